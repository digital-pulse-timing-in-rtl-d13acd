// tb_leading_edge_disc: self-checking test of the leading-edge discriminator.
//
// Drives a random sample stream (with gaps in `s_valid`) made of quiet
// stretches and pulses that rise through the threshold, and toggles `arm`
// at random. A cycle-by-cycle model written here predicts `trig`,
// `first_sample`, `first_time` and `missed`, including the rule that a
// rising edge counts only after a below-threshold sample and the one-clock
// delay of `trig`.
module tb_leading_edge_disc;
  localparam int unsigned SW = 12;
  localparam int unsigned CW = 24;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          s_valid = 1'b0;
  logic [SW-1:0] s_data = '0;
  logic [SW-1:0] threshold = 12'd200;
  logic          arm = 1'b1;
  logic          trig, missed;
  logic [SW-1:0] first_sample;
  logic [CW-1:0] first_time;

  int checks = 0, failures = 0;
  int n_trig = 0, n_missed = 0;

  leading_edge_disc #(.SW(SW), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  // model state
  int unsigned m_count = 0;
  bit m_prev_below = 1'b0;
  bit exp_trig = 1'b0, exp_missed = 1'b0;
  int unsigned exp_first = 0, exp_time = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    int phase;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    phase = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit edge_now;
      // drive stimulus for this cycle
      @(negedge clk);
      s_valid = ($urandom_range(0, 9) != 0);
      phase = (phase + 1) % 23;
      if (phase < 8) s_data = SW'($urandom_range(0, 150));          // quiet
      else if (phase < 14) s_data = SW'($urandom_range(150, 4095)); // pulse
      else s_data = SW'($urandom_range(0, 400));                    // tail
      arm = ($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 999) == 0) threshold = SW'($urandom_range(50, 600));
      // model: outputs after the next edge
      edge_now = s_valid && m_prev_below && (s_data >= threshold);
      @(posedge clk);
      #1;
      check(trig == (edge_now && arm), "trig");
      check(missed == (edge_now && !arm), "missed");
      if (edge_now && arm) begin
        exp_first = int'(s_data);
        exp_time  = m_count;
        n_trig++;
      end
      if (edge_now && !arm) n_missed++;
      check(first_sample == SW'(exp_first), "first_sample");
      check(first_time == CW'(exp_time), "first_time");
      if (s_valid) begin
        m_count++;
        m_prev_below = (s_data < threshold);
      end
    end
    check(n_trig > 100, "enough triggers");
    check(n_missed > 20, "enough missed edges");
    $display("triggers=%0d missed=%0d", n_trig, n_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
