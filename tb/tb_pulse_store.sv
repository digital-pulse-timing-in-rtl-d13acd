// tb_pulse_store: self-checking test of the raw pulse store and replay.
//
// Captures events (a trigger with the first sample, then WIN-1 samples with
// random gaps in `s_valid`, one sample possibly arriving with the trigger)
// until the store is full, and checks that a further trigger is ignored.
// Replay is then run with `sink_ready` withheld for random times; the
// played stream must contain, slot by slot and in order, at least GAP zero
// samples followed by exactly the WIN stored samples (all stored samples
// are non-zero so the framing can be seen). `replay_done` must pulse once,
// and `clear_store` must empty the store.
module tb_pulse_store;
  localparam int unsigned SW = 12, WIN = 16, NP = 12, GAP = 2;
  localparam int unsigned CW = $clog2(NP + 1);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          capture_en = 1'b0, clear_store = 1'b0;
  logic          trig = 1'b0;
  logic [SW-1:0] first_sample = '0;
  logic          s_valid = 1'b0;
  logic [SW-1:0] s_data = '0;
  logic [CW-1:0] count;
  logic          full;
  logic          replay_start = 1'b0, sink_ready = 1'b0;
  logic          replaying, replay_done, rp_valid;
  logic [SW-1:0] rp_data;

  pulse_store #(.SW(SW), .WIN(WIN), .NP(NP), .GAP(GAP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned stored [NP][WIN];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic capture_event(input int slot);
    int unsigned smp [WIN];
    int n;
    foreach (smp[i]) smp[i] = $urandom_range(1, 4095);
    @(negedge clk);
    trig = 1'b1;
    first_sample = SW'(smp[0]);
    n = 1;
    while (n < WIN) begin
      s_valid = ($urandom_range(0, 2) != 0);
      s_data = SW'(smp[n]);
      if (s_valid) n++;
      @(negedge clk);
      trig = 1'b0;
    end
    s_valid = 1'b0;
    if (slot >= 0) foreach (smp[i]) stored[slot][i] = smp[i];
    repeat (3) @(negedge clk);
  endtask

  // replay monitor
  int zeros = 0, grp = 0, pos = 0, n_done = 0, ready_run = 0;
  bit grp_open = 1'b0;
  always @(posedge clk) begin
    if (rst_n && rp_valid) begin
      if (rp_data == '0) begin
        if (grp_open) begin
          check(pos == WIN, $sformatf("slot %0d length %0d", grp, pos));
          grp_open = 1'b0;
          grp++;
          zeros = 0;
        end
        zeros++;
      end else begin
        if (!grp_open) begin
          check(zeros >= GAP, "gap before slot");
          grp_open = 1'b1;
          pos = 0;
        end
        if (grp < NP && pos < WIN)
          check(int'(rp_data) == stored[grp][pos], $sformatf("slot %0d sample %0d", grp, pos));
        pos++;
      end
    end
    if (rst_n && replay_done) n_done++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    capture_en = 1'b1;
    for (int e = 0; e < NP; e++) capture_event(e);
    check(full && count == CW'(NP), "store full");
    capture_event(-1);  // ignored
    check(count == CW'(NP), "no capture when full");
    capture_en = 1'b0;
    @(negedge clk);
    replay_start = 1'b1;
    @(negedge clk);
    replay_start = 1'b0;
    check(replaying, "replaying");
    while (replaying) begin
      sink_ready = ($urandom_range(0, 9) > 6);
      @(negedge clk);
    end
    sink_ready = 1'b0;
    repeat (3) @(negedge clk);
    if (grp_open) begin
      check(pos == WIN, "last slot length");
      grp++;
    end
    check(grp == NP, $sformatf("slots played %0d", grp));
    check(n_done == 1, "replay_done once");
    // clear empties the store
    clear_store = 1'b1;
    @(negedge clk);
    clear_store = 1'b0;
    check(count == '0 && !full, "cleared");
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
