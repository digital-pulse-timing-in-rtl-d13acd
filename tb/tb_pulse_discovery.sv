// tb_pulse_discovery: self-checking test of reference-pulse discovery.
//
// Feeds random events (first sample, following samples with gaps in
// `s_valid`, then the event's area and sub-sample offset) in both modes:
// unaligned (`align` low) and aligned (`align` high). A model here keeps
// its own bins: scale = ref_area * 2**SF / area, value = min(sample * scale
// / 2**SF, 2**YW - 1), bin = (k * 2**FW + offset) / 2**(FW-BB). Extra
// events sent while the block is busy, or without captured samples, must be
// dropped. At the end every bin is read back and its count, sum and average
// compared, and the read-out latency of SUM_W+6 clocks is checked.
module tb_pulse_discovery;
  localparam int unsigned SW = 12, WIN = 16, AW = 16, DW = 12, FW = 8, BB = 3, SF = 12;
  localparam int unsigned NB = (2 ** BB) * (WIN + 2 ** (DW - FW));
  localparam int unsigned SUM_W = 32, NCW = 16, YW = 16;
  localparam int unsigned BW = $clog2(NB);

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             align = 1'b0;
  logic [AW-1:0]    ref_area = 16'd20000;
  logic             s_valid = 1'b0;
  logic [SW-1:0]    s_data = '0;
  logic             trig = 1'b0;
  logic [SW-1:0]    first_sample = '0;
  logic             ev_valid = 1'b0;
  logic [AW-1:0]    ev_area = '0;
  logic [DW-1:0]    ev_offset = '0;
  logic             clear = 1'b0, rd_req = 1'b0;
  logic [BW-1:0]    rd_bin = '0;
  logic             rd_valid, busy, dropped;
  logic [NCW-1:0]   rd_count;
  logic [SUM_W-1:0] rd_sum;
  logic [YW-1:0]    rd_avg;
  logic [31:0]      pulses;

  pulse_discovery #(.SW(SW), .WIN(WIN), .AW(AW), .DW(DW), .FW(FW), .BB(BB), .SF(SF),
                    .NB(NB), .SUM_W(SUM_W), .NCW(NCW), .YW(YW), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_drop = 0, n_exp_drop = 0, n_acc = 0;
  longint unsigned m_sum [NB];
  int unsigned     m_cnt [NB];

  always @(posedge clk) if (rst_n && dropped) n_drop++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic send_event(input bit with_samples);
    int unsigned smp [WIN];
    int unsigned n, area, off;
    longint unsigned scale;
    area = 0;
    foreach (smp[i]) begin
      smp[i] = $urandom_range(0, 4095);
      area += smp[i];
    end
    if ($urandom_range(0, 9) == 0) area = $urandom_range(1, 200);  // tiny area: clipping
    off = $urandom_range(0, 2**DW - 1);
    if (with_samples) begin
      @(negedge clk);
      trig = 1'b1;
      first_sample = SW'(smp[0]);
      n = 1;
      while (n < WIN) begin
        s_valid = ($urandom_range(0, 3) != 0);
        s_data = SW'(smp[n]);
        if (s_valid) n++;
        @(negedge clk);
        trig = 1'b0;
        first_sample = SW'($urandom);
      end
      s_valid = 1'b0;
    end
    @(negedge clk);
    ev_valid = 1'b1;
    ev_area = AW'(area);
    ev_offset = DW'(off);
    @(negedge clk);
    ev_valid = 1'b0;
    if (!with_samples) begin
      n_exp_drop++;
      return;
    end
    scale = (longint'(ref_area) << SF) / longint'(area);
    for (int k = 0; k < WIN; k++) begin
      longint unsigned y;
      int unsigned bin;
      y = (longint'(smp[k]) * scale) >> SF;
      if (y > 2**YW - 1) y = 2**YW - 1;
      bin = (k * 2**FW + (align ? off : 2**(FW - 1))) >> (FW - BB);
      m_sum[bin] += y;
      m_cnt[bin]++;
    end
    n_acc++;
    // an event while busy is dropped
    if ($urandom_range(0, 3) == 0) begin
      ev_valid = 1'b1;
      @(negedge clk);
      ev_valid = 1'b0;
      n_exp_drop++;
    end
    while (busy) @(negedge clk);
  endtask

  initial begin
    foreach (m_sum[i]) begin
      m_sum[i] = 0;
      m_cnt[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (busy) @(negedge clk);  // clearing after reset
    for (int e = 0; e < 300; e++) begin
      align = (e >= 150);
      send_event(e % 25 != 24);
    end
    repeat (2) @(negedge clk);
    check(pulses == 32'(n_acc), "pulse count");
    check(n_drop == n_exp_drop, $sformatf("dropped %0d expected %0d", n_drop, n_exp_drop));
    check(n_exp_drop > 0, "drops exercised");
    for (int b = 0; b < NB; b++) begin
      int lat;
      longint unsigned exp_avg;
      @(negedge clk);
      rd_req = 1'b1;
      rd_bin = BW'(b);
      @(negedge clk);
      rd_req = 1'b0;
      lat = 1;
      while (!rd_valid && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      exp_avg = (m_cnt[b] == 0) ? 64'hffff_ffff : m_sum[b] / longint'(m_cnt[b]);
      if (exp_avg > 2**YW - 1) exp_avg = 2**YW - 1;
      check(lat == SUM_W + 6, $sformatf("read-out latency %0d", lat));
      check(rd_count == NCW'(m_cnt[b]), $sformatf("count bin %0d", b));
      check(rd_sum == SUM_W'(m_sum[b]), $sformatf("sum bin %0d", b));
      check(rd_avg == YW'(exp_avg), $sformatf("avg bin %0d", b));
    end
    // clear empties every bin
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    while (busy) @(negedge clk);
    for (int b = 0; b < NB; b += 37) begin
      @(negedge clk);
      rd_req = 1'b1;
      rd_bin = BW'(b);
      @(negedge clk);
      rd_req = 1'b0;
      while (!rd_valid) @(negedge clk);
      check(rd_count == '0 && rd_sum == '0, "cleared bin");
    end
    $display("accumulated=%0d dropped=%0d", n_acc, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
