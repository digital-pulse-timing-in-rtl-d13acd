// tb_table_builder: self-checking test of the table build.
//
// A bin memory modelled here answers read requests after a random delay.
// It holds a composite pulse that rises linearly from 0 at time 0 to
// PEAK at bin PEAK_BIN's centre and then falls, with some empty bins and
// one bin on the rise that dips below its predecessor (it must be skipped).
// On a linear rise, interpolation between bin centres is exact, so every
// entry v <= PEAK must equal v * t_peak / PEAK within the rounding of the
// bin averages and the truncation of the interpolation (two units); entries
// above PEAK must hold the peak time, within the same margin. The build is
// run twice; each run must write all 2**LAW entries once, and the table
// must never decrease.
module tb_table_builder;
  localparam int unsigned LAW = 12, DW = 12, FW = 8, BB = 3, NB = 256, BW = 8;
  localparam int unsigned YW = 16, NCW = 16;
  localparam int PEAK = 3000;
  localparam int PEAK_BIN = 60;
  localparam int HALF = 2 ** (FW - BB - 1);
  localparam int BINW = 2 ** (FW - BB);

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           start = 1'b0;
  logic           busy, done;
  logic           rd_req;
  logic [BW-1:0]  rd_bin;
  logic           rd_valid = 1'b0;
  logic [NCW-1:0] rd_count = '0;
  logic [YW-1:0]  rd_avg = '0;
  logic           lut_we;
  logic [LAW-1:0] lut_waddr;
  logic [DW-1:0]  lut_wdata;

  table_builder #(.LAW(LAW), .DW(DW), .FW(FW), .BB(BB), .NB(NB), .BW(BW), .YW(YW), .NCW(NCW))
    dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int avg [NB];
  int cnt [NB];
  int lut [2**LAW];
  int writes [2**LAW];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // bin memory model
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && rd_req) begin
        int b;
        b = int'(rd_bin);
        repeat ($urandom_range(1, 6)) @(posedge clk);
        #1;
        rd_valid = 1'b1;
        rd_count = NCW'(cnt[b]);
        rd_avg = YW'(avg[b]);
        @(posedge clk);
        #1;
        rd_valid = 1'b0;
      end
    end
  end

  always @(posedge clk) if (rst_n && lut_we) begin
    lut[lut_waddr] = int'(lut_wdata);
    writes[lut_waddr]++;
  end

  initial begin
    real t_peak;
    t_peak = PEAK_BIN * BINW + HALF;
    foreach (avg[b]) begin
      real tc;
      tc = b * BINW + HALF;
      cnt[b] = 5;
      if (b <= PEAK_BIN) avg[b] = int'(PEAK * tc / t_peak + 0.5);
      else avg[b] = PEAK - (b - PEAK_BIN) * 20;
      if (avg[b] < 0) avg[b] = 0;
    end
    cnt[7] = 0;   avg[7] = 65535;     // empty bin
    cnt[31] = 0;  avg[31] = 0;
    avg[20] = avg[19] - 5;            // dip on the rise: skipped
    foreach (writes[i]) writes[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      int lat;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (!done && lat < 200000) begin
        @(negedge clk);
        lat++;
      end
      check(done, "build finished");
      $display("build %0d took %0d clocks", pass, lat);
      check(!busy, "idle after build");
    end
    foreach (lut[v]) begin
      check(writes[v] == 2, $sformatf("entry %0d written %0d times", v, writes[v]));
      if (v <= PEAK) begin
        real exp_t;
        exp_t = v * t_peak / PEAK;
        check(lut[v] >= exp_t - 2.0 && lut[v] <= exp_t + 1.0,
              $sformatf("entry %0d = %0d, expected %0.1f", v, lut[v], exp_t));
      end else begin
        check(lut[v] >= int'(t_peak) - 2 && lut[v] <= int'(t_peak), $sformatf("entry %0d = %0d above peak", v, lut[v]));
      end
      if (v > 0) check(lut[v] >= lut[v-1], "monotonic");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
