// tb_first_point_lookup: self-checking test of the time-stamp look-up.
//
// The reference pulse memory is modelled here as a one-clock-latency ROM
// whose entry is a fixed scramble of its address. For random normalized
// voltages and coarse times the expected time stamp is
// first_time * 2**FW - entry, modulo the time-stamp width; it must arrive
// exactly three clocks after `start`.
module tb_first_point_lookup;
  localparam int unsigned AW  = 12;
  localparam int unsigned DW  = 12;
  localparam int unsigned CW  = 24;
  localparam int unsigned FW  = 8;
  localparam int unsigned TSW = CW + FW;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start = 1'b0;
  logic [AW-1:0]  norm_v = '0;
  logic [CW-1:0]  first_time = '0;
  logic           busy, ts_valid;
  logic [AW-1:0]  mem_raddr;
  logic [DW-1:0]  mem_rdata;
  logic [TSW-1:0] timestamp;
  logic [DW-1:0]  rise_time;

  int checks = 0, failures = 0;

  first_point_lookup #(.AW(AW), .DW(DW), .CW(CW), .FW(FW), .TSW(TSW)) dut (.*);

  function automatic logic [DW-1:0] rom(input logic [AW-1:0] a);
    return DW'((int'(a) * 37 + 11) ^ 12'h5a3);
  endfunction

  always_ff @(posedge clk) mem_rdata <= rom(mem_raddr);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [TSW-1:0] exp_ts;
      logic [AW-1:0] v;
      int lat;
      v = AW'($urandom);
      @(negedge clk);
      start = 1'b1;
      norm_v = v;
      first_time = (i < 5) ? CW'(i) : CW'($urandom);  // small times wrap below zero
      exp_ts = {first_time, FW'(0)} - TSW'(rom(v));
      @(negedge clk);
      start = 1'b0;
      norm_v = AW'($urandom);
      first_time = CW'($urandom);
      lat = 1;
      while (!ts_valid && lat < 20) begin
        check(busy, "busy");
        @(negedge clk);
        lat++;
      end
      check(lat == 3, "latency 3");
      check(timestamp == exp_ts, "timestamp");
      check(rise_time == rom(v), "rise_time");
      @(negedge clk);
      check(!busy && !ts_valid, "idle");
    end
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
