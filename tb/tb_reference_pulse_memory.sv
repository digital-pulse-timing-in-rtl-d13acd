// tb_reference_pulse_memory: self-checking test of the lookup RAM.
//
// Fills every entry through the write port, then mixes random writes and
// reads in the same clocks while a shadow array kept here predicts each
// read. Reads return the addressed entry one clock after the address, and
// a read of the entry being written returns its old value.
module tb_reference_pulse_memory;
  localparam int unsigned AW = 12;
  localparam int unsigned DW = 12;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0;
  logic [DW-1:0] rdata;

  int checks = 0, failures = 0;
  logic [DW-1:0] shadow [2**AW];

  reference_pulse_memory #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    logic [DW-1:0] exp_data;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = AW'(a);
      wdata = DW'($urandom);
      shadow[a] = wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      raddr = AW'($urandom);
      we = ($urandom_range(0, 1) == 1);
      waddr = (i % 7 == 0) ? raddr : AW'($urandom);
      wdata = DW'($urandom);
      exp_data = shadow[raddr];
      if (we) shadow[waddr] = wdata;
      @(posedge clk);
      #1;
      check(rdata == exp_data, $sformatf("read %0h", raddr));
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
