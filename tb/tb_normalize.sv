// tb_normalize: self-checking test of amplitude normalization.
//
// Applies random first samples, areas (at least the first sample, as in the
// real chain) and reference areas, plus corner cases (zero area, a first
// sample larger than the area, results just below and above the table
// range). The expected value first_sample * ref_area / area, rounded down
// and clipped to 2**OW-1, is computed here with wide integer arithmetic.
// The result must arrive exactly AW+2 clocks after `start`.
module tb_normalize;
  localparam int unsigned SW = 12;
  localparam int unsigned AW = 16;
  localparam int unsigned OW = 12;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [SW-1:0] first_sample = '0;
  logic [AW-1:0] area = '0;
  logic [AW-1:0] ref_area = '0;
  logic          busy, done, saturated;
  logic [OW-1:0] norm_v;

  int checks = 0, failures = 0;
  int n_sat = 0;

  normalize #(.SW(SW), .AW(AW), .OW(OW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic run(input int unsigned f, input int unsigned a, input int unsigned r);
    longint unsigned q;
    bit exp_sat;
    int lat;
    if (a == 0) begin
      exp_sat = 1'b1;
      q = (1 << OW) - 1;
    end else begin
      q = (longint'(f) * longint'(r)) / longint'(a);
      exp_sat = (q > (1 << OW) - 1);
      if (exp_sat) q = (1 << OW) - 1;
    end
    if (exp_sat) n_sat++;
    @(negedge clk);
    first_sample = SW'(f);
    area = AW'(a);
    ref_area = AW'(r);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    first_sample = SW'($urandom);  // inputs need only hold for the start clock
    area = AW'($urandom);
    lat = 1;
    while (!done && lat < 100) begin
      check(busy, "busy");
      @(negedge clk);
      lat++;
    end
    check(lat == AW + 2, "latency AW+2");
    check(norm_v == OW'(q), $sformatf("value f=%0d a=%0d r=%0d got %0d exp %0d", f, a, r, norm_v, q));
    check(saturated == exp_sat, "saturated flag");
    @(negedge clk);
    check(!busy && !done, "idle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(0, 0, 1000);
    run(100, 50, 1000);         // first sample above area
    run(4095, 65535, 65535);
    run(4095, 4095, 4095);      // exactly 4095
    run(4095, 4094, 4095);      // just over
    run(1, 65535, 1);
    for (int i = 0; i < 2000; i++) begin
      int unsigned f, a, r;
      f = $urandom_range(0, 4095);
      a = $urandom_range(f, 65535);
      r = (i % 3 == 0) ? $urandom_range(0, 65535) : $urandom_range(a / 2, a * 2 > 65535 ? 65535 : a * 2);
      run(f, a, r);
    end
    check(n_sat > 10, "saturation exercised");
    $display("saturated=%0d", n_sat);
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
