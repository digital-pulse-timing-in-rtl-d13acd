// tb_area_to_amplitude: self-checking test of the pulse-area summer.
//
// Starts the block on random first samples and feeds random samples with
// random gaps in `s_valid`. The expected area is the first sample plus the
// next WIN-1 valid samples, counted here independently. With `s_valid`
// held high the result must appear exactly WIN-1 clocks after `start`.
module tb_area_to_amplitude;
  localparam int unsigned SW  = 12;
  localparam int unsigned WIN = 16;
  localparam int unsigned AW  = SW + $clog2(WIN);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic [SW-1:0] start_sample = '0;
  logic          s_valid = 1'b0;
  logic [SW-1:0] s_data = '0;
  logic          busy, area_valid;
  logic [AW-1:0] area;

  int checks = 0, failures = 0;

  area_to_amplitude #(.SW(SW), .WIN(WIN), .AW(AW)) dut (.*);

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
    for (int p = 0; p < 400; p++) begin
      int unsigned sum, n, lat;
      bit gaps;
      gaps = (p % 2 == 1);
      @(negedge clk);
      start = 1'b1;
      start_sample = SW'($urandom_range(0, 4095));
      sum = int'(start_sample);
      n = 1;
      lat = 0;
      s_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
      s_data = SW'($urandom_range(0, 4095));
      forever begin
        if (s_valid && n < WIN) begin
          sum += int'(s_data);
          n++;
        end
        @(posedge clk);
        #1;
        lat++;
        check(!(area_valid && n < WIN), "area_valid early");
        if (area_valid) break;
        @(negedge clk);
        start = 1'b0;
        s_valid = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
        s_data = SW'($urandom_range(0, 4095));
        check(busy, "busy while summing");
      end
      check(area == AW'(sum), "area value");
      if (!gaps) check(lat == WIN - 1, "latency WIN-1");
      @(negedge clk);
      start = 1'b0;
      s_valid = 1'b0;
      check(!busy, "idle after result");
      repeat ($urandom_range(0, 3)) @(posedge clk);
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
