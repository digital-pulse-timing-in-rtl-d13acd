// tb_table1_workloads: runs the timing pick-off over the grid of ADC
// sampling rates (70, 140, 300, 500, 1000 MS/s) and RC low-pass cutoffs
// (33.3, 16.7, 10 MHz) for which timing resolution is usually tabulated.
//
// For each case the pulse model (A*(exp(-t/tauF) - exp(-t/tauR)) with
// tauR = 0.31 ns, tauF = 34.5 ns, through a first-order RC low-pass) is
// sampled at that rate with 12-bit rounding and no noise, the lookup table
// and reference area are recomputed and loaded, and N_PULSES isolated
// pulses with random amplitude and random start phase are timed. The design
// takes one sample per clock whatever the rate; a clock above 100 MHz is
// simulated here even though it is beyond the intended 100 MHz.
//
// Printed per case: RMS and peak error of the time stamps against the
// true start times, and 2.355*RMS as a Gaussian FWHM estimate. Because the
// pulses carry no noise, these show the algorithm's systematic limits
// (normalization and table quantization), not a detector's resolution.
// Checks: every pulse gets exactly one time stamp, and the RMS error stays
// below a quarter of the sampling period (sub-sample timing).
module tb_table1_workloads;
  import pet_timing_pkg::*;

  localparam real TAU_R    = 0.31;
  localparam real TAU_F    = 34.5;
  localparam int  REF_PEAK = 3000;
  localparam int  THRESH   = 100;
  localparam int  N_PULSES = 150;
  localparam real PI       = 3.14159265358979;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 adc_valid = 1'b0;
  logic [SAMPLE_W-1:0]  adc_data = '0;
  logic [SAMPLE_W-1:0]  threshold = SAMPLE_W'(THRESH);
  logic [AREA_W-1:0]    ref_area = '0;
  logic                 lut_we = 1'b0;
  logic [ADDR_W-1:0]    lut_waddr = '0;
  logic [TIME_W-1:0]    lut_wdata = '0;
  logic                 ts_valid, norm_saturated, pulse_missed, busy;
  logic [TS_W-1:0]      timestamp;
  logic [TIME_W-1:0]    rise_time;
  logic [ADDR_W-1:0]    norm_voltage;
  logic [AREA_W-1:0]    pulse_area;
  logic                 disc_enable = 1'b0, disc_align = 1'b0, disc_clear = 1'b0;
  logic                 disc_rd_req = 1'b0;
  logic [7:0]           disc_rd_bin = '0;
  logic                 disc_rd_valid, disc_busy, disc_dropped;
  logic [15:0]          disc_rd_count, disc_rd_avg;
  logic [31:0]          disc_rd_sum, disc_pulses;
  logic                 store_capture = 1'b0, store_clear = 1'b0;
  logic                 replay_start = 1'b0, build_start = 1'b0;
  logic [8:0]           store_count;
  logic                 store_full, replaying, replay_done, build_busy, build_done;

  pet_timing_pickoff dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  real tau_c, ts_ns, shape_peak, t_peak;

  function automatic real g(input real t, input real tau);
    return tau / (tau - tau_c) * ($exp(-t / tau) - $exp(-t / tau_c));
  endfunction

  function automatic real shape(input real t);  // unit peak once shape_peak is set
    if (t <= 0.0) return 0.0;
    return (g(t, TAU_F) - g(t, TAU_R)) / shape_peak;
  endfunction

  // ts counter value of the sample being presented
  longint unsigned sample_no;

  task automatic run_case(input real rate_mhz, input real cutoff_mhz);
    real acc_ref, err, err_sq, err_max, t0;
    int n_stamps, gap;
    ts_ns = 1.0e3 / rate_mhz;
    tau_c = 1.0e3 / (2.0 * PI * cutoff_mhz);
    shape_peak = 1.0;
    t_peak = 0.0;
    begin
      real best;
      best = 0.0;
      for (int i = 1; i < 20000; i++) begin
        real t;
        t = i * 0.01;
        if (shape(t) > best) begin
          best = shape(t);
          t_peak = t;
        end
      end
      shape_peak = best;
    end
    // table of the reference pulse's rising edge; no samples meanwhile, so
    // the design's sample counter stays equal to sample_no
    @(negedge clk);
    adc_valid = 1'b0;
    for (int v = 0; v < 2**ADDR_W; v++) begin
      real lo, hi, tv;
      int unsigned e;
      if (v >= REF_PEAK) tv = t_peak;
      else begin
        lo = 0.0;
        hi = t_peak;
        for (int k = 0; k < 40; k++) begin
          real mid;
          mid = 0.5 * (lo + hi);
          if (REF_PEAK * shape(mid) >= v) hi = mid; else lo = mid;
        end
        tv = hi;
      end
      e = int'(tv / ts_ns * (2.0 ** FRAC_W) + 0.5);
      if (e > 2**TIME_W - 1) e = 2**TIME_W - 1;
      @(negedge clk);
      lut_we = 1'b1;
      lut_waddr = ADDR_W'(v);
      lut_wdata = TIME_W'(e);
    end
    @(negedge clk);
    lut_we = 1'b0;
    // reference area averaged over start phases
    acc_ref = 0.0;
    for (int p = 0; p < 64; p++) begin
      real ph;
      int s, sum, k0;
      ph = (p + 0.5) / 64.0 * ts_ns;
      k0 = -1;
      for (int k = 0; k < 200 && k0 < 0; k++) begin
        s = int'(REF_PEAK * shape(ph + k * ts_ns) + 0.5);
        if (s >= THRESH) k0 = k;
      end
      sum = 0;
      for (int k = 0; k < AREA_WINDOW; k++)
        sum += int'(REF_PEAK * shape(ph + (k0 + k) * ts_ns) + 0.5);
      acc_ref += sum;
    end
    ref_area = AREA_W'(int'(acc_ref / 64.0 + 0.5));
    // pulses
    gap = int'(500.0 / ts_ns);
    if (gap < 120) gap = 120;
    err_sq = 0.0;
    err_max = 0.0;
    n_stamps = 0;
    for (int p = 0; p < N_PULSES; p++) begin
      real amp;
      int got;
      amp = $urandom_range(600, 4000);
      t0 = (real'(sample_no) + 10.0 + $urandom_range(0, 999) / 1000.0) * ts_ns;
      got = 0;
      for (int k = 0; k < gap; k++) begin
        real v;
        int s;
        if (ts_valid) begin
          got++;
          err = real'(timestamp) / (2.0 ** FRAC_W) * ts_ns - t0;
          err_sq += err * err;
          if (err > err_max) err_max = err;
          if (-err > err_max) err_max = -err;
        end
        v = amp * shape(real'(sample_no) * ts_ns - t0);
        s = int'(v + 0.5);
        if (s > 4095) s = 4095;
        @(negedge clk);
        adc_valid = 1'b1;
        adc_data = SAMPLE_W'(s);
        sample_no++;
      end
      check(got == 1, $sformatf("one time stamp per pulse (%0d)", got));
      n_stamps += got;
    end
    begin
      real rms;
      rms = (n_stamps > 0) ? $sqrt(err_sq / n_stamps) : 1.0e9;
      $display("ADC %6.1f MS/s  RC %4.1f MHz: %0d stamps, rms %0.3f ns, max %0.3f ns, 2.355*rms %0.3f ns (Ts %0.2f ns)",
               rate_mhz, cutoff_mhz, n_stamps, rms, err_max, 2.355 * rms, ts_ns);
      check(rms < 0.25 * ts_ns, "sub-sample RMS error");
    end
  endtask

  initial begin
    real rates[5];
    real cutoffs[3];
    rates = '{70.0, 140.0, 300.0, 500.0, 1000.0};
    cutoffs = '{33.3, 16.7, 10.0};
    sample_no = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (rates[r])
      foreach (cutoffs[c])
        run_case(rates[r], cutoffs[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
