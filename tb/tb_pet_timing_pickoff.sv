// tb_pet_timing_pickoff: end-to-end test of the timing pick-off at its
// default sizes.
//
// Pulse model: a scintillation pulse A*(exp(-t/tauF) - exp(-t/tauR)) with
// tauR = 0.31 ns and tauF = 34.5 ns, passed through a first-order RC
// low-pass with a 16.7 MHz cutoff, and sampled every 10 ns (100 MS/s) by a
// 12-bit ADC with rounding. Each pulse starts at a random time within the
// sampling period and has a random amplitude.
//
// Set-up: the reference pulse is the same shape with a peak of REF_PEAK
// counts. Entry v of the lookup table is the time, in 1/256 sample period,
// at which the reference pulse first reaches v counts (found by bisection on
// its rising edge; entries above the peak hold the peak time). ref_area is
// the reference pulse's window sum from its first sample above threshold,
// averaged over start phases. Both are computed here and loaded through the
// configuration ports.
//
// Checks:
//  * every time stamp, its rise time, normalized voltage and saturation
//    flag equal those of an integer model of the chain run on the same
//    sample stream, including which pulses fall into the dead time;
//  * each time stamp appears 37 clocks after its first sample;
//  * for isolated, noise-free pulses the time stamp lies within MAX_ERR_NS
//    of the true start time (mean and RMS error are printed);
//  * each mechanism happened: table load, trigger, a pulse lost in the dead
//    time, a saturated normalization (forced by single-sample spikes),
//    a discovery event dropped while discovery was busy;
//  * reference-pulse discovery, run unaligned and then (after a clear)
//    aligned on isolated pulses, rebuilds the reference pulse: every bin
//    with at least 3 entries lies within MAX_SHAPE_ERR of the true shape
//    at the bin's centre;
//  * closed loop: with a rough straight-line table loaded, CL_PULSES fresh
//    isolated pulses are timed and the first of them captured into the
//    pulse store until it is full; the store is replayed into unaligned
//    discovery and a table is built from the result, then CL_ALIGNED times
//    replayed into aligned discovery and the table rebuilt. Fresh pulses
//    timed with the built table must show a spread (RMS about the mean, the
//    mean being a fixed offset of the built time origin) below
//    MAX_CL_SPREAD_NS and below MIN_CL_GAIN times the straight-line table's,
//    and each replay must add one discovery event per stored pulse.
module tb_pet_timing_pickoff;
  import pet_timing_pkg::*;

  localparam real TS_NS      = 10.0;
  localparam real TAU_R      = 0.31;
  localparam real TAU_F      = 34.5;
  localparam real TAU_C      = 1.0e3 / (2.0 * 3.14159265358979 * 16.7);
  localparam int  REF_PEAK   = 3000;
  localparam int  THRESH     = 100;
  localparam int  N_SAMPLES  = 60000;
  localparam int  LATENCY    = AREA_WINDOW + AREA_W + 5;
  localparam real MAX_ERR_NS = 1.0;
  // stream phases: discovery off, then unaligned, then (after a clear)
  // aligned on isolated pulses only
  localparam int  DISC_ON    = 30000;
  localparam int  N_CLEAN    = 39700;
  localparam int  CLEAR_AT   = 39750;
  localparam int  BINS       = 256;
  localparam int  BINS_PER_SAMPLE = 8;
  localparam real MAX_SHAPE_ERR = 0.06;  // of REF_PEAK
  localparam int  CL_PULSES  = 300;
  localparam int  CL_FRAME   = 120;
  localparam int  CL_ALIGNED = 3;        // aligned replay-and-build passes
  localparam real MAX_CL_SPREAD_NS = 0.8;
  localparam real MIN_CL_GAIN = 0.6;      // built spread / straight-line spread

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
  int n_lut = 0, n_trig = 0, n_missed = 0, n_sat = 0, n_acc = 0;
  int n_disc_drop = 0, n_bins_cmp = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---- closed-loop timing monitor ----------------------------------------
  // Each queued entry is (first sample index - true start) in ns for one
  // driven pulse; each time stamp pops one and compares its rise time.
  int  cl_phase = 0;  // 0: not measuring, 1: rough table, 2: built table
  real cl_off [$];
  real cl_sum [3] = '{0.0, 0.0, 0.0};
  real cl_sq  [3] = '{0.0, 0.0, 0.0};
  int  cl_n   [3] = '{0, 0, 0};

  always @(posedge clk) if (cl_phase != 0 && ts_valid) begin
    real err;
    check(cl_off.size() != 0, "closed loop: unexpected time stamp");
    check(((timestamp + TS_W'(rise_time)) & TS_W'(2**FRAC_W - 1)) == '0,
          "closed loop: time stamp fine part");
    if (cl_off.size() != 0) begin
      err = cl_off.pop_front() - real'(rise_time) / (2.0 ** FRAC_W) * TS_NS;
      cl_sum[cl_phase] += err;
      cl_sq[cl_phase] += err * err;
      cl_n[cl_phase]++;
    end
  end

  // ---- pulse shape -------------------------------------------------------
  function automatic real g(input real t, input real tau);
    return tau / (tau - TAU_C) * ($exp(-t / tau) - $exp(-t / TAU_C));
  endfunction

  function automatic real raw_shape(input real t);
    if (t <= 0.0) return 0.0;
    return g(t, TAU_F) - g(t, TAU_R);
  endfunction

  real t_peak, shape_peak;

  function automatic real shape(input real t);  // unit peak
    return raw_shape(t) / shape_peak;
  endfunction

  // ---- stimulus and model data -------------------------------------------
  int            samp   [N_SAMPLES];
  real           t_true [N_SAMPLES];  // start time of a pulse whose first sample is here
  bit            clean  [N_SAMPLES];  // isolated, regular pulse starts near here
  int unsigned   lut    [2**ADDR_W];

  // expected results in order
  int            exp_idx [$];
  longint        exp_ts  [$];
  int            exp_norm[$];
  bit            exp_sat [$];
  int            exp_missed;

  // Drive n isolated pulses, one per CL_FRAME samples, queueing each one's
  // offset between its first sample and its true start.
  task automatic drive_pulses(input int n);
    int frame [CL_FRAME];
    for (int p = 0; p < n; p++) begin
      real amp, t0;
      int jf;
      amp = $urandom_range(600, 4000);
      t0 = (20 + $urandom_range(0, 999) / 1000.0) * TS_NS;
      jf = -1;
      for (int k = 0; k < CL_FRAME; k++) begin
        real v;
        v = amp * shape(k * TS_NS - t0);
        frame[k] = (v > 0.0) ? int'(v + 0.5) : 0;
        if (frame[k] > 4095) frame[k] = 4095;
        if (jf < 0 && frame[k] >= THRESH) jf = k;
      end
      cl_off.push_back(jf * TS_NS - t0);
      for (int k = 0; k < CL_FRAME; k++) begin
        @(negedge clk);
        adc_valid = 1'b1;
        adc_data = SAMPLE_W'(frame[k]);
      end
    end
    @(negedge clk);
    adc_valid = 1'b0;
    adc_data = '0;
    repeat (LATENCY + 5) @(negedge clk);
  endtask

  task automatic wait_for(ref logic sig, input int limit, input string what);
    int n;
    n = 0;
    while (!sig && n < limit) begin
      @(negedge clk);
      n++;
    end
    check(sig == 1'b1, what);
    $display("%s after %0d clocks", what, n);
  endtask

  // One replay of the store into discovery, then one table build.
  task automatic replay_and_build(input bit align);
    int unsigned ev_before;
    @(negedge clk);
    disc_clear = 1'b1;
    @(negedge clk);
    disc_clear = 1'b0;
    disc_align = align;
    disc_enable = 1'b1;
    repeat (BINS + 5) @(negedge clk);
    ev_before = disc_pulses;
    replay_start = 1'b1;
    @(negedge clk);
    replay_start = 1'b0;
    check(replaying, "replay started");
    wait_for(replay_done, 200000, "replay finished");
    repeat (LATENCY + 100) @(negedge clk);
    check(!disc_busy && !replaying, "discovery idle after replay");
    check(disc_pulses - ev_before == 32'(store_count),
          $sformatf("replay (align=%0d): %0d events for %0d stored pulses",
                    align, disc_pulses - ev_before, store_count));
    disc_enable = 1'b0;
    build_start = 1'b1;
    @(negedge clk);
    build_start = 1'b0;
    check(build_busy, "build started");
    wait_for(build_done, 200000, "build finished");
    @(negedge clk);
    check(!build_busy, "build idle");
  endtask

  task automatic closed_loop();
    real spread [3];
    int peak_code;
    // rough table: a straight line from 0 to the peak time
    peak_code = int'(t_peak / TS_NS * (2.0 ** FRAC_W) + 0.5);
    for (int v = 0; v < 2**ADDR_W; v++) begin
      @(negedge clk);
      lut_we = 1'b1;
      lut_waddr = ADDR_W'(v);
      lut_wdata = (v >= REF_PEAK) ? TIME_W'(peak_code) : TIME_W'(v * peak_code / REF_PEAK);
    end
    @(negedge clk);
    lut_we = 1'b0;
    store_clear = 1'b1;
    @(negedge clk);
    store_clear = 1'b0;
    check(store_count == '0, "store cleared");
    // time fresh pulses with the rough table while filling the store
    cl_phase = 1;
    store_capture = 1'b1;
    drive_pulses(CL_PULSES);
    store_capture = 1'b0;
    cl_phase = 0;
    check(store_full, "pulse store full");
    check(cl_off.size() == 0, "closed loop: every pulse stamped (rough table)");
    // unaligned, then aligned discovery from the stored pulses
    replay_and_build(1'b0);
    repeat (CL_ALIGNED) replay_and_build(1'b1);
    // time fresh pulses with the built table
    cl_phase = 2;
    drive_pulses(CL_PULSES);
    cl_phase = 0;
    check(cl_off.size() == 0, "closed loop: every pulse stamped (built table)");
    for (int ph = 1; ph <= 2; ph++) begin
      real m;
      m = (cl_n[ph] > 0) ? cl_sum[ph] / cl_n[ph] : 0.0;
      spread[ph] = (cl_n[ph] > 0) ? $sqrt(cl_sq[ph] / cl_n[ph] - m * m) : 0.0;
      $display("closed loop, %s table: %0d pulses, mean offset %0.3f ns, spread %0.3f ns",
               (ph == 1) ? "straight-line" : "built", cl_n[ph], m, spread[ph]);
    end
    check(cl_n[2] == CL_PULSES, "closed loop: pulses timed with the built table");
    check(spread[2] < MAX_CL_SPREAD_NS, "closed loop: spread with the built table");
    check(spread[2] < MIN_CL_GAIN * spread[1], "closed loop: built table beats the straight line");
  endtask

  initial begin
    real acc_ref, err_sum, err_sq;
    int n_err;
    // peak of the shape
    t_peak = 0.0;
    shape_peak = 0.0;
    for (int i = 1; i < 20000; i++) begin
      real t;
      t = i * 0.01;
      if (raw_shape(t) > shape_peak) begin
        shape_peak = raw_shape(t);
        t_peak = t;
      end
    end
    // lookup table: time for the reference pulse to reach v counts
    for (int v = 0; v < 2**ADDR_W; v++) begin
      real lo, hi, tv;
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
      lut[v] = int'(tv / TS_NS * (2.0 ** FRAC_W) + 0.5);
      if (lut[v] > 2**TIME_W - 1) lut[v] = 2**TIME_W - 1;
    end
    // reference area: window sum from the first sample above threshold
    acc_ref = 0.0;
    for (int p = 0; p < 64; p++) begin
      real ph;  // first sample ph after start
      int s, sum, k0;
      ph = (p + 0.5) / 64.0 * TS_NS;
      k0 = -1;
      for (int k = 0; k < 10 && k0 < 0; k++) begin
        s = int'(REF_PEAK * shape(ph + k * TS_NS) + 0.5);
        if (s >= THRESH) k0 = k;
      end
      sum = 0;
      for (int k = 0; k < AREA_WINDOW; k++)
        sum += int'(REF_PEAK * shape(ph + (k0 + k) * TS_NS) + 0.5);
      acc_ref += sum;
    end
    ref_area = AREA_W'(int'(acc_ref / 64.0 + 0.5));

    // sample stream: regular pulses, some close pairs, some spikes
    foreach (samp[i]) begin
      samp[i] = 0;
      t_true[i] = -1.0;
      clean[i] = 1'b0;
    end
    begin
      int pos, np;
      pos = 20;
      np = 0;
      while (pos < N_SAMPLES - 200) begin
        int kind;
        kind = (pos >= N_CLEAN) ? 0 : np % 10;
        if (kind == 7) begin
          samp[pos] = $urandom_range(400, 4000);  // one-sample spike
          pos += 60;
        end else begin
          real amp, t0;
          int last;
          amp = $urandom_range(600, 4000);
          t0 = (pos + $urandom_range(0, 999) / 1000.0) * TS_NS;
          last = pos + 400;
          if (last > N_SAMPLES) last = N_SAMPLES;
          for (int k = pos; k < last; k++) begin
            real v;
            v = amp * shape(k * TS_NS - t0);
            if (v > 0.0) samp[k] += int'(v + 0.5);
            if (samp[k] > 4095) samp[k] = 4095;
          end
          // a second pulse follows soon after in every fifth regular pulse
          if (kind == 3) pos += $urandom_range(5, 30);
          else begin
            clean[pos] = (kind != 2 && kind != 8 && kind != 4);
            t_true[pos] = t0;
            pos += (kind == 2) ? 45 : 120;
          end
        end
        np++;
      end
    end

    // integer model of the chain
    exp_missed = 0;
    begin
      int next_arm;
      next_arm = 0;
      for (int j = 1; j < N_SAMPLES - AREA_WINDOW; j++) begin
        bit edge_now;
        edge_now = (samp[j-1] < THRESH) && (samp[j] >= THRESH);
        if (edge_now && j >= next_arm) begin
          longint q;
          int area;
          bit sat;
          area = 0;
          for (int k = 0; k < AREA_WINDOW; k++) area += samp[j+k];
          q = longint'(samp[j]) * longint'(ref_area) / longint'(area);
          sat = (q > 2**ADDR_W - 1);
          if (sat) q = 2**ADDR_W - 1;
          exp_idx.push_back(j);
          exp_norm.push_back(int'(q));
          exp_sat.push_back(sat);
          exp_ts.push_back((longint'(j) * 2**FRAC_W - longint'(lut[int'(q)])) & ((64'd1 << TS_W) - 1));
          next_arm = j + LATENCY;
        end else if (edge_now) exp_missed++;
      end
    end
    $display("ref_area=%0d t_peak=%0.2f ns expected events=%0d missed=%0d",
             ref_area, t_peak, exp_idx.size(), exp_missed);

    // load the table
    for (int v = 0; v < 2**ADDR_W; v++) begin
      @(negedge clk);
      lut_we = 1'b1;
      lut_waddr = ADDR_W'(v);
      lut_wdata = TIME_W'(lut[v]);
      n_lut++;
    end
    @(negedge clk);
    lut_we = 1'b0;
    rst_n = 1'b1;
    @(negedge clk);

    // run the stream; results are checked at each negedge before driving
    err_sum = 0.0;
    err_sq = 0.0;
    n_err = 0;
    for (int k = 0; k < N_SAMPLES + LATENCY + 5; k++) begin
      if (pulse_missed) n_missed++;
      if (disc_dropped) n_disc_drop++;
      if (ts_valid) begin
        int j;
        n_trig++;
        if (exp_idx.size() == 0) check(1'b0, "unexpected time stamp");
        else begin
          j = exp_idx.pop_front();
          // Sample k-1 is on the input in this clock.
          check(k - 1 == j + LATENCY, $sformatf("latency: sample %0d stamp at %0d", j, k));
          check(timestamp == TS_W'(exp_ts.pop_front()), "timestamp");
          check(int'(norm_voltage) == exp_norm.pop_front(), "normalized voltage");
          check(norm_saturated == exp_sat.pop_front(), "saturation flag");
          check(rise_time == TIME_W'(lut[norm_voltage]), "rise time");
          if (norm_saturated) n_sat++;
          // accuracy against the true start for isolated pulses
          for (int d = -2; d <= 2; d++)
            if (j + d >= 0 && j + d < N_SAMPLES && clean[j+d]) begin
              real err;
              err = real'(timestamp) / (2.0 ** FRAC_W) * TS_NS - t_true[j+d];
              err_sum += err;
              err_sq += err * err;
              n_err++;
              check(err < MAX_ERR_NS && err > -MAX_ERR_NS,
                    $sformatf("accuracy: error %0.3f ns", err));
              n_acc++;
            end
        end
      end
      @(negedge clk);
      disc_enable = (k >= DISC_ON);
      disc_clear = (k >= CLEAR_AT && k < CLEAR_AT + 100);
      disc_align = (k >= CLEAR_AT);
      adc_valid = (k < N_SAMPLES);
      adc_data = (k < N_SAMPLES) ? SAMPLE_W'(samp[k]) : '0;
    end
    // composite reference pulse from the aligned pass
    begin
      real max_err;
      int unsigned aligned_pulses;
      max_err = 0.0;
      aligned_pulses = disc_pulses;
      for (int b = 0; b < BINS; b++) begin
        real tc, expv, e;
        @(negedge clk);
        disc_rd_req = 1'b1;
        disc_rd_bin = 8'(b);
        @(negedge clk);
        disc_rd_req = 1'b0;
        while (!disc_rd_valid) @(negedge clk);
        if (disc_rd_count >= 3) begin
          tc = (b + 0.5) * TS_NS / BINS_PER_SAMPLE;
          expv = REF_PEAK * shape(tc);
          e = (real'(disc_rd_avg) - expv) / REF_PEAK;
          if (e < 0.0) e = -e;
          if (e > max_err) max_err = e;
          check(e < MAX_SHAPE_ERR, $sformatf("composite pulse bin %0d: %0d vs %0.1f",
                                             b, disc_rd_avg, expv));
          n_bins_cmp++;
        end
      end
      $display("discovery: %0d pulses accumulated in both passes, %0d dropped, %0d bins compared, max error %0.2f%% of peak",
               aligned_pulses, n_disc_drop, n_bins_cmp, 100.0 * max_err);
    end
    check(n_bins_cmp > 50, "composite pulse compared");
    check(n_disc_drop > 0, "discovery dropped an event");
    check(exp_idx.size() == 0, "all expected time stamps seen");
    check(n_missed == exp_missed, "dead-time losses as modelled");
    check(n_lut > 0, "table loaded");
    check(n_trig > 0, "time stamps produced");
    check(n_missed > 0, "a pulse lost in the dead time");
    check(n_sat > 0, "a saturated normalization");
    check(n_acc > 0, "accuracy measured");
    closed_loop();
    if (n_err > 0)
      $display("timing error over %0d clean pulses: mean %0.3f ns, rms %0.3f ns",
               n_err, err_sum / n_err, $sqrt(err_sq / n_err));
    $display("lut writes=%0d stamps=%0d missed=%0d saturated=%0d",
             n_lut, n_trig, n_missed, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_SAMPLES + 2**ADDR_W + BINS * 50 + 1000 + 1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
