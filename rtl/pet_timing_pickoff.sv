// pet_timing_pickoff: digital timing pick-off for PET detector pulses.
//
// Gives each detector pulse a start time much finer than the ADC sampling
// period, using only the first sample on the pulse's leading edge. That
// sample's value depends on two unknowns, the pulse amplitude and where in
// the sampling period the pulse began. The amplitude is removed by scaling
// the sample with the ratio of a reference pulse's area to the event's area;
// the remaining value, looked up in a table of the reference pulse's rising
// edge, gives the time from the pulse start to the sample.
//
//   adc -> leading_edge_disc --trig/first sample--> area_to_amplitude
//                                                      | area
//                                                      v
//                                                  normalize
//                                                      | normalized voltage
//                                                      v
//          reference_pulse_memory <------------ first_point_lookup -> time stamp
//                   ^                                  |
//                   |     samples, trigger, area ----> pulse_discovery
//                   |                                  | composite pulse
//                   +-------------------------------- table_builder
//
//   adc -> pulse_store (raw pulses) --replay--> chain input, instead of adc
//
// One pulse is processed at a time. The discriminator is armed only while
// every later stage is idle; a pulse starting in the dead time raises
// `pulse_missed`. With one sample per clock, a time stamp appears
// WIN + AW + 5 clocks after its first sample is presented (37 clocks,
// 370 ns at 100 MHz, with the default sizes); a new first sample is
// accepted from the clock in which the time stamp appears.
//
// With `disc_enable` high, every time stamp with its pulse's samples, area
// and rise time is also handed to pulse_discovery, which averages the
// normalized pulses into a composite reference pulse on a grid of 2**DBB
// bins per sample period (unshifted with `disc_align` low, shifted by each
// pulse's own sub-sample start with it high); the bins are read back
// through the `disc_rd_*` ports.
//
// Closing the loop on chip: with `store_capture` high, pulse_store keeps
// the WIN samples of each triggered ADC pulse until NP are held
// (`store_full`). `replay_start` plays them back through the timing chain
// and discovery in place of the ADC (the ADC input is ignored while
// `replaying`), pacing itself so that discovery drops none.
// `build_start` then turns the composite pulse into a new table:
// table_builder takes over the discovery read port and the table write
// port while `build_busy`, and pulses `build_done`. A typical sequence:
// clear discovery, replay unaligned, build; clear, replay aligned, build;
// repeating the aligned step refines the table further.
//
// Ports: one ADC sample per clock when `adc_valid` is high (unsigned,
// baseline removed, pulse positive); `threshold` and `ref_area` are
// configuration; `lut_*` loads the reference pulse memory. Outputs are the
// time stamp, in sample periods with FRAC_W fraction bits, the rise time
// read from the table and the normalized voltage used as address.
//
// The block structure follows the source's architecture figure; the
// discriminator, the single-pulse control, the widths and the handshakes
// are this implementation's choices.
module pet_timing_pickoff
  import pet_timing_pkg::*;
#(
  parameter int unsigned SW  = SAMPLE_W,
  parameter int unsigned WIN = AREA_WINDOW,
  parameter int unsigned AW  = SW + $clog2(WIN),
  parameter int unsigned LAW = SW,
  parameter int unsigned DW  = TIME_W,
  parameter int unsigned CW  = CNT_W,
  parameter int unsigned FW  = FRAC_W,
  parameter int unsigned DBB = 3,
  parameter int unsigned DNB = (2 ** DBB) * (WIN + 2 ** (DW - FW)),
  parameter int unsigned DBW = $clog2(DNB),
  parameter int unsigned NP  = 256,
  parameter int unsigned SCW = $clog2(NP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // ADC samples
  input  logic             adc_valid,
  input  logic [SW-1:0]    adc_data,
  // configuration
  input  logic [SW-1:0]    threshold,
  input  logic [AW-1:0]    ref_area,
  input  logic             lut_we,
  input  logic [LAW-1:0]   lut_waddr,
  input  logic [DW-1:0]    lut_wdata,
  // results
  output logic             ts_valid,
  output logic [CW+FW-1:0] timestamp,
  output logic [DW-1:0]    rise_time,
  output logic [LAW-1:0]   norm_voltage,
  output logic             norm_saturated,
  output logic [AW-1:0]    pulse_area,
  output logic             pulse_missed,
  output logic             busy,
  // reference-pulse discovery
  input  logic             disc_enable,
  input  logic             disc_align,
  input  logic             disc_clear,
  input  logic             disc_rd_req,
  input  logic [DBW-1:0]   disc_rd_bin,
  output logic             disc_rd_valid,
  output logic [15:0]      disc_rd_count,
  output logic [31:0]      disc_rd_sum,
  output logic [15:0]      disc_rd_avg,
  output logic             disc_busy,
  output logic             disc_dropped,
  output logic [31:0]      disc_pulses,
  // pulse store and replay
  input  logic             store_capture,
  input  logic             store_clear,
  output logic [SCW-1:0]   store_count,
  output logic             store_full,
  input  logic             replay_start,
  output logic             replaying,
  output logic             replay_done,
  // table build from the composite pulse
  input  logic             build_start,
  output logic             build_busy,
  output logic             build_done
);
  logic          trig;
  logic [SW-1:0] first_sample;
  logic [CW-1:0] first_time, first_time_q;
  logic          area_busy, area_valid;
  logic [AW-1:0] area;
  logic          norm_busy, norm_done;
  logic [LAW-1:0] norm_v;
  logic          look_busy;
  logic [LAW-1:0] mem_raddr;
  logic [DW-1:0] mem_rdata;
  logic          arm;
  // sample stream into the chain: the ADC, or stored pulses during replay
  logic          s_valid;
  logic [SW-1:0] s_data;
  logic          rp_valid;
  logic [SW-1:0] rp_data;
  // arbitration of the discovery read port and the table write port
  logic          b_rd_req, d_rd_req;
  logic [DBW-1:0] b_rd_bin, d_rd_bin;
  logic          b_lut_we, m_we;
  logic [LAW-1:0] b_lut_waddr, m_waddr;
  logic [DW-1:0] b_lut_wdata, m_wdata;

  assign s_valid = replaying ? rp_valid : adc_valid;
  assign s_data  = replaying ? rp_data  : adc_data;
  assign d_rd_req = build_busy ? b_rd_req : disc_rd_req;
  assign d_rd_bin = build_busy ? b_rd_bin : disc_rd_bin;
  assign m_we    = build_busy ? b_lut_we    : lut_we;
  assign m_waddr = build_busy ? b_lut_waddr : lut_waddr;
  assign m_wdata = build_busy ? b_lut_wdata : lut_wdata;

  assign busy = trig || area_busy || area_valid || norm_busy || norm_done || look_busy;
  assign arm  = !busy;

  leading_edge_disc #(.SW(SW), .CW(CW)) u_disc (
    .clk, .rst_n,
    .s_valid, .s_data, .threshold, .arm,
    .trig, .first_sample, .first_time, .missed(pulse_missed)
  );

  area_to_amplitude #(.SW(SW), .WIN(WIN), .AW(AW)) u_area (
    .clk, .rst_n,
    .start(trig), .start_sample(first_sample),
    .s_valid, .s_data,
    .busy(area_busy), .area_valid, .area
  );

  normalize #(.SW(SW), .AW(AW), .OW(LAW)) u_norm (
    .clk, .rst_n,
    .start(area_valid), .first_sample, .area, .ref_area,
    .busy(norm_busy), .done(norm_done), .norm_v, .saturated(norm_saturated)
  );

  // The discriminator's outputs stay put while the chain is busy, but keep
  // a private copy of the coarse time for the look-up stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_time_q <= '0;
      pulse_area   <= '0;
    end else begin
      if (trig)       first_time_q <= first_time;
      if (area_valid) pulse_area   <= area;
    end
  end

  first_point_lookup #(.AW(LAW), .DW(DW), .CW(CW), .FW(FW)) u_look (
    .clk, .rst_n,
    .start(norm_done), .norm_v, .first_time(first_time_q),
    .busy(look_busy), .mem_raddr, .mem_rdata,
    .ts_valid, .timestamp, .rise_time
  );

  reference_pulse_memory #(.AW(LAW), .DW(DW)) u_mem (
    .clk,
    .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  assign norm_voltage = norm_v;

  // Reference-pulse discovery watches the same samples and time stamps.
  pulse_discovery #(
    .SW(SW), .WIN(WIN), .AW(AW), .DW(DW), .FW(FW), .BB(DBB), .NB(DNB),
    .SUM_W(32), .NCW(16), .YW(16), .BW(DBW)
  ) u_discovery (
    .clk, .rst_n,
    .align(disc_align), .ref_area,
    .s_valid, .s_data,
    .trig, .first_sample,
    .ev_valid(ts_valid && disc_enable), .ev_area(pulse_area), .ev_offset(rise_time),
    .clear(disc_clear), .rd_req(d_rd_req), .rd_bin(d_rd_bin),
    .rd_valid(disc_rd_valid), .rd_count(disc_rd_count), .rd_sum(disc_rd_sum),
    .rd_avg(disc_rd_avg), .busy(disc_busy), .dropped(disc_dropped),
    .pulses(disc_pulses)
  );

  // Raw pulses for discovery, played back in place of the ADC.
  pulse_store #(.SW(SW), .WIN(WIN), .NP(NP)) u_store (
    .clk, .rst_n,
    .capture_en(store_capture), .clear_store(store_clear),
    .trig, .first_sample, .s_valid(adc_valid), .s_data(adc_data),
    .count(store_count), .full(store_full),
    .replay_start, .sink_ready(!busy && !disc_busy && !ts_valid),
    .replaying, .replay_done, .rp_valid, .rp_data
  );

  // Timing table from the composite pulse in the discovery bins.
  table_builder #(
    .LAW(LAW), .DW(DW), .FW(FW), .BB(DBB), .NB(DNB), .BW(DBW), .YW(16), .NCW(16)
  ) u_build (
    .clk, .rst_n, .start(build_start), .busy(build_busy), .done(build_done),
    .rd_req(b_rd_req), .rd_bin(b_rd_bin), .rd_valid(disc_rd_valid),
    .rd_count(disc_rd_count), .rd_avg(disc_rd_avg),
    .lut_we(b_lut_we), .lut_waddr(b_lut_waddr), .lut_wdata(b_lut_wdata)
  );
endmodule
