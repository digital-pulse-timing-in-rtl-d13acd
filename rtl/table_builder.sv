// table_builder: turns a composite reference pulse into the timing table.
//
// Reads the bins of pulse_discovery in order (bin b holds the average
// normalized pulse value at fine time b * 2**(FW-BB) .. (b+1) * 2**(FW-BB)
// after the pulse start, in 1/2**FW sample periods) and writes the
// reference pulse memory so that entry v holds the time at which the
// composite pulse first reaches v. Between the pulse start (time 0, value
// 0) and the centres of successive non-empty bins on the rising edge the
// time is interpolated linearly:
//     t(v) = t0 + (v - a0) * (t1 - t0) / (a1 - a0)
// using one reciprocal (t1 - t0) * 2**16 / (a1 - a0) per bin from a serial
// divider and one multiply per entry. Bins whose average does not exceed
// the highest value so far are skipped; the scan ends at the first bin
// clearly past the peak (below the peak by more than 1/16 of it) or at
// the last bin, and all remaining entries get the peak time.
//
// Interface: `start` while idle begins a build; `busy` is high until
// `done` pulses. The bin read port follows pulse_discovery's read-out
// handshake; the table port writes one entry per clock at most. A build
// writes all 2**LAW entries. Its time is one bin read per bin scanned,
// plus a 32-step division for each bin used on the rising edge, plus one
// clock per table entry (about 5,500 clocks behind pulse_discovery at the
// default sizes, for a pulse rising over about two sample periods).
//
// The source says only that the final reference pulse is calculated from
// the aligned pulses; building the table from it in hardware, the
// interpolation and the peak rule are this implementation's choices.
module table_builder
  import pet_timing_pkg::*;
#(
  parameter int unsigned LAW = ADDR_W,
  parameter int unsigned DW  = TIME_W,
  parameter int unsigned FW  = FRAC_W,
  parameter int unsigned BB  = 3,
  parameter int unsigned NB  = 256,
  parameter int unsigned BW  = $clog2(NB),
  parameter int unsigned YW  = 16,
  parameter int unsigned NCW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // bin read-out of pulse_discovery
  output logic            rd_req,
  output logic [BW-1:0]   rd_bin,
  input  logic            rd_valid,
  input  logic [NCW-1:0]  rd_count,
  input  logic [YW-1:0]   rd_avg,
  // reference pulse memory write port
  output logic            lut_we,
  output logic [LAW-1:0]  lut_waddr,
  output logic [DW-1:0]   lut_wdata
);
  localparam int unsigned TW = BW + FW - BB + 1;  // fine time of a bin centre
  localparam int unsigned RS = 16;                // reciprocal fraction bits

  typedef enum logic [2:0] {IDLE, REQ, WAIT_BIN, DIV, FILL_EDGE, FILL_REST, FIN} state_t;
  state_t state_q;

  logic [BW-1:0]  bin_q;
  logic [TW-1:0]  t0_q, t1_q, tpk_q;
  logic [YW-1:0]  a0_q, a1_q, apk_q;
  logic [LAW:0]   v_q;               // next entry to write
  logic [31:0]    recip_q;

  logic           div_start, div_busy, div_done;
  logic [31:0]    div_quo;

  seq_divider #(.NW(32), .DEN_W(YW)) u_div (
    .clk, .rst_n, .start(div_start),
    .num(32'(t1_q - t0_q) << RS), .den(a1_q - a0_q),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  logic [TW-1:0] bin_centre;
  assign bin_centre = (TW'(rd_bin) << (FW - BB)) + TW'(2 ** (FW - BB - 1));

  // interpolated time of entry v_q on the current segment
  logic [YW+32-1:0] prod;
  logic [TW+1:0]    t_int;
  assign prod  = (YW + 32)'(YW'(v_q) - a0_q) * (YW + 32)'(recip_q);
  assign t_int = (TW + 2)'(t0_q) + (TW + 2)'(prod >> RS);

  function automatic logic [DW-1:0] clip(input logic [TW+1:0] t);
    return (t > (TW + 2)'(2 ** DW - 1)) ? '1 : DW'(t);
  endfunction

  always_comb begin
    lut_we    = 1'b0;
    lut_waddr = LAW'(v_q);
    lut_wdata = clip(t_int);
    if (state_q == FILL_EDGE && (YW + 1)'(v_q) <= (YW + 1)'(a1_q) && !v_q[LAW]) lut_we = 1'b1;
    if (state_q == FILL_REST && !v_q[LAW]) begin
      lut_we    = 1'b1;
      lut_wdata = clip((TW + 2)'(tpk_q));
    end
  end

  assign rd_bin    = bin_q;
  logic div_go_q;
  assign div_start = div_go_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      bin_q   <= '0;
      t0_q    <= '0;
      t1_q    <= '0;
      tpk_q   <= '0;
      a0_q    <= '0;
      a1_q    <= '0;
      apk_q   <= '0;
      v_q     <= '0;
      recip_q <= '0;
      rd_req  <= 1'b0;
      done    <= 1'b0;
      div_go_q <= 1'b0;
    end else begin
      rd_req <= 1'b0;
      done   <= 1'b0;
      div_go_q <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          bin_q   <= '0;
          t0_q    <= '0;
          a0_q    <= '0;
          tpk_q   <= '0;
          apk_q   <= '0;
          v_q     <= '0;
          state_q <= REQ;
        end
        REQ: begin
          rd_req  <= 1'b1;
          state_q <= WAIT_BIN;
        end
        WAIT_BIN: if (rd_valid) begin
          if (rd_count != '0 && rd_avg > apk_q) begin
            // next point on the rising edge
            t1_q    <= bin_centre;
            a1_q    <= rd_avg;
            apk_q   <= rd_avg;
            tpk_q   <= bin_centre;
            div_go_q <= 1'b1;
            state_q <= DIV;
          end else if (rd_count != '0 && rd_avg < apk_q - (apk_q >> 4)) begin
            state_q <= FILL_REST;  // past the peak
          end else if (bin_q == BW'(NB - 1)) begin
            state_q <= FILL_REST;
          end else begin
            bin_q   <= bin_q + 1'b1;
            state_q <= REQ;
          end
        end
        DIV: if (div_done) begin
          recip_q <= div_quo;
          state_q <= FILL_EDGE;
        end
        FILL_EDGE: begin
          if ((YW + 1)'(v_q) <= (YW + 1)'(a1_q) && !v_q[LAW]) begin
            v_q <= v_q + 1'b1;
          end else begin
            t0_q <= t1_q;
            a0_q <= a1_q;
            if (v_q[LAW] || bin_q == BW'(NB - 1)) state_q <= FILL_REST;
            else begin
              bin_q   <= bin_q + 1'b1;
              state_q <= REQ;
            end
          end
        end
        FILL_REST: begin
          if (!v_q[LAW]) v_q <= v_q + 1'b1;
          else state_q <= FIN;
        end
        FIN: begin
          done    <= 1'b1;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy = (state_q != IDLE);

  // The divider is started only while idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);
endmodule
