// pulse_store: stores raw event pulses and plays them back.
//
// Part of reference-pulse discovery, which works on a set of stored events:
// the same pulses are first averaged unaligned, then aligned with the table
// built from that first average.
//
// Capture: while `capture_en` is high and the store is not full, each
// `trig` writes the event's first sample and the next WIN-1 valid samples
// into the next free slot of a NP x WIN sample memory; `count` counts
// complete slots. `clear_store` empties it.
//
// Replay: `replay_start` plays slots 0 .. count-1 out as a sample stream
// (`rp_valid`, `rp_data`) that replaces the ADC at the timing chain's
// input. Each slot goes out as GAP zero samples (so the discriminator sees a
// below-threshold sample first), then its WIN samples, then zeros until
// `sink_ready` (timing chain and discovery idle) has been high for two
// clocks. `replaying` is high throughout; `replay_done` pulses at the end.
//
// Storing raw pulses for later processing is from the source; the store
// size, the playback through the timing chain and the framing with zero
// samples are this implementation's choices.
module pulse_store
  import pet_timing_pkg::*;
#(
  parameter int unsigned SW  = SAMPLE_W,
  parameter int unsigned WIN = AREA_WINDOW,
  parameter int unsigned NP  = 256,
  parameter int unsigned GAP = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // capture
  input  logic                    capture_en,
  input  logic                    clear_store,
  input  logic                    trig,
  input  logic [SW-1:0]           first_sample,
  input  logic                    s_valid,
  input  logic [SW-1:0]           s_data,
  output logic [$clog2(NP+1)-1:0] count,
  output logic                    full,
  // replay
  input  logic                    replay_start,
  input  logic                    sink_ready,
  output logic                    replaying,
  output logic                    replay_done,
  output logic                    rp_valid,
  output logic [SW-1:0]           rp_data
);
  localparam int unsigned KW = $clog2(WIN);
  localparam int unsigned PW = $clog2(NP);
  localparam int unsigned CW = $clog2(NP + 1);
  localparam int unsigned GW = $clog2(GAP + 1);

  logic [SW-1:0] mem [NP * WIN];

  // ---- capture ------------------------------------------------------------
  // The stream is delayed by one clock so the sample that arrives with the
  // trigger (the event's second sample) is written in the clock after the
  // first sample: one write port suffices.
  logic          sv_d_q;
  logic [SW-1:0] sd_d_q;
  logic          cap_act_q;
  logic [KW:0]   cap_k_q;
  logic          cap_trig;
  logic          wr_en;
  logic [PW+KW-1:0] wr_addr;
  logic [SW-1:0] wr_data;

  typedef enum logic [1:0] {R_IDLE, R_GAP, R_PLAY, R_WAIT} rstate_t;
  rstate_t rstate_q;

  assign cap_trig = (rstate_q == R_IDLE) && capture_en && !full && !cap_act_q && trig;

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = {PW'(count), KW'(0)};
    wr_data = first_sample;
    if (cap_trig) begin
      wr_en = 1'b1;
    end else if (cap_act_q && sv_d_q) begin
      wr_en   = 1'b1;
      wr_addr = {PW'(count), cap_k_q[KW-1:0]};
      wr_data = sd_d_q;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv_d_q    <= 1'b0;
      sd_d_q    <= '0;
      cap_act_q <= 1'b0;
      cap_k_q   <= '0;
      count     <= '0;
    end else begin
      sv_d_q <= s_valid;
      sd_d_q <= s_data;
      if (clear_store) begin
        cap_act_q <= 1'b0;
        count     <= '0;
      end else if (cap_trig) begin
        if (WIN == 1) count <= count + 1'b1;
        else begin
          cap_act_q <= 1'b1;
          cap_k_q   <= (KW + 1)'(1);
        end
      end else if (cap_act_q && sv_d_q) begin
        if (cap_k_q == (KW + 1)'(WIN - 1)) begin
          cap_act_q <= 1'b0;
          count     <= count + 1'b1;
        end
        cap_k_q <= cap_k_q + 1'b1;
      end
    end
  end

  assign full = (count == CW'(NP));

  // ---- replay ---------------------------------------------------------------
  logic [PW-1:0] slot_q;
  logic [KW:0]   k_q;
  logic [GW-1:0] gap_q;
  logic [1:0]    ready_q;
  logic [SW-1:0] rd_q;
  logic [PW+KW-1:0] rd_addr;

  assign rd_addr = {slot_q, k_q[KW-1:0]};
  always_ff @(posedge clk) rd_q <= mem[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate_q    <= R_IDLE;
      slot_q      <= '0;
      k_q         <= '0;
      gap_q       <= '0;
      ready_q     <= '0;
      replay_done <= 1'b0;
    end else begin
      replay_done <= 1'b0;
      unique case (rstate_q)
        R_IDLE: if (replay_start && count != '0 && !cap_act_q) begin
          slot_q   <= '0;
          k_q      <= '0;
          gap_q    <= '0;
          rstate_q <= R_GAP;
        end
        R_GAP: begin
          // rd_q holds sample 0 of the slot by the end of the gap
          gap_q <= gap_q + 1'b1;
          if (gap_q == GW'(GAP - 1)) begin
            k_q      <= (KW + 1)'(1);
            rstate_q <= R_PLAY;
          end
        end
        R_PLAY: begin
          k_q <= k_q + 1'b1;
          if (k_q == (KW + 1)'(WIN)) begin
            ready_q  <= '0;
            rstate_q <= R_WAIT;
          end
        end
        R_WAIT: begin
          ready_q <= sink_ready ? ready_q + (ready_q != 2'd2 ? 2'd1 : 2'd0) : 2'd0;
          if (ready_q == 2'd2) begin
            if (CW'(slot_q) + 1'b1 == count) begin
              replay_done <= 1'b1;
              rstate_q    <= R_IDLE;
            end else begin
              slot_q   <= slot_q + 1'b1;
              k_q      <= '0;
              gap_q    <= '0;
              rstate_q <= R_GAP;
            end
          end
        end
        default: rstate_q <= R_IDLE;
      endcase
    end
  end

  assign replaying = (rstate_q != R_IDLE);
  assign rp_valid  = replaying;
  assign rp_data   = (rstate_q == R_PLAY) ? rd_q : '0;
endmodule
