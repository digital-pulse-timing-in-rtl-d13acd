// normalize: scales the first sample to the reference pulse's amplitude.
//
// The first sample of an event is multiplied by the ratio of the reference
// pulse's area to the event's area:
//     norm_v = first_sample * ref_area / area      (rounded down)
// so that it reads as if the event had the reference pulse's amplitude.
// The product is formed in one clock and divided by restoring long
// division, one quotient bit per clock, AW clocks in all. The quotient is
// limited to the lookup table's range 0 .. 2**OW-1; `saturated` marks a
// result that was clipped, or an area of zero.
//
// Timing: `start` is accepted while idle; `done` pulses with the result
// AW+2 clocks after the clock in which `start` is high; `busy` is high in
// between.
//
// The area ratio is from the source. The divider, the rounding and the
// clipping are this implementation's choices. first_sample <= area holds
// whenever the first sample is part of the area sum, which bounds the
// quotient below 2**AW; a larger first sample is treated as saturating.
module normalize
  import pet_timing_pkg::*;
#(
  parameter int unsigned SW = SAMPLE_W,
  parameter int unsigned AW = AREA_W,
  parameter int unsigned OW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SW-1:0] first_sample,
  input  logic [AW-1:0] area,
  input  logic [AW-1:0] ref_area,
  output logic          busy,
  output logic          done,
  output logic [OW-1:0] norm_v,
  output logic          saturated
);
  localparam int unsigned PW = SW + AW;          // product width
  localparam int unsigned IW = $clog2(AW + 1);

  logic [PW-1:0] prod;
  logic [AW-1:0] den_q;
  logic [AW-1:0] num_lo_q;  // product bits still to be shifted in, MSB first
  logic [AW-1:0] rem_q;
  logic [AW-1:0] quo_q;
  logic [IW-1:0] iter_q;
  logic          ovf_q;

  logic [AW:0]   rem_sh;
  logic          take;

  assign prod   = PW'(first_sample) * PW'(ref_area);
  assign rem_sh = {rem_q, num_lo_q[AW-1]};
  assign take   = rem_sh >= {1'b0, den_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      norm_v    <= '0;
      saturated <= 1'b0;
      den_q     <= '0;
      num_lo_q  <= '0;
      rem_q     <= '0;
      quo_q     <= '0;
      iter_q    <= '0;
      ovf_q     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          den_q    <= area;
          num_lo_q <= prod[AW-1:0];
          // Upper product bits form the first partial remainder; if they
          // already reach the divisor the quotient would not fit in AW bits.
          rem_q    <= AW'(prod >> AW);
          ovf_q    <= (area == '0) || (prod >> AW) >= PW'(area);
          quo_q    <= '0;
          iter_q   <= '0;
        end
      end else if (iter_q != IW'(AW)) begin
        rem_q    <= AW'(take ? rem_sh - {1'b0, den_q} : rem_sh);
        quo_q    <= {quo_q[AW-2:0], take};
        num_lo_q <= num_lo_q << 1;
        iter_q   <= iter_q + 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (ovf_q || (quo_q >> OW) != '0) begin
          norm_v    <= '1;
          saturated <= 1'b1;
        end else begin
          norm_v    <= OW'(quo_q);
          saturated <= 1'b0;
        end
      end
    end
  end

  // The chain issues a new operand only while the divider is idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
