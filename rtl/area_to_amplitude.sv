// area_to_amplitude: pulse area as the amplitude measure.
//
// With fixed rise and fall time constants the amplitude of a pulse is a
// fixed fraction of its area, so the area stands in for the amplitude.
// On `start` the block takes the pulse's first sample (`start_sample`) and
// adds the next WIN-1 valid samples of the stream, including one presented
// in the `start` clock itself. `area_valid` pulses for one clock with the
// sum; `busy` is high from the clock after `start` until then. With one
// sample per clock the result appears WIN-1 clocks after `start`.
//
// The area-to-amplitude relation is from the source; the window length,
// the plain sum and the handshake are this implementation's choices.
module area_to_amplitude
  import pet_timing_pkg::*;
#(
  parameter int unsigned SW  = SAMPLE_W,
  parameter int unsigned WIN = AREA_WINDOW,
  parameter int unsigned AW  = SW + $clog2(WIN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SW-1:0] start_sample,
  input  logic          s_valid,
  input  logic [SW-1:0] s_data,
  output logic          busy,
  output logic          area_valid,
  output logic [AW-1:0] area
);
  localparam int unsigned NW = $clog2(WIN + 1);
  localparam logic [NW-1:0] WIN_N = NW'(WIN);

  logic [AW-1:0] acc_q;
  logic [NW-1:0] n_q;      // samples summed so far

  // Sum and count after this clock's sample, for the trigger clock and later.
  logic [AW-1:0] acc_in, acc_next;
  logic [NW-1:0] n_in, n_next;

  always_comb begin
    acc_in   = start ? AW'(start_sample) : acc_q;
    n_in     = start ? NW'(1) : n_q;
    acc_next = acc_in;
    n_next   = n_in;
    if (s_valid && n_in < WIN_N) begin
      acc_next = acc_in + AW'(s_data);
      n_next   = n_in + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      area_valid <= 1'b0;
      acc_q      <= '0;
      n_q        <= '0;
      area       <= '0;
    end else begin
      area_valid <= 1'b0;
      if (start || busy) begin
        acc_q <= acc_next;
        n_q   <= n_next;
        if (n_next == WIN_N) begin
          busy       <= 1'b0;
          area_valid <= 1'b1;
          area       <= acc_next;
        end else begin
          busy <= 1'b1;
        end
      end
    end
  end
endmodule
