// leading_edge_disc: digital leading-edge discriminator.
//
// Finds the first sample of a pulse: the first valid sample at or above
// `threshold` whose predecessor was below it. A free-running counter numbers
// the valid samples; the number of the first sample is its coarse arrival
// time. The first sample's value and number are registered and `trig`
// pulses for one clock, one clock after that sample was presented.
//
// Triggers are accepted only while `arm` is high (the rest of the chain is
// idle). A rising edge seen while `arm` is low is not processed; it raises
// `missed` for one clock so dead-time losses can be counted. Requiring a
// below-threshold predecessor keeps a pulse that is already high when the
// chain re-arms from being picked up part-way.
//
// The source says only that the timing uses a digital leading-edge
// discriminator and the first sample of the pulse; the threshold test,
// the re-arm rule and the counter are this implementation's choices.
module leading_edge_disc
  import pet_timing_pkg::*;
#(
  parameter int unsigned SW = SAMPLE_W,
  parameter int unsigned CW = CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          s_valid,
  input  logic [SW-1:0] s_data,
  input  logic [SW-1:0] threshold,
  input  logic          arm,
  output logic          trig,
  output logic [SW-1:0] first_sample,
  output logic [CW-1:0] first_time,
  output logic          missed
);
  logic [CW-1:0] count_q;
  logic          prev_below_q;
  logic          edge_seen;

  assign edge_seen = s_valid && prev_below_q && (s_data >= threshold);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q      <= '0;
      prev_below_q <= 1'b0;
      trig         <= 1'b0;
      missed       <= 1'b0;
      first_sample <= '0;
      first_time   <= '0;
    end else begin
      trig   <= edge_seen && arm;
      missed <= edge_seen && !arm;
      if (s_valid) begin
        count_q      <= count_q + 1'b1;
        prev_below_q <= (s_data < threshold);
      end
      if (edge_seen && arm) begin
        first_sample <= s_data;
        first_time   <= count_q;
      end
    end
  end
endmodule
