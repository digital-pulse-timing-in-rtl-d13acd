// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// `start` (accepted while idle) loads a NW-bit numerator and a DEN_W-bit
// denominator; NW clocks later the quotient, rounded down, is registered
// and `done` pulses for one clock. A zero denominator gives an all-ones
// quotient. `busy` is high from the clock after `start` until `done`.
// A plain shift-and-subtract divider, chosen for its small size.
module seq_divider #(
  parameter int unsigned NW    = 32,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NW-1:0]    num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NW-1:0]    quo
);
  localparam int unsigned IW = $clog2(NW + 1);

  logic [NW-1:0]    num_q, quo_q;
  logic [DEN_W-1:0] den_q, rem_q;
  logic [IW-1:0]    iter_q;
  logic [DEN_W:0]   rem_sh;
  logic             take;

  assign rem_sh = {rem_q, num_q[NW-1]};
  assign take   = rem_sh >= {1'b0, den_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      quo    <= '0;
      num_q  <= '0;
      quo_q  <= '0;
      den_q  <= '0;
      rem_q  <= '0;
      iter_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          num_q  <= num;
          den_q  <= den;
          rem_q  <= '0;
          quo_q  <= '0;
          iter_q <= '0;
        end
      end else if (iter_q != IW'(NW)) begin
        rem_q  <= DEN_W'(take ? rem_sh - {1'b0, den_q} : rem_sh);
        quo_q  <= {quo_q[NW-2:0], take};
        num_q  <= num_q << 1;
        iter_q <= iter_q + 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        quo  <= (den_q == '0) ? '1 : quo_q;
      end
    end
  end
endmodule
