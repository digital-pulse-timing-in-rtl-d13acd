// first_point_lookup: turns the normalized first sample into a time stamp.
//
// The normalized voltage of the pulse's first sample addresses the
// reference pulse memory, which returns how long the reference pulse needs
// from its start to reach that voltage. Subtracting this rise time from
// the first sample's own time gives the pulse's start time, finer than one
// sample period:
//     timestamp = first_time * 2**FRAC_W - rise_time   (modulo 2**TSW)
//
// Timing: `start` latches the voltage and the coarse time; the address is
// presented to the memory in the next clock, the memory answers one clock
// later, and `ts_valid` pulses with the result three clocks after `start`.
// `busy` is high until then.
//
// The look-up and its meaning follow the source; the number format, the
// subtraction and the pipeline are this implementation's choices.
module first_point_lookup
  import pet_timing_pkg::*;
#(
  parameter int unsigned AW  = ADDR_W,
  parameter int unsigned DW  = TIME_W,
  parameter int unsigned CW  = CNT_W,
  parameter int unsigned FW  = FRAC_W,
  parameter int unsigned TSW = CW + FW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [AW-1:0]  norm_v,
  input  logic [CW-1:0]  first_time,
  output logic           busy,
  // reference pulse memory read port
  output logic [AW-1:0]  mem_raddr,
  input  logic [DW-1:0]  mem_rdata,
  // result
  output logic           ts_valid,
  output logic [TSW-1:0] timestamp,
  output logic [DW-1:0]  rise_time
);
  typedef enum logic [1:0] {IDLE, ADDR, DATA} state_t;
  state_t        state_q;
  logic [CW-1:0] time_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= IDLE;
      mem_raddr <= '0;
      time_q    <= '0;
      ts_valid  <= 1'b0;
      timestamp <= '0;
      rise_time <= '0;
    end else begin
      ts_valid <= 1'b0;
      unique case (state_q)
        IDLE: if (start) begin
          mem_raddr <= norm_v;
          time_q    <= first_time;
          state_q   <= ADDR;
        end
        ADDR: state_q <= DATA;  // memory reads mem_raddr at this edge
        DATA: begin
          timestamp <= {time_q, FW'(0)} - TSW'(mem_rdata);
          rise_time <= mem_rdata;
          ts_valid  <= 1'b1;
          state_q   <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy = (state_q != IDLE);

  // One look-up at a time: a new request must wait for the previous result.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
