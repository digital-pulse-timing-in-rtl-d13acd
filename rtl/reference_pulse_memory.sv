// reference_pulse_memory: the reference pulse, stored as its rising edge.
//
// Entry v holds the time the reference pulse takes, from its start, to
// reach voltage v (in ADC counts at the reference amplitude), in units of
// 1/2**FRAC_W sample period. It is a simple dual-port RAM: one synchronous
// write port for loading (from a host or from reference-pulse discovery)
// and one read port with one clock of latency for the look-up.
//
// The table's meaning is from the source; its size (one entry per ADC
// code), entry width, port arrangement and read latency are this
// implementation's choices. The contents are not reset and must be loaded
// before time stamps are meaningful.
module reference_pulse_memory
  import pet_timing_pkg::*;
#(
  parameter int unsigned AW = ADDR_W,
  parameter int unsigned DW = TIME_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
