// pulse_discovery: builds a composite reference pulse from many events.
//
// Reference-pulse discovery: captured event pulses are brought to one
// amplitude and one start time, then averaged on a time grid finer than the
// ADC's, giving the reference pulse's shape at sub-sample resolution.
//
// How it works. On `trig` the block stores the event's first sample and the
// next WIN-1 valid samples. When the timing chain reports the event
// (`ev_valid` with its area and the rise time `ev_offset` it looked up, i.e.
// the time from the pulse start to the first sample), the block
//   1. forms a scale factor ref_area * 2**SF / area with a serial divider
//      (amplitude normalization, as in the timing chain);
//   2. places sample k at fine time k * 2**FW + offset after the pulse start
//      (offset is taken as half a sample when `align` is low) and adds the
//      scaled sample to bin  time >> (FW - BB)  of a sum memory, counting it
//      in a count memory. There are 2**BB bins per sample period.
// With `align` low the bins collect the plain average of unshifted pulses,
// the initial reference pulse; its first sample is put half a sample after
// the origin, the mean position of a start time spread evenly over the
// sample period (putting it at the origin would give a table in which the
// first sample value is reached at once, and aligning with that table
// would only reproduce it). With `align` high, after the timing table
// has been loaded from that initial pulse, every pulse is shifted by its
// own sub-sample start time and the bins collect the final, aligned
// reference pulse.
//
// Interface: `clear` zeroes all bins (NB clocks). `rd_req` with `rd_bin`
// reads one bin back: `rd_valid` pulses SUM_W+6 clocks after the `rd_req`
// clock with the bin's sample count, sum and average sum/count (the average
// reads all ones for an empty bin). An event that arrives while the block
// is busy, or whose samples were not captured, is dropped and `dropped`
// pulses. `pulses` counts accumulated events. Processing one event takes
// about SUM_W clocks for the scale factor and two clocks per sample (about
// 70 clocks with the default sizes); events closer together are dropped.
//
// The steps (normalize, average, shift each pulse onto a finer grid,
// average again) follow the source. Accumulating events as they arrive
// (stored raw pulses are fed in again by replaying them through the timing
// chain, see pulse_store), the grid of 2**BB bins per sample, the half-
// sample placement of unaligned pulses, the fixed-point scale and all
// widths are this implementation's choices. table_builder turns the
// composite pulse into a timing table.
module pulse_discovery
  import pet_timing_pkg::*;
#(
  parameter int unsigned SW    = SAMPLE_W,
  parameter int unsigned WIN   = AREA_WINDOW,
  parameter int unsigned AW    = SW + $clog2(WIN),
  parameter int unsigned DW    = TIME_W,
  parameter int unsigned FW    = FRAC_W,
  parameter int unsigned BB    = 3,
  parameter int unsigned SF    = 12,
  parameter int unsigned NB    = (2 ** BB) * (WIN + 2 ** (DW - FW)),
  parameter int unsigned SUM_W = 32,
  parameter int unsigned NCW   = 16,
  parameter int unsigned YW    = 16,
  parameter int unsigned BW    = $clog2(NB)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             align,
  input  logic [AW-1:0]    ref_area,
  // sample stream and discriminator
  input  logic             s_valid,
  input  logic [SW-1:0]    s_data,
  input  logic             trig,
  input  logic [SW-1:0]    first_sample,
  // event result from the timing chain
  input  logic             ev_valid,
  input  logic [AW-1:0]    ev_area,
  input  logic [DW-1:0]    ev_offset,
  // control and read-out
  input  logic             clear,
  input  logic             rd_req,
  input  logic [BW-1:0]    rd_bin,
  output logic             rd_valid,
  output logic [NCW-1:0]   rd_count,
  output logic [SUM_W-1:0] rd_sum,
  output logic [YW-1:0]    rd_avg,
  output logic             busy,
  output logic             dropped,
  output logic [31:0]      pulses
);
  localparam int unsigned KW  = $clog2(WIN + 1);
  localparam int unsigned IXW = (WIN > 1) ? $clog2(WIN) : 1;
  localparam int unsigned TW  = $clog2(WIN) + FW + 2;   // fine time of a sample

  typedef enum logic [2:0] {
    IDLE, SCALE, ACC_RD, ACC_WR, CLR, RD_MEM, RD_LATCH, RD_DIV
  } state_t;
  state_t state_q;

  // ---- capture buffer ---------------------------------------------------
  // Free while no event is being accumulated. A trigger while it is in use
  // marks its contents as not belonging to the next event.
  logic [SW-1:0] buf_q [WIN];
  logic [KW-1:0] cap_n_q;
  logic          cap_ok_q;
  logic          cap_full, buf_free, accept;
  assign cap_full = (cap_n_q == KW'(WIN));
  assign buf_free = (state_q != SCALE) && (state_q != ACC_RD) && (state_q != ACC_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_n_q  <= KW'(WIN);
      cap_ok_q <= 1'b0;
      for (int i = 0; i < WIN; i++) buf_q[i] <= '0;
    end else begin
      if (accept) cap_ok_q <= 1'b0;
      if (trig && !buf_free) cap_ok_q <= 1'b0;
      if (buf_free) begin
        if (trig) begin
          cap_ok_q <= 1'b1;
          buf_q[0] <= first_sample;
          if (s_valid && WIN > 1) begin
            buf_q[IXW'(1)] <= s_data;
            cap_n_q        <= KW'(2);
          end else begin
            cap_n_q <= KW'(1);
          end
        end else if (s_valid && !cap_full) begin
          buf_q[cap_n_q[IXW-1:0]] <= s_data;
          cap_n_q <= cap_n_q + 1'b1;
        end
      end
    end
  end

  // ---- accumulation memories (one read/write port each) -----------------
  logic [SUM_W-1:0] sum_mem [NB];
  logic [NCW-1:0]   cnt_mem [NB];
  logic [BW-1:0]    mem_addr;
  logic             mem_we;
  logic [SUM_W-1:0] mem_wsum, mem_rsum;
  logic [NCW-1:0]   mem_wcnt, mem_rcnt;

  always_ff @(posedge clk) begin
    if (mem_we) begin
      sum_mem[mem_addr] <= mem_wsum;
      cnt_mem[mem_addr] <= mem_wcnt;
    end
    mem_rsum <= sum_mem[mem_addr];
    mem_rcnt <= cnt_mem[mem_addr];
  end

  // ---- divider, shared by the scale factor and the read-out -------------
  logic             div_busy, div_done;
  logic [SUM_W-1:0] div_num;
  logic [NCW-1:0]   div_den;
  logic [SUM_W-1:0] div_quo;
  logic             div_go_q;

  // ---- control ------------------------------------------------------------
  logic [AW-1:0]    area_q;
  logic [DW-1:0]    off_q;
  logic [SUM_W-1:0] scale_q;
  logic [KW-1:0]    k_q;
  logic [BW-1:0]    bin_q;
  logic             bin_ok_q;
  logic [YW-1:0]    y_q;
  logic [SUM_W-1:0] rd_sum_q;
  logic [NCW-1:0]   rd_cnt_q;

  assign div_num = (state_q == SCALE) ? SUM_W'(ref_area) << SF : rd_sum_q;
  assign div_den = (state_q == SCALE) ? NCW'(area_q) : rd_cnt_q;

  seq_divider #(.NW(SUM_W), .DEN_W(NCW)) u_div (
    .clk, .rst_n, .start(div_go_q), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo)
  );

  // Fine time, bin and scaled value of sample k_q.
  logic [TW-1:0]         t_fine, bin_full;
  logic [SW+SUM_W-1:0]   y_full;
  assign t_fine   = (TW'(k_q) << FW) + (align ? TW'(off_q) : TW'(2 ** (FW - 1)));
  assign bin_full = t_fine >> (FW - BB);
  assign y_full   = ((SW + SUM_W)'(buf_q[k_q[IXW-1:0]]) * (SW + SUM_W)'(scale_q)) >> SF;

  assign accept = (state_q == IDLE) && !clear && ev_valid && cap_ok_q && cap_full && !trig;

  always_comb begin
    mem_we   = 1'b0;
    mem_addr = bin_q;
    mem_wsum = mem_rsum + SUM_W'(y_q);
    mem_wcnt = mem_rcnt + 1'b1;
    unique case (state_q)
      ACC_RD: mem_addr = bin_full[BW-1:0];
      ACC_WR: mem_we = bin_ok_q && (mem_rcnt != '1);  // a full bin stops counting
      CLR: begin
        mem_we   = 1'b1;
        mem_wsum = '0;
        mem_wcnt = '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= CLR;
      area_q   <= '0;
      off_q    <= '0;
      scale_q  <= '0;
      k_q      <= '0;
      bin_q    <= '0;
      bin_ok_q <= 1'b0;
      y_q      <= '0;
      rd_sum_q <= '0;
      rd_cnt_q <= '0;
      div_go_q <= 1'b0;
      rd_valid <= 1'b0;
      rd_count <= '0;
      rd_sum   <= '0;
      rd_avg   <= '0;
      dropped  <= 1'b0;
      pulses   <= '0;
    end else begin
      div_go_q <= 1'b0;
      rd_valid <= 1'b0;
      dropped  <= ev_valid && !accept;
      unique case (state_q)
        IDLE: begin
          if (clear) begin
            bin_q   <= '0;
            state_q <= CLR;
          end else if (accept) begin
            area_q   <= ev_area;
            off_q    <= ev_offset;
            div_go_q <= 1'b1;
            state_q  <= SCALE;
          end else if (rd_req) begin
            bin_q   <= rd_bin;
            state_q <= RD_MEM;
          end
        end
        SCALE: if (div_done) begin
          scale_q <= div_quo;
          k_q     <= '0;
          state_q <= ACC_RD;
        end
        ACC_RD: begin  // the memories read bin_full at this edge
          bin_q    <= bin_full[BW-1:0];
          bin_ok_q <= (bin_full < TW'(NB));
          y_q      <= ((y_full >> YW) != '0) ? '1 : YW'(y_full);
          state_q  <= ACC_WR;
        end
        ACC_WR: begin
          if (k_q == KW'(WIN - 1)) begin
            pulses  <= pulses + 1'b1;
            state_q <= IDLE;
          end else begin
            k_q     <= k_q + 1'b1;
            state_q <= ACC_RD;
          end
        end
        CLR: begin
          bin_q <= bin_q + 1'b1;
          if (bin_q == BW'(NB - 1)) begin
            bin_q   <= '0;
            state_q <= IDLE;
          end
        end
        RD_MEM: state_q <= RD_LATCH;  // the memories read bin_q at this edge
        RD_LATCH: begin
          rd_sum_q <= mem_rsum;
          rd_cnt_q <= mem_rcnt;
          div_go_q <= 1'b1;
          state_q  <= RD_DIV;
        end
        RD_DIV: if (div_done) begin
          rd_valid <= 1'b1;
          rd_sum   <= rd_sum_q;
          rd_count <= rd_cnt_q;
          rd_avg   <= ((div_quo >> YW) != '0) ? '1 : YW'(div_quo);
          state_q  <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy = (state_q != IDLE);

  // The shared divider is started only while it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) div_go_q |-> !div_busy);
endmodule
