// thread_contexts: the lane's Register Contexts.
//
// Up to THREADS lightweight thread contexts of 16 general purpose and 8 special
// 64-bit registers each. A context is created when an event with threadID 0xFF is
// dispatched (alloc: the lowest free context is taken), keeps its registers across
// `yield`, and is freed by `yieldt`. The threadID of an event selects which
// context the datapath works on. The count of contexts and registers follows the
// document; the lowest-free-first allocation, the three combinational read ports
// and the single write port are this design's choices.
//
// Timing: alloc_tid/alloc_ok are combinational from the free map; the context is
// marked busy at the clock edge where alloc_take is high. Reads are combinational,
// writes take effect at the clock edge. Registers are not cleared at reset: a new
// thread must write a register before reading it.
module thread_contexts
  import updown_pkg::*;
#(
  parameter int unsigned THREADS = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  // allocation / release
  output logic             alloc_ok,
  output logic [TID_W-1:0] alloc_tid,
  input  logic             alloc_take,
  input  logic             free_valid,
  input  logic [TID_W-1:0] free_tid,
  output logic [$clog2(THREADS+1)-1:0] live_count,
  // register access for the running thread
  input  logic [TID_W-1:0] tid,
  input  logic [REG_W-1:0] ra_idx, rb_idx, rc_idx,
  output word_t            ra_data, rb_data, rc_data,
  input  logic             we,
  input  logic [REG_W-1:0] w_idx,
  input  word_t            w_data
);
  localparam int unsigned TW = $clog2(THREADS);

  word_t regs [THREADS][NUM_REGS];
  logic [THREADS-1:0] busy;

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_tid = '0;
    for (int t = THREADS - 1; t >= 0; t--)
      if (!busy[t]) begin
        alloc_ok  = 1'b1;
        alloc_tid = TID_W'(t);
      end
  end

  always_comb begin
    live_count = '0;
    for (int t = 0; t < THREADS; t++) live_count += $bits(live_count)'(busy[t]);
  end

  wire [TW-1:0] t_sel = tid[TW-1:0];

  function automatic word_t rd(logic [REG_W-1:0] idx, word_t v);
    return (idx < REG_W'(NUM_REGS)) ? v : '0;
  endfunction

  assign ra_data = rd(ra_idx, regs[t_sel][ra_idx < REG_W'(NUM_REGS) ? ra_idx : '0]);
  assign rb_data = rd(rb_idx, regs[t_sel][rb_idx < REG_W'(NUM_REGS) ? rb_idx : '0]);
  assign rc_data = rd(rc_idx, regs[t_sel][rc_idx < REG_W'(NUM_REGS) ? rc_idx : '0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else begin
      if (free_valid) busy[free_tid[TW-1:0]] <= 1'b0;
      if (alloc_take && alloc_ok) busy[alloc_tid[TW-1:0]] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && w_idx < REG_W'(NUM_REGS)) regs[t_sel][w_idx] <= w_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) alloc_take |-> alloc_ok);
  assert property (@(posedge clk) disable iff (!rst_n) free_valid |-> busy[free_tid[TW-1:0]]);
endmodule
