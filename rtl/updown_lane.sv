// updown_lane: one UpDown lane, an event-driven programmable engine.
//
// Events (memory responses, write acknowledgements, events from the controller
// core) arrive through the network interface; the event word is queued in the
// EventQ and its payload in the Operand Buffer. The datapath dispatches one event
// at a time into the thread context it names, runs its handler from the
// instruction memory, and issues split-transaction memory requests, each carrying
// a continuation word, through the network interface. Nothing records which
// requests are outstanding: their number is bounded only by how fast the
// handlers issue them and by the memory system.
//
// The block structure (EventQ, Operand Buffer, Register Contexts, Instruction
// Execution Datapath, NW interface, scratchpad bank) follows the document's lane
// diagram; sizes the document does not give (queue depths, instruction memory
// size) are this design's choices and are parameters.
//
// Interface: in_* carries event messages to the lane, out_* carries memory
// requests from it, imem_* / pb_* load the program and its base, stat gives
// one-cycle activity pulses, busy is high while a handler runs.
module updown_lane
  import updown_pkg::*;
#(
  parameter int unsigned THREADS    = 128,
  parameter int unsigned EQ_DEPTH   = 32,
  parameter int unsigned OB_DEPTH   = 64,
  parameter int unsigned OUT_DEPTH  = 4,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned SP_BYTES   = 65536
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NWID_W-1:0]             lane_id,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  event_msg_t                    in_msg,
  output logic                          out_valid,
  input  logic                          out_ready,
  output mem_req_t                      out_req,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  logic [31:0]                   imem_data,
  input  logic                          pb_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] pb_data,
  output logic                          busy,
  output lane_stat_t                    stat
);
  localparam int unsigned PCW = $clog2(IMEM_DEPTH);

  // EventQ
  logic        eq_push_valid, eq_push_ready, eq_valid, eq_pop, eq_recirc;
  event_word_t eq_push_data, eq_head;
  logic [$clog2(EQ_DEPTH+1)-1:0] eq_count;
  // Operand Buffer
  logic ob_push_valid, ob_push_ready, ob_release;
  logic [NOPS_W-1:0] ob_push_n, ob_release_n;
  word_t [MAX_OPS-1:0] ob_push_words;
  logic [2:0] ob_rd_idx;
  word_t      ob_rd_word;
  logic [$clog2(OB_DEPTH+1)-1:0] ob_count;
  // contexts
  logic alloc_ok, alloc_take, free_valid, rf_we;
  logic [TID_W-1:0] alloc_tid, free_tid, ctx_tid;
  logic [REG_W-1:0] ra_idx, rb_idx, rc_idx, rf_widx;
  word_t ra_data, rb_data, rc_data, rf_wdata;
  logic [$clog2(THREADS+1)-1:0] live_threads;
  // instruction memory
  logic [PCW-1:0] progbase, fetch_addr;
  logic [31:0]    fetch_data;
  // scratchpad
  logic  sp_we;
  word_t sp_addr, sp_wdata, sp_rdata;
  // datapath -> network interface
  logic     req_valid, req_ready;
  mem_req_t req;
  logic     in_stall;
  lane_stat_t dp_stat;

  lane_nw_if #(.OUT_DEPTH(OUT_DEPTH)) u_nwif (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_msg,
    .eq_push_valid, .eq_push_ready, .eq_push_data,
    .ob_push_valid, .ob_push_ready, .ob_push_n, .ob_push_words,
    .in_stall,
    .req_valid, .req_ready, .req,
    .out_valid, .out_ready, .out_req
  );

  event_queue #(.DEPTH(EQ_DEPTH)) u_eventq (
    .clk, .rst_n,
    .push_valid(eq_push_valid), .push_ready(eq_push_ready), .push_data(eq_push_data),
    .recirc(eq_recirc),
    .pop_valid(eq_valid), .pop_ready(eq_pop), .pop_data(eq_head),
    .count(eq_count)
  );

  operand_buffer #(.DEPTH(OB_DEPTH)) u_opbuf (
    .clk, .rst_n,
    .push_valid(ob_push_valid), .push_ready(ob_push_ready),
    .push_n(ob_push_n), .push_words(ob_push_words),
    .rd_idx(ob_rd_idx), .rd_word(ob_rd_word),
    .release_valid(ob_release), .release_n(ob_release_n),
    .recirc(eq_recirc), .recirc_n(eq_head.nops),
    .count(ob_count)
  );

  thread_contexts #(.THREADS(THREADS)) u_ctx (
    .clk, .rst_n,
    .alloc_ok, .alloc_tid, .alloc_take, .free_valid, .free_tid,
    .live_count(live_threads),
    .tid(ctx_tid),
    .ra_idx, .rb_idx, .rc_idx, .ra_data, .rb_data, .rc_data,
    .we(rf_we), .w_idx(rf_widx), .w_data(rf_wdata)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rst_n,
    .wr_en(imem_we), .wr_addr(imem_addr), .wr_data(imem_data),
    .pb_we, .pb_data, .progbase,
    .fetch_addr, .fetch_data
  );

  scratchpad_bank #(.BYTES(SP_BYTES)) u_spad (
    .clk, .we(sp_we), .addr(sp_addr), .wdata(sp_wdata), .rdata(sp_rdata)
  );

  lane_datapath #(.IMEM_DEPTH(IMEM_DEPTH)) u_dp (
    .clk, .rst_n, .lane_id,
    .eq_valid, .eq_head, .eq_pop, .eq_recirc,
    .alloc_ok, .alloc_tid, .alloc_take, .free_valid, .free_tid, .ctx_tid,
    .ra_idx, .rb_idx, .rc_idx, .ra_data, .rb_data, .rc_data,
    .rf_we, .rf_widx, .rf_wdata,
    .ob_rd_idx, .ob_rd_word, .ob_release, .ob_release_n,
    .progbase, .fetch_addr, .fetch_data,
    .sp_we, .sp_addr, .sp_wdata, .sp_rdata,
    .req_valid, .req_ready, .req,
    .busy, .stat(dp_stat)
  );

  always_comb begin
    stat          = dp_stat;
    stat.in_stall = in_stall;
  end
endmodule
