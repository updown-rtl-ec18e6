// lane_nw_if: the lane's network interface.
//
// Inbound, it splits each arriving event message into its event word, which goes
// to the EventQ, and its operands, which go to the Operand Buffer; a message is
// taken only when both have room, so an event and its payload are never separated
// (otherwise the sender is held, which counts as an input stall). Outbound, it
// queues the memory requests formatted by sendm / sendmr / sendmops, so the
// datapath continues past a send without waiting for the memory system; no record
// of a request is kept after it leaves, since the response finds its way back by
// the continuation word it carries. The document gives these roles; the message
// format, the outbound queue depth and the valid/ready handshakes are this
// design's choices.
//
// Timing: inbound is combinational (a message accepted in a cycle is written to
// the EventQ and the Operand Buffer at that clock edge). Outbound requests pass
// through a FIFO of OUT_DEPTH entries, one cycle from push to visibility.
// The event word and operand outputs toward the two queues are wired straight
// from the incoming message: the split is a matter of routing, and the only
// inbound logic is the combined ready and the push enables.
module lane_nw_if
  import updown_pkg::*;
#(
  parameter int unsigned OUT_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the accelerator interconnect
  input  logic        in_valid,
  output logic        in_ready,
  input  event_msg_t  in_msg,
  // to EventQ / Operand Buffer
  output logic        eq_push_valid,
  input  logic        eq_push_ready,
  output event_word_t eq_push_data,
  output logic        ob_push_valid,
  input  logic        ob_push_ready,
  output logic [NOPS_W-1:0] ob_push_n,
  output word_t [MAX_OPS-1:0] ob_push_words,
  output logic        in_stall,
  // from the datapath
  input  logic        req_valid,
  output logic        req_ready,
  input  mem_req_t    req,
  // to the accelerator interconnect
  output logic        out_valid,
  input  logic        out_ready,
  output mem_req_t    out_req
);
  // ---------------- inbound ----------------
  assign in_ready      = eq_push_ready && ob_push_ready;
  assign eq_push_valid = in_valid && in_ready;
  assign ob_push_valid = in_valid && in_ready;
  assign eq_push_data  = in_msg.ev;
  assign ob_push_n     = in_msg.ev.nops;
  assign ob_push_words = in_msg.ops;
  assign in_stall      = in_valid && !in_ready;

  // ---------------- outbound ----------------
  localparam int unsigned AW = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1;
  localparam int unsigned CW = $clog2(OUT_DEPTH + 1);

  mem_req_t       q [OUT_DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;
  logic [CW-1:0]  count;

  assign req_ready = (count < CW'(OUT_DEPTH));
  assign out_valid = (count != '0);
  assign out_req   = q[rd_ptr];

  wire do_push = req_valid && req_ready;
  wire do_pop  = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(OUT_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) q[wr_ptr] <= req;
  end

  // The inbound side takes a message in the cycle it is offered, so an arbiter in
  // front of it may switch to another message while this one waits.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> in_msg.ev.nops <= NOPS_W'(MAX_OPS));
endmodule
