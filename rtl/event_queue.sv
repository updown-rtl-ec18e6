// event_queue: the lane's EventQ.
//
// Every event that arrives at a lane (a DRAM response, a write acknowledgement or a
// software event from the controller core) is scheduled by enqueuing its event
// word here; the dispatcher takes words out in arrival order, one event at a time.
// The document names the queue and its role; the first-in first-out order, the
// depth and the valid/ready style interface are this design's choices.
//
// Interface: push side (push_valid/push_ready/push_data) and pop side
// (pop_valid/pop_ready/pop_data, show-ahead: the head is visible before popping).
// `recirc` moves the head word to the tail in one cycle (used when a new-thread
// event cannot get a context yet, so that the events behind it can run); it
// works even when the queue is full, and no push may happen in that cycle.
// Timing: a pushed word is visible at the head one cycle later; one push and one
// pop may happen in the same cycle. `count` is the number of stored words.
module event_queue
  import updown_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push_valid,
  output logic        push_ready,
  input  event_word_t push_data,
  input  logic        recirc,
  output logic        pop_valid,
  input  logic        pop_ready,
  output event_word_t pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  event_word_t mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  wire do_push = push_valid && push_ready;
  wire do_pop  = pop_valid && pop_ready;

  assign push_ready = (count < DEPTH[$clog2(DEPTH+1)-1:0]) && !recirc;
  assign pop_valid  = (count != '0);
  assign pop_data   = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push || recirc)        wr_ptr <= inc(wr_ptr);
      if ((do_pop && !recirc) || recirc) rd_ptr <= inc(rd_ptr);
      if (!recirc)
        count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (recirc)       mem[wr_ptr] <= mem[rd_ptr];
    else if (do_push) mem[wr_ptr] <= push_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) recirc |-> pop_valid && !pop_ready);
  // The occupancy can never exceed the depth.
  assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
