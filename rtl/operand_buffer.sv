// operand_buffer: the lane's Operand Buffer.
//
// Holds the payload words (1-8 per event) of the events waiting in the EventQ, in
// the same order as their event words. While an event runs, its operands are the
// oldest words of the buffer: the datapath reads them at an offset from the head
// (the "top numOperands words"), and when the event ends with yield or yieldt all
// of them are released in one cycle. The document gives the buffer's role; the
// circular-buffer organisation, the depth and the all-words-in-one-cycle write
// are this design's choices.
//
// `recirc` moves the oldest recirc_n words to the tail in one cycle, together
// with the EventQ's recirculation of their event word; it works even when the
// buffer is full (the copy then lands on the words it replaces) and blocks pushes
// in that cycle.
//
// Interface: push_n words (push_words[0] first) are written when push_valid and
// push_ready are both high; push_ready says that push_n words fit. rd_idx selects
// one word at head+rd_idx, read combinationally as rd_word. release_n words are
// dropped from the head when release_valid is high.
module operand_buffer
  import updown_pkg::*;
#(
  parameter int unsigned DEPTH = 64   // power of two
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         push_valid,
  output logic                         push_ready,
  input  logic [NOPS_W-1:0]            push_n,
  input  word_t [MAX_OPS-1:0]          push_words,
  input  logic [2:0]                   rd_idx,
  output word_t                        rd_word,
  input  logic                         release_valid,
  input  logic [NOPS_W-1:0]            release_n,
  input  logic                         recirc,
  input  logic [NOPS_W-1:0]            recirc_n,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  word_t mem [DEPTH];
  logic [AW-1:0] head, tail;

  assign push_ready = (CW'(push_n) <= CW'(DEPTH) - count) && !recirc;
  assign rd_word    = mem[AW'(head + AW'(rd_idx))];

  wire do_push = push_valid && push_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (recirc) begin
        tail <= AW'(tail + AW'(recirc_n));
        head <= AW'(head + AW'(recirc_n));
      end else begin
        if (do_push)       tail <= AW'(tail + AW'(push_n));
        if (release_valid) head <= AW'(head + AW'(release_n));
        count <= count + (do_push ? CW'(push_n) : '0) - (release_valid ? CW'(release_n) : '0);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (recirc) begin
      for (int i = 0; i < MAX_OPS; i++)
        if (NOPS_W'(i) < recirc_n) mem[AW'(tail + AW'(i))] <= mem[AW'(head + AW'(i))];
    end else if (do_push) begin
      for (int i = 0; i < MAX_OPS; i++)
        if (NOPS_W'(i) < push_n) mem[AW'(tail + AW'(i))] <= push_words[i];
    end
  end

  // Software can only release operands that are present.
  assert property (@(posedge clk) disable iff (!rst_n)
                   release_valid |-> (CW'(release_n) <= count));
  assert property (@(posedge clk) disable iff (!rst_n)
                   recirc |-> !release_valid && (CW'(recirc_n) <= count));
endmodule
