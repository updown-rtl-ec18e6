// hbm_model: behavioural model of the DRAM seen by an UpDown accelerator (test only).
//
// PORTS independent request/response channels share one word-addressed memory.
// Every accepted request is performed at once and its response is released LAT
// cycles later; any number of requests may be in flight (there is no tracking
// limit, as with a real HBM stack whose only limits are its queues and banks).
// A read returns an event whose word is the request's continuation with
// numOperands = nwords and whose operands are the data; a write returns an
// acknowledgement event with one operand, the address. Memory starts as
// mem[i] = INIT_BASE + i. While `hold` is high no request is accepted, as when
// the DRAM's queues are full.
module hbm_model
  import updown_pkg::*;
#(
  parameter int unsigned PORTS     = 8,
  parameter int unsigned LAT       = 200,
  parameter int unsigned WORDS     = 1 << 16,
  parameter logic [63:0] INIT_BASE = 64'h1000_0000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     hold,        // refuse requests (full queues)
  input  logic       [PORTS-1:0]   req_valid,
  output logic       [PORTS-1:0]   req_ready,
  input  mem_req_t   [PORTS-1:0]   req,
  output logic       [PORTS-1:0]   rsp_valid,
  input  logic       [PORTS-1:0]   rsp_ready,
  output event_msg_t [PORTS-1:0]   rsp,
  output int unsigned              outstanding,
  output int unsigned              max_outstanding,
  output int unsigned              reads,
  output int unsigned              writes
);
  typedef struct packed {
    longint unsigned due;
    event_msg_t      msg;
  } pend_t;

  word_t           mem [WORDS];
  pend_t           q [PORTS][$];
  longint unsigned cyc;

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = INIT_BASE + 64'(i);

  function automatic word_t peek(int unsigned widx);
    return mem[widx % WORDS];
  endfunction

  assign req_ready = {PORTS{!hold}};

  always_comb begin
    for (int p = 0; p < int'(PORTS); p++) begin
      rsp_valid[p] = (q[p].size() > 0) && (q[p][0].due <= cyc);
      rsp[p]       = (q[p].size() > 0) ? q[p][0].msg : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
      outstanding <= 0;
      max_outstanding <= 0;
      reads <= 0;
      writes <= 0;
      for (int p = 0; p < int'(PORTS); p++) q[p].delete();
    end else begin
      automatic int unsigned o = outstanding;
      automatic int unsigned r = reads;
      automatic int unsigned w = writes;
      cyc <= cyc + 1;
      for (int p = 0; p < int'(PORTS); p++) begin
        if (rsp_valid[p] && rsp_ready[p]) begin
          void'(q[p].pop_front());
          o--;
        end
        if (req_valid[p] && req_ready[p]) begin
          automatic pend_t e;
          automatic int unsigned base = int'(req[p].addr >> 3);
          e.due = cyc + LAT;
          e.msg = '0;
          e.msg.ev = req[p].cont;
          if (req[p].write) begin
            for (int i = 0; i < int'(req[p].nwords); i++)
              mem[(base + i) % WORDS] = req[p].data[i];
            e.msg.ev.nops = 1;
            e.msg.ops[0]  = req[p].addr;
            w++;
          end else begin
            e.msg.ev.nops = req[p].nwords;
            for (int i = 0; i < int'(req[p].nwords); i++)
              e.msg.ops[i] = mem[(base + i) % WORDS];
            r++;
          end
          q[p].push_back(e);
          o++;
        end
      end
      outstanding <= o;
      reads <= r;
      writes <= w;
      if (o > max_outstanding) max_outstanding <= o;
    end
  end
endmodule
