// lane_datapath: event dispatch and instruction execution of one UpDown lane.
//
// Dispatch follows the compute-name synchronisation steps: when the lane is idle
// and the EventQ holds an event word, (1) the word is taken from the EventQ,
// (2) the first instruction is fetched from Progbase + eventLabel, (3) threadID
// selects the register context (threadID 0xFF creates a new context; if none is
// free the event and its operands are moved to the back of the queue, at most
// every other cycle, so that events of running threads behind it are not
// blocked and new events can still enter), and (4) the oldest numOperands words of the
// Operand Buffer become the event's operands. Dispatch takes one cycle. The
// handler then runs one instruction per cycle until `yield` (the thread keeps its
// registers) or `yieldt` (the context is freed); both release the operands, and
// the next event is dispatched in the following cycle.
//
// Memory is reached only through split-transaction sends: sendmr (payload from
// registers, or a read with no payload), sendm (payload from the scratchpad) and
// sendmops (payload from the Operand Buffer) gather 1-8 words, one per cycle, and
// hand a request carrying a continuation word to the network interface; execution
// then continues without waiting for the response, which returns later as a new
// event named by that continuation. evi / ev build continuation words. If the
// network interface is full, the send waits (send stall).
//
// What follows the document: the event word fields, the four dispatch steps,
// threadID 0xFF, the 16 + 8 registers per thread, yield / yieldt, the three send
// instructions and their payload sources, continuation creation, 1-8 word
// payloads. This design's own: the instruction encoding and the small ALU /
// branch / scratchpad instruction subset (see updown_pkg), the read-only special
// registers r16 (current event word), r17 (lane networkID), r18 (threadID), the
// one-word-per-cycle gather, the recirculation of a new-thread event that finds
// no free context, and the rule that an undefined opcode acts as nop.
//
// Some output bits are plain wiring by design: the register read indices are
// fields of the fetched instruction, and the stat.in_stall bit is always 0 here
// because the lane fills it in from the network interface.
module lane_datapath
  import updown_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NWID_W-1:0]             lane_id,
  // EventQ head
  input  logic                          eq_valid,
  input  event_word_t                   eq_head,
  output logic                          eq_pop,
  output logic                          eq_recirc,
  // register contexts
  input  logic                          alloc_ok,
  input  logic [TID_W-1:0]              alloc_tid,
  output logic                          alloc_take,
  output logic                          free_valid,
  output logic [TID_W-1:0]              free_tid,
  output logic [TID_W-1:0]              ctx_tid,
  output logic [REG_W-1:0]              ra_idx, rb_idx, rc_idx,
  input  word_t                         ra_data, rb_data, rc_data,
  output logic                          rf_we,
  output logic [REG_W-1:0]              rf_widx,
  output word_t                         rf_wdata,
  // operand buffer
  output logic [2:0]                    ob_rd_idx,
  input  word_t                         ob_rd_word,
  output logic                          ob_release,
  output logic [NOPS_W-1:0]             ob_release_n,
  // instruction memory
  input  logic [$clog2(IMEM_DEPTH)-1:0] progbase,
  output logic [$clog2(IMEM_DEPTH)-1:0] fetch_addr,
  input  logic [31:0]                   fetch_data,
  // scratchpad
  output logic                          sp_we,
  output word_t                         sp_addr,
  output word_t                         sp_wdata,
  input  word_t                         sp_rdata,
  // outgoing memory requests
  output logic                          req_valid,
  input  logic                          req_ready,
  output mem_req_t                      req,
  // status
  output logic                          busy,
  output lane_stat_t                    stat
);
  localparam int unsigned PCW = $clog2(IMEM_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_GATHER, S_SEND} state_e;
  typedef enum logic [1:0] {SRC_REG, SRC_SP, SRC_OB} src_e;

  state_e          state;
  logic [PCW-1:0]  pc;
  logic [TID_W-1:0] cur_tid;
  event_word_t     cur_ev;
  mem_req_t        req_q;
  logic [2:0]      g_i;         // word being gathered
  src_e            g_src;
  logic [REG_W-1:0] g_reg;      // first payload register
  word_t           g_spa;       // first payload scratchpad byte address
  logic [2:0]      g_op;        // first payload operand index
  logic            recirc_q;    // an event was recirculated in the last cycle

  // ---------------- decode ----------------
  wire [31:0]  ins   = fetch_data;
  opcode_e     op;
  assign op = opcode_e'(ins[31:27]);
  wire [4:0]   fa    = ins[26:22];
  wire [4:0]   fb    = ins[21:17];
  wire [4:0]   fc    = ins[16:12];
  wire [11:0]  imm12 = ins[11:0];
  wire [16:0]  imm17 = ins[16:0];
  wire word_t  sx12  = word_t'({{52{imm12[11]}}, imm12});
  wire word_t  sx17  = word_t'({{47{imm17[16]}}, imm17});

  assign ctx_tid    = (state == S_IDLE) ? alloc_tid : cur_tid;
  assign fetch_addr = pc;
  assign ra_idx     = fa;
  assign rb_idx     = fb;
  assign rc_idx     = (state == S_GATHER) ? REG_W'(g_reg + REG_W'(g_i)) : fc;

  // Special registers supplied by hardware.
  function automatic word_t spr(logic [REG_W-1:0] idx, word_t v, event_word_t ev,
                                logic [NWID_W-1:0] nw, logic [TID_W-1:0] t);
    case (idx)
      SR_EVENT: return word_t'(ev);
      SR_NWID:  return word_t'(nw);
      SR_TID:   return word_t'(t);
      default:  return v;
    endcase
  endfunction

  word_t A, B, C;
  assign A = spr(ra_idx, ra_data, cur_ev, lane_id, cur_tid);
  assign B = spr(rb_idx, rb_data, cur_ev, lane_id, cur_tid);
  assign C = spr(rc_idx, rc_data, cur_ev, lane_id, cur_tid);

  wire dispatch_new = eq_head.tid == TID_NEW;
  wire can_dispatch = (state == S_IDLE) && eq_valid && (!dispatch_new || alloc_ok);

  // ---------------- combinational control ----------------
  always_comb begin
    eq_pop       = 1'b0;
    eq_recirc    = 1'b0;
    alloc_take   = 1'b0;
    free_valid   = 1'b0;
    free_tid     = cur_tid;
    rf_we        = 1'b0;
    rf_widx      = fa;
    rf_wdata     = '0;
    ob_rd_idx    = 3'(imm17[2:0]);
    ob_release   = 1'b0;
    ob_release_n = cur_ev.nops;
    sp_we        = 1'b0;
    sp_addr      = B + sx17;
    sp_wdata     = A;
    req_valid    = 1'b0;
    req          = req_q;
    stat         = '0;

    case (state)
      S_IDLE: begin
        if (can_dispatch) begin
          eq_pop          = 1'b1;
          alloc_take      = dispatch_new;
          stat.dispatch   = 1'b1;
          stat.new_thread = dispatch_new;
        end
        // No free context: send the event (and its operands) to the back of
        // the queue so that events for existing threads can still run.
        // At most every other cycle, so that incoming events (which cannot be
        // written while the queue recirculates) always get in.
        eq_recirc        = eq_valid && dispatch_new && !alloc_ok && !recirc_q;
        stat.alloc_stall = eq_valid && dispatch_new && !alloc_ok;
      end

      S_EXEC: begin
        case (op)
          OP_ADD:  begin rf_we = 1'b1; rf_wdata = B + C; end
          OP_SUB:  begin rf_we = 1'b1; rf_wdata = B - C; end
          OP_ADDI: begin rf_we = 1'b1; rf_wdata = B + sx17; end
          OP_AND:  begin rf_we = 1'b1; rf_wdata = B & C; end
          OP_OR:   begin rf_we = 1'b1; rf_wdata = B | C; end
          OP_SLL:  begin rf_we = 1'b1; rf_wdata = B << C[5:0]; end
          OP_SRL:  begin rf_we = 1'b1; rf_wdata = B >> C[5:0]; end
          OP_MOVOP: begin rf_we = 1'b1; rf_wdata = ob_rd_word; end
          OP_LDS:  begin rf_we = 1'b1; rf_wdata = sp_rdata; end
          OP_STS:  begin sp_we = 1'b1; sp_addr = B + sx12; end
          OP_EVI: begin
            rf_we    = 1'b1;
            rf_wdata = word_t'(event_word_t'{nwid: lane_id, nops: '0, tid: cur_tid,
                                             label: LABEL_W'(imm17)});
          end
          OP_EV: begin
            rf_we    = 1'b1;
            rf_wdata = word_t'(event_word_t'{nwid: B[63:32], nops: '0, tid: C[TID_W-1:0],
                                             label: LABEL_W'(imm12)});
          end
          OP_YIELD, OP_YIELDT: begin
            ob_release  = 1'b1;
            free_valid  = (op == OP_YIELDT);
            stat.yield  = (op == OP_YIELD);
            stat.yieldt = (op == OP_YIELDT);
          end
          default: ;
        endcase
      end

      S_GATHER: begin
        ob_rd_idx = 3'(g_op + g_i);
        sp_addr   = g_spa + word_t'({g_i, 3'b000});
      end

      S_SEND: begin
        req_valid       = 1'b1;
        stat.send       = req_ready;
        stat.send_stall = !req_ready;
      end

      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  // ---------------- sequential ----------------
  wire is_send = (op == OP_SENDMR) || (op == OP_SENDM) || (op == OP_SENDMOPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) recirc_q <= 1'b0;
    else        recirc_q <= eq_recirc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pc      <= '0;
      cur_tid <= '0;
      cur_ev  <= '0;
      req_q   <= '0;
      g_i     <= '0;
      g_src   <= SRC_REG;
      g_reg   <= '0;
      g_spa   <= '0;
      g_op    <= '0;
    end else begin
      case (state)
        S_IDLE: if (can_dispatch) begin
          cur_tid    <= dispatch_new ? alloc_tid : eq_head.tid;
          cur_ev     <= eq_head;
          cur_ev.tid <= dispatch_new ? alloc_tid : eq_head.tid;
          pc         <= PCW'(progbase + PCW'(eq_head.label));
          state      <= S_EXEC;
        end

        S_EXEC: begin
          pc <= pc + 1'b1;
          case (op)
            OP_BEQ: if (A == B) pc <= PCW'(pc + PCW'(sx17));
            OP_BNE: if (A != B) pc <= PCW'(pc + PCW'(sx17));
            OP_BLT: if (A <  B) pc <= PCW'(pc + PCW'(sx17));
            OP_JMP: pc <= PCW'(pc + PCW'(sx17));
            OP_YIELD, OP_YIELDT: state <= S_IDLE;
            default: ;
          endcase
          if (is_send) begin
            req_q.addr   <= A;
            req_q.cont   <= event_word_t'(B);
            req_q.nwords <= NOPS_W'(imm12[2:0]) + 1'b1;
            req_q.write  <= (op != OP_SENDMR) || imm12[3];
            req_q.data   <= '0;
            g_i          <= '0;
            g_reg        <= fc;
            g_spa        <= C;
            g_op         <= imm12[6:4];
            g_src        <= (op == OP_SENDM) ? SRC_SP : (op == OP_SENDMOPS) ? SRC_OB : SRC_REG;
            state        <= ((op == OP_SENDMR) && !imm12[3]) ? S_SEND : S_GATHER;
          end
        end

        S_GATHER: begin
          case (g_src)
            SRC_SP:  req_q.data[g_i] <= sp_rdata;
            SRC_OB:  req_q.data[g_i] <= ob_rd_word;
            default: req_q.data[g_i] <= C;
          endcase
          g_i <= g_i + 1'b1;
          if (NOPS_W'(g_i) + 1'b1 == req_q.nwords) state <= S_SEND;
        end

        S_SEND: if (req_ready) state <= S_EXEC;

        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> req_valid && $stable(req));
endmodule
