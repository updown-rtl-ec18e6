// updown_pkg: types and constants shared by every UpDown block.
//
// The central type is the event word (also called continuation word or compute
// name). Its four fields and their order, <networkID, numOperands, threadID,
// eventLabel> from most to least significant, follow the published event word
// layout; the field widths are this design's choice (the layout names the fields
// but not their sizes). threadID 0xFF is the reserved "create a new thread" name.
// A word is 64 bits, and a message carries 1 to 8 payload words.
//
// Two message types travel between lanes and the memory system:
//   mem_req_t   lane -> DRAM: a split-transaction read or write that carries the
//               continuation word to which the response is to be delivered.
//   event_msg_t DRAM / controller core -> lane: an event word plus its operands.
package updown_pkg;

  localparam int unsigned WORD_W  = 64;
  localparam int unsigned MAX_OPS = 8;     // payload of 1-8 words
  localparam int unsigned NWID_W  = 32;
  localparam int unsigned NOPS_W  = 4;     // 0..8 operands
  localparam int unsigned TID_W   = 8;
  localparam int unsigned LABEL_W = 20;

  // Per-thread register context: 16 general purpose + 8 special registers.
  localparam int unsigned NUM_GPR  = 16;
  localparam int unsigned NUM_SPR  = 8;
  localparam int unsigned NUM_REGS = NUM_GPR + NUM_SPR;
  localparam int unsigned REG_W    = 5;

  // Special registers whose value is supplied by hardware while an event runs.
  localparam logic [REG_W-1:0] SR_EVENT = 5'd16;  // event word being executed
  localparam logic [REG_W-1:0] SR_NWID  = 5'd17;  // this lane's networkID
  localparam logic [REG_W-1:0] SR_TID   = 5'd18;  // current threadID

  localparam logic [TID_W-1:0] TID_NEW = 8'hFF;

  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    logic [NWID_W-1:0]  nwid;    // destination lane
    logic [NOPS_W-1:0]  nops;    // payload size in words
    logic [TID_W-1:0]   tid;     // thread context (0xFF = new thread)
    logic [LABEL_W-1:0] label;   // instruction offset from the program base
  } event_word_t;

  typedef struct packed {
    logic               write;   // 1 = write, 0 = read
    logic [NOPS_W-1:0]  nwords;  // 1..8 words
    word_t              addr;    // byte address of the first word
    event_word_t        cont;    // where the response event goes
    word_t [MAX_OPS-1:0] data;   // write payload, data[0] first
  } mem_req_t;

  typedef struct packed {
    event_word_t         ev;     // ev.nops = number of valid operands
    word_t [MAX_OPS-1:0] ops;    // ops[0] first
  } event_msg_t;

  // Lane activity pulses, one cycle each, for performance counting.
  typedef struct packed {
    logic dispatch;     // an event began executing
    logic new_thread;   // a thread context was created (threadID 0xFF)
    logic yield;        // a thread suspended, keeping its registers
    logic yieldt;       // a thread terminated, freeing its context
    logic alloc_stall;  // a 0xFF event waited: all contexts busy
    logic send;         // a memory request left the datapath
    logic send_stall;   // a memory request waited for the network interface
    logic in_stall;     // an incoming event waited: EventQ or Operand Buffer full
  } lane_stat_t;

  // Instruction set subset (32-bit instructions). Encoding is this design's own.
  //   [31:27] opcode  [26:22] a  [21:17] b  [16:12] c  [11:0] imm12
  //   I-type: [16:0] imm17
  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_ADD     = 5'd1,   // a = b + c
    OP_SUB     = 5'd2,   // a = b - c
    OP_ADDI    = 5'd3,   // a = b + sext(imm17)
    OP_AND     = 5'd4,
    OP_OR      = 5'd5,
    OP_SLL     = 5'd6,   // a = b << c[5:0]
    OP_SRL     = 5'd7,
    OP_MOVOP   = 5'd8,   // a = operand[imm17[2:0]] of the current event
    OP_LDS     = 5'd9,   // a = scratchpad[(b + sext(imm17)) >> 3]
    OP_STS     = 5'd10,  // scratchpad[(b + sext(imm12)) >> 3] = a
    OP_BEQ     = 5'd11,  // if a == b: pc += sext(imm17)
    OP_BNE     = 5'd12,
    OP_BLT     = 5'd13,  // unsigned a < b
    OP_JMP     = 5'd14,  // pc += sext(imm17)
    OP_EVI     = 5'd15,  // a = {own nwid, 0, current tid, imm17}
    OP_EV      = 5'd16,  // a = {b[nwid], 0, c[tid], imm12}
    OP_SENDMR  = 5'd17,  // addr=a, cont=b, data=regs c..c+n-1 (write) / read
    OP_SENDM   = 5'd18,  // write: addr=a, cont=b, data=scratchpad from byte addr c
    OP_SENDMOPS= 5'd19,  // write: addr=a, cont=b, data=operands from index imm[6:4]
    OP_YIELD   = 5'd20,
    OP_YIELDT  = 5'd21
  } opcode_e;
  // Send instructions: imm12[3] = write, imm12[2:0] = nwords-1.

  function automatic logic [31:0] enc_r(opcode_e op, logic [4:0] a, logic [4:0] b,
                                        logic [4:0] c, logic [11:0] imm);
    return {op, a, b, c, imm};
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, logic [4:0] a, logic [4:0] b,
                                        logic [16:0] imm);
    return {op, a, b, imm};
  endfunction

endpackage
