// tb_lane_datapath: self-checking test of event dispatch and instruction execution.
//
// The datapath is wired to the EventQ, Operand Buffer, register contexts,
// instruction memory and scratchpad; the testbench plays the network, pushing
// events straight into the EventQ / Operand Buffer and taking memory requests.
// Handlers report their results through memory writes, which are compared with
// values computed here. Checked: ALU, branch, scratchpad and operand
// instructions; continuation words built by evi / ev; the payload of sendmr,
// sendm and sendmops and a read request; register state kept across yield and
// the same context used by the next event; threadID 0xFF allocation; dispatch in
// one cycle and one instruction per cycle (exact cycle count to the first send);
// a send held while the network interface is not ready; and a new-thread event
// that finds no free context (2 contexts here) being moved behind the event that
// frees one, with its operand.
module tb_lane_datapath;
  import updown_pkg::*;
  localparam int THREADS = 2, IMEM = 256;
  localparam logic [NWID_W-1:0] LANE = 32'h0000_0123;

  logic clk = 0, rst_n = 0;
  // EventQ / Operand Buffer
  logic eq_push_valid, eq_push_ready, eq_valid, eq_pop, eq_recirc;
  event_word_t eq_push_data, eq_head;
  logic ob_push_valid, ob_push_ready, ob_release;
  logic [NOPS_W-1:0] ob_push_n, ob_release_n;
  word_t [MAX_OPS-1:0] ob_push_words;
  logic [2:0] ob_rd_idx;
  word_t ob_rd_word;
  // contexts
  logic alloc_ok, alloc_take, free_valid, rf_we;
  logic [TID_W-1:0] alloc_tid, free_tid, ctx_tid;
  logic [REG_W-1:0] ra_idx, rb_idx, rc_idx, rf_widx;
  word_t ra_data, rb_data, rc_data, rf_wdata;
  // imem
  logic imem_we = 0;
  logic [7:0] imem_addr = 0;
  logic [31:0] imem_data = 0, fetch_data;
  logic [7:0] progbase, fetch_addr;
  // scratchpad
  logic sp_we;
  word_t sp_addr, sp_wdata, sp_rdata;
  // requests
  logic req_valid, req_ready, busy;
  mem_req_t req;
  lane_stat_t stat;

  int checks = 0, failures = 0;
  int n_alloc_stall = 0, n_send_stall = 0, n_yield = 0, n_yieldt = 0, n_new = 0;
  longint cyc = 0;
  mem_req_t got[$];
  longint   got_cyc[$];
  longint   dispatch_cyc[$];

  event_queue #(.DEPTH(8)) u_eq (
    .clk, .rst_n, .push_valid(eq_push_valid), .push_ready(eq_push_ready), .push_data(eq_push_data),
    .recirc(eq_recirc), .pop_valid(eq_valid), .pop_ready(eq_pop), .pop_data(eq_head), .count());
  operand_buffer #(.DEPTH(32)) u_ob (
    .clk, .rst_n, .push_valid(ob_push_valid), .push_ready(ob_push_ready), .push_n(ob_push_n),
    .push_words(ob_push_words), .rd_idx(ob_rd_idx), .rd_word(ob_rd_word),
    .release_valid(ob_release), .release_n(ob_release_n), .recirc(eq_recirc),
    .recirc_n(eq_head.nops), .count());
  thread_contexts #(.THREADS(THREADS)) u_ctx (
    .clk, .rst_n, .alloc_ok, .alloc_tid, .alloc_take, .free_valid, .free_tid, .live_count(),
    .tid(ctx_tid), .ra_idx, .rb_idx, .rc_idx, .ra_data, .rb_data, .rc_data,
    .we(rf_we), .w_idx(rf_widx), .w_data(rf_wdata));
  instr_mem #(.DEPTH(IMEM)) u_im (
    .clk, .rst_n, .wr_en(imem_we), .wr_addr(imem_addr), .wr_data(imem_data),
    .pb_we(1'b0), .pb_data('0), .progbase, .fetch_addr, .fetch_data);
  scratchpad_bank #(.BYTES(4096)) u_sp (.clk, .we(sp_we), .addr(sp_addr), .wdata(sp_wdata), .rdata(sp_rdata));

  lane_datapath #(.IMEM_DEPTH(IMEM)) dut (
    .clk, .rst_n, .lane_id(LANE),
    .eq_valid, .eq_head, .eq_pop, .eq_recirc,
    .alloc_ok, .alloc_tid, .alloc_take, .free_valid, .free_tid, .ctx_tid,
    .ra_idx, .rb_idx, .rc_idx, .ra_data, .rb_data, .rc_data, .rf_we, .rf_widx, .rf_wdata,
    .ob_rd_idx, .ob_rd_word, .ob_release, .ob_release_n,
    .progbase, .fetch_addr, .fetch_data,
    .sp_we, .sp_addr, .sp_wdata, .sp_rdata,
    .req_valid, .req_ready, .req, .busy, .stat);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- monitors ----
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) begin got.push_back(req); got_cyc.push_back(cyc); end
    if (stat.dispatch) dispatch_cyc.push_back(cyc);
    if (stat.alloc_stall) n_alloc_stall++;
    if (stat.send_stall) n_send_stall++;
    if (stat.yield) n_yield++;
    if (stat.yieldt) n_yieldt++;
    if (stat.new_thread) n_new++;
  end

  // ---- program ----
  function automatic logic [11:0] snd(int n, bit w, int opi = 0);
    return 12'((opi << 4) | (int'(w) << 3) | (n - 1));
  endfunction

  logic [31:0] prog [IMEM];
  int pc_ptr;
  task automatic put(logic [31:0] ins); prog[pc_ptr] = ins; pc_ptr++; endtask

  localparam int L_MAIN = 0, L_CONT = 60, L_HOLD = 80, L_USE = 90, L_FREE = 100, L_WACK = 110;

  task automatic build_program();
    for (int i = 0; i < IMEM; i++) prog[i] = '0;
    // L_MAIN: operands x, y
    pc_ptr = L_MAIN;
    put(enc_i(OP_MOVOP, 0, 0, 0));            // r0 = x
    put(enc_i(OP_MOVOP, 1, 0, 1));            // r1 = y
    put(enc_r(OP_ADD, 2, 0, 1, 0));           // r2 = x + y
    put(enc_r(OP_SUB, 3, 0, 1, 0));           // r3 = x - y
    put(enc_r(OP_AND, 4, 0, 1, 0));           // r4 = x & y
    put(enc_r(OP_OR, 5, 0, 1, 0));            // r5 = x | y
    put(enc_i(OP_ADDI, 6, 0, -17'sd5));       // r6 = x - 5
    put(enc_r(OP_SUB, 10, 10, 10, 0));        // r10 = 0
    put(enc_i(OP_ADDI, 8, 10, 17'd4));        // r8 = 4
    put(enc_r(OP_SLL, 7, 1, 8, 0));           // r7 = y << 4
    put(enc_i(OP_ADDI, 9, 10, 17'h100));      // r9 = 0x100 (address)
    put(enc_i(OP_EVI, 11, 0, 17'(L_WACK)));   // r11 = continuation
    put(enc_r(OP_SENDMR, 9, 11, 2, snd(6, 1)));   // write r2..r7 -> 0x100   (instr 12)
    put(enc_r(OP_STS, 2, 10, 0, 12'd16));     // sp[16] = r2
    put(enc_r(OP_STS, 3, 10, 0, 12'd24));     // sp[24] = r3
    put(enc_i(OP_LDS, 12, 10, 17'd16));       // r12 = sp[16]
    put(enc_i(OP_BEQ, 12, 2, 17'd2));         // taken: skip next
    put(enc_i(OP_ADDI, 13, 10, 17'd1));       //   (skipped)
    put(enc_i(OP_ADDI, 13, 10, 17'd7));       // r13 = 7
    put(enc_i(OP_BLT, 13, 10, 17'd2));        // 7 < 0 unsigned: not taken
    put(enc_i(OP_ADDI, 13, 13, 17'd1));       // r13 = 8
    put(enc_i(OP_BNE, 13, 8, 17'd2));         // 8 != 4: taken
    put(enc_i(OP_ADDI, 13, 13, 17'd100));     //   (skipped)
    put(enc_i(OP_JMP, 0, 0, 17'd2));          // skip next
    put(enc_i(OP_ADDI, 13, 13, 17'd100));     //   (skipped)
    put(enc_r(OP_SENDMR, 9, 11, 12, snd(2, 1)));  // write r12, r13
    put(enc_i(OP_ADDI, 20, 10, 17'd16));      // r20 = 16 (scratchpad byte address)
    put(enc_r(OP_EV, 15, 16, 18, 12'd33));    // r15 = ev(nwid of event word, own tid, 33)
    put(enc_r(OP_SENDM, 9, 15, 20, snd(2, 1)));        // write sp[16], sp[24]
    put(enc_r(OP_SENDMOPS, 9, 11, 0, snd(2, 1, 0)));   // write operands x, y
    put(enc_r(OP_SENDMR, 0, 11, 0, snd(8, 0)));        // read 8 words at x
    put(enc_i(OP_ADDI, 19, 1, 17'd0));        // r19 (stored special) = y
    put(enc_r(OP_NOP, 0, 0, 0, 0));
    put(enc_r(OP_YIELD, 0, 0, 0, 0));
    // L_CONT: same thread continues; registers survived the yield
    pc_ptr = L_CONT;
    put(enc_r(OP_SENDMR, 9, 11, 19, snd(1, 1)));   // write r19 (= y)
    put(enc_r(OP_SENDMR, 9, 16, 17, snd(2, 1)));   // write r17 (nwid), r18 (tid); cont = event word
    put(enc_r(OP_YIELDT, 0, 0, 0, 0));
    // L_HOLD: keep the context
    pc_ptr = L_HOLD;
    put(enc_r(OP_YIELD, 0, 0, 0, 0));
    // L_USE: report operand 0 and own tid
    pc_ptr = L_USE;
    put(enc_r(OP_SUB, 10, 10, 10, 0));
    put(enc_i(OP_MOVOP, 1, 0, 0));
    put(enc_r(OP_SENDMR, 10, 16, 1, snd(1, 1)));
    put(enc_r(OP_YIELDT, 0, 0, 0, 0));
    // L_FREE
    pc_ptr = L_FREE;
    put(enc_r(OP_YIELDT, 0, 0, 0, 0));
  endtask

  task automatic push_event(event_word_t ev, word_t o0 = 0, word_t o1 = 0);
    eq_push_valid = 1; ob_push_valid = 1;
    eq_push_data = ev; ob_push_n = ev.nops;
    ob_push_words = '0; ob_push_words[0] = o0; ob_push_words[1] = o1;
    #1;
    while (!(eq_push_ready && ob_push_ready)) begin @(negedge clk); #1; end
    @(negedge clk);
    eq_push_valid = 0; ob_push_valid = 0;
  endtask

  function automatic event_word_t mk(int tid, int label, int nops);
    event_word_t e;
    e.nwid = LANE; e.nops = NOPS_W'(nops); e.tid = TID_W'(tid); e.label = LABEL_W'(label);
    return e;
  endfunction

  task automatic wait_idle();
    repeat (2) @(negedge clk);
    while (busy || eq_valid) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x = 64'h0000_0000_0000_1234, y = 64'h0000_0000_0000_0f0f;
    event_word_t cont_w;
    eq_push_valid = 0; ob_push_valid = 0; eq_push_data = '0; ob_push_n = 0; ob_push_words = '0;
    req_ready = 1;
    build_program();
    repeat (2) @(posedge clk);
    for (int i = 0; i < IMEM; i++) begin
      imem_we = 1; imem_addr = 8'(i); imem_data = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    rst_n = 1;
    @(negedge clk);

    // ---------- event 1: new thread, main handler ----------
    push_event(mk(8'hFF, L_MAIN, 2), x, y);
    wait_idle();
    cont_w = event_word_t'{nwid: LANE, nops: '0, tid: 8'd0, label: LABEL_W'(L_WACK)};
    chk(got.size() == 5, $sformatf("five requests, got %0d", got.size()));
    if (got.size() == 5) begin
      chk(got[0].write && got[0].nwords == 6 && got[0].addr == 64'h100 && got[0].cont == cont_w, "sendmr header");
      chk(got[0].data[0] == x + y && got[0].data[1] == x - y && got[0].data[2] == (x & y) &&
          got[0].data[3] == (x | y) && got[0].data[4] == x - 5 && got[0].data[5] == (y << 4), "ALU results");
      chk(got[1].nwords == 2 && got[1].data[0] == x + y && got[1].data[1] == 64'd8, "scratchpad and branches");
      chk(got[2].nwords == 2 && got[2].data[0] == x + y && got[2].data[1] == x - y, "sendm payload from scratchpad");
      chk(got[2].cont == event_word_t'{nwid: LANE, nops: 4'd0, tid: 8'd0, label: 20'd33}, "ev continuation");
      chk(got[3].nwords == 2 && got[3].data[0] == x && got[3].data[1] == y, "sendmops payload from operands");
      chk(!got[4].write && got[4].nwords == 8 && got[4].addr == x && got[4].cont == cont_w, "read request");
      // dispatch cycle, instructions 0..12 (the send itself) one per cycle, 6 gather cycles
      chk(got_cyc[0] - dispatch_cyc[0] == 1 + 13 + 6, $sformatf("cycles to first send %0d", got_cyc[0] - dispatch_cyc[0]));
    end
    chk(n_new == 1 && n_yield == 1, "new thread then yield");

    // ---------- event 2: same thread continues ----------
    got.delete(); got_cyc.delete(); dispatch_cyc.delete();
    push_event(mk(0, L_CONT, 0));
    // hold the first send for a few cycles
    req_ready = 0;
    repeat (6) @(negedge clk);
    chk(req_valid && got.size() == 0, "send waits for the network interface");
    req_ready = 1;
    wait_idle();
    chk(n_send_stall >= 2, "send stall counted");
    chk(got.size() == 2, "two requests from the continued thread");
    if (got.size() == 2) begin
      chk(got[0].data[0] == y, "register kept across yield");
      chk(got[1].data[0] == word_t'(LANE) && got[1].data[1] == 0, "special registers nwid and tid");
    end
    chk(n_yieldt == 1, "yieldt");

    // ---------- allocation with contexts exhausted ----------
    got.delete();
    push_event(mk(8'hFF, L_HOLD, 0));          // takes context 0
    push_event(mk(8'hFF, L_HOLD, 0));          // takes context 1
    push_event(mk(8'hFF, L_USE, 1), 64'hCAFE); // no context left
    push_event(mk(1, L_FREE, 0));              // frees context 1
    wait_idle();
    chk(n_alloc_stall >= 1, "allocation stall happened");
    chk(got.size() == 1 && got[0].data[0] == 64'hCAFE, "operand moved with the event");
    if (got.size() == 1) chk(got[0].cont.tid == 8'd1, "freed context reused");
    chk(n_new == 4, "contexts created");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
