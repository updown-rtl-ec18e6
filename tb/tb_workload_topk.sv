// tb_workload_topk: Top-k workload (TK, k = 8) on one lane at its default size
// (128 thread contexts, 64 KB scratchpad) against a behavioural DRAM.
//
// DRAM word i holds v = 0x1000_0000 + i; the handler turns it into a key
// key = (v * 8191) mod 2^16, computed as ((v << 13) - v) & 0xFFFF, which is a
// permutation of consecutive values and so gives distinct, scattered keys. The
// eight best keys are kept in scratchpad words 0-7, with the byte address of
// the smallest of them in word 9 and a shared word counter in word 8.
//   INIT   (new thread) clears those words and ends with yieldt.
//   START  (new thread, operands src, nwords, total, result) issues all of its
//          8-word reads with sendmr (continuation: RET in this thread), yields.
//   RET    for each of the 8 returned words: if its key beats the current
//          minimum, it overwrites the minimum and rescans the eight slots for
//          the new minimum (unsigned compares with blt). The handler that brings
//          the counter to `total` writes the eight keys to DRAM with one sendm.
//          The thread ends with yieldt after its last block.
//   ACK    the write acknowledgement goes to a new thread, which ends at once.
// Handlers run to completion one at a time, so the shared slots need no lock.
// The expected set is computed here from the same key formula.
//
// Checked: the eight keys (as a set), the read and write counts, threads
// created and ended, and the number of reads in flight.
module tb_workload_topk;
  import updown_pkg::*;
  localparam int LAT = 200, NTHR = 16, WPT = 256, TOTAL = NTHR * WPT, K = 8;
  localparam int RESULT_W = 8192;                 // result area, word index
  localparam int L_INIT = 0, L_START = 16, L_ACK = 40, L_RET = 48;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, busy;
  event_msg_t in_msg;
  mem_req_t out_req;
  logic imem_we = 0, pb_we = 0;
  logic [9:0] imem_addr = 0, pb_data = 0;
  logic [31:0] imem_data = 0;
  lane_stat_t stat;
  logic [0:0] m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  mem_req_t [0:0] m_req;
  event_msg_t [0:0] m_rsp;
  int unsigned outstanding, max_out, reads, writes;
  logic host_valid = 0;
  event_msg_t host_msg = '0;

  int checks = 0, failures = 0;
  int n_new = 0, n_yieldt = 0, n_send = 0;

  updown_lane dut (
    .clk, .rst_n, .lane_id(32'd0),
    .in_valid, .in_ready, .in_msg, .out_valid, .out_ready, .out_req,
    .imem_we, .imem_addr, .imem_data, .pb_we, .pb_data, .busy, .stat);

  hbm_model #(.PORTS(1), .LAT(LAT), .WORDS(1 << 14)) mem (
    .clk, .rst_n, .hold(1'b0), .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp(m_rsp),
    .outstanding, .max_outstanding(max_out), .reads, .writes);

  assign m_req_valid[0] = out_valid;
  assign m_req[0]       = out_req;
  assign out_ready      = m_req_ready[0];
  assign in_valid       = host_valid || m_rsp_valid[0];
  assign in_msg         = host_valid ? host_msg : m_rsp[0];
  assign m_rsp_ready[0] = in_ready && !host_valid;

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (stat.new_thread) n_new++;
    if (stat.yieldt) n_yieldt++;
    if (stat.send) n_send++;
  end

  function automatic logic [11:0] snd(int n, bit w);
    return 12'((int'(w) << 3) | (n - 1));
  endfunction

  localparam int PLEN = 512;
  logic [31:0] prog [PLEN];

  // Registers: r10 = 0, r13 = 255, r14 = 13, r6 = 0xFFFF, r0 src, r1 words of
  // this thread, r2 total, r3 result, r4 requested, r5 received, r7 read
  // continuation, r8 ack continuation, r15 / r9 address / value of the minimum.
  task automatic build_program();
    int p, br, jp;
    for (int i = 0; i < PLEN; i++) prog[i] = '0;
    // INIT: clear scratchpad words 0-9
    p = L_INIT;
    prog[p++] = enc_r(OP_SUB, 10, 10, 10, 0);
    prog[p++] = enc_i(OP_ADDI, 1, 10, 0);
    prog[p++] = enc_i(OP_ADDI, 2, 10, 80);
    prog[p++] = enc_r(OP_STS, 10, 1, 0, 12'd0);
    prog[p++] = enc_i(OP_ADDI, 1, 1, 8);
    prog[p++] = enc_i(OP_BLT, 1, 2, -17'sd2);
    prog[p++] = enc_r(OP_YIELDT, 0, 0, 0, 0);
    if (p > L_START) $fatal(1, "INIT too long");
    p = L_START;
    prog[p++] = enc_r(OP_SUB, 10, 10, 10, 0);
    prog[p++] = enc_i(OP_MOVOP, 0, 0, 0);
    prog[p++] = enc_i(OP_MOVOP, 1, 0, 1);
    prog[p++] = enc_i(OP_MOVOP, 2, 0, 2);
    prog[p++] = enc_i(OP_MOVOP, 3, 0, 3);
    prog[p++] = enc_i(OP_ADDI, 4, 10, 0);
    prog[p++] = enc_i(OP_ADDI, 5, 10, 0);
    prog[p++] = enc_i(OP_ADDI, 6, 10, 17'h0FFFF);
    prog[p++] = enc_i(OP_ADDI, 13, 10, 255);
    prog[p++] = enc_i(OP_ADDI, 14, 10, 13);
    prog[p++] = enc_i(OP_EVI, 7, 0, 17'(L_RET));
    prog[p++] = enc_r(OP_EV, 8, 16, 13, 12'(L_ACK));     // {own lane, new thread, ACK}
    prog[p++] = enc_r(OP_SENDMR, 0, 7, 0, snd(8, 0));    // read 8 words
    prog[p++] = enc_i(OP_ADDI, 0, 0, 64);
    prog[p++] = enc_i(OP_ADDI, 4, 4, 8);
    prog[p++] = enc_i(OP_BLT, 4, 1, -17'sd3);
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);
    if (p > L_ACK) $fatal(1, "START too long");
    p = L_ACK;
    prog[p++] = enc_r(OP_YIELDT, 0, 0, 0, 0);
    p = L_RET;
    for (int k = 0; k < 8; k++) begin
      prog[p++] = enc_i(OP_MOVOP, 11, 0, 17'(k));
      prog[p++] = enc_r(OP_SLL, 12, 11, 14, 0);
      prog[p++] = enc_r(OP_SUB, 12, 12, 11, 0);
      prog[p++] = enc_r(OP_AND, 12, 12, 6, 0);           // key
      prog[p++] = enc_i(OP_LDS, 15, 10, 17'd72);         // address of the minimum
      prog[p++] = enc_i(OP_LDS, 9, 15, 17'd0);           // the minimum
      prog[p++] = enc_i(OP_BLT, 9, 12, 17'd2);           // key beats it: insert
      jp = p;
      prog[p++] = enc_i(OP_JMP, 0, 0, 17'd0);            // patched: next word
      prog[p++] = enc_r(OP_STS, 12, 15, 0, 12'd0);
      prog[p++] = enc_i(OP_LDS, 9, 10, 17'd0);           // rescan for the minimum
      prog[p++] = enc_i(OP_ADDI, 15, 10, 0);
      for (int j = 1; j < K; j++) begin
        prog[p++] = enc_i(OP_LDS, 20, 10, 17'(8 * j));
        prog[p++] = enc_i(OP_BLT, 9, 20, 17'd3);
        prog[p++] = enc_i(OP_ADDI, 9, 20, 0);
        prog[p++] = enc_i(OP_ADDI, 15, 10, 17'(8 * j));
      end
      prog[p++] = enc_r(OP_STS, 15, 10, 0, 12'd72);
      prog[jp] = enc_i(OP_JMP, 0, 0, 17'(p - jp));
    end
    prog[p++] = enc_i(OP_ADDI, 5, 5, 8);
    prog[p++] = enc_i(OP_LDS, 9, 10, 17'd64);            // shared counter
    prog[p++] = enc_i(OP_ADDI, 9, 9, 8);
    prog[p++] = enc_r(OP_STS, 9, 10, 0, 12'd64);
    br = p;
    prog[p++] = enc_i(OP_BNE, 9, 2, 17'd0);              // patched below
    prog[p++] = enc_r(OP_SENDM, 3, 8, 10, snd(8, 1));    // keys from scratchpad byte 0
    prog[br] = enc_i(OP_BNE, 9, 2, 17'(p - br));
    prog[p++] = enc_i(OP_BEQ, 5, 1, 17'd2);
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);
    prog[p++] = enc_r(OP_YIELDT, 0, 0, 0, 0);
    if (p > PLEN) $fatal(1, "program too long");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_send(logic [TID_W-1:0] tid, int label, int nops,
                           word_t o0 = 0, word_t o1 = 0, word_t o2 = 0, word_t o3 = 0);
    host_msg = '0;
    host_msg.ev = event_word_t'{nwid: 32'd0, nops: NOPS_W'(nops), tid: tid, label: LABEL_W'(label)};
    host_msg.ops[0] = o0; host_msg.ops[1] = o1; host_msg.ops[2] = o2; host_msg.ops[3] = o3;
    host_valid = 1;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_valid = 0;
  endtask

  initial begin
    int unsigned keys [TOTAL];
    int unsigned got [K];
    longint t0;
    word_t v;
    bit ok;
    build_program();
    for (int i = 0; i < TOTAL; i++) begin
      v = 64'h1000_0000 + 64'(i);
      keys[i] = int'((v * 64'd8191) & 64'hFFFF);
    end
    keys.rsort();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < PLEN; i++) begin
      imem_we = 1; imem_addr = 10'(i); imem_data = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    pb_we = 1; pb_data = 10'd0;
    @(negedge clk);
    pb_we = 0;
    host_send(TID_NEW, L_INIT, 0);
    for (int t = 0; t < NTHR; t++)
      host_send(TID_NEW, L_START, 4, 64'(t * WPT * 8), 64'(WPT), 64'(TOTAL), 64'(RESULT_W * 8));
    t0 = 0;
    while (n_yieldt < 2 + NTHR && t0 < 300000) begin @(negedge clk); t0++; end
    repeat (20) @(negedge clk);
    for (int i = 0; i < K; i++) got[i] = int'(mem.peek(RESULT_W + i));
    got.rsort();
    for (int i = 0; i < K; i++)
      chk(got[i] == keys[i], $sformatf("rank %0d: key %0d expected %0d", i, got[i], keys[i]));
    ok = 1;
    for (int i = 0; i < K; i++) if (mem.peek(RESULT_W + i) > 64'hFFFF) ok = 0;
    chk(ok, "keys are 16-bit");
    chk(reads == TOTAL / 8, $sformatf("reads %0d", reads));
    chk(writes == 1, $sformatf("writes %0d", writes));
    chk(n_new == 2 + NTHR, $sformatf("threads created %0d", n_new));
    chk(n_yieldt == 2 + NTHR, $sformatf("threads ended %0d", n_yieldt));
    chk(dut.u_ctx.live_count == 0, "all contexts free at the end");
    chk(max_out >= 32, $sformatf("memory parallelism %0d", max_out));
    $display("TK: %0d keys, k=%0d, %0d threads, max outstanding %0d, %0d cycles", TOTAL, K, NTHR, max_out, t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
