// tb_updown_lane: end-to-end test of one lane against a behavioural DRAM.
//
// The lane runs a STREAM-copy kernel with a reduction: a START event (threadID
// 0xFF, operands src, nwords, dst, result) creates a thread that issues all its
// 8-word reads back to back with sendmr, each carrying a continuation that names
// the thread's RET handler, and yields. Each read response runs RET in the same
// thread: it copies the 8 words to dst with sendmops, adds them to a running sum,
// and after the last block stores the sum through the scratchpad with sendm and
// from a register with sendmr. Write acknowledgements run ACK, which ends the
// thread with yieldt after the last one. Three threads are started with only two
// contexts, so the third waits (allocation stall) until a thread ends.
//
// Checked: the copied memory, both sums, that many reads were in flight at
// once, and that each mechanism (new thread, yield, yieldt, allocation stall,
// input stall, send) happened.
module tb_updown_lane;
  import updown_pkg::*;
  localparam int THREADS = 2, LAT = 100, WORDS_PER_THREAD = 128, NTHR = 3;
  localparam int L_START = 0, L_RET = 20, L_ACK = 46;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, busy;
  event_msg_t in_msg;
  mem_req_t out_req;
  logic imem_we = 0, pb_we = 0;
  logic [9:0] imem_addr = 0, pb_data = 0;
  logic [31:0] imem_data = 0;
  lane_stat_t stat;
  // memory model
  logic [0:0] m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  mem_req_t [0:0] m_req;
  event_msg_t [0:0] m_rsp;
  int unsigned outstanding, max_out, reads, writes;
  // host
  logic host_valid = 0;
  event_msg_t host_msg = '0;

  int checks = 0, failures = 0;
  int n_new = 0, n_yield = 0, n_yieldt = 0, n_alloc = 0, n_in_stall = 0, n_send = 0;

  updown_lane #(.THREADS(THREADS), .EQ_DEPTH(8)) dut (
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
    if (stat.yield) n_yield++;
    if (stat.yieldt) n_yieldt++;
    if (stat.alloc_stall) n_alloc++;
    if (stat.in_stall) n_in_stall++;
    if (stat.send) n_send++;
  end

  function automatic logic [11:0] snd(int n, bit w, int opi = 0);
    return 12'((opi << 4) | (int'(w) << 3) | (n - 1));
  endfunction

  logic [31:0] prog [64];
  task automatic build_program();
    int p;
    for (int i = 0; i < 64; i++) prog[i] = '0;
    p = L_START;
    prog[p++] = enc_i(OP_MOVOP, 0, 0, 0);          // r0 = src
    prog[p++] = enc_i(OP_MOVOP, 1, 0, 1);          // r1 = nwords
    prog[p++] = enc_i(OP_MOVOP, 2, 0, 2);          // r2 = dst
    prog[p++] = enc_i(OP_MOVOP, 3, 0, 3);          // r3 = result address
    prog[p++] = enc_r(OP_SUB, 10, 10, 10, 0);      // r10 = 0
    prog[p++] = enc_i(OP_ADDI, 4, 10, 0);          // r4 = words requested
    prog[p++] = enc_i(OP_ADDI, 5, 10, 0);          // r5 = words received
    prog[p++] = enc_i(OP_ADDI, 6, 10, 0);          // r6 = sum
    prog[p++] = enc_i(OP_ADDI, 9, 10, 0);          // r9 = acks received
    prog[p++] = enc_i(OP_EVI, 7, 0, 17'(L_RET));   // r7 = read continuation
    prog[p++] = enc_i(OP_EVI, 8, 0, 17'(L_ACK));   // r8 = write continuation
    prog[p++] = enc_i(OP_ADDI, 13, 10, 3);
    prog[p++] = enc_r(OP_SRL, 12, 1, 13, 0);       // r12 = blocks
    prog[p++] = enc_i(OP_ADDI, 12, 12, 2);         // r12 = acks expected
    prog[p++] = enc_r(OP_SENDMR, 0, 7, 0, snd(8, 0));   // 14: read 8 words
    prog[p++] = enc_i(OP_ADDI, 0, 0, 64);
    prog[p++] = enc_i(OP_ADDI, 4, 4, 8);
    prog[p++] = enc_i(OP_BLT, 4, 1, -17'sd3);      // more to request
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);
    p = L_RET;
    prog[p++] = enc_r(OP_SENDMOPS, 2, 8, 0, snd(8, 1, 0));  // copy
    prog[p++] = enc_i(OP_ADDI, 2, 2, 64);
    for (int k = 0; k < 8; k++) begin
      prog[p++] = enc_i(OP_MOVOP, 11, 0, 17'(k));
      prog[p++] = enc_r(OP_ADD, 6, 6, 11, 0);
    end
    prog[p++] = enc_i(OP_ADDI, 5, 5, 8);           // 38
    prog[p++] = enc_i(OP_BNE, 5, 1, 17'd5);        // 39: not last -> 44
    prog[p++] = enc_r(OP_STS, 6, 10, 0, 12'd0);    // sp[0] = sum
    prog[p++] = enc_r(OP_SENDM, 3, 8, 10, snd(1, 1));
    prog[p++] = enc_i(OP_ADDI, 14, 3, 8);
    prog[p++] = enc_r(OP_SENDMR, 14, 8, 6, snd(1, 1));
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);       // 44
    p = L_ACK;
    prog[p++] = enc_i(OP_ADDI, 9, 9, 1);
    prog[p++] = enc_i(OP_BNE, 9, 12, 17'd2);
    prog[p++] = enc_r(OP_YIELDT, 0, 0, 0, 0);
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    build_program();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      imem_we = 1; imem_addr = 10'(i); imem_data = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    pb_we = 1; pb_data = 10'd0;
    @(negedge clk);
    pb_we = 0;
    for (int t = 0; t < NTHR; t++) begin
      host_msg = '0;
      host_msg.ev = event_word_t'{nwid: 32'd0, nops: 4'd4, tid: TID_NEW, label: 20'(L_START)};
      host_msg.ops[0] = 64'(t * WORDS_PER_THREAD * 8);              // src
      host_msg.ops[1] = 64'(WORDS_PER_THREAD);
      host_msg.ops[2] = 64'((4096 + t * WORDS_PER_THREAD) * 8);     // dst
      host_msg.ops[3] = 64'((8192 + t * 2) * 8);                    // results
      host_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      host_valid = 0;
    end
    t0 = 0;
    while (n_yieldt < NTHR && t0 < 100000) begin @(negedge clk); t0++; end
    repeat (LAT + 20) @(negedge clk);
    for (int t = 0; t < NTHR; t++) begin
      word_t sum, v;
      bit copy_ok;
      sum = 0;
      copy_ok = 1;
      for (int i = 0; i < WORDS_PER_THREAD; i++) begin
        v = 64'h1000_0000 + 64'(t * WORDS_PER_THREAD + i);
        sum += v;
        if (mem.peek(4096 + t * WORDS_PER_THREAD + i) != v) copy_ok = 0;
      end
      chk(copy_ok, $sformatf("thread %0d copy", t));
      chk(mem.peek(8192 + t * 2) == sum, $sformatf("thread %0d sum via sendm", t));
      chk(mem.peek(8192 + t * 2 + 1) == sum, $sformatf("thread %0d sum via sendmr", t));
    end
    chk(reads == NTHR * WORDS_PER_THREAD / 8, "read count");
    chk(writes == NTHR * (WORDS_PER_THREAD / 8 + 2), "write count");
    chk(max_out >= 8, $sformatf("memory parallelism %0d", max_out));
    chk(n_new == NTHR && n_yieldt == NTHR, "threads created and ended");
    chk(n_yield > 0, "yield");
    chk(n_alloc > 0, "allocation stall");
    chk(n_in_stall > 0, "input stall");
    $display("max outstanding %0d, alloc stalls %0d, input stalls %0d, sends %0d", max_out, n_alloc, n_in_stall, n_send);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
