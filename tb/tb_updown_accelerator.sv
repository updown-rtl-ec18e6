// tb_updown_accelerator: end-to-end test of a full-size UpDown accelerator
// (64 lanes, 8 DRAM channels, 128 contexts and 64 KB scratchpad per lane, all
// parameters at their defaults) against a behavioural DRAM with a 200-cycle
// latency (100 ns at 2 GHz).
//
// Every lane runs two threads of a STREAM-copy kernel with a reduction (see
// tb_updown_lane): reads are issued back to back with sendmr, each response
// event copies its 8 words with sendmops and adds them to a sum, and the sum is
// written with sendm and sendmr. Lane 63 is additionally filled with 128 threads
// that only yield, so a further new-thread event has to wait until events that
// end those threads (yieldt) have run.
//
// Checked: every copied word and every sum; the number of reads and writes; the
// number of requests in flight at once; and that each mechanism happened at
// least once: thread creation, yield, yieldt, allocation stall, send stall
// (outbound queue full while the DRAM refuses requests for 500 cycles), input stall (EventQ or Operand Buffer full), and
// arbitration conflicts on the outbound and inbound paths.
module tb_updown_accelerator;
  import updown_pkg::*;
  localparam int LANES = 64, PORTS = 8, LAT = 200, W = 64, TPL = 2;
  localparam int L_START = 0, L_RET = 20, L_ACK = 46, L_HOLD = 52, L_FREE = 54;
  localparam int DST = 16384, RES = 32768;

  logic clk = 0, rst_n = 0;
  logic [PORTS-1:0] mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t [PORTS-1:0] mem_req;
  event_msg_t [PORTS-1:0] mem_rsp;
  logic host_ev_valid = 0, host_ev_ready;
  event_msg_t host_ev = '0;
  logic imem_we = 0, imem_bcast = 0, pb_we = 0;
  logic [5:0] imem_lane = 0;
  logic [9:0] imem_addr = 0, pb_data = 0;
  logic [31:0] imem_data = 0;
  logic [LANES-1:0] lane_busy;
  lane_stat_t [LANES-1:0] lane_stat;
  logic out_conflict, in_conflict;
  int unsigned outstanding, max_out, reads, writes;

  int checks = 0, failures = 0;
  int n_new = 0, n_yield = 0, n_yieldt = 0, n_alloc = 0, n_send_stall = 0, n_in_stall = 0;
  int n_oc = 0, n_ic = 0, n_send = 0;
  longint cyc = 0;
  logic mem_hold;
  // the DRAM refuses requests for a while, so the lanes' outbound queues fill
  assign mem_hold = (cyc >= 500) && (cyc < 1000);

  updown_accelerator dut (
    .clk, .rst_n,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_ready, .mem_rsp,
    .host_ev_valid, .host_ev_ready, .host_ev,
    .imem_we, .imem_bcast, .imem_lane, .imem_addr, .imem_data, .pb_we, .pb_data,
    .lane_busy, .lane_stat, .out_conflict, .in_conflict);

  hbm_model #(.PORTS(PORTS), .LAT(LAT), .WORDS(1 << 16)) mem (
    .clk, .rst_n, .hold(mem_hold), .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp),
    .outstanding, .max_outstanding(max_out), .reads, .writes);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int l = 0; l < LANES; l++) begin
      if (lane_stat[l].new_thread) n_new++;
      if (lane_stat[l].yield) n_yield++;
      if (lane_stat[l].yieldt) n_yieldt++;
      if (lane_stat[l].alloc_stall) n_alloc++;
      if (lane_stat[l].send_stall) n_send_stall++;
      if (lane_stat[l].in_stall) n_in_stall++;
      if (lane_stat[l].send) n_send++;
    end
    if (out_conflict) n_oc++;
    if (in_conflict) n_ic++;
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
    p = L_HOLD;
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);
    p = L_FREE;
    prog[p++] = enc_r(OP_YIELDT, 0, 0, 0, 0);
    p = L_ACK;
    prog[p++] = enc_i(OP_ADDI, 9, 9, 1);
    prog[p++] = enc_i(OP_BNE, 9, 12, 17'd2);
    prog[p++] = enc_r(OP_YIELDT, 0, 0, 0, 0);
    prog[p++] = enc_r(OP_YIELD, 0, 0, 0, 0);
  endtask

  task automatic host_send(int lane, int tid, int label, int nops, word_t o0 = 0, word_t o1 = 0,
                          word_t o2 = 0, word_t o3 = 0);
    host_ev = '0;
    host_ev.ev = event_word_t'{nwid: NWID_W'(lane), nops: NOPS_W'(nops), tid: TID_W'(tid),
                               label: LABEL_W'(label)};
    host_ev.ops[0] = o0; host_ev.ops[1] = o1; host_ev.ops[2] = o2; host_ev.ops[3] = o3;
    host_ev_valid = 1;
    #1;
    while (!host_ev_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    host_ev_valid = 0;
  endtask

  task automatic start(int lane, int idx);
    host_send(lane, 8'hFF, L_START, 4, 64'(idx * W * 8), 64'(W), 64'((DST + idx * W) * 8),
              64'((RES + idx * 2) * 8));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nthreads;
    longint t_start;
    build_program();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      imem_we = 1; imem_bcast = 1; imem_addr = 10'(i); imem_data = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
    pb_we = 1; pb_data = 10'd0;
    @(negedge clk);
    pb_we = 0; imem_bcast = 0;
    t_start = cyc;
    // lane 63: fill every context, then one more new thread, then free them
    for (int k = 0; k < 128; k++) host_send(63, 8'hFF, L_HOLD, 0);
    start(63, LANES * TPL);
    for (int t = 0; t < TPL; t++)
      for (int l = 0; l < LANES; l++) start(l, l * TPL + t);
    for (int k = 0; k < 128; k++) host_send(63, k, L_FREE, 0);
    nthreads = LANES * TPL + 1;
    while (n_yieldt < nthreads + 128 && cyc < 300000) @(negedge clk);
    repeat (LAT + 50) @(negedge clk);
    $display("all threads done after %0d cycles", cyc - t_start);
    for (int idx = 0; idx < nthreads; idx++) begin
      word_t sum, v;
      bit copy_ok;
      sum = 0; copy_ok = 1;
      for (int i = 0; i < W; i++) begin
        v = 64'h1000_0000 + 64'(idx * W + i);
        sum += v;
        if (mem.peek(DST + idx * W + i) != v) copy_ok = 0;
      end
      chk(copy_ok, $sformatf("copy of thread %0d", idx));
      chk(mem.peek(RES + idx * 2) == sum && mem.peek(RES + idx * 2 + 1) == sum,
          $sformatf("sums of thread %0d", idx));
    end
    chk(reads == nthreads * W / 8, "read count");
    chk(writes == nthreads * (W / 8 + 2), "write count");
    chk(max_out >= 200, $sformatf("requests in flight %0d", max_out));
    chk(n_new == nthreads + 128, "thread creation");
    chk(n_yield > 0, "yield");
    chk(n_yieldt == nthreads + 128, "yieldt");
    chk(n_alloc > 0, "allocation stall");
    chk(n_send_stall > 0, "send stall");
    chk(n_in_stall > 0, "input stall");
    chk(n_oc > 0 && n_ic > 0, "arbitration conflicts");
    $display("max in flight %0d reads %0d writes %0d", max_out, reads, writes);
    $display("counts: new %0d yield %0d yieldt %0d alloc_stall %0d send_stall %0d in_stall %0d conflicts %0d/%0d",
             n_new, n_yield, n_yieldt, n_alloc, n_send_stall, n_in_stall, n_oc, n_ic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
