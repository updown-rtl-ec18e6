// tb_thread_contexts: self-checking test of the register contexts.
// Allocates every context (lowest free first), checks that none is left, frees
// some and checks reuse, and writes/reads registers of many threads, checking
// that each context keeps its own values.
module tb_thread_contexts;
  import updown_pkg::*;
  localparam int THREADS = 16;
  logic clk = 0, rst_n = 0;
  logic alloc_ok, alloc_take, free_valid, we;
  logic [TID_W-1:0] alloc_tid, free_tid, tid;
  logic [$clog2(THREADS+1)-1:0] live_count;
  logic [REG_W-1:0] ra_idx, rb_idx, rc_idx, w_idx;
  word_t ra_data, rb_data, rc_data, w_data;
  int checks = 0, failures = 0;
  word_t refr [THREADS][NUM_REGS];

  thread_contexts #(.THREADS(THREADS)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_take = 0; free_valid = 0; free_tid = 0; we = 0; tid = 0;
    ra_idx = 0; rb_idx = 0; rc_idx = 0; w_idx = 0; w_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < THREADS; t++) begin
      chk(alloc_ok && alloc_tid == TID_W'(t), $sformatf("alloc %0d", t));
      alloc_take = 1;
      @(negedge clk);
      alloc_take = 0;
    end
    chk(!alloc_ok && live_count == THREADS, "all busy");
    free_valid = 1; free_tid = 5;
    @(negedge clk);
    free_tid = 2;
    @(negedge clk);
    free_valid = 0;
    chk(alloc_ok && alloc_tid == 2 && live_count == THREADS - 2, "lowest freed reused");
    // initialise every register, then random writes across threads
    for (int t = 0; t < THREADS; t++)
      for (int r = 0; r < NUM_REGS; r++) begin
        tid = TID_W'(t); w_idx = REG_W'(r); w_data = {32'(t), 32'(r)}; we = 1;
        @(negedge clk);
        refr[t][r] = w_data;
      end
    for (int n = 0; n < 2000; n++) begin
      tid = TID_W'($urandom_range(0, THREADS - 1));
      w_idx = REG_W'($urandom_range(0, NUM_REGS - 1));
      w_data = {$urandom, $urandom};
      we = 1;
      @(negedge clk);
      refr[tid][w_idx] = w_data;
    end
    we = 0;
    for (int t = 0; t < THREADS; t++)
      for (int r = 0; r < NUM_REGS; r += 3) begin
        tid = TID_W'(t); ra_idx = REG_W'(r);
        rb_idx = REG_W'((r + 1) % NUM_REGS); rc_idx = REG_W'((r + 2) % NUM_REGS);
        #1;
        chk(ra_data == refr[t][r], "read a");
        chk(rb_data == refr[t][(r + 1) % NUM_REGS], "read b");
        chk(rc_data == refr[t][(r + 2) % NUM_REGS], "read c");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
