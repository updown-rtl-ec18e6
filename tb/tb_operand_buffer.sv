// tb_operand_buffer: self-checking test of the Operand Buffer.
// Pushes payloads of 1-8 words, reads every operand of the oldest payload at its
// offset from the head, releases it, and checks against a reference queue,
// including the wrap-around of the circular store and push_ready when full.
module tb_operand_buffer;
  import updown_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, release_valid, recirc = 0;
  logic [NOPS_W-1:0] recirc_n = 0;
  logic [NOPS_W-1:0] push_n, release_n;
  word_t [MAX_OPS-1:0] push_words;
  logic [2:0] rd_idx;
  word_t rd_word;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  word_t ref_w[$];
  int    ref_n[$];
  bit    took;

  operand_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #50 clk = ~clk;  // half period longer than the eight 1-unit operand reads

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; release_valid = 0; push_n = 0; release_n = 0; push_words = '0; rd_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      // try a push
      push_valid = $urandom_range(0, 2) != 0;
      push_n = NOPS_W'($urandom_range(1, 8));
      for (int i = 0; i < MAX_OPS; i++) push_words[i] = {$urandom, $urandom};
      release_valid = 0;
      #1;
      chk(push_ready == (int'(push_n) <= DEPTH - ref_w.size()), "push_ready");
      took = push_valid && push_ready;
      @(posedge clk);
      if (took) begin
        for (int i = 0; i < int'(push_n); i++) ref_w.push_back(push_words[i]);
        ref_n.push_back(int'(push_n));
      end
      @(negedge clk);
      push_valid = 0;
      chk(int'(count) == ref_w.size(), $sformatf("count %0d vs %0d took %0d n %0d", count, ref_w.size(), took, push_n));
      // sometimes consume the oldest payload
      if (ref_n.size() > 0 && ($urandom_range(0, 1) == 1 || ref_w.size() > DEPTH - 8)) begin
        for (int i = 0; i < ref_n[0]; i++) begin
          rd_idx = 3'(i);
          #1;
          chk(rd_word == ref_w[i], $sformatf("operand %0d", i));
        end
        release_valid = 1;
        release_n = NOPS_W'(ref_n[0]);
        @(posedge clk);
        for (int i = 0; i < ref_n[0]; i++) void'(ref_w.pop_front());
        void'(ref_n.pop_front());
        @(negedge clk);
        release_valid = 0;
      end
    end
    // recirculation: the oldest payload moves behind the others, also when full
    while (ref_n.size() > 0) begin
      release_valid = 1; release_n = NOPS_W'(ref_n[0]);
      @(negedge clk);
      for (int i = 0; i < ref_n[0]; i++) void'(ref_w.pop_front());
      void'(ref_n.pop_front());
    end
    release_valid = 0;
    for (int p = 0; p < 2; p++) begin   // 8 + 8 words = full
      push_valid = 1; push_n = 8;
      for (int i = 0; i < MAX_OPS; i++) push_words[i] = {32'(p), 32'(i)};
      @(negedge clk);
      for (int i = 0; i < 8; i++) ref_w.push_back(push_words[i]);
    end
    push_valid = 0;
    chk(int'(count) == DEPTH, "full before recirculation");
    recirc = 1; recirc_n = 8;
    @(negedge clk);
    recirc = 0;
    for (int i = 0; i < 8; i++) ref_w.push_back(ref_w.pop_front());
    chk(int'(count) == DEPTH, "count kept");
    for (int i = 0; i < 8; i++) begin
      rd_idx = 3'(i);
      #1;
      chk(rd_word == ref_w[i], "second payload now first");
    end
    release_valid = 1; release_n = 8;
    @(negedge clk);
    release_valid = 0;
    for (int i = 0; i < 8; i++) begin
      rd_idx = 3'(i);
      #1;
      chk(rd_word == ref_w[8 + i], "first payload now last");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
