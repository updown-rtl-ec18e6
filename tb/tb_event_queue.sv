// tb_event_queue: self-checking test of the EventQ.
// Random pushes and pops against a reference queue; checks order, the full and
// empty flags, that a pushed word shows at the head one cycle later, and count.
module tb_event_queue;
  import updown_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, pop_valid, pop_ready, recirc = 0;
  event_word_t push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  event_word_t ref_q[$];

  event_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

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
    push_valid = 0; pop_ready = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!pop_valid && count == 0, "empty after reset");
    // single push visible next cycle
    push_valid = 1; push_data = event_word_t'(64'h1234_5678_9abc_def0);
    @(negedge clk);
    push_valid = 0;
    chk(pop_valid && pop_data == event_word_t'(64'h1234_5678_9abc_def0), "head after one cycle");
    ref_q.push_back(push_data);
    // fill to full
    for (int i = 0; i < DEPTH - 1; i++) begin
      push_valid = 1; push_data = event_word_t'({$urandom, $urandom});
      ref_q.push_back(push_data);
      @(negedge clk);
    end
    push_valid = 0;
    chk(!push_ready && count == DEPTH, "full");
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      push_valid = $urandom_range(0, 1);
      pop_ready  = $urandom_range(0, 1);
      push_data  = event_word_t'({$urandom, $urandom});
      #1;
      chk(push_ready == (ref_q.size() < DEPTH), "push_ready");
      chk(pop_valid == (ref_q.size() > 0), "pop_valid");
      if (pop_valid && ref_q.size() > 0) chk(pop_data == ref_q[0], "order");
      @(posedge clk);
      if (pop_valid && pop_ready) void'(ref_q.pop_front());
      if (push_valid && push_ready) ref_q.push_back(push_data);
      @(negedge clk);
      chk(count == ref_q.size(), "count");
    end
    // recirculation: head goes to the tail, also when full
    push_valid = 0; pop_ready = 1;
    while (pop_valid) @(negedge clk);
    pop_ready = 0;
    ref_q.delete();
    for (int i = 0; i < DEPTH; i++) begin
      push_valid = 1; push_data = event_word_t'(64'(i + 100));
      ref_q.push_back(push_data);
      @(negedge clk);
    end
    push_valid = 0;
    for (int r = 0; r < 3; r++) begin
      recirc = 1;
      #1;
      chk(!push_ready, "no push during recirculation");
      @(negedge clk);
      recirc = 0;
      ref_q.push_back(ref_q.pop_front());
      chk(count == DEPTH && pop_data == ref_q[0], "recirculate when full");
    end
    pop_ready = 1;
    for (int i = 0; i < DEPTH; i++) begin
      #1;
      chk(pop_data == ref_q[i], "order after recirculation");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
