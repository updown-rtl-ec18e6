// tb_lane_nw_if: self-checking test of the lane network interface.
// Inbound: random event messages against random EventQ / Operand Buffer room;
// checks a message is taken only when both have room, is split correctly, and
// that in_stall flags a waiting message. Outbound: random request traffic against
// random downstream ready; checks order, no loss, and that the 4-entry queue lets
// the datapath run ahead by exactly 4 requests when downstream is blocked.
module tb_lane_nw_if;
  import updown_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, eq_push_valid, eq_push_ready, ob_push_valid, ob_push_ready, in_stall;
  event_msg_t in_msg;
  event_word_t eq_push_data;
  logic [NOPS_W-1:0] ob_push_n;
  word_t [MAX_OPS-1:0] ob_push_words;
  logic req_valid, req_ready, out_valid, out_ready;
  mem_req_t req, out_req;
  int checks = 0, failures = 0, stalls = 0;
  mem_req_t sent[$];
  bit popped, pushed;

  lane_nw_if #(.OUT_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic mem_req_t rnd_req();
    mem_req_t r;
    r = '0;
    r.addr = {$urandom, $urandom};
    r.write = 1'($urandom);
    r.nwords = NOPS_W'($urandom_range(1, 8));
    r.cont = event_word_t'({$urandom, $urandom});
    r.data[0] = {$urandom, $urandom};
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_msg = '0; eq_push_ready = 0; ob_push_ready = 0;
    req_valid = 0; req = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- inbound ----
    for (int n = 0; n < 2000; n++) begin
      // a waiting message is held unchanged (handshake rule)
      if (!in_stall) begin
        in_valid = $urandom_range(0, 3) != 0;
        in_msg.ev = event_word_t'({$urandom, $urandom});
        in_msg.ev.nops = NOPS_W'($urandom_range(1, 8));
        for (int i = 0; i < MAX_OPS; i++) in_msg.ops[i] = {$urandom, $urandom};
      end
      eq_push_ready = $urandom_range(0, 3) != 0;
      ob_push_ready = $urandom_range(0, 3) != 0;
      #1;
      chk(in_ready == (eq_push_ready && ob_push_ready), "in_ready");
      chk(eq_push_valid == (in_valid && eq_push_ready && ob_push_ready), "eq push");
      chk(ob_push_valid == eq_push_valid, "ob push with eq push");
      chk(eq_push_data == in_msg.ev && ob_push_n == in_msg.ev.nops && ob_push_words == in_msg.ops, "split");
      chk(in_stall == (in_valid && !in_ready), "in_stall");
      if (in_stall) stalls++;
      @(negedge clk);
    end
    in_valid = 0;
    chk(stalls > 0, "a stall happened");
    // ---- outbound: run-ahead while blocked ----
    out_ready = 0;
    for (int i = 0; i < 6; i++) begin
      req_valid = 1; req = rnd_req();
      #1;
      chk(req_ready == (i < 4), $sformatf("run-ahead slot %0d", i));
      if (req_ready) sent.push_back(req);
      @(negedge clk);
    end
    req_valid = 0;
    // ---- outbound random ----
    for (int n = 0; n < 3000; n++) begin
      req_valid = $urandom_range(0, 1);
      req = rnd_req();
      out_ready = $urandom_range(0, 1);
      #1;
      if (out_valid) begin
        chk(sent.size() > 0 && out_req == sent[0], "outbound order");
      end else chk(sent.size() == 0, "outbound not lost");
      popped = out_valid && out_ready;
      pushed = req_valid && req_ready;
      @(posedge clk);
      if (popped) void'(sent.pop_front());
      if (pushed) sent.push_back(req);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
