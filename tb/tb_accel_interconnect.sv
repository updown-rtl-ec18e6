// tb_accel_interconnect: self-checking test of the lane / DRAM / controller
// interconnect at 16 lanes and 4 channels. Every lane sends numbered requests
// (the address holds lane and sequence number); every source sends numbered
// event messages to random lanes. Checks: each request appears on its lane's
// channel, in order, exactly once; each event reaches the lane named by its
// networkID, in per-source order; arbitration is fair (a waiting requester is
// served within one round); and both conflict flags were seen.
module tb_accel_interconnect;
  import updown_pkg::*;
  localparam int L = 16, M = 4, N_IN = M + 1, G = L / M;
  logic clk = 0, rst_n = 0;
  logic [L-1:0] lane_out_valid, lane_out_ready, lane_in_valid, lane_in_ready;
  mem_req_t [L-1:0] lane_out_req;
  logic [M-1:0] mem_req_valid, mem_req_ready;
  mem_req_t [M-1:0] mem_req;
  logic [N_IN-1:0] in_valid, in_ready;
  event_msg_t [N_IN-1:0] in_msg;
  event_msg_t [L-1:0] lane_in_msg;
  logic out_conflict, in_conflict;
  int checks = 0, failures = 0, n_oc = 0, n_ic = 0;
  int out_seq[L], exp_out[L], in_seq[N_IN], exp_in[N_IN], wait_cyc[L];
  int total_out = 0, total_in = 0;
  logic [L-1:0] lo_take;
  logic [N_IN-1:0] src_take;

  accel_interconnect #(.NUM_LANES(L), .MEM_PORTS(M)) dut (.*);
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
    lane_out_valid = 0; lane_out_req = '0; mem_req_ready = 0;
    in_valid = 0; in_msg = '0; lane_in_ready = 0;
    foreach (out_seq[i]) begin out_seq[i] = 0; exp_out[i] = 0; wait_cyc[i] = 0; end
    foreach (in_seq[i]) begin in_seq[i] = 0; exp_in[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      // lanes: hold a request until taken
      for (int l = 0; l < L; l++)
        if (!lane_out_valid[l] && $urandom_range(0, 2) == 0 && n < 4500) begin
          lane_out_valid[l] = 1;
          lane_out_req[l] = '0;
          lane_out_req[l].addr = {32'(l), 32'(out_seq[l])};
        end
      for (int s = 0; s < N_IN; s++)
        if (!in_valid[s] && $urandom_range(0, 1) == 0 && n < 4500) begin
          in_valid[s] = 1;
          in_msg[s] = '0;
          in_msg[s].ev.nwid = NWID_W'($urandom_range(0, L - 1));
          in_msg[s].ops[0] = {32'(s), 32'(in_seq[s])};
        end
      mem_req_ready = M'($urandom);
      lane_in_ready = L'($urandom) | L'($urandom);
      #1;
      if (out_conflict) n_oc++;
      if (in_conflict) n_ic++;
      for (int p = 0; p < M; p++)
        if (mem_req_valid[p] && mem_req_ready[p]) begin
          automatic int l = int'(mem_req[p].addr[63:32]);
          chk(l / G == p, "request on its lane's channel");
          chk(int'(mem_req[p].addr[31:0]) == exp_out[l], "request order");
          chk(lane_out_ready[l], "granted lane sees ready");
          exp_out[l]++;
          total_out++;
        end
      for (int l = 0; l < L; l++)
        if (lane_in_valid[l] && lane_in_ready[l]) begin
          automatic int s = int'(lane_in_msg[l].ops[0][63:32]);
          chk(int'(lane_in_msg[l].ev.nwid) == l, "event to its lane");
          chk(int'(lane_in_msg[l].ops[0][31:0]) == exp_in[s], "event order per source");
          chk(in_ready[s], "source sees ready");
          exp_in[s]++;
          total_in++;
        end
      lo_take = lane_out_valid & lane_out_ready;
      src_take = in_valid & in_ready;
      @(posedge clk);
      @(negedge clk);  // change inputs away from the sampling edge
      for (int l = 0; l < L; l++) begin
        if (lo_take[l]) begin
          lane_out_valid[l] = 0; out_seq[l]++; wait_cyc[l] = 0;
        end else if (lane_out_valid[l] && mem_req_ready[l / G]) begin
          wait_cyc[l]++;
          chk(wait_cyc[l] < G, $sformatf("served within one round: lane %0d waited %0d n=%0d", l, wait_cyc[l], n));
        end
      end
      for (int s = 0; s < N_IN; s++)
        if (src_take[s]) begin in_valid[s] = 0; in_seq[s]++; end
    end
    for (int l = 0; l < L; l++) chk(exp_out[l] == out_seq[l], "no request lost");
    for (int s = 0; s < N_IN; s++) chk(exp_in[s] == in_seq[s], "no event lost");
    chk(n_oc > 0 && n_ic > 0, "conflicts exercised");
    $display("requests %0d events %0d conflicts out %0d in %0d", total_out, total_in, n_oc, n_ic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
