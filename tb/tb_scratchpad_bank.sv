// tb_scratchpad_bank: self-checking test of the 64 KB scratchpad bank.
// Random word writes and reads against a reference array, covering the first
// and last words and checking that the low three address bits are ignored.
module tb_scratchpad_bank;
  import updown_pkg::*;
  localparam int BYTES = 65536;
  localparam int WORDS = BYTES / 8;
  logic clk = 0, we;
  word_t addr, wdata, rdata;
  int checks = 0, failures = 0;
  word_t refm [WORDS];
  bit    valid [WORDS];

  scratchpad_bank dut (.*);
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
    we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      automatic int w = (i < 4) ? i : WORDS - 8 + i;
      we = 1; addr = word_t'(w * 8); wdata = {$urandom, $urandom};
      @(negedge clk);
      refm[w] = wdata; valid[w] = 1;
    end
    for (int n = 0; n < 20000; n++) begin
      automatic int w = $urandom_range(0, WORDS - 1);
      if ($urandom_range(0, 1) == 1) begin
        we = 1; addr = word_t'(w * 8 + $urandom_range(0, 7)); wdata = {$urandom, $urandom};
        @(negedge clk);
        refm[w] = wdata; valid[w] = 1;
        we = 0;
      end else if (valid[w]) begin
        we = 0; addr = word_t'(w * 8 + $urandom_range(0, 7));
        #1;
        chk(rdata == refm[w], "read back");
      end
    end
    for (int i = 0; i < 8; i++) begin
      automatic int w = (i < 4) ? i : WORDS - 8 + i;
      addr = word_t'(w * 8);
      #1;
      chk(rdata == refm[w], "edge words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
