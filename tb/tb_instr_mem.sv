// tb_instr_mem: self-checking test of the instruction memory.
// Loads a program, sets Progbase, and checks that fetching Progbase + eventLabel
// returns the handler's first instruction for several labels.
module tb_instr_mem;
  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0;
  logic wr_en, pb_we;
  logic [AW-1:0] wr_addr, pb_data, progbase, fetch_addr;
  logic [31:0] wr_data, fetch_data;
  int checks = 0, failures = 0;
  logic [31:0] img [DEPTH];

  instr_mem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; pb_we = 0; wr_addr = 0; pb_data = 0; wr_data = 0; fetch_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(progbase == 0, "progbase reset");
    for (int i = 0; i < DEPTH; i++) begin
      img[i] = $urandom;
      wr_en = 1; wr_addr = AW'(i); wr_data = img[i];
      @(negedge clk);
    end
    wr_en = 0;
    pb_we = 1; pb_data = AW'(40);
    @(negedge clk);
    pb_we = 0;
    chk(progbase == 40, "progbase set");
    for (int label = 0; label < 100; label++) begin
      fetch_addr = AW'(progbase + AW'(label));
      #1;
      chk(fetch_data == img[40 + label], "fetch Progbase+label");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
