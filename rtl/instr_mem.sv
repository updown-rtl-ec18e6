// instr_mem: a lane's instruction memory.
//
// Holds the event handlers. When an event is dispatched its first instruction is
// fetched from Progbase + eventLabel, so one program image serves every thread and
// the eventLabel selects the handler (multi-way dispatch). Progbase is a register
// loaded together with the program. The document gives the Progbase + eventLabel
// addressing; the size and the load port are this design's choices.
//
// Interface: one write port for loading (wr_en/wr_addr/wr_data, applied at the
// clock edge, also sets Progbase when pb_we is high) and one combinational fetch
// port addressed in instructions.
module instr_mem #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [31:0]              wr_data,
  input  logic                     pb_we,
  input  logic [$clog2(DEPTH)-1:0] pb_data,
  output logic [$clog2(DEPTH)-1:0] progbase,
  input  logic [$clog2(DEPTH)-1:0] fetch_addr,
  output logic [31:0]              fetch_data
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     progbase <= '0;
    else if (pb_we) progbase <= pb_data;
  end

  assign fetch_data = mem[fetch_addr];
endmodule
