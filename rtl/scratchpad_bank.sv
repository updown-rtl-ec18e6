// scratchpad_bank: one lane's scratchpad memory (64 KB by default).
//
// Software-managed local storage, 64-bit words, byte addressed with the three low
// address bits ignored. Handlers use it as a staging area; `sendm` takes the
// payload of a memory write from here. The 64 KB per lane follows the document;
// the single read/write port and the combinational read are this design's
// choices (a hard SRAM with a registered read would add one cycle per access).
//
// Interface: addr is a byte address. Writes happen at the clock edge when we is
// high; rdata shows the word at addr in the same cycle.
module scratchpad_bank
  import updown_pkg::*;
#(
  parameter int unsigned BYTES = 65536
) (
  input  logic  clk,
  input  logic  we,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata
);
  localparam int unsigned WORDS = BYTES / 8;
  localparam int unsigned AW    = $clog2(WORDS);

  word_t mem [WORDS];
  wire [AW-1:0] widx = addr[AW+2:3];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  assign rdata = mem[widx];
endmodule
