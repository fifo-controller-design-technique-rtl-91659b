// sram_1w1r: simple dual-port SRAM used for the CCBM and the MAT.
//
// The compressed code block memory (CCBM) holds the code block bytes the FIFO Controller
// moves out of the EBCOT FIFOs; the memory allocation table (MAT) holds one record per
// code block (start address, end address, logical address). Both are written by the
// FIFO Controller and read by the rate control unit downstream. The defaults are the
// CCBM's: 2**18 bytes. The one write port plus one read port organisation and the
// registered read are this design's own choices.
//
// Timing: we writes wdata at waddr at the rising edge; rdata shows the word at raddr
// one clock after raddr is presented (read before write when both hit the same word).
module sram_1w1r
  import fc_pkg::*;
#(
  parameter int unsigned W  = DATA_W,
  parameter int unsigned AW = CCBM_AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2 ** AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
