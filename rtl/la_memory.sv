// la_memory: logical address memory of the FIFO Controller.
//
// A small RAM with one word per EBCOT unit. When the code block allocator (CBA) hands a
// code block to EBCOT wr_sel it raises cb_valid with the logical address (LA) of that
// code block; the word of that EBCOT is overwritten. The FIFO Controller reads the word
// of an EBCOT when that EBCOT's code block is complete, to put the LA into the MAT record.
//
// The memory's existence and its role follow the FIFO Controller design; one word per
// EBCOT and the EBCOT select input are this design's own choices.
//
// Timing: written at the rising edge when cb_valid is high; read combinationally
// (rd_la follows rd_sel in the same cycle). Reset clears every word.
module la_memory
  import fc_pkg::*;
#(
  parameter int unsigned N   = N_FIFO,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cb_valid,
  input  logic [IW-1:0] wr_sel,
  input  la_t           wr_la,
  input  logic [IW-1:0] rd_sel,
  output la_t           rd_la
);

  la_t mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) mem[i] <= '0;
    end else if (cb_valid && 32'(wr_sel) < N) begin
      mem[wr_sel] <= wr_la;
    end
  end

  assign rd_la = mem[rd_sel];

endmodule
