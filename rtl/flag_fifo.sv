// flag_fifo: the FIFO between one EBCOT unit and the FIFO Controller.
//
// A first-in first-out SRAM buffer for the compressed code block byte stream of one
// EBCOT. It reports its fill level to the FIFO Controller through four flags: full (f),
// almost full (af, count >= AF_LEVEL), almost empty (ae, count <= AE_LEVEL, empty
// included) and empty (emp). The EBCOT writes, the FIFO Controller reads.
//
// The flags and the roles follow the FIFO Controller design. The depth, the thresholds,
// the single clock for both sides and the drop-and-flag behaviour on a write into a full
// FIFO are this design's own choices. The read side is asynchronous, as the SRAM FIFOs
// of the design are: rd_data always shows the oldest word (first word fall through).
//
// Timing: wr_en stores wr_data at the rising edge; rd_en removes the word shown on
// rd_data at the rising edge. Flags are registered-state functions of the count and
// change right after the edge. ovf pulses for a write that was dropped because the FIFO
// was full at that edge (even if a word was read at the same edge). Reset empties the FIFO.
module flag_fifo
  import fc_pkg::*;
#(
  parameter int unsigned W        = DATA_W,
  parameter int unsigned DEPTH    = FIFO_DEPTH,
  parameter int unsigned AE_LVL   = AE_LEVEL,
  parameter int unsigned AF_LVL   = AF_LEVEL,
  localparam int unsigned PW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output fifo_flags_t  flags,
  output logic         ovf
);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic [PW:0]   count;
  logic          do_wr, do_rd;

  assign do_wr = wr_en && (count != (PW+1)'(DEPTH));
  assign do_rd = rd_en && (count != '0);
  assign ovf   = wr_en && !do_wr;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (32'(wptr) == DEPTH - 1) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (32'(rptr) == DEPTH - 1) ? '0 : rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assign rd_data   = mem[rptr];
  assign flags.f   = (count == (PW+1)'(DEPTH));
  assign flags.af  = (32'(count) >= AF_LVL);
  assign flags.ae  = (32'(count) <= AE_LVL);
  assign flags.emp = (count == '0);

  // The FIFO Controller only reads a FIFO whose empty flag is low.
  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !flags.emp);

endmodule
