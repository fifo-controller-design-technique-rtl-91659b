// ccbm_addr_gen: CCBM write address generator of the FIFO Controller.
//
// The compressed code block memory (CCBM) is cut into pages of PAGE_SIZE locations.
// Page p belongs to FIFO (p mod N): FIFO i owns pages i, i+N, i+2N, ... For every FIFO
// the generator keeps a page base address (Add_mem, reset to i*PAGE_SIZE) and an in-page
// counter (count_mem, reset to 0). The address of a byte from FIFO i is
// Add_mem[i] + count_mem[i]. After the last location of a page (offset PAGE_SIZE-1) the
// counter returns to 0 and Add_mem[i] jumps N pages ahead, to the FIFO's next page.
//
// The generator also registers, per FIFO, the start address of the code block being
// written (the address of its first byte) and its end address (the address of the
// latest byte); once a start address is held no other is taken until the code block is
// closed.
//
// This design's own choices: when a FIFO's next page would not fit in the CCBM the
// FIFO returns to its first page (a circular region per FIFO); the start address is
// taken at the first byte of a code block whatever the EBCOT status at that moment.
//
// Interface and timing: addr is combinational from wr_idx. In a cycle with wr_en high
// the byte from FIFO wr_idx is written at addr, and the counters, start/end registers
// and open flag advance at the clock edge that ends the cycle. close_en for close_idx
// clears that FIFO's open flag at the same edge; start_addr/end_addr show the records
// of close_idx combinationally. page_jump and region_wrap flag, in a wr_en cycle, that
// this byte is the last of its page, and that the jump wraps to the FIFO's first page.
module ccbm_addr_gen
  import fc_pkg::*;
#(
  parameter int unsigned N         = N_FIFO,
  parameter int unsigned AW        = CCBM_AW,
  parameter int unsigned PAGE      = PAGE_SIZE,
  localparam int unsigned IW       = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW_      = (PAGE > 1) ? $clog2(PAGE) : 1,
  // Whole pages each FIFO owns in a CCBM of 2**AW locations.
  localparam int unsigned PAGES_PER_FIFO = ((2 ** AW) / PAGE) / N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [IW-1:0]         wr_idx,
  output logic [AW-1:0]         addr,
  output logic                  page_jump,
  output logic                  region_wrap,
  input  logic                  close_en,
  input  logic [IW-1:0]         close_idx,
  output logic [AW-1:0]         start_addr,
  output logic [AW-1:0]         end_addr,
  output logic [N-1:0]          open
);

  logic [AW-1:0]  add_mem   [N];   // page base address per FIFO
  logic [CW_-1:0] count_mem [N];   // location inside the page per FIFO
  logic [$clog2(PAGES_PER_FIFO+1)-1:0] page_no [N];  // which of its pages the FIFO is on
  logic [AW-1:0]  start_q   [N];
  logic [AW-1:0]  end_q     [N];

  assign addr        = add_mem[wr_idx] + AW'(count_mem[wr_idx]);
  assign page_jump   = wr_en && (count_mem[wr_idx] == CW_'(PAGE - 1));
  assign region_wrap = page_jump && (32'(page_no[wr_idx]) == PAGES_PER_FIFO - 1);
  assign start_addr  = start_q[close_idx];
  assign end_addr    = end_q[close_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        add_mem[i]   <= AW'(i * PAGE);
        count_mem[i] <= '0;
        page_no[i]   <= '0;
        start_q[i]   <= '0;
        end_q[i]     <= '0;
      end
      open <= '0;
    end else begin
      if (close_en) open[close_idx] <= 1'b0;
      if (wr_en) begin
        if (page_jump) begin
          count_mem[wr_idx] <= '0;
          if (region_wrap) begin
            add_mem[wr_idx] <= AW'(32'(wr_idx) * PAGE);
            page_no[wr_idx] <= '0;
          end else begin
            add_mem[wr_idx] <= add_mem[wr_idx] + AW'(N * PAGE);
            page_no[wr_idx] <= page_no[wr_idx] + 1'b1;
          end
        end else begin
          count_mem[wr_idx] <= count_mem[wr_idx] + 1'b1;
        end
        if (!open[wr_idx]) start_q[wr_idx] <= addr;
        end_q[wr_idx] <= addr;
        open[wr_idx]  <= 1'b1;
      end
    end
  end

endmodule
