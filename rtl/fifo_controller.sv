// fifo_controller: FIFO Controller of a JPEG 2000 encoder.
//
// Several EBCOT (entropy coding) units work in parallel, each writing the compressed
// bytes of its code block into its own FIFO. The FIFO Controller keeps those FIFOs from
// overflowing: it empties them one byte at a time into the compressed code block memory
// (CCBM), and when a code block is complete it writes a record of it into the memory
// allocation table (MAT): CCBM start address, CCBM end address and the logical address
// (LA) that the code block allocator (CBA) gave for it.
//
// Inside, four units (see the FIFO Controller architecture):
//   fifo_arbiter   picks a FIFO from the FIFO flags and the EBCOT_Done flags,
//   ccbm_addr_gen  gives the CCBM address (paged, FIFO i owns every N-th page) and keeps
//                  each code block's start and end address,
//   la_memory      holds the LA of each EBCOT's current code block,
//   mat_addr_gen   turns the LA into the MAT address (the code block's index).
//
// Timing. After reset nothing moves until a start_fc pulse. From then on the controller
// works in arbitration cycles of two system clocks:
//   phase 0: the arbiter registers its choice from the flags; a FIFO whose EBCOT is
//            done and which is empty, with an open code block, is closed: its MAT
//            record is registered (mat_we high in the next clock);
//   phase 1: fifo_rd of the chosen FIFO is high, its byte (asynchronous FIFO read) is
//            registered towards the CCBM (ccbm_we high in the next clock).
// So at most one byte moves every two clocks, and one record is written per arbitration
// cycle at most. If several code blocks end in the same arbitration cycle, the
// lowest-numbered FIFO is closed first and the others follow in the next cycles.
//
// Follows the design: the units, the two-clock arbitration cycle, the priority rules,
// the paged CCBM with Add_mem/count_mem, start/end address registers, the MAT record
// contents. This design's own choices: the cb_sel input telling which EBCOT an LA is for,
// the close condition (EBCOT done and FIFO empty, taken outside the arbitration),
// registered outputs, the la_err output and the record layout {start, end, la}.
// The EBCOT is expected to keep EBCOT_Done high until its code block is closed.
module fifo_controller
  import fc_pkg::*;
#(
  parameter int unsigned N        = N_FIFO,
  parameter int unsigned W        = DATA_W,
  parameter int unsigned CCBM_A   = CCBM_AW,
  parameter int unsigned PAGE     = PAGE_SIZE,
  parameter int unsigned MAT_A    = MAT_AW,
  localparam int unsigned IW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned MAT_W   = 2 * CCBM_A + LA_W
) (
  // master controller
  input  logic                  sys_clk,
  input  logic                  sys_reset_n,
  input  logic                  start_fc,
  input  cw_t                   cw,
  // code block allocator
  input  logic                  cb_valid,
  input  logic [IW-1:0]         cb_sel,
  input  la_t                   la,
  // FIFOs and EBCOTs
  input  fifo_flags_t [N-1:0]   fifo_flags,
  input  logic        [N-1:0]   ebcot_done,
  input  logic [N-1:0][W-1:0]   fifo_data,
  output logic        [N-1:0]   fifo_rd,
  // CCBM write port
  output logic                  ccbm_we,
  output logic [CCBM_A-1:0]     ccbm_addr,
  output logic [W-1:0]          ccbm_data,
  output logic                  ccbm_page_end,     // this byte fills the last location of its page
  output logic                  ccbm_region_wrap,  // ... and the FIFO goes back to its first page
  // MAT write port
  output logic                  mat_we,
  output logic [MAT_A-1:0]      mat_addr,
  output logic [MAT_W-1:0]      mat_data,
  output logic                  mat_la_err,
  // arbitration result of the current arbitration cycle
  output logic                  arb_valid,
  output logic [IW-1:0]         arb_fifo,
  output arb_class_e            arb_class
);

  logic running, phase;
  logic arb_en, xfer;

  always_ff @(posedge sys_clk or negedge sys_reset_n) begin
    if (!sys_reset_n) begin
      running <= 1'b0;
      phase   <= 1'b0;
    end else begin
      if (start_fc) running <= 1'b1;
      phase <= running ? !phase : 1'b0;
    end
  end

  assign arb_en = running && !phase;

  // ---------------------------------------------------------------- arbitration
  fifo_arbiter #(.N(N)) u_arb (
    .clk         (sys_clk),
    .rst_n       (sys_reset_n),
    .arb_en      (arb_en),
    .flags       (fifo_flags),
    .done        (ebcot_done),
    .grant_valid (arb_valid),
    .grant_idx   (arb_fifo),
    .grant_class (arb_class)
  );

  assign xfer = running && phase && arb_valid;

  always_comb begin
    fifo_rd = '0;
    if (xfer) fifo_rd[arb_fifo] = 1'b1;
  end

  // ---------------------------------------------------------------- CCBM addresses
  logic [N-1:0]        cb_open;
  logic [N-1:0]        close_req;
  logic                close_en;
  logic [IW-1:0]       close_idx;
  logic [CCBM_A-1:0]   cur_addr, start_addr, end_addr;
  logic                page_jump, region_wrap;

  always_comb begin
    close_req = cb_open & ebcot_done;
    for (int i = 0; i < N; i++)
      if (!fifo_flags[i].emp) close_req[i] = 1'b0;
    close_idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (close_req[i]) close_idx = IW'(i);
  end

  assign close_en = arb_en && (|close_req);

  ccbm_addr_gen #(.N(N), .AW(CCBM_A), .PAGE(PAGE)) u_ccbm_ag (
    .clk         (sys_clk),
    .rst_n       (sys_reset_n),
    .wr_en       (xfer),
    .wr_idx      (arb_fifo),
    .addr        (cur_addr),
    .page_jump   (page_jump),
    .region_wrap (region_wrap),
    .close_en    (close_en),
    .close_idx   (close_idx),
    .start_addr  (start_addr),
    .end_addr    (end_addr),
    .open        (cb_open)
  );

  // ---------------------------------------------------------------- LA memory, MAT
  la_t              cur_la;
  logic [MAT_A-1:0] cur_mat_addr;
  logic             cur_la_err;

  la_memory #(.N(N)) u_la_mem (
    .clk      (sys_clk),
    .rst_n    (sys_reset_n),
    .cb_valid (cb_valid),
    .wr_sel   (cb_sel),
    .wr_la    (la),
    .rd_sel   (close_idx),
    .rd_la    (cur_la)
  );

  mat_addr_gen #(.AW(MAT_A)) u_mat_ag (
    .la       (cur_la),
    .cw       (cw),
    .mat_addr (cur_mat_addr),
    .la_err   (cur_la_err)
  );

  // ---------------------------------------------------------------- output registers
  always_ff @(posedge sys_clk or negedge sys_reset_n) begin
    if (!sys_reset_n) begin
      ccbm_we    <= 1'b0;
      ccbm_addr  <= '0;
      ccbm_data  <= '0;
      ccbm_page_end    <= 1'b0;
      ccbm_region_wrap <= 1'b0;
      mat_we     <= 1'b0;
      mat_addr   <= '0;
      mat_data   <= '0;
      mat_la_err <= 1'b0;
    end else begin
      ccbm_we          <= xfer;
      ccbm_page_end    <= page_jump;
      ccbm_region_wrap <= region_wrap;
      if (xfer) begin
        ccbm_addr <= cur_addr;
        ccbm_data <= fifo_data[arb_fifo];
      end
      mat_we     <= close_en;
      mat_la_err <= close_en && cur_la_err;
      if (close_en) begin
        mat_addr <= cur_mat_addr;
        mat_data <= {start_addr, end_addr, cur_la};
      end
    end
  end

  // A FIFO is only read while its empty flag is low.
  a_rd_not_empty: assert property (@(posedge sys_clk) disable iff (!sys_reset_n)
                                   xfer |-> !fifo_flags[arb_fifo].emp);

endmodule
