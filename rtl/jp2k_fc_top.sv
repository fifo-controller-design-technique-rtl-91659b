// jp2k_fc_top: the FIFO Controller stage of a JPEG 2000 encoder, with its memories.
//
// Between the parallel EBCOT (entropy coding) units and the rate control unit sit one
// FIFO per EBCOT, the FIFO Controller, the compressed code block memory (CCBM) and the
// memory allocation table (MAT). The EBCOTs write compressed bytes into their FIFOs; the
// FIFO Controller drains the FIFOs into the CCBM in pages and, for each finished code
// block, writes {CCBM start address, CCBM end address, logical address} into the MAT at
// the code block's index. The rate control unit reads both memories.
//
// Outside this module: the EBCOT units (ebcot_* ports, fifo_flags/fifo_ovf back to
// them), the code block allocator (cb_valid, cb_sel, la), the master controller
// (sys_reset_n, start_fc, cw) and the rate control unit (ccbm_raddr/ccbm_rdata,
// mat_raddr/mat_rdata, plus the write strobes as notice of new data).
//
// Timing: one byte moves from a FIFO to the CCBM every two clocks at most; CCBM and MAT
// reads return data one clock after the address. Sizes default to six EBCOTs, an
// 18-bit CCBM with 166-byte pages, 512-byte FIFOs and a 4096-record MAT; of these the
// FIFO depth and the MAT depth are this design's own choices.
module jp2k_fc_top
  import fc_pkg::*;
#(
  parameter int unsigned N          = N_FIFO,
  parameter int unsigned W          = DATA_W,
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter int unsigned AE_LVL     = AE_LEVEL,
  parameter int unsigned AF_LVL     = AF_LEVEL,
  parameter int unsigned CCBM_A     = CCBM_AW,
  parameter int unsigned PAGE       = PAGE_SIZE,
  parameter int unsigned MAT_A      = MAT_AW,
  localparam int unsigned IW        = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned MAT_W     = 2 * CCBM_A + LA_W
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
  // EBCOT units
  input  logic        [N-1:0]          ebcot_wr,
  input  logic        [N-1:0][W-1:0]   ebcot_data,
  input  logic        [N-1:0]          ebcot_done,
  output fifo_flags_t [N-1:0]          fifo_flags,
  output logic        [N-1:0]          fifo_ovf,
  // rate control: CCBM and MAT read ports
  input  logic [CCBM_A-1:0]     ccbm_raddr,
  output logic [W-1:0]          ccbm_rdata,
  input  logic [MAT_A-1:0]      mat_raddr,
  output logic [MAT_W-1:0]      mat_rdata,
  // write activity
  output logic                  ccbm_we,
  output logic [CCBM_A-1:0]     ccbm_waddr,
  output logic [W-1:0]          ccbm_wdata,
  output logic                  ccbm_page_end,
  output logic                  ccbm_region_wrap,
  output logic                  mat_we,
  output logic [MAT_A-1:0]      mat_waddr,
  output logic [MAT_W-1:0]      mat_wdata,
  output logic                  mat_la_err,
  output logic                  arb_valid,
  output logic [IW-1:0]         arb_fifo,
  output arb_class_e            arb_class
);

  logic [N-1:0]        fifo_rd;
  logic [N-1:0][W-1:0] fifo_q;

  for (genvar i = 0; i < N; i++) begin : g_fifo
    flag_fifo #(.W(W), .DEPTH(DEPTH), .AE_LVL(AE_LVL), .AF_LVL(AF_LVL)) u_fifo (
      .clk     (sys_clk),
      .rst_n   (sys_reset_n),
      .wr_en   (ebcot_wr[i]),
      .wr_data (ebcot_data[i]),
      .rd_en   (fifo_rd[i]),
      .rd_data (fifo_q[i]),
      .flags   (fifo_flags[i]),
      .ovf     (fifo_ovf[i])
    );
  end

  fifo_controller #(.N(N), .W(W), .CCBM_A(CCBM_A), .PAGE(PAGE), .MAT_A(MAT_A)) u_fc (
    .sys_clk          (sys_clk),
    .sys_reset_n      (sys_reset_n),
    .start_fc         (start_fc),
    .cw               (cw),
    .cb_valid         (cb_valid),
    .cb_sel           (cb_sel),
    .la               (la),
    .fifo_flags       (fifo_flags),
    .ebcot_done       (ebcot_done),
    .fifo_data        (fifo_q),
    .fifo_rd          (fifo_rd),
    .ccbm_we          (ccbm_we),
    .ccbm_addr        (ccbm_waddr),
    .ccbm_data        (ccbm_wdata),
    .ccbm_page_end    (ccbm_page_end),
    .ccbm_region_wrap (ccbm_region_wrap),
    .mat_we           (mat_we),
    .mat_addr         (mat_waddr),
    .mat_data         (mat_wdata),
    .mat_la_err       (mat_la_err),
    .arb_valid        (arb_valid),
    .arb_fifo         (arb_fifo),
    .arb_class        (arb_class)
  );

  sram_1w1r #(.W(W), .AW(CCBM_A)) u_ccbm (
    .clk   (sys_clk),
    .we    (ccbm_we),
    .waddr (ccbm_waddr),
    .wdata (ccbm_wdata),
    .raddr (ccbm_raddr),
    .rdata (ccbm_rdata)
  );

  sram_1w1r #(.W(MAT_W), .AW(MAT_A)) u_mat (
    .clk   (sys_clk),
    .we    (mat_we),
    .waddr (mat_waddr),
    .wdata (mat_wdata),
    .raddr (mat_raddr),
    .rdata (mat_rdata)
  );

endmodule
