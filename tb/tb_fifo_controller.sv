// tb_fifo_controller: self-checking test of the FIFO Controller on its own.
//
// The six FIFOs and EBCOTs around the controller are modelled here. Each EBCOT model
// takes the next logical address from a list that walks every code block of a tile in
// MAT order (so the expected MAT address is the position in that list), announces it
// on the CBA port, writes a random number of bytes at a random rate into its FIFO
// (never into a full one), raises EBCOT_Done and lowers it once the code block's MAT
// record has been written. Small sizes are used: 32-word FIFOs, an 1024-location CCBM
// with 8-location pages, so that page jumps and region wraps are frequent.
//
// Checked: every FIFO read against the priority rules applied to the flags of the
// cycle before; one byte every two clocks while something qualifies; every CCBM write
// (address from the page formula, data in FIFO order); every MAT record (address,
// start, end, logical address); nothing moves before start_fc. Each priority level,
// page jumps, region wraps and record writes must all occur.
module tb_fifo_controller;
  import fc_pkg::*;

  localparam int N = 6, W = 8, CA = 10, PG = 8, MA = 12;
  localparam int DEPTH = 32, AEL = 4, AFL = 28;

  logic clk = 1'b0, rst_n = 1'b0, start_fc = 1'b0;
  cw_t  cw;
  logic cb_valid = 1'b0;
  logic [2:0] cb_sel = '0;
  la_t  la = '0;
  fifo_flags_t [N-1:0] fifo_flags;
  logic [N-1:0] ebcot_done = '0;
  logic [N-1:0][W-1:0] fifo_data;
  logic [N-1:0] fifo_rd;
  logic ccbm_we, ccbm_page_end, ccbm_region_wrap;
  logic [CA-1:0] ccbm_addr;
  logic [W-1:0] ccbm_data;
  logic mat_we, mat_la_err;
  logic [MA-1:0] mat_addr;
  logic [2*CA+LA_W-1:0] mat_data;
  logic arb_valid;
  logic [2:0] arb_fifo;
  arb_class_e arb_class;

  fifo_controller #(.N(N), .W(W), .CCBM_A(CA), .PAGE(PG), .MAT_A(MA)) dut (
    .sys_clk(clk), .sys_reset_n(rst_n), .*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- list of LAs
  localparam int N_CB_MAX = 4096;
  la_t la_list [N_CB_MAX];
  int  n_la = 0;

  initial begin
    int levels;
    cw.tile_size = 4'd8;  // 256 x 256 tile
    cw.sb_size   = 4'd3;  // 8 x 8 LL subband, five decomposition levels
    cw.cb_size   = 4'd5;  // 32 x 32 code blocks
    levels = 5;
    for (int r = 0; r <= levels; r++) begin
      int side, nside;
      side  = (r == 0) ? 3 : 3 + r - 1;
      nside = (side > 5) ? (1 << (side - 5)) : 1;
      for (int s = (r == 0 ? 0 : 1); s <= (r == 0 ? 0 : 3); s++)
        for (int b = 0; b < nside * nside; b++) begin
          la_list[n_la] = '{res: 3'(r), sb: 2'(s), cb: 7'(b)};
          n_la++;
        end
    end
  end

  // ---------------------------------------------------------------- FIFO models
  logic [W-1:0] fmem [N][DEPTH];
  int fhead [N], fcnt [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      fifo_data[i]      = fmem[i][fhead[i]];
      fifo_flags[i].emp = (fcnt[i] == 0);
      fifo_flags[i].f   = (fcnt[i] == DEPTH);
      fifo_flags[i].ae  = (fcnt[i] <= AEL);
      fifo_flags[i].af  = (fcnt[i] >= AFL);
    end
  end

  function automatic int rank_of(input fifo_flags_t fl, input logic d);
    if (fl.emp) return 99;
    if (!d) begin
      if (fl.f)  return 0;
      if (fl.af) return 1;
      if (fl.ae) return 2;
      return 99;
    end
    if (fl.ae) return 3;
    if (fl.f)  return 5;
    if (fl.af) return 4;
    return 6;
  endfunction

  // ---------------------------------------------------------------- EBCOT models
  typedef enum {E_IDLE, E_WRITE, E_DONE} est_e;
  est_e est [N];
  int   remaining [N], rate [N], cb_of [N], cb_seq = 0;
  int   blocks_done = 0;
  bit   allow_write = 1'b0;
  logic [W-1:0] byte_seq [N];

  // expected stream state
  int   nbytes [N];            // bytes of FIFO i moved so far (for the page formula)
  bit   m_open [N];
  int   m_start [N], m_end [N];
  bit   pend_ccbm = 1'b0;
  int   pend_addr, pend_data;
  int   pend_read_fifo;
  // statistics
  int   class_cnt [8];
  int   reads = 0, page_ends = 0, wraps = 0, records = 0;
  int   last_read_t = -10, cyc = 0;
  int   prev_rank [N];
  logic [N-1:0] prev_done;
  fifo_flags_t [N-1:0] prev_flags;
  bit   running_tb = 1'b0;

  function automatic int exp_addr(input int i, input int n);
    int ppf;
    ppf = ((1 << CA) / PG) / N;
    return (i + N * ((n / PG) % ppf)) * PG + n % PG;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // ---- checks on the outputs of the cycle that ends now
      if (!running_tb) check(fifo_rd == '0 && !ccbm_we && !mat_we, "idle before start_fc");
      check($countones(fifo_rd) <= 1, "one FIFO read at a time");
      if (pend_ccbm) begin
        check(ccbm_we, "CCBM write follows the FIFO read");
        check(int'(ccbm_addr) == pend_addr,
              $sformatf("CCBM address fifo %0d got %0d exp %0d", pend_read_fifo, ccbm_addr, pend_addr));
        check(int'(ccbm_data) == pend_data, "CCBM data");
        if (ccbm_page_end) page_ends++;
        if (ccbm_region_wrap) wraps++;
      end else begin
        check(!ccbm_we, "no CCBM write without a read");
      end
      pend_ccbm = 1'b0;
      if (mat_we) begin
        int fi;
        la_t rla;
        fi  = -1;
        rla = la_t'(mat_data[LA_W-1:0]);
        for (int i = 0; i < N; i++)
          if (est[i] == E_DONE && la_list[cb_of[i]] == rla && m_open[i] && fcnt[i] == 0) fi = i;
        check(fi >= 0, "MAT record for a finished, drained code block");
        if (fi >= 0) begin
          check(int'(mat_addr) == cb_of[fi], $sformatf("MAT address got %0d exp %0d", mat_addr, cb_of[fi]));
          check(int'(mat_data[2*CA+LA_W-1:CA+LA_W]) == m_start[fi], "record start address");
          check(int'(mat_data[CA+LA_W-1:LA_W]) == m_end[fi], "record end address");
          check(!mat_la_err, "valid logical address");
          m_open[fi] = 1'b0;
          est[fi] <= E_IDLE;
          ebcot_done[fi] <= 1'b0;
          records++;
          blocks_done++;
        end
      end
      if (fifo_rd != '0) begin
        int i, best, best_rank;
        i = $clog2(int'(fifo_rd));
        check(fcnt[i] > 0, "read of a non-empty FIFO");
        // the choice must follow the priority rules on the flags of the cycle before
        best = -1; best_rank = 99;
        for (int k = 0; k < N; k++)
          if (prev_rank[k] <= best_rank && prev_rank[k] != 99) begin
            best = k; best_rank = prev_rank[k];
          end
        check(i == best, $sformatf("arbitration chose %0d exp %0d", i, best));
        check(int'(arb_class) == best_rank + 1, "arbitration level");
        if (best_rank != 99) class_cnt[best_rank + 1]++;
        check(cyc - last_read_t >= 2, "at most one byte every two clocks");
        last_read_t = cyc;
        reads++;
        pend_ccbm      = 1'b1;
        pend_read_fifo = i;
        pend_addr      = exp_addr(i, nbytes[i]);
        pend_data      = int'(fifo_data[i]);
        if (!m_open[i]) m_start[i] = pend_addr;
        m_end[i]  = pend_addr;
        m_open[i] = 1'b1;
        nbytes[i]++;
      end
      for (int k = 0; k < N; k++) prev_rank[k] = rank_of(fifo_flags[k], ebcot_done[k]);

      // ---- FIFO and EBCOT models
      cb_valid <= 1'b0;
      begin
        bit cba_busy;
        cba_busy = 1'b0;
        for (int i = 0; i < N; i++) begin
          int c;
          bit wr;
          c  = fcnt[i];
          wr = 1'b0;
          case (est[i])
            E_IDLE: if (!cba_busy && allow_write && fcnt[i] == 0) begin
              cba_busy = 1'b1;
              cb_valid <= 1'b1;
              cb_sel   <= 3'(i);
              la       <= la_list[cb_seq % n_la];
              cb_of[i] = cb_seq % n_la;
              cb_seq++;
              remaining[i] = int'($urandom_range(1, 120));
              case ($urandom_range(0, 3))
                0: rate[i] = 100;
                1: rate[i] = 50;
                2: rate[i] = 10;
                default: rate[i] = 3;
              endcase
              est[i] <= E_WRITE;
            end
            E_WRITE: begin
              if (remaining[i] == 0) begin
                est[i] <= E_DONE;
                ebcot_done[i] <= 1'b1;
              end else if (fcnt[i] < DEPTH && $urandom_range(0, 99) < rate[i]) begin
                wr = 1'b1;
                remaining[i]--;
              end
            end
            default: ;
          endcase
          if (wr) begin
            fmem[i][(fhead[i] + fcnt[i]) % DEPTH] <= byte_seq[i];
            byte_seq[i] <= byte_seq[i] + 8'd37;
            c++;
          end
          if (fifo_rd[i]) begin
            fhead[i] <= (fhead[i] + 1) % DEPTH;
            c--;
          end
          fcnt[i] <= c;
        end
      end
    end
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      fhead[i] = 0; fcnt[i] = 0; est[i] = E_IDLE; byte_seq[i] = 8'(i * 40);
      nbytes[i] = 0; m_open[i] = 1'b0; prev_rank[i] = 99;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // EBCOTs fill their FIFOs before the controller is started
    allow_write = 1'b1;
    repeat (300) @(negedge clk);
    check(reads == 0, "nothing read before start_fc");
    start_fc = 1'b1;
    running_tb = 1'b1;
    @(negedge clk);
    start_fc = 1'b0;
    // rate: with bytes waiting in several FIFOs one byte moves every two clocks
    begin
      int r0;
      r0 = reads;
      repeat (100) @(negedge clk);
      check(reads - r0 == 50, $sformatf("50 bytes in 100 clocks, got %0d", reads - r0));
    end
    wait (blocks_done >= 400);
    allow_write = 1'b0;
    repeat (2000) @(negedge clk);
    for (int c = 1; c < 8; c++) begin
      $display("priority level %0d: %0d bytes", c, class_cnt[c]);
      check(class_cnt[c] > 0, $sformatf("priority level %0d never used", c));
    end
    $display("reads=%0d page_ends=%0d wraps=%0d records=%0d", reads, page_ends, wraps, records);
    check(page_ends > 0 && wraps > 0 && records >= 400, "page jump, region wrap and records seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
