// tb_jp2k_fc_top: end-to-end test of the FIFO Controller stage at its default sizes.
//
// Six EBCOT models feed the real FIFOs (512 bytes), the FIFO Controller drains them into
// the 2**18-byte CCBM in 166-byte pages and records every code block in the MAT. Each
// EBCOT takes the next code block of a 256x256 tile (LL subband 8x8, 32x32 code blocks,
// 70 code blocks, listed in MAT order), announces its logical address on the CBA port,
// writes 50 to 4000 random bytes at a rate drawn per code block (stalling on the full
// flag), raises EBCOT_Done and lowers it once the MAT record is written. One code block
// carries a logical address that does not exist in the tile.
//
// The run goes on until every FIFO has gone once round its whole CCBM region (263
// pages), about 300 000 bytes. Checked: every CCBM write (FIFO chosen by the priority
// rules on the flags two clocks before, address from the page formula, data in write
// order); every MAT record; no FIFO overflow; one byte every two clocks while bytes wait
// (measured right after start_fc, with all FIFOs pre-filled); and at the end, read back
// through the rate-control ports, all MAT records and a sample of CCBM bytes. Each
// mechanism must occur: all seven priority levels, a full FIFO stalling its EBCOT, page
// jumps, region wraps, an invalid logical address, the wait for start_fc.
module tb_jp2k_fc_top;
  import fc_pkg::*;

  localparam int N = 6, W = 8, CA = 18, PG = 166, MA = 12, MW = 2 * CA + LA_W;
  localparam int DEPTH = 512, AEL = 64, AFL = 448;

  logic sys_clk = 1'b0, sys_reset_n = 1'b0, start_fc = 1'b0;
  cw_t  cw;
  logic cb_valid = 1'b0;
  logic [2:0] cb_sel = '0;
  la_t  la = '0;
  logic [N-1:0] ebcot_wr, ebcot_done = '0;
  logic [N-1:0][W-1:0] ebcot_data;
  // An EBCOT model holds a byte in want/want_data until the FIFO takes it: the write
  // strobe is gated by the full flag of the same cycle.
  logic [N-1:0] want = '0;
  logic [N-1:0][W-1:0] want_data = '0;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      ebcot_wr[i]   = want[i] && !fifo_flags[i].f;
      ebcot_data[i] = want_data[i];
    end
  end
  fifo_flags_t [N-1:0] fifo_flags;
  logic [N-1:0] fifo_ovf;
  logic [CA-1:0] ccbm_raddr = '0, ccbm_waddr;
  logic [W-1:0]  ccbm_rdata, ccbm_wdata;
  logic [MA-1:0] mat_raddr = '0, mat_waddr;
  logic [MW-1:0] mat_rdata, mat_wdata;
  logic ccbm_we, ccbm_page_end, ccbm_region_wrap, mat_we, mat_la_err, arb_valid;
  logic [2:0] arb_fifo;
  arb_class_e arb_class;

  jp2k_fc_top dut (.*);

  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- code block list
  la_t la_list [128];
  int  n_la = 0;
  localparam la_t BAD_LA = '{res: 3'd7, sb: 2'd1, cb: 7'd0};

  initial begin
    cw.tile_size = 4'd8;
    cw.sb_size   = 4'd3;
    cw.cb_size   = 4'd5;
    for (int r = 0; r <= 5; r++) begin
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

  function automatic int exp_addr(input int i, input int n);
    int ppf;
    ppf = ((1 << CA) / PG) / N;
    return (i + N * ((n / PG) % ppf)) * PG + n % PG;
  endfunction

  // ---------------------------------------------------------------- models and checks
  typedef enum {E_IDLE, E_WRITE, E_DONE} est_e;
  est_e est [N];
  int   remaining [N], rate [N], cb_of [N];
  la_t  cur_la [N];
  int   cb_seq = 0, blocks_done = 0;
  bit   allow_write = 1'b0, running_tb = 1'b0, bad_sent = 1'b0;
  logic [W-1:0] wq [N][$];          // bytes written and not yet seen in the CCBM
  int   nbytes [N];
  bit   m_open [N];
  int   m_start [N], m_end [N];
  int   wraps_of [N];
  logic [W-1:0]  ccbm_model [int];
  logic [MW-1:0] mat_model [int];
  int   rank_h1 [N], rank_h2 [N];
  int   class_cnt [8];
  int   bytes = 0, page_ends = 0, wraps = 0, records = 0, stalls = 0, la_errs = 0;

  always @(posedge sys_clk) begin
    if (sys_reset_n) begin
      check(fifo_ovf == '0, "no FIFO overflow");
      if (!running_tb) check(!ccbm_we && !mat_we, "idle before start_fc");
      if (ccbm_we) begin
        int i, best, best_rank, ea;
        i = int'(arb_fifo);
        best = -1; best_rank = 99;
        for (int k = 0; k < N; k++)
          if (rank_h2[k] <= best_rank && rank_h2[k] != 99) begin
            best = k; best_rank = rank_h2[k];
          end
        check(i == best, $sformatf("arbitration chose %0d exp %0d", i, best));
        check(int'(arb_class) == best_rank + 1, "arbitration level");
        if (best_rank != 99) class_cnt[best_rank + 1]++;
        ea = exp_addr(i, nbytes[i]);
        check(int'(ccbm_waddr) == ea, $sformatf("CCBM address fifo %0d got %0d exp %0d", i, ccbm_waddr, ea));
        check(wq[i].size() > 0, "CCBM byte was written by an EBCOT");
        if (wq[i].size() > 0) check(ccbm_wdata == wq[i].pop_front(), "CCBM data in write order");
        ccbm_model[ea] = ccbm_wdata;
        if (!m_open[i]) m_start[i] = ea;
        m_end[i]  = ea;
        m_open[i] = 1'b1;
        nbytes[i]++;
        bytes++;
        if (ccbm_page_end) page_ends++;
        if (ccbm_region_wrap) begin
          wraps++;
          wraps_of[i]++;
        end
        check(ccbm_page_end == (ea % PG == PG - 1), "page end flag");
      end
      if (mat_we) begin
        int fi;
        la_t rla;
        fi  = -1;
        rla = la_t'(mat_wdata[LA_W-1:0]);
        for (int i = 0; i < N; i++)
          if (est[i] == E_DONE && cur_la[i] == rla && m_open[i]) fi = i;
        check(fi >= 0, "MAT record for a finished code block");
        if (fi >= 0) begin
          check(wq[fi].size() == 0, "code block fully moved before its record");
          check(mat_wdata[MW-1:CA+LA_W] == CA'(m_start[fi]), "record start address");
          check(mat_wdata[CA+LA_W-1:LA_W] == CA'(m_end[fi]), "record end address");
          if (rla == BAD_LA) begin
            check(mat_la_err, "invalid logical address flagged");
            la_errs += int'(mat_la_err);
          end else begin
            check(!mat_la_err, "valid logical address");
            check(int'(mat_waddr) == cb_of[fi], $sformatf("MAT address got %0d exp %0d", mat_waddr, cb_of[fi]));
            mat_model[int'(mat_waddr)] = mat_wdata;
          end
          m_open[fi] = 1'b0;
          est[fi] <= E_IDLE;
          ebcot_done[fi] <= 1'b0;
          records++;
          blocks_done++;
        end
      end
      for (int k = 0; k < N; k++) begin
        rank_h2[k] = rank_h1[k];
        rank_h1[k] = rank_of(fifo_flags[k], ebcot_done[k]);
      end

      // ---- EBCOT models
      cb_valid <= 1'b0;
      begin
        bit cba_busy;
        cba_busy = 1'b0;
        for (int i = 0; i < N; i++) begin
          case (est[i])
            E_IDLE: if (!cba_busy && allow_write && fifo_flags[i].emp) begin
              cba_busy = 1'b1;
              cb_valid <= 1'b1;
              cb_sel   <= 3'(i);
              if (!bad_sent && cb_seq == 20) begin
                cur_la[i] = BAD_LA;
                bad_sent  = 1'b1;
              end else begin
                cur_la[i] = la_list[cb_seq % n_la];
                cb_of[i]  = cb_seq % n_la;
                cb_seq++;
              end
              la <= cur_la[i];
              remaining[i] = int'($urandom_range(50, 4000));
              case ($urandom_range(0, 3))
                0: rate[i] = 100;
                1: rate[i] = 40;
                2: rate[i] = 10;
                default: rate[i] = 2;
              endcase
              est[i] <= E_WRITE;
            end
            E_WRITE: begin
              bit pending;
              pending = want[i];
              if (ebcot_wr[i]) begin
                wq[i].push_back(want_data[i]);
                remaining[i]--;
                pending = 1'b0;
              end else if (want[i]) begin
                stalls++;
              end
              if (!pending) begin
                want[i] <= 1'b0;
                if (remaining[i] == 0) begin
                  est[i] <= E_DONE;
                  ebcot_done[i] <= 1'b1;
                end else if ($urandom_range(0, 99) < rate[i]) begin
                  want[i]      <= 1'b1;
                  want_data[i] <= 8'($urandom);
                end
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    repeat (3000000) @(posedge sys_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_wrapped;
    for (int i = 0; i < N; i++) begin
      est[i] = E_IDLE; nbytes[i] = 0; m_open[i] = 1'b0; rank_h1[i] = 99; rank_h2[i] = 99;
      wraps_of[i] = 0;
    end
    repeat (3) @(negedge sys_clk);
    sys_reset_n = 1'b1;
    allow_write = 1'b1;
    repeat (1500) @(negedge sys_clk);
    check(bytes == 0, "nothing moved before start_fc");
    start_fc = 1'b1;
    running_tb = 1'b1;
    @(negedge sys_clk);
    start_fc = 1'b0;
    begin
      int b0;
      while (bytes == 0) @(negedge sys_clk);
      check(running_tb, "first byte after start_fc");
      b0 = bytes;
      repeat (1000) @(negedge sys_clk);
      check(bytes - b0 == 500, $sformatf("500 bytes in 1000 clocks, got %0d", bytes - b0));
    end
    do begin
      repeat (1000) @(negedge sys_clk);
      all_wrapped = 1'b1;
      for (int i = 0; i < N; i++) if (wraps_of[i] == 0) all_wrapped = 1'b0;
    end while (!all_wrapped);
    allow_write = 1'b0;
    wait (blocks_done > 0 && est[0] == E_IDLE && est[1] == E_IDLE && est[2] == E_IDLE &&
          est[3] == E_IDLE && est[4] == E_IDLE && est[5] == E_IDLE);
    repeat (20) @(negedge sys_clk);
    // read back through the rate-control ports
    foreach (mat_model[a]) begin
      mat_raddr = MA'(a);
      @(negedge sys_clk);
      check(mat_rdata == mat_model[a], $sformatf("MAT read back at %0d", a));
    end
    begin
      int n;
      n = 0;
      foreach (ccbm_model[a]) begin
        if (n % 37 == 0) begin
          ccbm_raddr = CA'(a);
          @(negedge sys_clk);
          check(ccbm_rdata == ccbm_model[a], $sformatf("CCBM read back at %0d", a));
        end
        n++;
      end
    end
    for (int c = 1; c < 8; c++) begin
      $display("priority level %0d: %0d bytes", c, class_cnt[c]);
      check(class_cnt[c] > 0, $sformatf("priority level %0d never used", c));
    end
    $display("bytes=%0d records=%0d page_ends=%0d wraps=%0d stalls=%0d la_errs=%0d",
             bytes, records, page_ends, wraps, stalls, la_errs);
    check(stalls > 0, "a full FIFO stalled an EBCOT");
    check(page_ends > 0, "page jumps happened");
    check(wraps >= N, "every FIFO wrapped round its region");
    check(la_errs == 1, "the invalid logical address was flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
