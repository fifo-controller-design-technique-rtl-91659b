// tb_mat_addr_gen: self-checking test of the MAT address generator.
//
// For several control words the expected MAT addresses are built by walking the tile's
// subbands in order (LL of resolution 0, then HL, LH, HH of each higher resolution) and
// numbering their code blocks one after the other. Every existing logical address must
// map to its number without la_err; logical addresses that do not exist (resolution too
// high, wrong subband, code block number past the subband) must raise la_err.
module tb_mat_addr_gen;
  import fc_pkg::*;

  la_t la;
  cw_t cw;
  logic [11:0] mat_addr;
  logic la_err;

  mat_addr_gen dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // {tile, LL subband, code block} as log2 of the sides
  int cfg [5][3] = '{'{8, 3, 5}, '{9, 4, 5}, '{7, 2, 2}, '{10, 5, 6}, '{6, 3, 3}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin
      int levels, next;
      cw.tile_size = 4'(cfg[c][0]);
      cw.sb_size   = 4'(cfg[c][1]);
      cw.cb_size   = 4'(cfg[c][2]);
      levels = cfg[c][0] - cfg[c][1];
      next = 0;
      for (int r = 0; r <= levels; r++) begin
        int side, nside, ncb;
        side  = (r == 0) ? cfg[c][1] : cfg[c][1] + r - 1;
        nside = 1;
        for (int s = cfg[c][2]; s < side; s++) nside *= 2;
        ncb = nside * nside;
        for (int s = (r == 0 ? 0 : 1); s <= (r == 0 ? 0 : 3); s++) begin
          for (int b = 0; b < ncb; b++) begin
            if (b < 128) begin
              la.res = 3'(r); la.sb = 2'(s); la.cb = 7'(b);
              #1;
              check(int'(mat_addr) == next && !la_err,
                    $sformatf("cfg %0d r%0d s%0d b%0d got %0d exp %0d err %0b",
                              c, r, s, b, mat_addr, next, la_err));
            end
            next++;
          end
          if (ncb < 128) begin
            la.res = 3'(r); la.sb = 2'(s); la.cb = 7'(ncb);
            #1;
            check(la_err, "code block past the subband");
          end
        end
        // wrong subband for the resolution
        la.res = 3'(r); la.sb = (r == 0) ? 2'd1 : 2'd0; la.cb = '0;
        #1;
        check(la_err, "wrong subband");
      end
      if (levels < 7) begin
        la.res = 3'(levels + 1); la.sb = 2'd1; la.cb = '0;
        #1;
        check(la_err, "resolution above the levels");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
