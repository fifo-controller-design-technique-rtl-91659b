// mat_addr_gen: MAT address generator of the FIFO Controller.
//
// Each code block of a tile has one record in the memory allocation table (MAT). Its
// address is the index of the code block in the tile, worked out from the logical
// address (resolution, subband, code block number inside the subband) and the sizes in
// the control word (CW). The subbands are laid out in the order LL of resolution 0, then
// HL, LH, HH of resolution 1, 2, ... and the code blocks of a subband follow each other:
//
//   side(0) = sb_size, side(r) = sb_size + r - 1 for r >= 1        (log2 of the side)
//   n(r)    = 4 ** max(0, side(r) - cb_size)                         (code blocks)
//   index   = cb                                                     for r = 0
//   index   = n(0) + 3*(n(1)+...+n(r-1)) + (sb-1)*n(r) + cb          for r >= 1
//
// where sb_size is the side of the lowest-resolution subband and the number of
// decomposition levels is tile_size - sb_size (all sizes as log2). The layout, the
// field widths and the meaning of the CW fields are this design's own choices; the
// principle (index of the code block in its subband, used as MAT address) follows the
// FIFO Controller design. la_err flags a logical address that does not exist for the CW
// (resolution above the number of levels, wrong subband for the resolution, code block
// number beyond the subband, or an index beyond the MAT).
//
// Interface: purely combinational.
module mat_addr_gen
  import fc_pkg::*;
#(
  parameter int unsigned AW = MAT_AW
) (
  input  la_t          la,
  input  cw_t          cw,
  output logic [AW-1:0] mat_addr,
  output logic          la_err
);

  // log2 of the number of code blocks across one side of a subband at resolution r.
  function automatic int unsigned cb_side_log2(input int unsigned r,
                                               input logic [3:0] sb_size,
                                               input logic [3:0] cb_size);
    int unsigned side;
    side = (r == 0) ? int'(sb_size) : int'(sb_size) + r - 1;
    return (side > int'(cb_size)) ? side - int'(cb_size) : 0;
  endfunction

  always_comb begin
    int unsigned levels, base, n_r, idx;
    levels = (cw.tile_size >= cw.sb_size) ? int'(cw.tile_size) - int'(cw.sb_size) : 0;
    base   = 0;
    for (int unsigned r = 0; r < 8; r++) begin
      if (r < int'(la.res)) begin
        if (r == 0) base += 1 << (2 * cb_side_log2(r, cw.sb_size, cw.cb_size));
        else        base += 3 * (1 << (2 * cb_side_log2(r, cw.sb_size, cw.cb_size)));
      end
    end
    n_r = 1 << (2 * cb_side_log2(int'(la.res), cw.sb_size, cw.cb_size));
    if (la.res == 3'd0) idx = int'(la.cb);
    else                idx = base + (int'(la.sb) - 1) * n_r + int'(la.cb);
    mat_addr = AW'(idx);
    la_err   = (int'(la.res) > levels)
            || ((la.res == 3'd0) != (la.sb == 2'd0))
            || (int'(la.cb) >= n_r)
            || (idx >= (1 << AW));
  end

endmodule
