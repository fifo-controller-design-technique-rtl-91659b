// fifo_arbiter: chooses which EBCOT FIFO the FIFO Controller empties next.
//
// Once per arbitration cycle (arb_en high, one system clock in two) the arbiter looks at
// the status flags of every FIFO and at the EBCOT_Done flag of its EBCOT and registers
// the chosen FIFO. The choice is combinational, the register holds it until the next
// arbitration cycle. Two rules, the first always winning over the second:
//   1. EBCOT still working (done low) and FIFO not empty: a full FIFO first, then an
//      almost full one, then an almost empty one.
//   2. EBCOT finished (done high) and FIFO not empty: in the reverse order, almost empty
//      first, then almost full, then full.
// Inside one flag level the highest-numbered FIFO wins (FIFO N-1 down to FIFO 0).
// The flag levels are taken as exclusive (full, else almost full, else almost empty) so
// that each level of the order can be reached.
//
// This design's own choices: a fourth, last level of rule 2 that takes a finished
// EBCOT's FIFO whose fill lies between the two thresholds, so that every finished code
// block is drained to the end; no FIFO is ever picked while its empty flag is high;
// grant_valid low stands for the released (high impedance) output during reset and when
// nothing qualifies. Reset clears the grant register.
//
// Interface: flags and done are sampled in the cycle where arb_en is high; grant_valid,
// grant_idx and grant_class change at the clock edge that ends that cycle.
module fifo_arbiter
  import fc_pkg::*;
#(
  parameter int unsigned N   = N_FIFO,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arb_en,
  input  fifo_flags_t [N-1:0]  flags,
  input  logic        [N-1:0]  done,
  output logic                 grant_valid,
  output logic        [IW-1:0] grant_idx,
  output arb_class_e           grant_class
);

  logic [N-1:0] run_f, run_af, run_ae;
  logic [N-1:0] fin_f, fin_af, fin_ae, fin_rest;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic lvl_f, lvl_af, lvl_ae, run, fin;
      run    = !done[i] && !flags[i].emp;
      fin    =  done[i] && !flags[i].emp;
      lvl_f  = flags[i].f;
      lvl_af = flags[i].af && !flags[i].f;
      lvl_ae = flags[i].ae && !flags[i].af && !flags[i].f;
      run_f[i]    = run && lvl_f;
      run_af[i]   = run && lvl_af;
      run_ae[i]   = run && lvl_ae;
      fin_ae[i]   = fin && lvl_ae;
      fin_af[i]   = fin && lvl_af;
      fin_f[i]    = fin && lvl_f;
      fin_rest[i] = fin && !lvl_f && !lvl_af && !lvl_ae;
    end
  end

  // Highest set bit of a request vector.
  function automatic logic [IW-1:0] top_index(input logic [N-1:0] req);
    logic [IW-1:0] idx;
    idx = '0;
    for (int i = 0; i < N; i++)
      if (req[i]) idx = IW'(i);
    return idx;
  endfunction

  logic            nxt_valid;
  logic [IW-1:0]   nxt_idx;
  arb_class_e      nxt_class;

  always_comb begin
    nxt_valid = 1'b1;
    nxt_idx   = '0;
    nxt_class = ARB_NONE;
    if      (|run_f)    begin nxt_idx = top_index(run_f);    nxt_class = ARB_RUN_F;     end
    else if (|run_af)   begin nxt_idx = top_index(run_af);   nxt_class = ARB_RUN_AF;    end
    else if (|run_ae)   begin nxt_idx = top_index(run_ae);   nxt_class = ARB_RUN_AE;    end
    else if (|fin_ae)   begin nxt_idx = top_index(fin_ae);   nxt_class = ARB_DONE_AE;   end
    else if (|fin_af)   begin nxt_idx = top_index(fin_af);   nxt_class = ARB_DONE_AF;   end
    else if (|fin_f)    begin nxt_idx = top_index(fin_f);    nxt_class = ARB_DONE_F;    end
    else if (|fin_rest) begin nxt_idx = top_index(fin_rest); nxt_class = ARB_DONE_REST; end
    else                      nxt_valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_valid <= 1'b0;
      grant_idx   <= '0;
      grant_class <= ARB_NONE;
    end else if (arb_en) begin
      grant_valid <= nxt_valid;
      grant_idx   <= nxt_idx;
      grant_class <= nxt_class;
    end
  end

endmodule
