// tb_fifo_arbiter: self-checking test of the FIFO arbitration unit.
//
// Random flag and EBCOT_Done patterns are applied, with a bias towards few candidates so
// that every priority level wins sometimes. The expected choice is computed by ranking:
// each qualifying FIFO gets a rank from its rule and flag level (working: full 0, almost
// full 1, almost empty 2; finished: almost empty 3, almost full 4, full 5, in between 6)
// and the lowest rank wins, ties going to the higher FIFO number. The register must
// follow only in cycles with arb_en high, and reset must leave no grant.
module tb_fifo_arbiter;
  import fc_pkg::*;

  localparam int N = 6;

  logic clk = 1'b0, rst_n = 1'b0, arb_en = 1'b0;
  fifo_flags_t [N-1:0] flags;
  logic [N-1:0] done;
  logic grant_valid;
  logic [2:0] grant_idx;
  arb_class_e grant_class;

  int checks = 0, failures = 0;
  int class_seen [8];

  fifo_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random consistent flags for one FIFO from a fill level 0..4:
  // 0 empty, 1 almost empty, 2 in between, 3 almost full, 4 full.
  function automatic fifo_flags_t mk_flags(input int lvl);
    fifo_flags_t fl;
    fl.emp = (lvl == 0);
    fl.ae  = (lvl <= 1);
    fl.af  = (lvl >= 3);
    fl.f   = (lvl == 4);
    return fl;
  endfunction

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

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic exp_valid;
  int   exp_idx, exp_rank;
  logic prev_valid;
  logic [2:0] prev_idx;

  initial begin
    flags = '0;
    done  = '0;
    repeat (3) @(negedge clk);
    check(grant_valid == 1'b0, "no grant during reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(grant_valid == 1'b0, "no grant after reset before arbitration");

    for (int t = 0; t < 6000; t++) begin
      for (int i = 0; i < N; i++) begin
        int lvl;
        lvl = ($urandom_range(0, 2) == 0) ? int'($urandom_range(1, 4)) : 0;
        flags[i] = mk_flags(lvl);
        done[i]  = $urandom_range(0, 1);
      end
      arb_en = ($urandom_range(0, 3) != 0);
      exp_rank = 99;
      exp_idx  = 0;
      for (int i = 0; i < N; i++) begin
        int r;
        r = rank_of(flags[i], done[i]);
        if (r <= exp_rank && r != 99) begin
          exp_rank = r;
          exp_idx  = i;
        end
      end
      exp_valid  = (exp_rank != 99);
      prev_valid = grant_valid;
      prev_idx   = grant_idx;
      @(negedge clk);
      if (arb_en) begin
        check(grant_valid == exp_valid, $sformatf("valid t=%0d", t));
        if (exp_valid) begin
          check(int'(grant_idx) == exp_idx,
                $sformatf("idx t=%0d got %0d exp %0d rank %0d", t, grant_idx, exp_idx, exp_rank));
          check(int'(grant_class) == exp_rank + 1, $sformatf("class t=%0d", t));
          class_seen[exp_rank + 1]++;
        end else begin
          class_seen[0]++;
        end
      end else begin
        check(grant_valid == prev_valid && grant_idx == prev_idx, "hold without arb_en");
      end
    end
    for (int c = 0; c < 8; c++) begin
      check(class_seen[c] > 0, $sformatf("priority level %0d never chosen", c));
      $display("level %0d chosen %0d times", c, class_seen[c]);
    end
    rst_n = 1'b0;
    @(negedge clk);
    check(grant_valid == 1'b0, "reset clears grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
