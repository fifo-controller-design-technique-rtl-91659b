// tb_flag_fifo: self-checking test of the EBCOT FIFO with its four flags.
//
// A 16-word FIFO (almost empty at <= 3 words, almost full at >= 12) is written and read
// at random rates, swinging between phases that fill it and phases that drain it. A
// queue models the contents: read data, every flag and the overflow pulse on a write
// into a full FIFO are compared with it every cycle.
module tb_flag_fifo;
  import fc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  fifo_flags_t flags;
  logic ovf;

  flag_fifo #(.W(8), .DEPTH(16), .AE_LVL(3), .AF_LVL(12)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int n_full = 0, n_ovf = 0, n_empty = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      int wp, rp;
      @(negedge clk);
      wp = ((t / 500) % 2 == 0) ? 70 : 30;
      rp = 100 - wp;
      wr_en   = ($urandom_range(0, 99) < wp);
      wr_data = 8'($urandom);
      rd_en   = ($urandom_range(0, 99) < rp) && (q.size() != 0);
      #1;
      check(flags.emp == (q.size() == 0), "empty flag");
      check(flags.f   == (q.size() == 16), "full flag");
      check(flags.ae  == (q.size() <= 3), "almost empty flag");
      check(flags.af  == (q.size() >= 12), "almost full flag");
      check(ovf == (wr_en && q.size() == 16), "overflow pulse");
      if (q.size() != 0) check(rd_data == q[0], $sformatf("read data t=%0d", t));
      if (q.size() == 16) n_full++;
      if (q.size() == 0) n_empty++;
      if (ovf) n_ovf++;
      @(posedge clk);
      begin
        bit take;
        take = wr_en && q.size() < 16;  // a write into a full FIFO is dropped
        if (rd_en && q.size() != 0) void'(q.pop_front());
        if (take) q.push_back(wr_data);
      end
    end
    check(n_full > 0 && n_empty > 0 && n_ovf > 0, "full, empty and overflow all reached");
    $display("full=%0d empty=%0d ovf=%0d", n_full, n_empty, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
