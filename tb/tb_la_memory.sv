// tb_la_memory: self-checking test of the logical address memory.
//
// Random logical addresses are written for random EBCOTs while random words are read;
// every read must return the last logical address written for that EBCOT (zero after
// reset).
module tb_la_memory;
  import fc_pkg::*;

  localparam int N = 6;
  logic clk = 1'b0, rst_n = 1'b0, cb_valid = 1'b0;
  logic [2:0] wr_sel = '0, rd_sel = '0;
  la_t wr_la = '0, rd_la;
  la_t model [N];

  la_memory #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      rd_sel = 3'(i);
      #1 check(rd_la == '0, "cleared by reset");
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cb_valid = ($urandom_range(0, 2) == 0);
      wr_sel   = 3'($urandom_range(0, N - 1));
      wr_la    = la_t'($urandom_range(0, 4095));
      rd_sel   = 3'($urandom_range(0, N - 1));
      #1 check(rd_la == model[rd_sel], $sformatf("read t=%0d", t));
      @(posedge clk);
      if (cb_valid) model[wr_sel] = wr_la;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
