// tb_sram_1w1r: self-checking test of the CCBM/MAT memory.
//
// A 64-word by 48-bit instance (the MAT word width) and a default-size instance (the
// CCBM) get random writes and reads; each read must return, one clock later, the last
// word written to that address before the read.
module tb_sram_1w1r;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [5:0]  waddr = '0, raddr = '0;
  logic [47:0] wdata = '0, rdata;
  logic [47:0] model [64];
  logic [17:0] cwaddr = '0, craddr = '0;
  logic [7:0]  cwdata = '0, crdata;
  logic [7:0]  cmodel [int];

  sram_1w1r #(.W(48), .AW(6)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  sram_1w1r dut_ccbm (.clk, .we, .waddr(cwaddr), .wdata(cwdata), .raddr(craddr), .rdata(crdata));

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill both so every later read has a known value
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(a); wdata = {16'(a), 32'($urandom)}; model[a] = wdata;
      cwaddr = 18'(a * 4099); cwdata = 8'($urandom); cmodel[a * 4099] = cwdata;
    end
    for (int t = 0; t < 5000; t++) begin
      logic [47:0] exp;
      logic [7:0]  cexp;
      int ca;
      @(negedge clk);
      we     = ($urandom_range(0, 1) == 1);
      waddr  = 6'($urandom);
      wdata  = {$urandom, 16'($urandom)};
      raddr  = 6'($urandom);
      exp    = model[raddr];
      ca     = int'($urandom_range(0, 63)) * 4099;
      craddr = 18'(ca);
      cexp   = cmodel[ca];
      cwaddr = 18'(int'($urandom_range(0, 63)) * 4099);
      cwdata = 8'($urandom);
      @(posedge clk);
      if (we) begin
        model[waddr] = wdata;
        cmodel[int'(cwaddr)] = cwdata;
      end
      #1;
      check(rdata == exp, $sformatf("MAT-size read t=%0d", t));
      check(crdata == cexp, $sformatf("CCBM-size read t=%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
