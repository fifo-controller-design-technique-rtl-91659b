// tb_ccbm_addr_gen: self-checking test of the CCBM address generator.
//
// Two instances are driven with the same random sequence of writes and code block
// closes: one with the default sizes (18-bit CCBM, 166-location pages, six FIFOs) and a
// small one (512 locations, 10-location pages) in which every FIFO runs through its
// whole region and wraps. The expected address of the n-th byte of FIFO i is computed
// directly: page k = (n / PAGE) mod pages_per_fifo, address = (i + N*k)*PAGE + n mod PAGE.
// Start and end addresses of each code block are checked when it is closed.
module tb_ccbm_addr_gen;
  localparam int N = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, close_en = 1'b0;
  logic [2:0] wr_idx = '0, close_idx = '0;

  logic [17:0] addr_a, start_a, end_a;
  logic        pj_a, rw_a;
  logic [N-1:0] open_a;
  logic [8:0]  addr_b, start_b, end_b;
  logic        pj_b, rw_b;
  logic [N-1:0] open_b;

  ccbm_addr_gen dut_a (.clk, .rst_n, .wr_en, .wr_idx, .addr(addr_a), .page_jump(pj_a),
                       .region_wrap(rw_a), .close_en, .close_idx, .start_addr(start_a),
                       .end_addr(end_a), .open(open_a));
  ccbm_addr_gen #(.N(N), .AW(9), .PAGE(10)) dut_b (
                       .clk, .rst_n, .wr_en, .wr_idx, .addr(addr_b), .page_jump(pj_b),
                       .region_wrap(rw_b), .close_en, .close_idx, .start_addr(start_b),
                       .end_addr(end_b), .open(open_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bytes [N];
  int st_a [N], en_a [N], st_b [N], en_b [N];
  bit is_open [N];
  int jumps = 0, wraps = 0, closes = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int exp_addr(input int i, input int n, input int aw, input int page);
    int ppf, k;
    ppf = ((1 << aw) / page) / N;
    k   = (n / page) % ppf;
    return (i + N * k) * page + n % page;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      wr_idx = 3'(i);
      #1;
      check(addr_a == 18'(i * 166), "reset page base, default sizes");
      check(addr_b == 9'(i * 10), "reset page base, small sizes");
    end
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 3) != 0);
      wr_idx = 3'($urandom_range(0, N - 1));
      close_en  = 1'b0;
      close_idx = 3'($urandom_range(0, N - 1));
      if (is_open[close_idx] && close_idx != wr_idx && $urandom_range(0, 30) == 0)
        close_en = 1'b1;
      #1;
      if (close_en) begin
        check(int'(start_a) == st_a[close_idx] && int'(end_a) == en_a[close_idx],
              $sformatf("start/end default t=%0d", t));
        check(int'(start_b) == st_b[close_idx] && int'(end_b) == en_b[close_idx],
              $sformatf("start/end small t=%0d", t));
        is_open[close_idx] = 1'b0;
        closes++;
      end
      if (wr_en) begin
        int ea, eb, i;
        i  = int'(wr_idx);
        ea = exp_addr(i, n_bytes[i], 18, 166);
        eb = exp_addr(i, n_bytes[i], 9, 10);
        check(int'(addr_a) == ea, $sformatf("addr default t=%0d fifo %0d got %0d exp %0d", t, i, addr_a, ea));
        check(int'(addr_b) == eb, $sformatf("addr small t=%0d fifo %0d got %0d exp %0d", t, i, addr_b, eb));
        check(pj_b == (n_bytes[i] % 10 == 9), "page end flag");
        check(rw_b == (n_bytes[i] % 80 == 79), "region wrap flag");
        if (pj_b) jumps++;
        if (rw_b) wraps++;
        if (!is_open[i]) begin
          st_a[i] = ea;
          st_b[i] = eb;
        end
        en_a[i] = ea;
        en_b[i] = eb;
        is_open[i] = 1'b1;
        n_bytes[i]++;
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) begin
        check(open_a[i] == is_open[i] && open_b[i] == is_open[i], "open flags");
      end
    end
    check(jumps > 100, "page jumps happened");
    check(wraps > 10, "region wraps happened");
    check(closes > 100, "code blocks closed");
    $display("jumps=%0d wraps=%0d closes=%0d", jumps, wraps, closes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
