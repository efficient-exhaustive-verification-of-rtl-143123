// tb_collatz_multi_default -- the system at its default size (380
// coprocessors, 112-bit interim registers, 2^32 numbers per block) for a
// bounded time. A whole block takes about 4e9 clocks per coprocessor, far
// beyond a simulation, so this bench checks the start of the run instead:
// every coprocessor, given a random 32-bit block number (64-bit start values),
// must go busy, must report no overflow, and must be reading its tables at
// the rate of a running coprocessor: one B/C table read per table operation,
// at most one every five clocks and at least one every 4+6 clocks. For the
// first four coprocessors the number of table operations started in the
// window is compared with the reference timing (k+4 clocks per operation).
module tb_collatz_multi_default;
  import collatz_ref_pkg::*;
  localparam int NC = 380, RUN = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin : watchdog
    repeat (RUN + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst;
  logic [NC-1:0] start, busy, done, ovf_valid;
  logic [45:0]   m_block [NC];
  logic [77:0]   ovf_m [NC];

  collatz_multi dut (
    .clk(clk), .rst(rst), .start(start), .m_block(m_block), .busy(busy),
    .done(done), .ovf_valid(ovf_valid), .ovf_m(ovf_m));

  int reads [NC];
  int n_ovf = 0;

  for (genvar g = 0; g < NC / 2; g++) begin : g_mon
    always @(negedge clk) begin
      if (dut.g_pair[g].u_pair.bc_en[0]) reads[2*g]++;
      if (dut.g_pair[g].u_pair.bc_en[1]) reads[2*g+1]++;
    end
  end

  always @(negedge clk) if (ovf_valid != '0) n_ovf++;

  // Table operations a coprocessor starts within its first `window` clocks.
  function automatic int ops_in_window(input big_t mb, input longint window);
    logic [14:0] mand [$];
    big_t   m, n;
    longint t;
    int     ops;
    for (int unsigned x = 0; x < 32768; x++)
      if (is_mandatory(15, x)) mand.push_back(15'(x));
    t = 1;
    ops = 0;
    for (int mh = 0; mh < (1 << 17); mh++)
      foreach (mand[i]) begin
        m = (mb << 32) | (big_t'(mh) << 15) | big_t'(mand[i]);
        n = m;
        do begin
          if (t > window) return ops;
          ops++;
          t += digits_in_use(n, 10) + 4;
          n = collatz_halvings(n, 10);
        end while (n >= m);
      end
    return ops;
  endfunction

  initial begin
    rst = 1; start = '0;
    for (int c = 0; c < NC; c++) begin
      m_block[c] = 46'({1'b1, 31'($urandom)});
      reads[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    start = '1;
    @(negedge clk);
    start = '0;
    check(busy == '1, "not every coprocessor went busy");
    repeat (RUN) @(negedge clk);
    check(busy == '1 && done == '0, "a coprocessor finished or stopped early");
    check(n_ovf == 0, "overflow reported for a 64-bit start value");
    for (int c = 0; c < NC; c++)
      check(reads[c] >= RUN / 10 && reads[c] <= RUN / 5 + 1,
            $sformatf("coprocessor %0d: %0d table operations in %0d clocks", c, reads[c], RUN));
    for (int c = 0; c < 4; c++) begin
      int expect_ops;
      expect_ops = ops_in_window(big_t'(m_block[c]), RUN);
      check(reads[c] >= expect_ops - 1 && reads[c] <= expect_ops + 1,
            $sformatf("coprocessor %0d: %0d table operations, reference %0d", c, reads[c], expect_ops));
    end
    $display("coprocessor 0: %0d table operations in %0d clocks", reads[0], RUN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
