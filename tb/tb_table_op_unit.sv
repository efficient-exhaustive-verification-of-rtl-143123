// tb_table_op_unit -- checks the table operation n <- B[n_L]*n_H + C[n_L]
// against the plain Collatz map run to ten halvings, on 112-bit numbers of
// every length, loaded or chained back to back (start in the done clock).
// Each operation must report done exactly k+4 clocks after its start, k
// being the number of 17-bit digits of n_H in use (k issue clocks of the
// multiplier, one table-read clock and three multiplier stages). Numbers
// near the top of the range must raise ovf exactly when the result needs
// more than 112 bits.
module tb_table_op_unit;
  import collatz_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_chain = 0;
  int n_k [8] = '{default: 0};

  logic         rst, start, load, bc_en, busy, done, ovf;
  logic [111:0] load_n, n;
  logic [9:0]   bc_addr;
  logic [31:0]  bc_data;
  logic [2:0]   k_used;

  bc_table_ram u_ram (
    .clk(clk), .ena(bc_en), .addra(bc_addr), .doa(bc_data),
    .enb(1'b0), .addrb('0), .dob()
  );

  table_op_unit dut (
    .clk(clk), .rst(rst), .start(start), .load(load), .load_n(load_n),
    .bc_en(bc_en), .bc_addr(bc_addr), .bc_data(bc_data),
    .busy(busy), .done(done), .ovf(ovf), .n(n), .k_used(k_used)
  );

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t rand_big(input int unsigned bits);
    big_t v;
    v = {$urandom, $urandom, $urandom, $urandom};
    if (bits < 128) v = v & ((big_t'(1) << bits) - 1);
    if (bits > 0) v[bits-1] = 1'b1;
    return v;
  endfunction

  // Run one operation; the request is driven from the current negedge.
  // Leaves the bench at the negedge where done is seen.
  task automatic run_op(input bit do_load, input big_t value);
    big_t n_in, expect_n;
    int   k, cyc;
    n_in = do_load ? value : big_t'(n);
    k = digits_in_use(n_in, 10);
    expect_n = collatz_halvings(n_in, 10);
    load = do_load; start = !do_load; load_n = 112'(value);
    cyc = 0;
    do begin
      @(negedge clk);
      load = 0; start = 0;
      cyc++;
    end while (!done && cyc < 100);
    check(cyc == k + 4, $sformatf("done after %0d clocks, expected %0d (k=%0d)", cyc, k + 4, k));
    n_k[k]++;
    if (expect_n >= (big_t'(1) << 112)) begin
      check(ovf, $sformatf("missing overflow for n=%h", n_in));
      n_ovf++;
    end else begin
      check(!ovf, $sformatf("false overflow for n=%h", n_in));
      check(big_t'(n) == expect_n, $sformatf("n=%h -> %h, expected %h", n_in, n, expect_n));
    end
  endtask

  initial begin
    big_t v;
    rst = 1; start = 0; load = 0; load_n = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // Single loads of every length.
    for (int t = 0; t < 600; t++) begin
      run_op(1'b1, rand_big(11 + (t % 100)));
      if ($urandom_range(0, 1) == 1) @(negedge clk);
    end
    // Chains: keep operating on the result while it stays large.
    for (int t = 0; t < 60; t++) begin
      run_op(1'b1, rand_big(40 + (t % 60)));
      for (int s = 0; s < 8 && !ovf && n >= 112'(1 << 20); s++) begin
        run_op(1'b0, '0);
        n_chain++;
      end
    end
    // Numbers close to 2^112: some overflow, some do not.
    for (int t = 0; t < 200; t++) begin
      v = rand_big(112 - (t % 4));
      run_op(1'b1, v);
    end
    run_op(1'b1, (big_t'(1) << 112) - 1);
    check(n_ovf > 0 && n_chain > 0, "overflow or chained operations never exercised");
    for (int k = 1; k <= 6; k++) check(n_k[k] > 0, $sformatf("no operation with %0d digits", k));
    $display("operations by digit count: %0d %0d %0d %0d %0d %0d, overflows %0d, chained %0d",
             n_k[1], n_k[2], n_k[3], n_k[4], n_k[5], n_k[6], n_ovf, n_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
