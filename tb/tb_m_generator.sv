// tb_m_generator -- checks the start-value enumeration with the 15-bit S
// table and a 2-bit m_H counter: every m = {M, m_H, S[i]} must come out
// once, in order, under random back-pressure, with m_last on the final one,
// m_valid one clock after start and one value per clock when the consumer
// is always ready. Two ranges with different M are run.
module tb_m_generator;
  import collatz_ref_pkg::*;

  localparam int MH_W = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst, start, s_en, m_valid, m_ready, m_last, active;
  logic [45:0]   m_block;
  logic [10:0]   s_addr;
  logic [14:0]   s_data;
  logic [62:0]   m;

  s_table_ram u_s (
    .clk(clk), .ena(s_en), .addra(s_addr), .doa(s_data),
    .enb(1'b0), .addrb('0), .dob()
  );

  m_generator #(.MH_W(MH_W)) dut (
    .clk(clk), .rst(rst), .start(start), .m_block(m_block),
    .s_en(s_en), .s_addr(s_addr), .s_data(s_data),
    .m_valid(m_valid), .m_ready(m_ready), .m(m), .m_last(m_last), .active(active)
  );

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [14:0] mand [$];

  task automatic run_range(input logic [45:0] mb, input int ready_pct);
    int idx, cyc;
    logic [62:0] exp_m;
    start = 1; m_block = mb; m_ready = 0;
    @(negedge clk);
    start = 0; m_block = '0;
    check(m_valid, "m_valid not high one clock after start");
    idx = 0;
    cyc = 0;
    while (active && cyc < 40000) begin
      m_ready = ($urandom_range(0, 99) < ready_pct);
      #1;
      if (m_valid && m_ready) begin
        exp_m = {mb, MH_W'(idx / mand.size()), mand[idx % mand.size()]};
        check(m == exp_m, $sformatf("value %0d: m=%h expected %h", idx, m, exp_m));
        check(m_last == (idx == (mand.size() << MH_W) - 1), $sformatf("m_last wrong at %0d", idx));
        idx++;
      end
      @(negedge clk);
      cyc++;
    end
    m_ready = 0;
    check(idx == (mand.size() << MH_W), $sformatf("%0d values, expected %0d", idx, mand.size() << MH_W));
    if (ready_pct == 100)
      check(cyc == idx, $sformatf("%0d clocks for %0d values with a consumer always ready", cyc, idx));
    @(negedge clk);
    check(!m_valid && !active, "still active after the last value");
  endtask

  initial begin
    for (int unsigned r = 0; r < 32768; r++)
      if (is_mandatory(15, r)) mand.push_back(15'(r));
    rst = 1; start = 0; m_block = '0; m_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!m_valid, "m_valid before start");
    run_range(46'h2bad_cafe_f00d, 100);
    run_range(46'h0000_0000_0001, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
