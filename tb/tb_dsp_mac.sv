// tb_dsp_mac -- drives dsp_mac with random chains: one P <- A*B + C
// operation followed by a random number of P <- A*B + P_H operations on
// consecutive clocks, with random idle gaps. A reference model computes P
// for every operation; each result must appear exactly three clocks after
// its operands, and P_L/P_H must be the 17-bit split of P. Chains start at
// least two clocks apart, as the C register requires.
module tb_dsp_mac;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [16:0] a, b, c;
  logic        cec, sel_ph;
  logic [47:0] p;
  logic [16:0] p_l;
  logic [30:0] p_h;

  dsp_mac dut (.clk(clk), .a(a), .b(b), .c(c), .cec(cec), .sel_ph(sel_ph),
               .p(p), .p_l(p_l), .p_h(p_h));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected P for the operation issued at each clock, 0 = no operation.
  logic [47:0] exp_q [$];
  bit          vld_q [$];
  logic [47:0] p_model;

  always @(negedge clk) begin
    if (vld_q.size() > 3) begin
      logic [47:0] e;
      bit v;
      e = exp_q.pop_front();
      v = vld_q.pop_front();
      if (v) begin
        check(p == e, $sformatf("P = %h, expected %h", p, e));
        check(p_l == e[16:0] && p_h == e[47:17], "P_L/P_H split");
      end
    end
  end

  task automatic issue(input logic [16:0] ai, input logic [16:0] bi,
                       input logic [16:0] ci, input bit first);
    a = ai; b = bi; c = ci; cec = first; sel_ph = !first;
    p_model = 48'(ai) * 48'(bi) + (first ? 48'(ci) : 48'(p_model >> 17));
    exp_q.push_back(p_model);
    vld_q.push_back(1'b1);
    @(negedge clk);
  endtask

  task automatic idle();
    a = 17'($urandom); b = 17'($urandom); c = 17'($urandom);
    cec = 1'b0; sel_ph = 1'b1;
    exp_q.push_back('0);
    vld_q.push_back(1'b0);
    @(negedge clk);
  endtask

  initial begin
    logic [16:0] bb, cc;
    int len;
    a = 0; b = 0; c = 0; cec = 0; sel_ph = 1; p_model = '0;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      bb  = (t % 7 == 0) ? 17'h1ffff : 17'($urandom);
      cc  = 17'($urandom);
      len = 1 + $urandom_range(0, 6);
      for (int i = 0; i < len; i++)
        issue((t % 11 == 0) ? 17'h1ffff : 17'($urandom), bb, cc, i == 0);
      // C is held in a single register stage while the first product
      // passes the M register, so two chain starts need two clocks between.
      if (len == 1 || $urandom_range(0, 2) == 0) idle();
    end
    repeat (5) idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
