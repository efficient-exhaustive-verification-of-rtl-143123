// tb_coproc_pair -- two coprocessors working through the shared table RAMs
// at the same time, on different ranges. Interim registers have two digits
// (44 bits) and start values 41 bits, so both overflow reports and
// multi-digit operations occur. Each coprocessor's reports and clock count
// are compared with the reference; the two must not disturb each other.
module tb_coproc_pair;
  import collatz_ref_pkg::*;

  localparam int MW = 25, MHW = 1, ND = 2, MV = MW + MHW + 15, NW = 10 + 17 * ND;

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
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst;
  logic [1:0]    start, busy, done, ovf_valid;
  logic [MW-1:0] m_block [2];
  logic [MV-1:0] ovf_m [2];

  coproc_pair #(.M_W(MW), .MH_W(MHW), .N_DIGITS(ND)) dut (
    .clk(clk), .rst(rst), .start(start), .m_block(m_block), .busy(busy),
    .done(done), .ovf_valid(ovf_valid), .ovf_m(ovf_m));

  logic [14:0] mand [$];
  big_t        got [2][$];

  always @(negedge clk)
    for (int c = 0; c < 2; c++)
      if (ovf_valid[c]) got[c].push_back(big_t'(ovf_m[c]));

  initial begin
    range_ref_t r [2];
    longint cyc [2];
    bit     fin [2];
    logic [MW-1:0] mbv [2];
    for (int unsigned x = 0; x < 32768; x++)
      if (is_mandatory(15, x)) mand.push_back(15'(x));
    mbv[0] = 25'h1A5_F00D;
    mbv[1] = 25'h0C3_1234;
    for (int c = 0; c < 2; c++) range_reference(big_t'(mbv[c]), MHW, NW, mand, r[c]);
    check(r[0].ovf_list.size() > 0 && r[1].ovf_list.size() > 0, "reference has no overflow");

    rst = 1; start = '0; m_block[0] = '0; m_block[1] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // Coprocessor 1 starts three clocks after coprocessor 0.
    start = 2'b01; m_block[0] = mbv[0];
    cyc[0] = 0; cyc[1] = 0; fin[0] = 0; fin[1] = 0;
    for (int t = 0; !(fin[0] && fin[1]); t++) begin
      @(negedge clk);
      start = (t == 2) ? 2'b10 : 2'b00;
      if (t == 2) m_block[1] = mbv[1];
      if (!fin[0]) cyc[0]++;
      if (!fin[1] && t >= 3) cyc[1]++;
      for (int c = 0; c < 2; c++) if (done[c]) fin[c] = 1;
    end
    @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      check(got[c].size() == r[c].ovf_list.size(),
            $sformatf("cp%0d: %0d reports, expected %0d", c, got[c].size(), r[c].ovf_list.size()));
      for (int i = 0; i < got[c].size() && i < r[c].ovf_list.size(); i++)
        check(got[c][i] == r[c].ovf_list[i], $sformatf("cp%0d report %0d = %h, expected %h",
                                                      c, i, got[c][i], r[c].ovf_list[i]));
      check(cyc[c] == r[c].cycles, $sformatf("cp%0d: %0d clocks, expected %0d", c, cyc[c], r[c].cycles));
      $display("cp%0d: %0d operations (%0d multi-digit), %0d reports, %0d clocks",
               c, r[c].ops, r[c].multi_ops, r[c].ovf_list.size(), cyc[c]);
    end
    check(busy == 2'b00, "busy after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
