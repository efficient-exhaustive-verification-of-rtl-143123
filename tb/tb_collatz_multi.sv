// tb_collatz_multi -- end-to-end run of the multi-coprocessor system with
// four coprocessors (two RAM-sharing pairs), 44-bit interim registers and
// 41-bit start values, each coprocessor on its own block number and started
// at a different clock from the other pair. Every coprocessor's overflow reports and run time
// are compared with the reference. The run must exercise each mechanism of
// the design at least once, and the counts are printed:
//   - a table operation repeated because the result was still >= m,
//   - a new start value loaded because the result fell below m,
//   - an overflow reported to the host,
//   - a multi-digit operation (the digit-serial multiplier on k > 1),
//   - both ports of a shared table RAM read in the same clock.
module tb_collatz_multi;
  import collatz_ref_pkg::*;

  localparam int NC = 4, MW = 25, MHW = 1, ND = 2, MV = MW + MHW + 15, NW = 10 + 17 * ND;

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
  logic [NC-1:0] start, busy, done, ovf_valid;
  logic [MW-1:0] m_block [NC];
  logic [MV-1:0] ovf_m [NC];

  collatz_multi #(.N_COPROC(NC), .M_W(MW), .MH_W(MHW), .N_DIGITS(ND)) dut (
    .clk(clk), .rst(rst), .start(start), .m_block(m_block), .busy(busy),
    .done(done), .ovf_valid(ovf_valid), .ovf_m(ovf_m));

  logic [14:0] mand [$];
  big_t        got [NC][$];

  // Mechanism counters.
  int n_repeat = 0, n_next = 0, n_ovf = 0, n_multi = 0, n_shared = 0;

  always @(negedge clk)
    for (int c = 0; c < NC; c++)
      if (ovf_valid[c]) begin
        got[c].push_back(big_t'(ovf_m[c]));
        n_ovf++;
      end

  for (genvar g = 0; g < NC / 2; g++) begin : g_mon
    always @(negedge clk) begin
      if (dut.g_pair[g].u_pair.s_en == 2'b11 || dut.g_pair[g].u_pair.bc_en == 2'b11) n_shared++;
    end
    for (genvar c = 0; c < 2; c++) begin : g_cp
      always @(negedge clk) begin
        if (dut.g_pair[g].u_pair.g_cp[c].u_cp.op_start) n_repeat++;
        if (dut.g_pair[g].u_pair.g_cp[c].u_cp.op_load)  n_next++;
        if (dut.g_pair[g].u_pair.g_cp[c].u_cp.op_done &&
            dut.g_pair[g].u_pair.g_cp[c].u_cp.k_used > 1) n_multi++;
      end
    end
  end

  initial begin
    range_ref_t r [NC];
    longint     cyc [NC];
    bit         fin [NC];
    logic [MW-1:0] mbv [NC];
    for (int unsigned x = 0; x < 32768; x++)
      if (is_mandatory(15, x)) mand.push_back(15'(x));
    for (int c = 0; c < NC; c++) begin
      mbv[c] = MW'(25'h1000000 + 25'h35_79BD * c + $urandom_range(0, 1000));
      range_reference(big_t'(mbv[c]), MHW, NW, mand, r[c]);
    end

    rst = 1; start = '0;
    for (int c = 0; c < NC; c++) m_block[c] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin cyc[c] = 0; fin[c] = 0; end
    // Both coprocessors of pair p start at clock 3p.
    for (int t = 0; ; t++) begin
      bit all;
      start = '0;
      for (int c = 0; c < NC; c++)
        if (t == 3 * (c / 2)) begin
          start[c] = 1'b1;
          m_block[c] = mbv[c];
        end
      @(negedge clk);
      all = 1;
      for (int c = 0; c < NC; c++) begin
        if (t >= 3 * (c / 2) && !fin[c]) cyc[c]++;
        if (done[c]) fin[c] = 1;
        all &= fin[c];
      end
      if (all) break;
    end
    start = '0;
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      check(got[c].size() == r[c].ovf_list.size(),
            $sformatf("cp%0d: %0d reports, expected %0d", c, got[c].size(), r[c].ovf_list.size()));
      for (int i = 0; i < got[c].size() && i < r[c].ovf_list.size(); i++)
        check(got[c][i] == r[c].ovf_list[i], $sformatf("cp%0d report %0d = %h, expected %h",
                                                      c, i, got[c][i], r[c].ovf_list[i]));
      check(cyc[c] == r[c].cycles, $sformatf("cp%0d: %0d clocks, expected %0d", c, cyc[c], r[c].cycles));
      $display("cp%0d M=%h: %0d start values, %0d operations, %0d reports, %0d clocks (%.2f clocks per start value)",
               c, mbv[c], mand.size() << MHW, r[c].ops, r[c].ovf_list.size(), cyc[c],
               real'(cyc[c]) / real'(mand.size() << MHW));
    end
    check(busy == '0, "busy after done");
    $display("mechanisms: repeated operations %0d, next-m loads %0d, overflow reports %0d, multi-digit operations %0d, shared-RAM double reads %0d",
             n_repeat, n_next, n_ovf, n_multi, n_shared);
    check(n_repeat > 0, "no operation was repeated");
    check(n_next > 0,   "no next start value was loaded");
    check(n_ovf > 0,    "no overflow was reported");
    check(n_multi > 0,  "no multi-digit operation");
    check(n_shared > 0, "shared RAM ports never read together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
