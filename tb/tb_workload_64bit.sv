// tb_workload_64bit -- the evaluation workload in miniature: 64-bit
// numbers M*2^32 + m_H*2^15 + S[i] with random 32-bit block numbers M, run
// on a RAM-sharing pair of coprocessors at the full interim width (112
// bits, six digits) and full 46-bit M field. Only the m_H counter is cut
// from 17 to 3 bits so that the run ends quickly (8 x 1295 start values per
// coprocessor instead of 2^17 x 1295). The upper 14 bits of the real m_H
// therefore move into the block-number field: it holds a 1, 31 random bits
// of M and 14 random bits of m_H, so every start value has exactly 64 bits
// and the run covers a random slice of 2^18 numbers of a 64-bit block. Reports are compared with the
// reference (none are expected at 112 bits), the clock count must match the
// operation-by-operation timing, and the throughput is printed as numbers
// checked per clock (all numbers of the range count, skipped ones included).
module tb_workload_64bit;
  import collatz_ref_pkg::*;

  localparam int MW = 46, MHW = 3, MV = MW + MHW + 15, NW = 112;

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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          rst;
  logic [1:0]    start, busy, done, ovf_valid;
  logic [MW-1:0] m_block [2];
  logic [MV-1:0] ovf_m [2];

  coproc_pair #(.MH_W(MHW)) dut (
    .clk(clk), .rst(rst), .start(start), .m_block(m_block), .busy(busy),
    .done(done), .ovf_valid(ovf_valid), .ovf_m(ovf_m));

  logic [14:0] mand [$];
  int          n_reports = 0;

  always @(negedge clk)
    for (int c = 0; c < 2; c++)
      if (ovf_valid[c]) n_reports++;

  initial begin
    range_ref_t r [2];
    longint     cyc [2];
    bit         fin [2];
    logic [MW-1:0] mbv [2];
    real        per_clock;
    for (int unsigned x = 0; x < 32768; x++)
      if (is_mandatory(15, x)) mand.push_back(15'(x));
    for (int c = 0; c < 2; c++) begin
      // 32-bit M with the top bit set, then the upper 14 bits of m_H.
      mbv[c] = {1'b1, 31'($urandom), 14'($urandom)};
      range_reference(big_t'(mbv[c]), MHW, NW, mand, r[c]);
    end

    rst = 1; start = '0; m_block[0] = '0; m_block[1] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    start = 2'b11; m_block = mbv;
    cyc[0] = 0; cyc[1] = 0; fin[0] = 0; fin[1] = 0;
    while (!(fin[0] && fin[1])) begin
      @(negedge clk);
      start = '0;
      for (int c = 0; c < 2; c++) begin
        if (!fin[c]) cyc[c]++;
        if (done[c]) fin[c] = 1;
      end
    end
    @(negedge clk);
    check(n_reports == r[0].ovf_list.size() + r[1].ovf_list.size(), "overflow reports differ from the reference");
    for (int c = 0; c < 2; c++) begin
      check(cyc[c] == r[c].cycles, $sformatf("cp%0d: %0d clocks, expected %0d", c, cyc[c], r[c].cycles));
      per_clock = real'(longint'(1) << (MHW + 15)) / real'(cyc[c]);
      $display("cp%0d M=%h: %0d operations (%.2f per start value), %0d clocks, %.3f numbers per clock, %.3g numbers/s at 360.49 MHz",
               c, mbv[c], r[c].ops, real'(r[c].ops) / real'(mand.size() << MHW), cyc[c],
               per_clock, per_clock * 360.49e6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
