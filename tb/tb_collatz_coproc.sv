// tb_collatz_coproc -- runs two coprocessors over complete (shortened)
// ranges and compares them with a reference that applies the Collatz map
// directly:
//   dut_a  1 digit  (27-bit interim numbers), 25-bit start values: most
//          trajectories outgrow the register, so overflow reports dominate;
//   dut_b  3 digits (61-bit interim numbers), 36-bit start values: no
//          overflow expected, multi-digit operations throughout.
// Checked: the sequence of reported start values, the number of table
// operations (one B/C table read each), the done pulse, and the total clock count, which must be
// 2 + sum over all operations of (k+4), k being the digits of n_H in use.
module tb_collatz_coproc;
  import collatz_ref_pkg::*;

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

  logic rst;

  // ---------------- instance A ----------------
  localparam int A_MW = 8, A_MHW = 2, A_ND = 1, A_MV = A_MW + A_MHW + 15, A_NW = 10 + 17 * A_ND;
  logic              a_start, a_busy, a_done, a_ovf_valid, a_s_en, a_bc_en;
  logic [A_MW-1:0]   a_mb;
  logic [A_MV-1:0]   a_ovf_m;
  logic [10:0]       a_s_addr;
  logic [14:0]       a_s_data;
  logic [9:0]        a_bc_addr;
  logic [31:0]       a_bc_data;

  s_table_ram  a_sram  (.clk(clk), .ena(a_s_en), .addra(a_s_addr), .doa(a_s_data),
                        .enb(1'b0), .addrb('0), .dob());
  bc_table_ram a_bcram (.clk(clk), .ena(a_bc_en), .addra(a_bc_addr), .doa(a_bc_data),
                        .enb(1'b0), .addrb('0), .dob());
  collatz_coproc #(.M_W(A_MW), .MH_W(A_MHW), .N_DIGITS(A_ND)) dut_a (
    .clk(clk), .rst(rst), .start(a_start), .m_block(a_mb), .busy(a_busy), .done(a_done),
    .ovf_valid(a_ovf_valid), .ovf_m(a_ovf_m),
    .s_en(a_s_en), .s_addr(a_s_addr), .s_data(a_s_data),
    .bc_en(a_bc_en), .bc_addr(a_bc_addr), .bc_data(a_bc_data));

  // ---------------- instance B ----------------
  localparam int B_MW = 20, B_MHW = 1, B_ND = 3, B_MV = B_MW + B_MHW + 15, B_NW = 10 + 17 * B_ND;
  logic              b_start, b_busy, b_done, b_ovf_valid, b_s_en, b_bc_en;
  logic [B_MW-1:0]   b_mb;
  logic [B_MV-1:0]   b_ovf_m;
  logic [10:0]       b_s_addr;
  logic [14:0]       b_s_data;
  logic [9:0]        b_bc_addr;
  logic [31:0]       b_bc_data;

  s_table_ram  b_sram  (.clk(clk), .ena(b_s_en), .addra(b_s_addr), .doa(b_s_data),
                        .enb(1'b0), .addrb('0), .dob());
  bc_table_ram b_bcram (.clk(clk), .ena(b_bc_en), .addra(b_bc_addr), .doa(b_bc_data),
                        .enb(1'b0), .addrb('0), .dob());
  collatz_coproc #(.M_W(B_MW), .MH_W(B_MHW), .N_DIGITS(B_ND)) dut_b (
    .clk(clk), .rst(rst), .start(b_start), .m_block(b_mb), .busy(b_busy), .done(b_done),
    .ovf_valid(b_ovf_valid), .ovf_m(b_ovf_m),
    .s_en(b_s_en), .s_addr(b_s_addr), .s_data(b_s_data),
    .bc_en(b_bc_en), .bc_addr(b_bc_addr), .bc_data(b_bc_data));

  // ---------------- reference ----------------
  logic [14:0] mand [$];
  typedef range_ref_t ref_t;
  function automatic void reference(input big_t mb, input int mhw, input int s_bits,
                                    input int nw, ref ref_t r);
    range_reference(mb, mhw, nw, mand, r);
  endfunction

  // ---------------- monitors ----------------
  big_t a_got [$], b_got [$];
  int   a_ops = 0, b_ops = 0;
  always @(negedge clk) begin
    if (a_ovf_valid) a_got.push_back(big_t'(a_ovf_m));
    if (b_ovf_valid) b_got.push_back(big_t'(b_ovf_m));
    if (a_bc_en) a_ops++;
    if (b_bc_en) b_ops++;
  end

  task automatic compare(input string name, input ref_t r, input big_t got [$],
                         input int ops, input longint cyc);
    check(got.size() == r.ovf_list.size(),
          $sformatf("%s: %0d overflow reports, expected %0d", name, got.size(), r.ovf_list.size()));
    for (int i = 0; i < got.size() && i < r.ovf_list.size(); i++)
      check(got[i] == r.ovf_list[i], $sformatf("%s: report %0d = %h, expected %h", name, i, got[i], r.ovf_list[i]));
    check(ops == r.ops, $sformatf("%s: %0d table operations, expected %0d", name, ops, r.ops));
    check(cyc == r.cycles, $sformatf("%s: %0d clocks, expected %0d", name, cyc, r.cycles));
    $display("%s: %0d start values, %0d operations (%0d multi-digit, %0d repeated), %0d overflow reports, %0d clocks",
             name, mand.size(), r.ops, r.multi_ops, r.repeats, r.ovf_list.size(), cyc);
  endtask

  initial begin
    ref_t  ra, rb;
    longint ca, cb;
    bit    da, db;
    for (int unsigned r = 0; r < 32768; r++)
      if (is_mandatory(15, r)) mand.push_back(15'(r));
    reference(big_t'(8'hA5), A_MHW, 15, A_NW, ra);
    reference(big_t'(20'h9_2C31), B_MHW, 15, B_NW, rb);
    check(ra.ovf_list.size() > 0 && rb.ovf_list.size() == 0 && rb.multi_ops > 0 && ra.repeats > 0,
          "reference runs do not cover overflow, no-overflow and multi-digit cases");

    rst = 1; a_start = 0; b_start = 0; a_mb = '0; b_mb = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    a_start = 1; a_mb = 8'hA5;
    b_start = 1; b_mb = 20'h9_2C31;
    ca = 0; cb = 0; da = 0; db = 0;
    while (!(da && db)) begin
      @(negedge clk);
      a_start = 0; b_start = 0;
      if (!da) ca++;
      if (!db) cb++;
      if (a_done) da = 1;
      if (b_done) db = 1;
    end
    @(negedge clk);
    check(!a_busy && !b_busy, "busy after done");
    compare("A", ra, a_got, a_ops, ca);
    compare("B", rb, b_got, b_ops, cb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
