// tb_s_table_ram -- checks table S against an independent enumeration of
// mandatory residues: the full 15-bit table (1295 entries, in order, through
// both ports), the zero words above it, the one-clock read latency, and a
// 4-bit instance against the three residues 0111, 1011, 1111.
module tb_s_table_ram;
  import collatz_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        ena, enb, ena4, enb4;
  logic [10:0] addra, addrb;
  logic [14:0] doa, dob;
  logic [1:0]  addra4, addrb4;
  logic [3:0]  doa4, dob4;

  s_table_ram dut (
    .clk(clk), .ena(ena), .addra(addra), .doa(doa),
    .enb(enb), .addrb(addrb), .dob(dob)
  );

  s_table_ram #(.D(4), .DEPTH(4)) dut4 (
    .clk(clk), .ena(ena4), .addra(addra4), .doa(doa4),
    .enb(enb4), .addrb(addrb4), .dob(dob4)
  );

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] expect_s [2048];
    int unsigned cnt;
    logic [14:0] held;
    cnt = 0;
    for (int i = 0; i < 2048; i++) expect_s[i] = '0;
    for (int unsigned r = 0; r < 32768; r++)
      if (is_mandatory(15, r)) begin
        expect_s[cnt] = 15'(r);
        cnt++;
      end
    check(cnt == 1295, $sformatf("reference count %0d, expected 1295", cnt));

    ena = 0; enb = 0; ena4 = 0; enb4 = 0;
    addra = 0; addrb = 0; addra4 = 0; addrb4 = 0;
    @(negedge clk);
    // Port A walks upwards, port B downwards, one read per clock.
    for (int i = 0; i < 2048; i++) begin
      ena = 1; enb = 1;
      addra = 11'(i); addrb = 11'(2047 - i);
      @(negedge clk);
      check(doa == expect_s[i], $sformatf("S[%0d] port A = %0d, expected %0d", i, doa, expect_s[i]));
      check(dob == expect_s[2047 - i], $sformatf("S[%0d] port B = %0d", 2047 - i, dob));
    end
    // Output holds while the port is disabled.
    held = doa;
    ena = 0; addra = 11'd5;
    @(negedge clk);
    check(doa == held, "port A output changed while disabled");
    // Read latency is exactly one clock.
    ena = 1; addra = 11'd3;
    @(posedge clk); #1;
    check(doa == expect_s[3], "port A word not there one clock after the read");
    // Four-bit table: 0111, 1011, 1111.
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      ena4 = 1; enb4 = 1; addra4 = 2'(i); addrb4 = 2'(i);
      @(negedge clk);
      check(doa4 == 4'(7 + 4 * i), $sformatf("4-bit S[%0d] = %b", i, doa4));
      check(dob4 == doa4, "4-bit port B differs from port A");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
