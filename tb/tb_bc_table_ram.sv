// tb_bc_table_ram -- checks tables B and C. For every 10-bit residue r the
// Collatz map run to ten halvings gives C[r] from n = r and B[r] + C[r] from
// n = 1024 + r (n = 1024*x + r maps to B*x + C). A 4-bit instance is
// compared with the printed 16-entry example table.
module tb_bc_table_ram;
  import collatz_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        ena, enb, ena4, enb4;
  logic [9:0]  addra, addrb;
  logic [31:0] doa, dob;
  logic [3:0]  addra4, addrb4;
  logic [31:0] doa4, dob4;

  bc_table_ram dut (
    .clk(clk), .ena(ena), .addra(addra), .doa(doa),
    .enb(enb), .addrb(addrb), .dob(dob)
  );

  bc_table_ram #(.D(4)) dut4 (
    .clk(clk), .ena(ena4), .addra(addra4), .doa(doa4),
    .enb(enb4), .addrb(addrb4), .dob(dob4)
  );

  // The 4-bit example: B and C for residues 0000..1111.
  localparam int B4 [16] = '{1, 9, 9, 9, 3, 3, 9, 27, 3, 27, 3, 27, 9, 9, 27, 81};
  localparam int C4 [16] = '{0, 1, 2, 2, 1, 1, 4, 13, 2, 17, 2, 20, 8, 8, 26, 80};

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t c_ref, bc_ref;
    ena = 0; enb = 0; ena4 = 0; enb4 = 0;
    addra = 0; addrb = 0; addra4 = 0; addrb4 = 0;
    @(negedge clk);
    for (int unsigned r = 0; r < 1024; r++) begin
      ena = 1; enb = 1;
      addra = 10'(r); addrb = 10'(r ^ 10'h3ff);
      @(negedge clk);
      c_ref  = collatz_halvings(big_t'(r), 10);
      bc_ref = collatz_halvings(big_t'(1024 + r), 10);
      check(doa[31:16] == 16'(c_ref), $sformatf("C[%0d] = %0d, expected %0d", r, doa[31:16], c_ref));
      check(doa[15:0] == 16'(bc_ref - c_ref), $sformatf("B[%0d] = %0d, expected %0d", r, doa[15:0], bc_ref - c_ref));
      c_ref  = collatz_halvings(big_t'(r ^ 10'h3ff), 10);
      check(dob[31:16] == 16'(c_ref), $sformatf("port B C[%0d]", r ^ 10'h3ff));
    end
    for (int r = 0; r < 16; r++) begin
      ena4 = 1; enb4 = 1; addra4 = 4'(r); addrb4 = 4'(15 - r);
      @(negedge clk);
      check(doa4[15:0] == 16'(B4[r]) && doa4[31:16] == 16'(C4[r]),
            $sformatf("4-bit entry %0d = B %0d C %0d", r, doa4[15:0], doa4[31:16]));
      check(dob4[15:0] == 16'(B4[15 - r]) && dob4[31:16] == 16'(C4[15 - r]),
            $sformatf("4-bit port B entry %0d", 15 - r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
