// s_table_ram -- dual-port read-only block RAM holding table S, the list of
// mandatory D-bit residues in increasing order.
//
// With D = 15 there are 1295 mandatory residues out of 32768 (about 4%),
// so a coprocessor only has to start the iteration for 1295 of every 32768
// consecutive numbers. The table is stored as 2k words of 15 bits in one
// 36k-bit block RAM, as in the document. Its contents are produced at
// initialisation by walking the even/odd rules of collatz_pkg over every
// residue (the equivalent of block-RAM initial values); addresses at and
// above the number of mandatory residues read as zero.
//
// Interface: two independent read ports A and B (ENA/ADDRA/DOA and
// ENB/ADDRB/DOB), so two coprocessors can share one RAM. The write ports of
// a general block RAM are not used by this design and are left out.
// Timing: synchronous read, the word appears on DOx one clock after ENx is
// high with the address; DOx holds its value while ENx is low.
module s_table_ram #(
  parameter int unsigned D     = collatz_pkg::D_S,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          ena,
  input  logic [AW-1:0] addra,
  output logic [D-1:0]  doa,
  input  logic          enb,
  input  logic [AW-1:0] addrb,
  output logic [D-1:0]  dob
);
  import collatz_pkg::*;

  logic [D-1:0] mem [DEPTH];

  initial begin : fill
    int unsigned idx;
    rule_walk_t  w;
    idx = 0;
    for (int unsigned k = 0; k < DEPTH; k++) mem[k] = '0;
    for (longint unsigned r = 0; r < (64'd1 << D); r++) begin
      w = walk_rules(D, r);
      if (w.mandatory && idx < DEPTH) begin
        mem[idx] = D'(r);
        idx++;
      end
    end
  end


  always_ff @(posedge clk) begin
    if (ena) doa <= mem[addra];
    if (enb) dob <= mem[addrb];
  end
endmodule
