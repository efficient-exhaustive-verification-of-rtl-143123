// bc_table_ram -- dual-port read-only block RAM holding tables B and C.
//
// For every D-bit residue n_L the word at address n_L is {C[n_L], B[n_L]},
// each BC_W bits wide; a table operation then computes
// n <- B[n_L] * n_H + C[n_L], which equals D halvings of the Collatz map
// together with all the 3n+1 steps met on the way. With D = 10 both B and C
// stay below 2^16 (B = 3^j <= 3^10), so the table fits one 36k-bit block
// RAM configured as 1k x 36, using 32 of the 36 bits, as in the document.
// Contents are produced at initialisation from the even/odd rules of
// collatz_pkg (the equivalent of block-RAM initial values).
//
// Interface: two independent read ports (ENA/ADDRA/DOA, ENB/ADDRB/DOB) so
// two coprocessors can share the RAM; no write port is used by this design.
// Timing: synchronous read, one clock of latency; DOx holds while ENx is low.
module bc_table_ram #(
  parameter int unsigned D    = collatz_pkg::D_BC,
  parameter int unsigned BC_W = collatz_pkg::BC_W
) (
  input  logic            clk,
  input  logic            ena,
  input  logic [D-1:0]    addra,
  output logic [2*BC_W-1:0] doa,
  input  logic            enb,
  input  logic [D-1:0]    addrb,
  output logic [2*BC_W-1:0] dob
);
  import collatz_pkg::*;

  localparam int unsigned DEPTH = 1 << D;

  logic [2*BC_W-1:0] mem [DEPTH];

  initial begin : fill
    rule_walk_t w;
    for (int unsigned r = 0; r < DEPTH; r++) begin
      w = walk_rules(D, longint'(r));
      mem[D'(r)] = {BC_W'(w.c), BC_W'(w.b)};
    end
  end


  always_ff @(posedge clk) begin
    if (ena) doa <= mem[addra];
    if (enb) dob <= mem[addrb];
  end
endmodule
