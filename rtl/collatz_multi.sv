// collatz_multi -- the multi-coprocessor system: N_COPROC independent
// Collatz verification coprocessors (380 by default) on one device.
//
// The coprocessors are grouped in pairs (coproc_pair) that share their two
// table RAMs, so the system uses one S/B/C block RAM per coprocessor. Every
// coprocessor works on its own block number M, given by the host, and
// reports on its own; there is no communication between coprocessors. How
// the host reaches the coprocessors (bus, serial link) is not described and
// is left out: each coprocessor's start, M, busy, done and overflow report
// are brought out as ports, indexed by coprocessor number.
//
// Interface and timing per coprocessor are those of collatz_coproc.
module collatz_multi #(
  parameter int unsigned N_COPROC = 380,
  parameter int unsigned M_W      = collatz_pkg::M_W,
  parameter int unsigned MH_W     = collatz_pkg::MH_W,
  parameter int unsigned N_DIGITS = collatz_pkg::N_DIGITS,
  parameter int unsigned MV_W     = M_W + MH_W + collatz_pkg::D_S
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N_COPROC-1:0] start,
  input  logic [M_W-1:0]      m_block [N_COPROC],
  output logic [N_COPROC-1:0] busy,
  output logic [N_COPROC-1:0] done,
  output logic [N_COPROC-1:0] ovf_valid,
  output logic [MV_W-1:0]     ovf_m [N_COPROC]
);
  localparam int unsigned N_PAIRS = N_COPROC / 2;

  for (genvar g = 0; g < N_PAIRS; g++) begin : g_pair
    logic [M_W-1:0]  mb  [2];
    logic [MV_W-1:0] om  [2];
    assign mb[0] = m_block[2*g];
    assign mb[1] = m_block[2*g+1];
    assign ovf_m[2*g]   = om[0];
    assign ovf_m[2*g+1] = om[1];

    coproc_pair #(.M_W(M_W), .MH_W(MH_W), .N_DIGITS(N_DIGITS)) u_pair (
      .clk       (clk),
      .rst       (rst),
      .start     (start[2*g +: 2]),
      .m_block   (mb),
      .busy      (busy[2*g +: 2]),
      .done      (done[2*g +: 2]),
      .ovf_valid (ovf_valid[2*g +: 2]),
      .ovf_m     (om)
    );
  end

  // Pairs share RAMs, so the system is built from whole pairs.
  initial assert (N_COPROC % 2 == 0 && N_COPROC > 0)
    else $error("N_COPROC must be a positive even number");
endmodule
