// coproc_pair -- two coprocessors sharing one pair of table RAMs.
//
// Each coprocessor needs two 36k-bit block RAMs, one for table S and one
// for tables B/C, but uses only one read port of each. Block RAMs have two
// independent ports, so two coprocessors share both RAMs: coprocessor 0
// reads through port A, coprocessor 1 through port B. A system of N
// coprocessors thus needs N block RAMs, not 2N. The two coprocessors are
// otherwise independent: each has its own M, start, done and overflow report.
//
// Interface: per-coprocessor arrays indexed 0 and 1, same meaning and timing
// as collatz_coproc.
module coproc_pair #(
  parameter int unsigned M_W      = collatz_pkg::M_W,
  parameter int unsigned MH_W     = collatz_pkg::MH_W,
  parameter int unsigned N_DIGITS = collatz_pkg::N_DIGITS,
  parameter int unsigned MV_W     = M_W + MH_W + collatz_pkg::D_S
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [1:0]      start,
  input  logic [M_W-1:0]  m_block [2],
  output logic [1:0]      busy,
  output logic [1:0]      done,
  output logic [1:0]      ovf_valid,
  output logic [MV_W-1:0] ovf_m [2]
);
  import collatz_pkg::*;

  localparam int unsigned SAW = $clog2(S_COUNT);

  logic [1:0]        s_en, bc_en;
  logic [SAW-1:0]    s_addr  [2];
  logic [D_S-1:0]    s_data  [2];
  logic [D_BC-1:0]   bc_addr [2];
  logic [2*BC_W-1:0] bc_data [2];

  s_table_ram #(.D(D_S), .DEPTH(1 << SAW)) u_s_ram (
    .clk   (clk),
    .ena   (s_en[0]), .addra (s_addr[0]), .doa (s_data[0]),
    .enb   (s_en[1]), .addrb (s_addr[1]), .dob (s_data[1])
  );

  bc_table_ram #(.D(D_BC), .BC_W(BC_W)) u_bc_ram (
    .clk   (clk),
    .ena   (bc_en[0]), .addra (bc_addr[0]), .doa (bc_data[0]),
    .enb   (bc_en[1]), .addrb (bc_addr[1]), .dob (bc_data[1])
  );

  for (genvar g = 0; g < 2; g++) begin : g_cp
    collatz_coproc #(
      .M_W(M_W), .MH_W(MH_W), .N_DIGITS(N_DIGITS)
    ) u_cp (
      .clk       (clk),
      .rst       (rst),
      .start     (start[g]),
      .m_block   (m_block[g]),
      .busy      (busy[g]),
      .done      (done[g]),
      .ovf_valid (ovf_valid[g]),
      .ovf_m     (ovf_m[g]),
      .s_en      (s_en[g]),
      .s_addr    (s_addr[g]),
      .s_data    (s_data[g]),
      .bc_en     (bc_en[g]),
      .bc_addr   (bc_addr[g]),
      .bc_data   (bc_data[g])
    );
  end
endmodule
