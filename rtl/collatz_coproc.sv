// collatz_coproc -- one Collatz verification coprocessor.
//
// Given a block number M from the host it checks every number m in
// M*2^32 .. (M+1)*2^32-1 (defaults): for each start value m whose low 15
// bits are a mandatory residue (the others are skipped, see m_generator) it
// sets n <- m and repeats the table operation n <- B[n_L]*n_H + C[n_L]
// while n >= m. Once n < m, m is verified, assuming all smaller numbers
// are. If an interim n outgrows the 112-bit register (D_BC + 17*N_DIGITS
// bits), m is handed back to the host on the overflow report, to be checked
// there with unbounded arithmetic, and the coprocessor moves on.
//
// Structure: m_generator (counters i and m_H, S table port) feeds start
// values; table_op_unit (n register, B/C table port, DSP multiplier)
// performs the table operations; this module holds the current m, compares
// n with m after every operation and decides between "operate again",
// "next m" and "report overflow". The two table RAMs are outside, so that
// two coprocessors can share them (coproc_pair).
//
// Interface: start with m_block begins a range while busy is low; done
// pulses one clock when the last m of the range has been verified or
// reported. ovf_valid pulses for one clock with ovf_m holding the start
// value whose trajectory overflowed; the host must take it in that clock
// (the document does not describe the reporting path; this one-clock,
// no-back-pressure report is this design's choice).
// Timing: the next table operation, or the load of the next m, is issued in
// the same clock in which the previous operation reports done, so an
// operation on a k-digit n costs k+4 clocks with no gap between them.
module collatz_coproc #(
  parameter int unsigned M_W      = collatz_pkg::M_W,
  parameter int unsigned MH_W     = collatz_pkg::MH_W,
  parameter int unsigned D_S      = collatz_pkg::D_S,
  parameter int unsigned S_COUNT  = collatz_pkg::S_COUNT,
  parameter int unsigned SAW      = $clog2(S_COUNT),
  parameter int unsigned D_BC     = collatz_pkg::D_BC,
  parameter int unsigned BC_W     = collatz_pkg::BC_W,
  parameter int unsigned N_DIGITS = collatz_pkg::N_DIGITS,
  parameter int unsigned MV_W     = M_W + MH_W + D_S,
  parameter int unsigned N_W      = D_BC + collatz_pkg::DIGIT_W * N_DIGITS
) (
  input  logic              clk,
  input  logic              rst,
  // host side
  input  logic              start,
  input  logic [M_W-1:0]    m_block,
  output logic              busy,
  output logic              done,
  output logic              ovf_valid,
  output logic [MV_W-1:0]   ovf_m,
  // S table RAM port
  output logic              s_en,
  output logic [SAW-1:0]    s_addr,
  input  logic [D_S-1:0]    s_data,
  // B/C table RAM port
  output logic              bc_en,
  output logic [D_BC-1:0]   bc_addr,
  input  logic [2*BC_W-1:0] bc_data
);
  localparam int unsigned KW = $clog2(N_DIGITS + 1);

  logic            running, wait_m;
  logic [MV_W-1:0] m_cur;

  logic            gen_valid, gen_ready, gen_active;
  logic [MV_W-1:0] gen_m;

  logic            op_start, op_load, op_busy, op_done, op_ovf;
  logic [N_W-1:0]  n_val;
  logic [KW-1:0]   k_used;

  logic            below, want_m;

  m_generator #(
    .M_W(M_W), .MH_W(MH_W), .D(D_S), .S_COUNT(S_COUNT), .SAW(SAW)
  ) u_gen (
    .clk     (clk),
    .rst     (rst),
    .start   (start && !running),
    .m_block (m_block),
    .s_en    (s_en),
    .s_addr  (s_addr),
    .s_data  (s_data),
    .m_valid (gen_valid),
    .m_ready (gen_ready),
    .m       (gen_m),
    .m_last  (),
    .active  (gen_active)
  );

  table_op_unit #(
    .D(D_BC), .N_DIGITS(N_DIGITS), .BC_W(BC_W)
  ) u_op (
    .clk     (clk),
    .rst     (rst),
    .start   (op_start),
    .load    (op_load),
    .load_n  (N_W'(gen_m)),
    .bc_en   (bc_en),
    .bc_addr (bc_addr),
    .bc_data (bc_data),
    .busy    (op_busy),
    .done    (op_done),
    .ovf     (op_ovf),
    .n       (n_val),
    .k_used  (k_used)
  );

  // After an operation: go on while n >= m, otherwise m is settled.
  assign below     = (n_val < N_W'(m_cur));
  assign want_m    = running && (wait_m || (op_done && (op_ovf || below)));
  assign op_load   = want_m && gen_valid;
  assign gen_ready = op_load;
  assign op_start  = running && op_done && !op_ovf && !below;

  always_ff @(posedge clk) begin
    if (rst) begin
      running   <= 1'b0;
      wait_m    <= 1'b0;
      done      <= 1'b0;
      ovf_valid <= 1'b0;
    end else begin
      done      <= 1'b0;
      ovf_valid <= running && op_done && op_ovf;
      if (start && !running) begin
        running <= 1'b1;
        wait_m  <= 1'b1;
      end else if (want_m) begin
        if (gen_valid) begin
          wait_m <= 1'b0;
        end else if (!gen_active) begin
          running <= 1'b0;
          wait_m  <= 1'b0;
          done    <= 1'b1;
        end else begin
          wait_m <= 1'b1;
        end
      end
    end
    if (op_load) m_cur <= gen_m;
    if (op_done) ovf_m <= m_cur;
  end

  assign busy = running;

  // An m may only be loaded while the operation unit is idle.
  assert property (@(posedge clk) disable iff (rst) op_load |-> !op_busy);
endmodule
