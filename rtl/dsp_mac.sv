// dsp_mac -- the part of a DSP48E1 slice that the coprocessor uses: an
// unsigned multiply-add with a 17-bit shifted feedback path.
//
// Each clock it can start one of two operations:
//     sel_ph = 0 :  P <- A*B + C
//     sel_ph = 1 :  P <- A*B + P_H,   P_H = P >> 17 (the previous result)
// P_L is the low 17 bits of P. Chaining sel_ph = 1 operations over the
// 17-bit digits of a long operand, least significant first, multiplies that
// operand by B: P_L delivers one result digit per clock and P_H carries into
// the next digit.
//
// Pipeline (three register stages, as in the document's configuration):
//   stage 1  input registers A, B, C (C loads only when cec = 1) and sel_ph
//   stage 2  product register M = A*B, with the operation select delayed
//   stage 3  accumulator register P = M + (sel ? P_H : C)
// An operand presented at clock edge t therefore shows on P at edge t+3.
// P_H feeds back from the P register, so digits of one multiplication must
// be issued on consecutive clocks. As in the slice, C passes one register
// while the product passes two, so C loaded with the first digit must stay
// put for one more clock: two chain starts need at least two clocks between
// them. Carrying sel_ph down the pipeline with
// its data, and holding C in its register until the next cec, are this
// model's choices; the document gives only the two operations, the
// register stages and the 17-bit split of P.
module dsp_mac #(
  parameter int unsigned A_W  = 17,
  parameter int unsigned B_W  = 17,
  parameter int unsigned C_W  = 17,
  parameter int unsigned P_W  = 48,
  parameter int unsigned PL_W = 17
) (
  input  logic                clk,
  input  logic [A_W-1:0]      a,
  input  logic [B_W-1:0]      b,
  input  logic [C_W-1:0]      c,
  input  logic                cec,     // load the C register
  input  logic                sel_ph,  // 1: add P_H, 0: add C
  output logic [P_W-1:0]      p,
  output logic [PL_W-1:0]     p_l,
  output logic [P_W-PL_W-1:0] p_h
);
  logic [A_W-1:0]     a_r;
  logic [B_W-1:0]     b_r;
  logic [C_W-1:0]     c_r;
  logic               sel_r, sel_m;
  logic [A_W+B_W-1:0] m_r;
  logic [P_W-1:0]     addend;

  always_ff @(posedge clk) begin
    a_r   <= a;
    b_r   <= b;
    sel_r <= sel_ph;
    if (cec) c_r <= c;
    m_r   <= a_r * b_r;
    sel_m <= sel_r;
    p     <= P_W'(m_r) + addend;
  end

  always_comb addend = sel_m ? P_W'(p[P_W-1:PL_W]) : P_W'(c_r);

  assign p_l = p[PL_W-1:0];
  assign p_h = p[P_W-1:PL_W];
endmodule
