// table_op_unit -- the interim-number register and the sequential pipeline
// multiplier of one coprocessor.
//
// It holds the interim number n as a D-bit low part n_L and N_DIGITS
// 17-bit digits n_0..n_{N_DIGITS-1} of n_H (n = 2^D * n_H + n_L; 112 bits
// with the defaults) and performs one table operation
//     n <- B[n_L] * n_H + C[n_L]
// per request. B and C are read from a B/C table RAM port; the product is
// formed digit-serially by one dsp_mac, least significant digit first:
//     P <- B*n_0 + C;  then for each further digit  P <- B*n_i + P_H;
// each P_L is one 17-bit result digit p_i and the final P_H is the top
// digit p_k. Only the k digits in use are sent through the multiplier, so a
// 17k x 17-bit product takes k issue clocks (k is latched at the start of
// the operation as the index of the highest non-zero digit plus one).
//
// The result digits p_i are aligned to 17-bit boundaries of the result,
// while the next operation needs n_L = p[D-1:0] and n_H digits taken at bit
// D + 17*i. A (17-D)-bit carry register re-slices the stream as it arrives:
// digit i-1 of the new n_H is {p_i[D-1:0], p_{i-1}[16:D]}. Digits are
// rewritten in place; each is overwritten only after it has been issued.
// If the result needs more than D + 17*N_DIGITS bits, ovf is raised with
// done and n is no longer meaningful.
//
// Interface: load (with load_n) loads n and starts an operation on it;
// start runs an operation on the n held. Either may be given when busy is
// low, including in the clock where done is high.
// Timing: in the start clock the B/C address is presented; digits are issued
// on the next k clocks; the three-stage dsp_mac returns the last digit three
// clocks later; done (and ovf) is high for one clock k+4 clocks after the
// start clock, with n already updated. Back-to-back operations therefore take
// k+4 clocks each. The digit layout, the 1+3 stage pipeline and the six
// digits follow the document; the in-place re-slicing, the digit-count
// skipping logic and the handshake are this design's own.
module table_op_unit #(
  parameter int unsigned D        = collatz_pkg::D_BC,
  parameter int unsigned DIGIT_W  = collatz_pkg::DIGIT_W,
  parameter int unsigned N_DIGITS = collatz_pkg::N_DIGITS,
  parameter int unsigned BC_W     = collatz_pkg::BC_W,
  parameter int unsigned N_W      = D + DIGIT_W * N_DIGITS,
  parameter int unsigned KW       = $clog2(N_DIGITS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              load,
  input  logic [N_W-1:0]    load_n,
  // B/C table RAM read port
  output logic              bc_en,
  output logic [D-1:0]      bc_addr,
  input  logic [2*BC_W-1:0] bc_data,
  // status and result
  output logic              busy,
  output logic              done,
  output logic              ovf,
  output logic [N_W-1:0]    n,
  output logic [KW-1:0]     k_used
);
  localparam int unsigned CW   = DIGIT_W - D;   // carry slice width
  localparam int unsigned P_W  = 48;
  localparam int unsigned PH_W = P_W - DIGIT_W;

  typedef enum logic [1:0] {IDLE, ISSUE, DRAIN} state_t;

  typedef struct packed {
    logic          valid;
    logic          last;
    logic [KW-1:0] idx;
  } tag_t;

  state_t              state;
  logic [D-1:0]        nl_r;
  logic [DIGIT_W-1:0]  dig_r [N_DIGITS];
  logic [KW-1:0]       k_r, j_r;
  logic [CW-1:0]       carry_r;
  tag_t                tag [3];

  logic [DIGIT_W-1:0]  load_dig [N_DIGITS];
  logic [KW-1:0]       k_load, k_held;

  logic [BC_W-1:0]     b_val, c_val;
  logic [DIGIT_W-1:0]  dsp_a;
  logic                dsp_cec, dsp_sel;
  logic [DIGIT_W-1:0]  p_l;
  logic [PH_W-1:0]     p_h;
  logic                go;

  // Number of digits in use: index of the highest non-zero digit plus one.
  function automatic logic [KW-1:0] digits_used(input logic [DIGIT_W-1:0] d [N_DIGITS]);
    logic [KW-1:0] k;
    k = KW'(1);
    for (int unsigned i = 0; i < N_DIGITS; i++)
      if (d[i] != '0) k = KW'(i + 1);
    return k;
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < N_DIGITS; i++)
      load_dig[i] = load_n[D + DIGIT_W*i +: DIGIT_W];
    k_load = digits_used(load_dig);
    k_held = digits_used(dig_r);
  end

  assign go      = (start || load) && (state == IDLE);
  assign bc_en   = go;
  assign bc_addr = load ? load_n[D-1:0] : nl_r;
  assign {c_val, b_val} = bc_data;

  // Operands for the multiplier in the ISSUE state.
  always_comb begin
    dsp_a   = dig_r[j_r];
    dsp_cec = (state == ISSUE) && (j_r == '0);
    dsp_sel = (j_r != '0);
  end

  dsp_mac #(.A_W(DIGIT_W), .B_W(DIGIT_W), .C_W(DIGIT_W), .P_W(P_W), .PL_W(DIGIT_W)) u_dsp (
    .clk    (clk),
    .a      (dsp_a),
    .b      (DIGIT_W'(b_val)),
    .c      (DIGIT_W'(c_val)),
    .cec    (dsp_cec),
    .sel_ph (dsp_sel),
    .p      (),
    .p_l    (p_l),
    .p_h    (p_h)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      j_r   <= '0;
      k_r   <= KW'(1);
      done  <= 1'b0;
      ovf   <= 1'b0;
      for (int unsigned s = 0; s < 3; s++) tag[s] <= '0;
    end else begin
      done <= 1'b0;
      ovf  <= 1'b0;

      // ---- control: start, then issue k digits on consecutive clocks ----
      tag[0] <= '0;
      unique case (state)
        IDLE: if (go) begin
          state <= ISSUE;
          j_r   <= '0;
          k_r   <= load ? k_load : k_held;
        end
        ISSUE: begin
          tag[0].valid <= 1'b1;
          tag[0].idx   <= j_r;
          tag[0].last  <= (j_r == k_r - 1'b1);
          if (j_r == k_r - 1'b1) state <= DRAIN;
          else                   j_r   <= j_r + 1'b1;
        end
        DRAIN: if (tag[2].valid && tag[2].last) state <= IDLE;
        default: state <= IDLE;
      endcase
      tag[1] <= tag[0];
      tag[2] <= tag[1];

      // ---- result digits leave P_L one per clock; re-slice into n ----
      if (tag[2].valid) begin
        if (tag[2].last) begin
          done <= 1'b1;
          if (p_h[PH_W-1:DIGIT_W] != '0) ovf <= 1'b1;
          if (32'(tag[2].idx) + 1 < N_DIGITS) begin
            dig_r[tag[2].idx + 1'b1] <= DIGIT_W'(p_h[DIGIT_W-1:D]);
          end else if (p_h[DIGIT_W-1:D] != '0) begin
            ovf <= 1'b1;
          end
        end
      end
    end

    // Data registers without reset.
    if (state == IDLE && go && load) begin
      nl_r <= load_n[D-1:0];
      for (int unsigned i = 0; i < N_DIGITS; i++) dig_r[i] <= load_dig[i];
    end
    if (tag[2].valid) begin
      carry_r <= p_l[DIGIT_W-1:D];
      if (tag[2].idx == '0) nl_r <= p_l[D-1:0];
      else                  dig_r[tag[2].idx - 1'b1] <= {p_l[D-1:0], carry_r};
      if (tag[2].last)      dig_r[tag[2].idx] <= {p_h[D-1:0], p_l[DIGIT_W-1:D]};
    end
  end

  assign busy   = (state != IDLE);
  assign k_used = k_r;

  always_comb begin
    n[D-1:0] = nl_r;
    for (int unsigned i = 0; i < N_DIGITS; i++)
      n[D + DIGIT_W*i +: DIGIT_W] = dig_r[i];
  end

  // A new operation may only be requested while the unit is idle.
  assert property (@(posedge clk) disable iff (rst) (start || load) |-> !busy);
endmodule
