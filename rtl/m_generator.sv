// m_generator -- enumerates the start values one coprocessor must verify.
//
// For a block number M supplied by the host, every number of the range
// M*2^(MH_W+D) .. (M+1)*2^(MH_W+D)-1 whose low D bits are a mandatory
// residue is produced once, as
//     m = {M, m_H, S[i]}      (46 + 17 + 15 = 78 bits with the defaults)
// with the counter i running over the S_COUNT mandatory residues inside the
// counter m_H, which runs over all 2^MH_W values. All other numbers of the
// range are known to fall below themselves within their first table
// operation and are skipped. This is the "counter i / counter m_H / m"
// part of the coprocessor; how the counters are sequenced and handshaken
// is this design's own choice.
//
// Interface: start (with m_block) latches M and restarts both counters.
// The values leave on a valid/ready stream (m_valid, m_ready, m); m_last
// marks the final value of the range. The S table RAM is read through
// s_en/s_addr/s_data (one clock of read latency).
// Timing: m_valid rises one clock after start. The RAM address is the
// next index whenever a value is taken, so a new m is offered in the clock
// right after the previous one was taken: one value per clock at most.
module m_generator #(
  parameter int unsigned M_W     = collatz_pkg::M_W,
  parameter int unsigned MH_W    = collatz_pkg::MH_W,
  parameter int unsigned D       = collatz_pkg::D_S,
  parameter int unsigned S_COUNT = collatz_pkg::S_COUNT,
  parameter int unsigned SAW     = $clog2(S_COUNT),
  parameter int unsigned MV_W    = M_W + MH_W + D
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  input  logic [M_W-1:0]  m_block,
  // S table RAM read port
  output logic            s_en,
  output logic [SAW-1:0]  s_addr,
  input  logic [D-1:0]    s_data,
  // stream of start values
  output logic            m_valid,
  input  logic            m_ready,
  output logic [MV_W-1:0] m,
  output logic            m_last,
  output logic            active
);
  logic [M_W-1:0]  m_block_r;
  logic [MH_W-1:0] mh_r;
  logic [SAW-1:0]  i_r, i_next;
  logic [MH_W-1:0] mh_next;
  logic            take, i_wrap;

  assign take    = m_valid && m_ready;
  assign i_wrap  = (i_r == SAW'(S_COUNT - 1));
  assign m_last  = i_wrap && (mh_r == '1);
  assign m_valid = active;
  assign m       = {m_block_r, mh_r, s_data};

  always_comb begin
    i_next  = i_r;
    mh_next = mh_r;
    if (start) begin
      i_next  = '0;
      mh_next = '0;
    end else if (take) begin
      i_next  = i_wrap ? '0 : i_r + 1'b1;
      mh_next = i_wrap ? mh_r + 1'b1 : mh_r;
    end
  end

  assign s_en   = start || take;
  assign s_addr = i_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      i_r    <= '0;
      mh_r   <= '0;
    end else begin
      i_r  <= i_next;
      mh_r <= mh_next;
      if (start) begin
        active    <= 1'b1;
        m_block_r <= m_block;
      end else if (take && m_last) begin
        active <= 1'b0;
      end
    end
  end
endmodule
