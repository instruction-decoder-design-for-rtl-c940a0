// multiplier: pipelined multiplier spanning EXE1, EXE2 and EXE3.
//
// Two uses share one set of 17x17 partial-product multipliers:
//   16x16 mode (mode16=1): the signed or unsigned product of a[15:0] and b[15:0]
//     is formed in EXE1 and appears on res16 while the operation is in EXE2
//     (two-cycle latency, 32-bit result).
//   32x32 mode: EXE1 forms the four 16-bit partial products (aL*bL, aL*bH,
//     aH*bL, aH*bH), EXE2 adds the two middle products, and EXE3 assembles the
//     64-bit product on res64 (three-cycle latency, lower and upper 32 bits).
// `en` advances the internal stage registers together with the pipeline; a
// frozen pipeline holds them. Operands are sampled on the clock edge that moves
// the instruction from EXE1 to EXE2. The split into 16-bit halves is this
// design's way of building the stages shown for the original core.
module multiplier
  import coffee_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              mode16,
  input  logic              is_signed,
  input  logic [XLEN-1:0]   a,
  input  logic [XLEN-1:0]   b,
  output logic [XLEN-1:0]   res16,
  output logic [2*XLEN-1:0] res64
);
  logic signed [16:0] a_lo, a_hi, b_lo, b_hi;
  logic signed [33:0] p_ll, p_lh, p_hl, p_hh;     // EXE1 -> EXE2 registers
  logic signed [33:0] q_ll, q_hh;                 // EXE2 -> EXE3 registers
  logic signed [34:0] q_mid;

  always_comb begin
    // low halves are unsigned parts of a 32-bit word, except in 16x16 mode
    a_lo = {mode16 & is_signed & a[15], a[15:0]};
    b_lo = {mode16 & is_signed & b[15], b[15:0]};
    a_hi = {is_signed & a[31], a[31:16]};
    b_hi = {is_signed & b[31], b[31:16]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_ll <= '0; p_lh <= '0; p_hl <= '0; p_hh <= '0;
      q_ll <= '0; q_mid <= '0; q_hh <= '0;
    end else if (en) begin
      p_ll  <= a_lo * b_lo;
      p_lh  <= a_lo * b_hi;
      p_hl  <= a_hi * b_lo;
      p_hh  <= a_hi * b_hi;
      q_ll  <= p_ll;
      q_mid <= 35'(p_lh) + 35'(p_hl);
      q_hh  <= p_hh;
    end
  end

  assign res16 = p_ll[31:0];

  logic signed [65:0] full;
  always_comb begin
    full  = 66'(q_ll) + (66'(q_mid) <<< 16) + (66'(q_hh) <<< 32);
    res64 = full[63:0];
  end
endmodule
