// mont_mul: modified Montgomery multiplier, z = a*b*R^-1 mod p, p = 12289, R = 2^14.
//
// Because p = 3*2^12 + 1 is a Proth prime, p^-1 mod R is 2^12 + 1, so the
// Montgomery quotient Q = T*p^-1 mod R is formed as ((T << 12) + T) mod R, a
// shift and an add, instead of a second multiplication. Q*p is likewise
// (Q << 13) + (Q << 12) + Q. The steps are:
//   stage 1  T = a*b                      (the one real multiplication, a DSP)
//   stage 2  Q = ((T << 12) + T) mod R
//   stage 3  QP = Q*p
//   stage 4  Z = (T - QP) / R              (exact; -p < Z < p)
//   output   z = Z < 0 ? Z + p : Z         (combinational)
// Inputs must be below p; z is then below p.
//
// Timing: fully pipelined, a new pair every cycle. a and b are sampled on a
// rising edge; z is valid, combinationally from the stage-4 register, after the
// fourth edge. The user's destination register, written on the fifth edge,
// completes the five-cycle multiplication. Splitting the algorithm into these
// five steps is this design's choice; the document gives the algorithm and the
// five-cycle cost.
module mont_mul
  import wntt_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t z
);

  localparam int unsigned TW = 2*CW;   // product width

  logic [TW-1:0]      t1, t2, t3;
  logic [RBITS-1:0]   q2;
  logic [TW-1:0]      qp3;
  logic signed [CW:0] z4;

  // stage 1: the product
  always_ff @(posedge clk) t1 <= a * b;

  // stage 2: quotient by shift and add, modulo R
  always_ff @(posedge clk) begin
    q2 <= RBITS'(t1 + (t1 << PINV_SH));
    t2 <= t1;
  end

  // stage 3: Q*p = Q*2^13 + Q*2^12 + Q
  always_ff @(posedge clk) begin
    qp3 <= (TW'(q2) << 13) + (TW'(q2) << 12) + TW'(q2);
    t3  <= t2;
  end

  // stage 4: exact division by R of T - Q*p
  logic signed [TW:0] diff;
  always_comb diff = $signed({1'b0, t3}) - $signed({1'b0, qp3});
  always_ff @(posedge clk) z4 <= (CW+1)'(diff >>> RBITS);

  // final correction into [0, p)
  always_comb z = (z4 < 0) ? coef_t'(z4 + $signed((CW+1)'(P))) : coef_t'(z4);

endmodule
