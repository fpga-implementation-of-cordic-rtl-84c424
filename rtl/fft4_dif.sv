// fft4_dif: pipelined 4-point radix-2 decimation-in-frequency FFT of four
// real samples, with the twiddle factors supplied as inputs.
//
//   stage 1 (N = 4):  a0 = x0 + x2        b0 = (x0 - x2) * W4^0
//                     a1 = x1 + x3        b1 = (x1 - x3) * W4^1
//   stage 2 (N = 2):  X0 = a0 + a1        X2 = (a0 - a1) * W2^0
//                     X1 = b0 + b1        X3 = (b0 - b1) * W2^0
//
// The DIF flow produces X in bit-reversed order (X0, X2, X1, X3); the outputs
// are wired back to natural order, so x<k>_r / x<k>_i carry X[k].
//
// Interface (names as in the source design):
//   x0..x3        signed IW-bit real samples.
//   w2_0, w4_0, w4_1 (_r, _i)  signed Q1.6 twiddles; for a true DFT
//                 W4^0 = W2^0 = 1 (64 + j0) and W4^1 = -j (0 - j64).
//   x<k>_r/_i     signed OW-bit outputs equal to X[k] * 2^(2*TF) (X * 4096);
//                 exact while |W| <= 1.
//   ce            clock enable for both pipeline registers.
// Timing: two register stages, latency 2 enabled cycles, one transform per
// enabled cycle. All inputs, w2_0 included, belong to the same cycle: w2_0
// is delayed internally to meet its stage-1 data. There is no reset; the
// pipeline holds valid data after two enabled cycles.
//
// Some output bits are constant by construction: with real inputs Im X[0]
// is always zero, and the sum paths carry the zero low bits of the alignment
// shift (12 in Re X[0], 6 in X[1]). They are kept so that every output has
// the same 24-bit format.
//
// From the source design: four 8-bit inputs, 24-bit real/imaginary outputs, the
// three twiddle ports, the radix-2 DIF butterfly. This design's own: the
// fixed-point scaling, natural output order and the pipeline registers.
module fft4_dif #(
  parameter int IW = 8,
  parameter int TW = 8,
  parameter int TF = 6,
  parameter int OW = 24
) (
  input  logic                 clk,
  input  logic                 ce,
  input  logic signed [IW-1:0] x0,
  input  logic signed [IW-1:0] x1,
  input  logic signed [IW-1:0] x2,
  input  logic signed [IW-1:0] x3,
  input  logic signed [TW-1:0] w2_0_r,
  input  logic signed [TW-1:0] w2_0_i,
  input  logic signed [TW-1:0] w4_0_r,
  input  logic signed [TW-1:0] w4_0_i,
  input  logic signed [TW-1:0] w4_1_r,
  input  logic signed [TW-1:0] w4_1_i,
  output logic signed [OW-1:0] x0_r,
  output logic signed [OW-1:0] x1_r,
  output logic signed [OW-1:0] x2_r,
  output logic signed [OW-1:0] x3_r,
  output logic signed [OW-1:0] x0_i,
  output logic signed [OW-1:0] x1_i,
  output logic signed [OW-1:0] x2_i,
  output logic signed [OW-1:0] x3_i
);

  localparam int S1W = IW + TW + 2;  // stage-1 width, exact

  typedef struct packed {
    logic signed [S1W-1:0] re;
    logic signed [S1W-1:0] im;
  } s1_t;

  // ---- stage 1 ----
  s1_t a0_c, b0_c, a1_c, b1_c;
  s1_t a0_q, b0_q, a1_q, b1_q;
  logic signed [TW-1:0] w2_r_q, w2_i_q;

  butterfly #(.IW(IW), .TW(TW), .TF(TF), .OW(S1W)) u_bf_s1_0 (
    .a_r (x0), .a_i ('0), .b_r (x2), .b_i ('0),
    .w_r (w4_0_r), .w_i (w4_0_i),
    .sum_r (a0_c.re), .sum_i (a0_c.im),
    .dif_r (b0_c.re), .dif_i (b0_c.im)
  );

  butterfly #(.IW(IW), .TW(TW), .TF(TF), .OW(S1W)) u_bf_s1_1 (
    .a_r (x1), .a_i ('0), .b_r (x3), .b_i ('0),
    .w_r (w4_1_r), .w_i (w4_1_i),
    .sum_r (a1_c.re), .sum_i (a1_c.im),
    .dif_r (b1_c.re), .dif_i (b1_c.im)
  );

  always_ff @(posedge clk) begin
    if (ce) begin
      a0_q   <= a0_c;
      b0_q   <= b0_c;
      a1_q   <= a1_c;
      b1_q   <= b1_c;
      w2_r_q <= w2_0_r;
      w2_i_q <= w2_0_i;
    end
  end

  // ---- stage 2 ----
  logic signed [OW-1:0] X0_r_c, X0_i_c, X1_r_c, X1_i_c;
  logic signed [OW-1:0] X2_r_c, X2_i_c, X3_r_c, X3_i_c;

  butterfly #(.IW(S1W), .TW(TW), .TF(TF), .OW(OW)) u_bf_s2_0 (
    .a_r (a0_q.re), .a_i (a0_q.im), .b_r (a1_q.re), .b_i (a1_q.im),
    .w_r (w2_r_q), .w_i (w2_i_q),
    .sum_r (X0_r_c), .sum_i (X0_i_c),
    .dif_r (X2_r_c), .dif_i (X2_i_c)
  );

  butterfly #(.IW(S1W), .TW(TW), .TF(TF), .OW(OW)) u_bf_s2_1 (
    .a_r (b0_q.re), .a_i (b0_q.im), .b_r (b1_q.re), .b_i (b1_q.im),
    .w_r (w2_r_q), .w_i (w2_i_q),
    .sum_r (X1_r_c), .sum_i (X1_i_c),
    .dif_r (X3_r_c), .dif_i (X3_i_c)
  );

  always_ff @(posedge clk) begin
    if (ce) begin
      x0_r <= X0_r_c;  x0_i <= X0_i_c;
      x1_r <= X1_r_c;  x1_i <= X1_i_c;
      x2_r <= X2_r_c;  x2_i <= X2_i_c;
      x3_r <= X3_r_c;  x3_i <= X3_i_c;
    end
  end

endmodule
