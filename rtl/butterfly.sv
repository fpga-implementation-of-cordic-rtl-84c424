// butterfly: radix-2 decimation-in-frequency butterfly on complex fixed-point
// numbers, combinational:
//   A = a + b
//   B = (a - b) * W
// W is a Q(TW-TF).TF twiddle (Q1.6 by default). The product B therefore has
// TF more fraction bits than the inputs; A is shifted left by TF so both
// outputs share one scale, OW-bit results with TF more fraction bits than the
// inputs. The internal arithmetic is exact (IW + TW + 2 bits); the outputs keep
// the low OW bits, so OW < IW + TW + 2 relies on |W| <= 1 for headroom.
// The butterfly shape follows the source design; the scaling and widths are this
// design's own.
module butterfly #(
  parameter int IW = 8,
  parameter int TW = 8,
  parameter int TF = 6,
  parameter int OW = 18
) (
  input  logic signed [IW-1:0] a_r,
  input  logic signed [IW-1:0] a_i,
  input  logic signed [IW-1:0] b_r,
  input  logic signed [IW-1:0] b_i,
  input  logic signed [TW-1:0] w_r,
  input  logic signed [TW-1:0] w_i,
  output logic signed [OW-1:0] sum_r,
  output logic signed [OW-1:0] sum_i,
  output logic signed [OW-1:0] dif_r,
  output logic signed [OW-1:0] dif_i
);

  localparam int FW = IW + TW + 2;  // full-precision width

  logic signed [IW:0]   d_r, d_i;    // a - b
  logic signed [FW-1:0] s_r, s_i, p_r, p_i;

  always_comb begin
    d_r = (IW+1)'(a_r) - (IW+1)'(b_r);
    d_i = (IW+1)'(a_i) - (IW+1)'(b_i);
    s_r = (FW'(a_r) + FW'(b_r)) <<< TF;
    s_i = (FW'(a_i) + FW'(b_i)) <<< TF;
    p_r = FW'(d_r) * FW'(w_r) - FW'(d_i) * FW'(w_i);
    p_i = FW'(d_r) * FW'(w_i) + FW'(d_i) * FW'(w_r);
    sum_r = OW'(s_r);
    sum_i = OW'(s_i);
    dif_r = OW'(p_r);
    dif_i = OW'(p_i);
  end

endmodule
