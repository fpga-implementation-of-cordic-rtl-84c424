// cordic_software_cw: CORDIC-generated twiddle factors driving a 4-point FFT.
//
// Two pipelined CORDIC units turn angles into twiddle factors
// W = exp(-j*theta) = cos(theta) - j*sin(theta):
//   gateway_in  -> W4^1 (drive pi/2 = 16'd12868 for a true DFT: W = -j)
//   gateway_in1 -> W4^0 and W2^0 (drive 0 for a true DFT: W = 1)
// The four real samples x0..x3 pass through a delay line as long as the CORDIC
// latency, so the FFT combines each sample set with the twiddles computed
// from the angles presented in the same cycle.
//
// Interface (names as in the source design): angles are signed radians
// Q3.13 (8192 = 1 rad); samples are signed 8-bit; outputs are signed 24-bit,
// X[k] * 4096:
//   gateway_out,  gateway_out1, gateway_out2, gateway_out3 = Re X[0..3]
//   gateway_out4, gateway_out5, gateway_out6, gateway_out7 = Im X[0..3]
// ce enables every register. There is no reset port, as in the source design;
// the CORDIC resets are held inactive, and the outputs are valid once
// ITER + 4 enabled cycles have passed.
//
// Timing: latency ITER + 4 enabled cycles (ITER + 2 in the CORDIC, 2 in the
// FFT), one transform per enabled cycle.
//
// From the source design: the ports and widths, and that CORDIC units feed the FFT.
// This design's own: which angle drives which twiddle, the sample delay line,
// the order of the outputs and the number formats.
module cordic_software_cw
  import cordic_pkg::*;
#(
  parameter int ITER = 9
) (
  input  logic               clk,
  input  logic               ce,
  input  logic signed [15:0] gateway_in,
  input  logic signed [15:0] gateway_in1,
  input  logic signed [7:0]  x0,
  input  logic signed [7:0]  x1,
  input  logic signed [7:0]  x2,
  input  logic signed [7:0]  x3,
  output logic signed [23:0] gateway_out,
  output logic signed [23:0] gateway_out1,
  output logic signed [23:0] gateway_out2,
  output logic signed [23:0] gateway_out3,
  output logic signed [23:0] gateway_out4,
  output logic signed [23:0] gateway_out5,
  output logic signed [23:0] gateway_out6,
  output logic signed [23:0] gateway_out7
);

  localparam int LAT = ITER + 2;  // CORDIC latency

  typedef logic signed [7:0] sample_t;
  typedef sample_t [3:0]     frame_t;

  // ---- twiddle generation ----
  logic signed [7:0] cos1, sin1, cos0, sin0;

  cordic #(.ITER(ITER), .AW(16), .OW(8), .DW(16)) u_cordic_w41 (
    .clk (clk), .rst (1'b1), .ce (ce),
    .anglevalue (gateway_in),
    .cos (cos1), .sin (sin1)
  );

  cordic #(.ITER(ITER), .AW(16), .OW(8), .DW(16)) u_cordic_w0 (
    .clk (clk), .rst (1'b1), .ce (ce),
    .anglevalue (gateway_in1),
    .cos (cos0), .sin (sin0)
  );

  // ---- sample delay line, aligned with the CORDIC latency ----
  frame_t dly [LAT];

  always_ff @(posedge clk) begin
    if (ce) begin
      dly[0] <= {x3, x2, x1, x0};
      for (int k = 1; k < LAT; k++) dly[k] <= dly[k-1];
    end
  end

  // ---- FFT ----
  logic signed [23:0] xr [4];
  logic signed [23:0] xi [4];

  fft4_dif #(.IW(8), .TW(8), .TF(TWIDDLE_FRAC), .OW(24)) u_fft (
    .clk (clk), .ce (ce),
    .x0 (dly[LAT-1][0]), .x1 (dly[LAT-1][1]),
    .x2 (dly[LAT-1][2]), .x3 (dly[LAT-1][3]),
    .w2_0_r (cos0), .w2_0_i (-sin0),
    .w4_0_r (cos0), .w4_0_i (-sin0),
    .w4_1_r (cos1), .w4_1_i (-sin1),
    .x0_r (xr[0]), .x1_r (xr[1]), .x2_r (xr[2]), .x3_r (xr[3]),
    .x0_i (xi[0]), .x1_i (xi[1]), .x2_i (xi[2]), .x3_i (xi[3])
  );

  assign gateway_out  = xr[0];
  assign gateway_out1 = xr[1];
  assign gateway_out2 = xr[2];
  assign gateway_out3 = xr[3];
  assign gateway_out4 = xi[0];
  assign gateway_out5 = xi[1];
  assign gateway_out6 = xi[2];
  assign gateway_out7 = xi[3];

endmodule
