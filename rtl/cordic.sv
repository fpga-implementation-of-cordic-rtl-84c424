// cordic: pipelined rotation-mode CORDIC that turns a 16-bit angle into 8-bit
// cosine and sine, one micro-rotation per pipeline stage.
//
// Interface (port names as in the source design):
//   anglevalue  signed radians, Q3.13 (8192 = 1 rad). Any value in [-4, 4)
//               is accepted; the source design's working range is 0 to 180 degrees
//               (0 .. 25736).
//   cos, sin    signed Q1.6 (64 = 1.0), rounded to nearest.
//   ce          clock enable: when low, every pipeline register holds.
//   rst         synchronous reset, active low, as in the source design
//               (outputs appear only while reset is high); clears the pipeline,
//               so cos and sin read 0 during and just after reset.
//
// How it works: the input register folds the angle into [-pi/2, pi/2], where
// CORDIC converges, by starting from (-1/K, 0) and rotating by theta -/+ pi
// when |theta| > pi/2, otherwise from (1/K, 0) with theta itself (1/K
// cancels the CORDIC gain K). ITER cordic_stage instances follow, each with a
// register; iteration i shifts by i and uses atan_const(i), which reads a
// 4-entry ROM and replaces the larger-i angles by 2^-i. A last register rounds
// x and y from DW bits (Q2.14 at DW = 16) to OW bits.
//
// Timing: latency ITER + 2 enabled clock cycles from anglevalue to cos/sin,
// one new angle accepted per enabled cycle.
//
// From the source design: 16-bit angle, 8-bit sine/cosine, pipelined iterations,
// ITER = n + 1 = 9 for n = 8 output bits, the iteration structure, and
// the smaller angle ROM. This design's own choices: the number formats, the
// quadrant fold, the DW = 16 internal width, the ROM split point and the
// rounding.
module cordic
  import cordic_pkg::*;
#(
  parameter int ITER = 9,
  parameter int AW   = 16,
  parameter int OW   = 8,
  parameter int DW   = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic signed [AW-1:0] anglevalue,
  output logic signed [OW-1:0] cos,
  output logic signed [OW-1:0] sin
);

  typedef struct packed {
    logic signed [DW-1:0] x;
    logic signed [DW-1:0] y;
    logic signed [AW-1:0] z;
  } vec_t;

  localparam logic signed [DW-1:0] START = DW'(cordic_start(DW));
  localparam int                   DROP  = DW - 2 - TWIDDLE_FRAC;  // bits removed at the output
  localparam logic signed [AW-1:0] HPI   = AW'(HALF_PI);
  localparam logic signed [AW-1:0] FPI   = AW'(PI);

  vec_t pipe [ITER+1];   // pipe[0]: folded input; pipe[k]: after k iterations
  vec_t nxt  [ITER];     // combinational output of each stage

  // Input register with quadrant fold.
  vec_t fold;
  always_comb begin
    fold.y = '0;
    if (anglevalue > HPI) begin
      fold.x = -START;
      fold.z = anglevalue - FPI;
    end else if (anglevalue < -HPI) begin
      fold.x = -START;
      fold.z = anglevalue + FPI;
    end else begin
      fold.x = START;
      fold.z = anglevalue;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst)    pipe[0] <= '0;
    else if (ce) pipe[0] <= fold;
  end

  for (genvar k = 0; k < ITER; k++) begin : g_iter
    cordic_stage #(
      .SHIFT (k),
      .DW    (DW),
      .ZW    (AW),
      .ATAN  (AW'(atan_const(k)))
    ) u_stage (
      .x_i (pipe[k].x),
      .y_i (pipe[k].y),
      .z_i (pipe[k].z),
      .x_o (nxt[k].x),
      .y_o (nxt[k].y),
      .z_o (nxt[k].z)
    );

    always_ff @(posedge clk) begin
      if (!rst)    pipe[k+1] <= '0;
      else if (ce) pipe[k+1] <= nxt[k];
    end
  end

  // Output rounding: round half up, then keep OW bits.
  logic signed [DW:0] x_rnd, y_rnd;
  always_comb begin
    x_rnd = (DW+1)'(pipe[ITER].x) + (DW+1)'(1 <<< (DROP - 1));
    y_rnd = (DW+1)'(pipe[ITER].y) + (DW+1)'(1 <<< (DROP - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      cos <= '0;
      sin <= '0;
    end else if (ce) begin
      cos <= OW'(x_rnd >>> DROP);
      sin <= OW'(y_rnd >>> DROP);
    end
  end

endmodule
