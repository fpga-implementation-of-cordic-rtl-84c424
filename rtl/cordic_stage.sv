// cordic_stage: one rotation-mode CORDIC micro-rotation, combinational.
//
// Both vector components are arithmetically shifted right by SHIFT and added
// to / subtracted from the other component; the residual angle z moves by
// ATAN toward zero. The sign of z picks all three directions:
//   z >= 0:  x' = x - (y >>> i),  y' = y + (x >>> i),  z' = z - atan(2^-i)
//   z <  0:  x' = x + (y >>> i),  y' = y - (x >>> i),  z' = z + atan(2^-i)
// The structure (two shifters, three add/subtract units steered by sign(z))
// follows the source design's single-iteration diagram. The pipeline register that
// follows each stage lives in the cordic module. Word widths are this
// design's choice; additions wrap, and the caller sizes DW for headroom.
module cordic_stage #(
  parameter int                     SHIFT = 0,
  parameter int                     DW    = 16,
  parameter int                     ZW    = 16,
  parameter logic signed [ZW-1:0]   ATAN  = 16'sd6434
) (
  input  logic signed [DW-1:0] x_i,
  input  logic signed [DW-1:0] y_i,
  input  logic signed [ZW-1:0] z_i,
  output logic signed [DW-1:0] x_o,
  output logic signed [DW-1:0] y_o,
  output logic signed [ZW-1:0] z_o
);

  logic signed [DW-1:0] x_sh, y_sh;
  logic                 neg;

  always_comb begin
    x_sh = x_i >>> SHIFT;
    y_sh = y_i >>> SHIFT;
    neg  = z_i[ZW-1];
    if (!neg) begin
      x_o = x_i - y_sh;
      y_o = y_i + x_sh;
      z_o = z_i - ATAN;
    end else begin
      x_o = x_i + y_sh;
      y_o = y_i - x_sh;
      z_o = z_i + ATAN;
    end
  end

endmodule
