// tb_cordic_stage: self-checking test of one CORDIC micro-rotation.
// Three instances (shift 0, 3 and 7) receive random x, y and residual angle;
// the expected outputs come from the micro-rotation equations evaluated with
// floor division in 64-bit integers and wrapped to the word width.
module tb_cordic_stage;

  localparam int DW = 16;
  localparam int ZW = 16;
  localparam int NS = 3;
  localparam int SH [NS] = '{0, 3, 7};
  localparam logic signed [ZW-1:0] AT [NS] = '{16'sd6434, 16'sd1019, 16'sd64};

  logic signed [DW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic signed [DW-1:0] xo [NS];
  logic signed [DW-1:0] yo [NS];
  logic signed [ZW-1:0] zo [NS];

  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_dut
    cordic_stage #(.SHIFT(SH[s]), .DW(DW), .ZW(ZW), .ATAN(AT[s])) u_dut (
      .x_i (x), .y_i (y), .z_i (z), .x_o (xo[s]), .y_o (yo[s]), .z_o (zo[s])
    );
  end

  function automatic longint floordiv(longint v, int sh);
    longint d = longint'(1) << sh;
    longint q = v / d;
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction

  function automatic longint wrap16(longint v);
    longint m = v & 64'hFFFF;
    return (m >= 32768) ? m - 65536 : m;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ex, ey, ez, dir;
    for (int n = 0; n < 2000; n++) begin
      x = DW'($urandom_range(0, 65535)) >>> 1;   // keep one bit of headroom
      y = DW'($urandom_range(0, 65535)) >>> 1;
      z = ZW'($urandom);
      if (n == 0) z = 0;                          // z = 0 counts as positive
      #1;
      for (int s = 0; s < NS; s++) begin
        dir = (z < 0) ? -1 : 1;
        ex = wrap16(longint'(x) - dir * floordiv(longint'(y), SH[s]));
        ey = wrap16(longint'(y) + dir * floordiv(longint'(x), SH[s]));
        ez = wrap16(longint'(z) - dir * longint'(AT[s]));
        checks++;
        if (longint'(xo[s]) != ex || longint'(yo[s]) != ey || longint'(zo[s]) != ez) begin
          failures++;
          if (failures < 10)
            $display("mismatch shift=%0d x=%0d y=%0d z=%0d got %0d %0d %0d exp %0d %0d %0d",
                     SH[s], x, y, z, xo[s], yo[s], zo[s], ex, ey, ez);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
