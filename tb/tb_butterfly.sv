// tb_butterfly: self-checking test of the radix-2 DIF butterfly.
// Random complex operands and twiddles at the stage-1 sizes (8-bit data,
// Q1.6 twiddle, 18-bit exact outputs); expected A = (a + b) * 64 and
// B = (a - b) * W are computed with 64-bit integers.
module tb_butterfly;

  localparam int IW = 8, TW = 8, TF = 6, OW = 18;

  logic signed [IW-1:0] a_r, a_i, b_r, b_i;
  logic signed [TW-1:0] w_r, w_i;
  logic signed [OW-1:0] s_r, s_i, d_r, d_i;

  int checks = 0, failures = 0;

  butterfly #(.IW(IW), .TW(TW), .TF(TF), .OW(OW)) u_dut (
    .a_r (a_r), .a_i (a_i), .b_r (b_r), .b_i (b_i), .w_r (w_r), .w_i (w_i),
    .sum_r (s_r), .sum_i (s_i), .dif_r (d_r), .dif_i (d_i)
  );

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint er, ei, fr, fi, dr, di;
    for (int n = 0; n < 3000; n++) begin
      {a_r, a_i, b_r, b_i} = $urandom;
      {w_r, w_i} = 16'($urandom);
      if (n < 4) begin          // extremes
        a_r = -128; a_i = -128; b_r = 127; b_i = 127; w_r = -128; w_i = -128;
      end
      #1;
      er = (longint'(a_r) + longint'(b_r)) * 64;
      ei = (longint'(a_i) + longint'(b_i)) * 64;
      dr = longint'(a_r) - longint'(b_r);
      di = longint'(a_i) - longint'(b_i);
      fr = dr * longint'(w_r) - di * longint'(w_i);
      fi = dr * longint'(w_i) + di * longint'(w_r);
      checks++;
      if (longint'(s_r) != er || longint'(s_i) != ei ||
          longint'(d_r) != fr || longint'(d_i) != fi) begin
        failures++;
        if (failures < 10)
          $display("a=%0d,%0d b=%0d,%0d w=%0d,%0d: got A=%0d,%0d B=%0d,%0d exp A=%0d,%0d B=%0d,%0d",
                   a_r, a_i, b_r, b_i, w_r, w_i, s_r, s_i, d_r, d_i, er, ei, fr, fi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
