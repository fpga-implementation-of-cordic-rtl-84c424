// tb_fft4_dif: self-checking test of the pipelined 4-point DIF FFT.
// Half of the transforms use the true twiddles (W4^0 = W2^0 = 1, W4^1 = -j)
// and are compared with a direct 4-point DFT, X[k] = sum x[n] (-j)^(nk),
// scaled by 4096. The other half use random twiddles of magnitude <= 1 and
// are compared with the DIF flow graph evaluated in 64-bit integers. A new
// transform enters on every enabled cycle, with random ce gaps; each result
// must appear after exactly 2 enabled cycles and hold while ce is low.
module tb_fft4_dif;

  localparam int NTR = 3000;
  localparam int LAT = 2;

  typedef struct {
    longint re [4];
    longint im [4];
  } spec_t;

  logic clk = 0;
  logic ce;
  logic signed [7:0]  x [4];
  logic signed [7:0]  w20r, w20i, w40r, w40i, w41r, w41i;
  logic signed [23:0] yr [4];
  logic signed [23:0] yi [4];

  int checks = 0, failures = 0, stalls = 0, dft_runs = 0;

  fft4_dif u_dut (
    .clk (clk), .ce (ce),
    .x0 (x[0]), .x1 (x[1]), .x2 (x[2]), .x3 (x[3]),
    .w2_0_r (w20r), .w2_0_i (w20i), .w4_0_r (w40r), .w4_0_i (w40i),
    .w4_1_r (w41r), .w4_1_i (w41i),
    .x0_r (yr[0]), .x1_r (yr[1]), .x2_r (yr[2]), .x3_r (yr[3]),
    .x0_i (yi[0]), .x1_i (yi[1]), .x2_i (yi[2]), .x3_i (yi[3])
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10 * NTR) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Direct DFT with (-j)^m twiddles, times 4096.
  function automatic spec_t dft4();
    spec_t s;
    for (int k = 0; k < 4; k++) begin
      s.re[k] = 0;
      s.im[k] = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: s.re[k] += x[n];
          1: s.im[k] -= x[n];
          2: s.re[k] -= x[n];
          3: s.im[k] += x[n];
        endcase
      end
      s.re[k] *= 4096;
      s.im[k] *= 4096;
    end
    return s;
  endfunction

  // DIF flow graph for arbitrary twiddles: outputs in units of 2^-12.
  function automatic spec_t dif4();
    spec_t s;
    longint a0r, a0i, a1r, a1i, b0r, b0i, b1r, b1i, tr, ti;
    a0r = (longint'(x[0]) + x[2]) * 64;  a0i = 0;
    a1r = (longint'(x[1]) + x[3]) * 64;  a1i = 0;
    tr  = longint'(x[0]) - x[2];
    b0r = tr * w40r;  b0i = tr * w40i;
    tr  = longint'(x[1]) - x[3];
    b1r = tr * w41r;  b1i = tr * w41i;
    s.re[0] = (a0r + a1r) * 64;  s.im[0] = (a0i + a1i) * 64;
    s.re[1] = (b0r + b1r) * 64;  s.im[1] = (b0i + b1i) * 64;
    tr = a0r - a1r;  ti = a0i - a1i;
    s.re[2] = tr * w20r - ti * w20i;  s.im[2] = tr * w20i + ti * w20r;
    tr = b0r - b1r;  ti = b0i - b1i;
    s.re[3] = tr * w20r - ti * w20i;  s.im[3] = tr * w20i + ti * w20r;
    return s;
  endfunction

  task automatic rand_twiddle(output logic signed [7:0] wr, output logic signed [7:0] wi);
    real th = $urandom_range(0, 62831) / 10000.0;
    wr = 8'(int'($floor(64.0 * $cos(th) + 0.5)));
    wi = 8'(int'($floor(64.0 * $sin(th) + 0.5)));
  endtask

  spec_t q [$];
  logic signed [23:0] last_r [4];

  initial begin
    int sent = 0;
    spec_t e;
    ce = 1;
    // Flush the unreset pipeline.
    foreach (x[n]) x[n] = 0;
    {w20r, w20i, w40r, w40i, w41r, w41i} = '0;
    repeat (3) @(posedge clk);
    while (sent < NTR + LAT - 1) begin
      @(negedge clk);
      ce = (sent < NTR) ? ($urandom_range(0, 3) != 0) : 1'b1;
      foreach (x[n]) x[n] = 8'($urandom);
      if (sent < 8) foreach (x[n]) x[n] = (sent % 2 == 0) ? -8'sd128 : 8'sd127;
      if (sent % 2 == 0) begin
        w40r = 64; w40i = 0; w20r = 64; w20i = 0; w41r = 0; w41i = -64;
        e = dft4();
      end else begin
        rand_twiddle(w40r, w40i);
        rand_twiddle(w41r, w41i);
        rand_twiddle(w20r, w20i);
        e = dif4();
      end
      if (!ce) stalls++;
      last_r = yr;
      @(posedge clk);
      #1;
      if (ce) begin
        q.push_back(e);
        if (sent % 2 == 0) dft_runs++;
        sent++;
        if (q.size() == LAT) begin
          e = q.pop_front();
          checks++;
          for (int k = 0; k < 4; k++) begin
            if (longint'(yr[k]) != e.re[k] || longint'(yi[k]) != e.im[k]) begin
              failures++;
              if (failures < 10)
                $display("X[%0d]: got %0d,%0d expected %0d,%0d", k, yr[k], yi[k], e.re[k], e.im[k]);
              break;
            end
          end
        end
      end else begin
        checks++;
        if (yr != last_r) begin
          failures++;
          $display("output changed while ce was low");
        end
      end
    end
    checks++;
    if (stalls == 0 || dft_runs == 0) failures++;
    $display("stalls=%0d dft_runs=%0d", stalls, dft_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
