// tb_cordic_software_cw: end-to-end test of the CORDIC-twiddle 4-point FFT,
// at the design's default parameters.
// - DFT transforms: gateway_in = pi/2 (W4^1 = -j), gateway_in1 = 0 (W = 1);
//   the outputs must equal 4096 * the direct 4-point DFT exactly.
// - Rotated transforms: random angles for both CORDICs (half of them above
//   pi/2, which takes the CORDIC quadrant fold); the outputs are compared with
//   the DIF flow graph evaluated in floating point with exact cos/sin twiddles,
//   within a bound that allows 1.5 LSB of twiddle error per component.
// - Angles and samples change every enabled cycle with random ce gaps; each
//   result must appear ITER + 4 enabled cycles later and hold while ce is low.
// Mechanisms counted (each must occur): ce stalls, quadrant folds, exact DFT
// transforms, rotated-twiddle transforms.
module tb_cordic_software_cw;

  localparam int ITER = 9;       // the top's default
  localparam int LAT  = ITER + 4;
  localparam int NTR  = 2000;
  localparam real EPS = 1.4142136 * 1.5 / 64.0;   // twiddle error bound

  typedef struct {
    real re [4];
    real im [4];
    real tol [4];
  } spec_t;

  logic clk = 0;
  logic ce;
  logic signed [15:0] ang1, ang0;
  logic signed [7:0]  x [4];
  logic signed [23:0] y [8];

  int checks = 0, failures = 0;
  int stalls = 0, folds = 0, dft_runs = 0, rot_runs = 0;

  cordic_software_cw u_dut (
    .clk (clk), .ce (ce),
    .gateway_in (ang1), .gateway_in1 (ang0),
    .x0 (x[0]), .x1 (x[1]), .x2 (x[2]), .x3 (x[3]),
    .gateway_out  (y[0]), .gateway_out1 (y[1]), .gateway_out2 (y[2]), .gateway_out3 (y[3]),
    .gateway_out4 (y[4]), .gateway_out5 (y[5]), .gateway_out6 (y[6]), .gateway_out7 (y[7])
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10 * NTR) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Direct DFT, X[k] = sum x[n] (-j)^(nk), times 4096; exact.
  function automatic spec_t dft4();
    spec_t s;
    for (int k = 0; k < 4; k++) begin
      s.re[k] = 0.0;  s.im[k] = 0.0;  s.tol[k] = 0.0;
      for (int n = 0; n < 4; n++)
        case ((n * k) % 4)
          0: s.re[k] += 4096.0 * x[n];
          1: s.im[k] -= 4096.0 * x[n];
          2: s.re[k] -= 4096.0 * x[n];
          3: s.im[k] += 4096.0 * x[n];
        endcase
    end
    return s;
  endfunction

  // DIF flow graph with W4^1 = exp(-j a1), W4^0 = W2^0 = exp(-j a0).
  function automatic spec_t dif4(real a1, real a0);
    spec_t s;
    real w1r = $cos(a1), w1i = -$sin(a1), w0r = $cos(a0), w0i = -$sin(a0);
    real a0v = real'(x[0]) + real'(x[2]), a1v = real'(x[1]) + real'(x[3]);
    real d0 = real'(x[0]) - real'(x[2]), d1 = real'(x[1]) - real'(x[3]);
    real b0r = d0 * w0r, b0i = d0 * w0i, b1r = d1 * w1r, b1i = d1 * w1i;
    real tr, ti;
    s.re[0] = a0v + a1v;  s.im[0] = 0.0;
    s.re[1] = b0r + b1r;  s.im[1] = b0i + b1i;
    s.re[2] = (a0v - a1v) * w0r;  s.im[2] = (a0v - a1v) * w0i;
    tr = b0r - b1r;  ti = b0i - b1i;
    s.re[3] = tr * w0r - ti * w0i;  s.im[3] = tr * w0i + ti * w0r;
    s.tol[0] = 0.0;
    s.tol[1] = (rabs(d0) + rabs(d1)) * EPS;
    s.tol[2] = rabs(a0v - a1v) * EPS;
    s.tol[3] = (rabs(d0) + rabs(d1)) * (2.0 * EPS + EPS * EPS);
    for (int k = 0; k < 4; k++) begin
      s.re[k] *= 4096.0;  s.im[k] *= 4096.0;  s.tol[k] = s.tol[k] * 4096.0 + 0.5;
    end
    return s;
  endfunction

  spec_t q [$];
  logic signed [23:0] last_y [8];

  initial begin
    int sent = 0;
    bit dft;
    spec_t e;
    ce = 1;
    ang1 = 16'sd12868;  ang0 = 0;
    foreach (x[n]) x[n] = 0;
    // No reset port: run the pipeline empty for its latency.
    repeat (LAT + 1) @(posedge clk);
    while (sent < NTR + LAT - 1) begin
      @(negedge clk);
      ce  = (sent < NTR) ? ($urandom_range(0, 4) != 0) : 1'b1;
      dft = (sent % 2 == 0);
      foreach (x[n]) x[n] = 8'($urandom);
      if (sent < 4) foreach (x[n]) x[n] = (sent % 2 == 0) ? -8'sd128 : 8'sd127;
      if (dft) begin
        ang1 = 16'sd12868;  ang0 = 0;
        e = dft4();
      end else begin
        if (sent % 4 == 1) ang1 = 16'($urandom_range(12869, 25736));  // 90..180 deg
        else               ang1 = 16'($urandom_range(0, 12868));
        ang0 = 16'($urandom_range(0, 25736)) * (($urandom_range(0, 1) != 0) ? 16'sd1 : -16'sd1);
        e = dif4(real'(ang1) / 8192.0, real'(ang0) / 8192.0);
      end
      if (!ce) stalls++;
      last_y = y;
      @(posedge clk);
      #1;
      if (ce) begin
        q.push_back(e);
        if (sent < NTR) begin
          if (dft) dft_runs++; else rot_runs++;
          if (ang1 > 16'sd12868 || ang0 > 16'sd12868 || ang0 < -16'sd12868) folds++;
        end
        sent++;
        if (q.size() == LAT) begin
          e = q.pop_front();
          checks++;
          for (int k = 0; k < 4; k++) begin
            if (rabs(real'(y[k]) - e.re[k]) > e.tol[k] ||
                rabs(real'(y[k+4]) - e.im[k]) > e.tol[k]) begin
              failures++;
              if (failures < 10)
                $display("X[%0d]: got %0d,%0d expected %0.1f,%0.1f (+-%0.1f)",
                         k, y[k], y[k+4], e.re[k], e.im[k], e.tol[k]);
              break;
            end
          end
        end
      end else begin
        checks++;
        if (y != last_y) begin
          failures++;
          $display("output changed while ce was low");
        end
      end
    end
    checks++;
    if (stalls == 0 || folds == 0 || dft_runs == 0 || rot_runs == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("stalls=%0d folds=%0d dft_runs=%0d rot_runs=%0d", stalls, folds, dft_runs, rot_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
