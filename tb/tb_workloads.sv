// tb_workloads: the two evaluation workloads at default parameters.
// 1. Sine/cosine over the whole 0..180 degree range: every angle code from 0
//    to 25736 (pi in Q3.13) is streamed through a cordic, one per cycle, and
//    each result must be within 1 LSB of round(64 * cos/sin). The largest
//    error seen is reported.
// 2. The transform stimulus of the source design's published simulation: all four samples = 2,
//    gateway_in = 16'b0010_1000_0000_0000 (1.25 rad), gateway_in1 = 0. Since
//    W4^0 = W2^0 = 1 and x0 = x2, x1 = x3, the expected result is X[0] = 8,
//    X[1..3] = 0, independent of W4^1. The stimulus is then repeated with
//    gateway_in = pi/2, which gives the same result.
module tb_workloads;

  localparam int ITER  = 9;
  localparam int LATC  = ITER + 2;   // cordic
  localparam int LATT  = ITER + 4;   // top level
  localparam int NANG  = 25737;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- workload 1: angle sweep ----
  logic signed [15:0] ang;
  logic signed [7:0]  c, s;

  cordic u_cordic (.clk (clk), .rst (1'b1), .ce (1'b1), .anglevalue (ang), .cos (c), .sin (s));

  // ---- workload 2: top-level transform ----
  logic signed [15:0] g0, g1;
  logic signed [7:0]  x;
  logic signed [23:0] y [8];

  cordic_software_cw u_top (
    .clk (clk), .ce (1'b1), .gateway_in (g0), .gateway_in1 (g1),
    .x0 (x), .x1 (x), .x2 (x), .x3 (x),
    .gateway_out  (y[0]), .gateway_out1 (y[1]), .gateway_out2 (y[2]), .gateway_out3 (y[3]),
    .gateway_out4 (y[4]), .gateway_out5 (y[5]), .gateway_out6 (y[6]), .gateway_out7 (y[7])
  );

  initial begin : watchdog
    repeat (NANG + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iround(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic run_top(input logic signed [15:0] a1);
    g0 = a1;  g1 = 0;  x = 8'sd2;
    repeat (LATT + 1) @(posedge clk);
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (y[k] != ((k == 0) ? 24'sd32768 : 24'sd0)) begin   // 8 * 4096
        failures++;
        $display("gateway_in=%0d output %0d = %0d", a1, k, y[k]);
      end
    end
  endtask

  initial begin
    int maxerr = 0, e;
    logic signed [15:0] a;
    ang = 0;
    repeat (LATC) @(posedge clk);
    for (int n = 0; n < NANG + LATC - 1; n++) begin
      @(negedge clk);
      ang = 16'((n < NANG) ? n : 0);
      @(posedge clk);
      #1;
      if (n >= LATC - 1) begin
        a = 16'(n - (LATC - 1));
        e = iabs(int'(c) - iround(64.0 * $cos(real'(a) / 8192.0)));
        if (iabs(int'(s) - iround(64.0 * $sin(real'(a) / 8192.0))) > e)
          e = iabs(int'(s) - iround(64.0 * $sin(real'(a) / 8192.0)));
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 1) begin
          failures++;
          if (failures < 10) $display("angle %0d: cos=%0d sin=%0d", a, c, s);
        end
      end
    end
    $display("0..180 degree sweep: %0d angles, largest error %0d LSB", NANG, maxerr);

    run_top(16'b0010_1000_0000_0000);
    run_top(16'sd12868);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
