// tb_cordic: self-checking test of the pipelined CORDIC.
// - reset (active low) clears the outputs;
// - a stream of angles, one per enabled cycle, with random clock-enable gaps;
//   each output pair is matched with the angle applied ITER + 2 enabled
//   cycles earlier, which checks the latency and the stall behaviour;
// - cos/sin must be within one LSB of round(64 * cos/sin(angle / 8192)), and
//   exact at 0, +-pi/2 and pi;
// - angles cover 0..180 degrees, the negative half circle and the [-4, 4) rad
//   ends of the input range.
module tb_cordic;

  localparam int ITER = 9;
  localparam int LAT  = ITER + 2;
  localparam int NANG = 3000;

  logic               clk = 0;
  logic               rst;
  logic               ce;
  logic signed [15:0] ang;
  logic signed [7:0]  cos_o, sin_o;

  int checks = 0, failures = 0;
  int stalls = 0, folds = 0;

  cordic #(.ITER(ITER)) u_dut (
    .clk (clk), .rst (rst), .ce (ce), .anglevalue (ang), .cos (cos_o), .sin (sin_o)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20 * NANG) @(posedge clk);
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

  logic signed [15:0] hist [$];   // angles accepted on enabled edges
  logic signed [7:0]  last_cos, last_sin;

  task automatic check_out(logic signed [15:0] a);
    real th;
    int ec, es, tol;
    th  = real'(a) / 8192.0;
    ec  = iround(64.0 * $cos(th));
    es  = iround(64.0 * $sin(th));
    tol = (a == 0 || a == 16'sd12868 || a == -16'sd12868 || a == 16'sd25736) ? 0 : 1;
    checks++;
    if (iabs(int'(cos_o) - ec) > tol || iabs(int'(sin_o) - es) > tol) begin
      failures++;
      if (failures < 10)
        $display("angle %0d: got cos=%0d sin=%0d, expected %0d %0d (+-%0d)",
                 a, cos_o, sin_o, ec, es, tol);
    end
  endtask

  function automatic logic signed [15:0] pick_angle(int n);
    case (n)
      0: return 16'sd0;
      1: return 16'sd12868;       // pi/2
      2: return 16'sd25736;       // pi (180 degrees)
      3: return -16'sd12868;
      4: return 16'sh7FFF;
      5: return 16'sh8000;
      6: return 16'sd6434;        // pi/4
      7: return 16'sd12869;       // just above pi/2
      default:
        if (n % 2 == 0) return 16'($urandom_range(0, 25736));  // 0..180 degrees
        else return 16'($urandom);
    endcase
  endfunction

  initial begin
    int sent = 0;
    rst = 0; ce = 1; ang = 16'sd1000;
    repeat (4) @(posedge clk);
    @(negedge clk);
    checks++;
    if (cos_o != 0 || sin_o != 0) begin
      failures++;
      $display("outputs not cleared by reset");
    end
    // Reset must win over ce: pipeline stays cleared.
    repeat (LAT + 2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (cos_o != 0 || sin_o != 0) failures++;

    rst = 1;
    // Feed NANG angles, then LAT - 1 zero angles to drain the pipeline.
    while (sent < NANG + LAT - 1) begin
      @(negedge clk);
      ce  = (sent < NANG) ? ($urandom_range(0, 3) != 0) : 1'b1;
      ang = (sent < NANG) ? pick_angle(sent) : 16'sd0;
      if (!ce) stalls++;
      last_cos = cos_o;
      last_sin = sin_o;
      @(posedge clk);
      #1;
      if (ce) begin
        hist.push_back(ang);
        if (ang > 16'sd12868 || ang < -16'sd12868) folds++;
        sent++;
        // The angle taken LAT - 1 enabled edges ago is now at the output.
        if (hist.size() == LAT) check_out(hist.pop_front());
      end else begin
        checks++;
        if (cos_o != last_cos || sin_o != last_sin) begin
          failures++;
          $display("output changed while ce was low");
        end
      end
    end
    checks++;
    if (stalls == 0 || folds == 0) begin
      failures++;
      $display("stalls=%0d folds=%0d: a mechanism was not exercised", stalls, folds);
    end
    $display("stalls=%0d folds=%0d", stalls, folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
