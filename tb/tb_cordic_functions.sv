// tb_cordic_functions: elementary functions obtained from the co-processor
// by the choice of initial values, plus the convergence limits of each
// coordinate system.
//
// Most functions are one pass through the default-size pipeline:
//   sin, cos     circular rotation,  x0 = 1,       y0 = 0,       z0 = a
//   atan, |v|    circular vectoring, x0 = 1,       y0 = a,       z0 = 0
//   polar->xy    circular rotation,  x0 = r,       y0 = 0,       z0 = phi
//   multiply     linear rotation,    x0 = a,       y0 = 0,       z0 = b
//   divide       linear vectoring,   x0 = b,       y0 = a,       z0 = 0
//   sinh, cosh   hyperbolic rotation, x0 = 1,      y0 = 0,       z0 = a
//   exp          hyperbolic rotation, x0 = 1,      y0 = 1,       z0 = a  (x = e^a)
//   atanh        hyperbolic vectoring, x0 = 1,     y0 = a,       z0 = 0
//   ln           hyperbolic vectoring, x0 = a+1,   y0 = a-1,     z0 = 0  (2z = ln a)
//   sqrt         hyperbolic vectoring, x0 = a+1/4, y0 = a-1/4,   z0 = 0  (x = sqrt a)
// tan and tanh take two passes: the (cos, sin) or (cosh, sinh) result is
// fed back as a linear vectoring operation, which divides y by x.
// The gain is removed inside the pipeline, so no input is pre-scaled.
// Each result is compared with the exact value; the largest error of each
// function is printed. The last group rotates by angles at 99.9 % of the
// largest angle each system accepts (pi circular, thanks to the quarter
// turn; 1.0 linear; 1.118173 hyperbolic) and checks that the angle is
// still driven to zero.
`timescale 1ns / 1ps
module tb_cordic_functions;
  import cordic_pkg::*;

  localparam int W = 20;
  localparam int FRAC = 16;
  localparam real SC = 2.0 ** FRAC;
  localparam real TOL = 5.0e-4;
  localparam real PI = 3.14159265358979;

  // Largest angle accepted in rotation mode, per coordinate system
  localparam real a_lim [4] = '{1.743287, PI, 1.0, 1.118173};
  localparam coord_e m_lim [4] = '{CS_CIRCULAR, CS_CIRCULAR, CS_LINEAR, CS_HYPERBOLIC};

  int checks = 0;
  int failures = 0;

  logic                clk = 0;
  logic                rst_n = 1;
  logic                in_valid = 0, in_ready, out_valid, out_ready = 1, busy;
  op_t                 in_op, out_op;
  logic signed [W-1:0] in_x = 0, in_y = 0, in_z = 0, out_x, out_y, out_z;

  cordic_coproc dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_op(in_op),
    .in_x(in_x), .in_y(in_y), .in_z(in_z),
    .out_valid(out_valid), .out_ready(out_ready), .out_op(out_op),
    .out_x(out_x), .out_y(out_y), .out_z(out_z), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation, result returned after it leaves the pipeline
  task automatic run(input coord_e m, input mode_e mode, input real x0, input real y0,
                     input real z0, output real x, output real y, output real z);
    in_op = '{m, mode};
    in_x = W'(int'(x0 * SC));
    in_y = W'(int'(y0 * SC));
    in_z = W'(int'(z0 * SC));
    in_valid = 1;
    @(posedge clk);
    #1;
    in_valid = 0;
    while (!out_valid) begin
      @(posedge clk);
      #1;
    end
    x = out_x / SC;
    y = out_y / SC;
    z = out_z / SC;
  endtask

  real max_err [string];

  task automatic check(string fn, real got, real exp);
    real e;
    e = got > exp ? got - exp : exp - got;
    if (!max_err.exists(fn) || e > max_err[fn]) max_err[fn] = e;
    checks++;
    if (e > TOL) begin
      failures++;
      if (failures < 10) $display("%s: got %f expected %f", fn, got, exp);
    end
  endtask

  initial begin
    real a, b, x, y, z;
    #1;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      a = -PI + 2.0 * PI * t / 39.0;
      run(CS_CIRCULAR, MODE_ROTATION, 1.0, 0.0, a, x, y, z);
      check("cos", x, $cos(a));
      check("sin", y, $sin(a));

      a = -4.0 + 8.0 * t / 39.0;
      run(CS_CIRCULAR, MODE_VECTORING, 1.0, a / 2.0, 0.0, x, y, z);
      check("atan", z, $atan(a / 2.0));
      check("magnitude", x, $sqrt(1.0 + a * a / 4.0));

      b = 0.2 + 1.5 * t / 39.0;
      a = -PI + 2.0 * PI * t / 39.0;
      run(CS_CIRCULAR, MODE_ROTATION, b, 0.0, a, x, y, z);
      check("polar to cartesian", x, b * $cos(a));
      check("polar to cartesian", y, b * $sin(a));

      a = -1.5 + 3.0 * t / 39.0;
      b = -0.95 + 1.9 * t / 39.0;
      run(CS_LINEAR, MODE_ROTATION, a, 0.0, b, x, y, z);
      check("multiply", y, a * b);

      b = 0.5 + 1.0 * t / 39.0;
      a = -0.9 * b + 1.8 * b * t / 39.0;
      run(CS_LINEAR, MODE_VECTORING, b, a, 0.0, x, y, z);
      check("divide", z, a / b);

      a = -1.1 + 2.2 * t / 39.0;
      run(CS_HYPERBOLIC, MODE_ROTATION, 1.0, 0.0, a, x, y, z);
      check("cosh", x, $cosh(a));
      check("sinh", y, $sinh(a));
      run(CS_HYPERBOLIC, MODE_ROTATION, 1.0, 1.0, a, x, y, z);
      check("exp", x, $exp(a));

      // two passes: (cos, sin) then a linear division
      a = -0.75 + 1.5 * t / 39.0;
      run(CS_CIRCULAR, MODE_ROTATION, 1.0, 0.0, a, x, y, z);
      run(CS_LINEAR, MODE_VECTORING, x, y, 0.0, x, y, z);
      check("tan (two passes)", z, $tan(a));
      a = -1.1 + 2.2 * t / 39.0;
      run(CS_HYPERBOLIC, MODE_ROTATION, 1.0, 0.0, a, x, y, z);
      run(CS_LINEAR, MODE_VECTORING, x, y, 0.0, x, y, z);
      check("tanh (two passes)", z, $tanh(a));

      a = -0.8 + 1.6 * t / 39.0;
      run(CS_HYPERBOLIC, MODE_VECTORING, 1.0, a, 0.0, x, y, z);
      check("atanh", z, 0.5 * $ln((1.0 + a) / (1.0 - a)));

      a = 0.15 + 2.5 * t / 39.0;
      run(CS_HYPERBOLIC, MODE_VECTORING, a + 1.0, a - 1.0, 0.0, x, y, z);
      check("ln", 2.0 * z, $ln(a));

      a = 0.05 + 2.0 * t / 39.0;
      run(CS_HYPERBOLIC, MODE_VECTORING, a + 0.25, a - 0.25, 0.0, x, y, z);
      check("sqrt", x, $sqrt(a));
    end
    // Convergence limits (the table's maximum angles)
    foreach (a_lim[i]) begin
      for (int s = -1; s <= 1; s += 2) begin
        a = s * 0.999 * a_lim[i];
        run(m_lim[i], MODE_ROTATION, 1.0, 0.0, a, x, y, z);
        check("angle driven to zero at the limit", z, 0.0);
        case (m_lim[i])
          CS_CIRCULAR:   check("sin at the limit", y, $sin(a));
          CS_LINEAR:     check("multiply at the limit", y, a);
          default:       check("sinh at the limit", y, $sinh(a));
        endcase
      end
    end
    foreach (max_err[fn]) $display("%-34s max error %f", fn, max_err[fn]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
