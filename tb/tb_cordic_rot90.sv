// tb_cordic_rot90: self-checking test of the quarter-turn range extension.
//
// Random samples in all coordinate systems and modes pass through the
// stage. For circular samples the test checks what the turn must preserve:
//   rotation:  the vector rotated by z is the same before and after, and
//              afterwards |z| <= pi/2;
//   vectoring: z + atan2(y, x) is the same before and after, and
//              afterwards x >= 0;
// and that x, y are an exact quarter turn of the input (same magnitude,
// no rounding). Linear and hyperbolic samples must pass unchanged. It also
// checks the one-cycle latency and that the register holds while en is low.
`timescale 1ns / 1ps
module tb_cordic_rot90;
  import cordic_pkg::*;

  localparam int W = 20;
  localparam int FRAC = 16;
  localparam real SC = 2.0 ** FRAC;
  localparam real PI = 3.14159265358979;

  int checks = 0;
  int failures = 0;
  int n_pos = 0, n_neg = 0;

  logic                clk = 0;
  logic                en;
  op_t                 op_i, op_o;
  logic signed [W-1:0] x_i, y_i, z_i, x_o, y_o, z_o;
  turn_e               turn;

  cordic_rot90 #(.W(W), .FRAC(FRAC)) dut (
    .clk(clk), .en(en), .op_i(op_i), .x_i(x_i), .y_i(y_i), .z_i(z_i),
    .op_o(op_o), .x_o(x_o), .y_o(y_o), .z_o(z_o), .turn_o(turn)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 10)
      $display("%s: in %s %s x=%0d y=%0d z=%0d out x=%0d y=%0d z=%0d", what, op_i.m.name(),
               op_i.mode.name(), x_i, y_i, z_i, x_o, y_o, z_o);
  endtask

  function automatic real wrap_pi(real a);
    while (a > PI) a = a - 2.0 * PI;
    while (a < -PI) a = a + 2.0 * PI;
    return a;
  endfunction

  initial begin
    real xi, yi, zi, xo, yo, zo, d;
    logic signed [W-1:0] hx, hy, hz;
    op_t hop;
    en = 1;
    for (int t = 0; t < 4000; t++) begin
      case (t % 4)
        0, 1: op_i.m = CS_CIRCULAR;
        2: op_i.m = CS_LINEAR;
        default: op_i.m = CS_HYPERBOLIC;
      endcase
      op_i.mode = mode_e'($urandom_range(0, 1));
      x_i = W'($urandom_range(0, 2 ** 18)) - W'(2 ** 17);
      y_i = W'($urandom_range(0, 2 ** 18)) - W'(2 ** 17);
      z_i = W'(int'(($urandom_range(0, 20000) / 10000.0 - 1.0) * PI * SC));
      en = 1;
      @(posedge clk);
      #1;
      xi = x_i / SC; yi = y_i / SC; zi = z_i / SC;
      xo = x_o / SC; yo = y_o / SC; zo = z_o / SC;
      checks++;
      if (op_o != op_i) fail("tag");
      if (op_i.m != CS_CIRCULAR) begin
        checks++;
        if (x_o != x_i || y_o != y_i || z_o != z_i || turn != TURN_NONE) fail("pass-through");
      end else begin
        // exact quarter turn or identity
        checks++;
        if (!((x_o == x_i && y_o == y_i) || (x_o == -y_i && y_o == x_i) ||
              (x_o == y_i && y_o == -x_i))) fail("not a quarter turn");
        if (op_i.mode == MODE_ROTATION) begin
          // compare the final rotated vectors
          d = (xi * $cos(zi) - yi * $sin(zi)) - (xo * $cos(zo) - yo * $sin(zo));
          checks++;
          if (d > 1e-3 || d < -1e-3) fail("rotation x changed");
          d = (yi * $cos(zi) + xi * $sin(zi)) - (yo * $cos(zo) + xo * $sin(zo));
          checks++;
          if (d > 1e-3 || d < -1e-3) fail("rotation y changed");
          checks++;
          if (zo > PI / 2 + 1e-4 || zo < -PI / 2 - 1e-4) fail("angle not reduced");
        end else begin
          if (!(x_i == 0 && y_i == 0)) begin
            d = wrap_pi((zi + $atan2(yi, xi)) - (zo + $atan2(yo, xo)));
            checks++;
            if (d > 1e-3 || d < -1e-3) fail("vectoring angle changed");
          end
          checks++;
          if (x_o < 0) fail("x still negative");
        end
        if (turn == TURN_POS) n_pos++;
        if (turn == TURN_NEG) n_neg++;
      end
      // hold while en is low
      if (t % 10 == 0) begin
        hx = x_o; hy = y_o; hz = z_o; hop = op_o;
        en = 0;
        x_i = ~x_i; z_i = -z_i;
        @(posedge clk);
        #1;
        checks++;
        if (x_o != hx || y_o != hy || z_o != hz || op_o != hop) fail("no hold");
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++;
      $display("turns: +90 %0d -90 %0d", n_pos, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
