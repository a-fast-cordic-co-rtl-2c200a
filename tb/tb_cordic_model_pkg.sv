// tb_cordic_model_pkg: reference model and stimulus for the CORDIC tests.
//
// ref_result() gives the mathematically exact result of each of the six
// operations with real arithmetic ($cos, $sinh, $atan2, ...), optionally
// multiplied by the CORDIC gain K_m(16) so it can be compared with the
// pseudorotation block alone. gen_input() draws random operands inside
// the convergence range of each operation; with wide = 1 circular samples
// use the full angle range that the quarter-turn stage makes possible.
package tb_cordic_model_pkg;
  import cordic_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int HYP_SHIFT [16] = '{1, 2, 3, 4, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 13, 14};

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * ($urandom_range(0, 1000000) / 1000000.0);
  endfunction

  function automatic real gain(coord_e m, int n);
    real k = 1.0;
    for (int i = 0; i < n; i++) begin
      if (m == CS_CIRCULAR)   k = k * $sqrt(1.0 + 2.0 ** (-2 * i));
      if (m == CS_HYPERBOLIC) k = k * $sqrt(1.0 - 2.0 ** (-2 * HYP_SHIFT[i]));
    end
    return k;
  endfunction

  function automatic real atanh_r(real v);
    return 0.5 * $ln((1.0 + v) / (1.0 - v));
  endfunction

  task automatic gen_input(input op_t op, input bit wide, output real x, output real y,
                           output real z);
    real r;
    case ({op.m, op.mode})
      {CS_CIRCULAR, MODE_ROTATION}: begin
        x = rnd(-1.0, 1.0); y = rnd(-1.0, 1.0);
        z = wide ? rnd(-PI, PI) : rnd(-1.5, 1.5);
      end
      {CS_CIRCULAR, MODE_VECTORING}: begin
        x = wide ? rnd(-1.0, 1.0) : rnd(0.1, 1.0); y = rnd(-1.0, 1.0);
        if (x < 0.05 && x > -0.05) x = 0.5;
        z = rnd(-0.5, 0.5);
      end
      {CS_LINEAR, MODE_ROTATION}: begin
        x = rnd(-1.0, 1.0); y = rnd(-1.0, 1.0); z = rnd(-0.99, 0.99);
      end
      {CS_LINEAR, MODE_VECTORING}: begin
        x = rnd(0.3, 1.0); r = rnd(-0.95, 0.95); y = r * x; z = rnd(-0.5, 0.5);
      end
      {CS_HYPERBOLIC, MODE_ROTATION}: begin
        x = rnd(0.5, 1.0); y = rnd(-0.4, 0.4); z = rnd(-1.1, 1.1);
      end
      default: begin
        x = rnd(0.3, 1.0); r = rnd(-0.8, 0.8); y = r * x; z = rnd(-0.2, 0.2);
      end
    endcase
  endtask

  task automatic ref_result(input op_t op, input real x0, input real y0, input real z0,
                            input bit with_gain, output real x, output real y, output real z);
    real k;
    k = with_gain ? gain(op.m, 16) : 1.0;
    case ({op.m, op.mode})
      {CS_CIRCULAR, MODE_ROTATION}: begin
        x = k * (x0 * $cos(z0) - y0 * $sin(z0));
        y = k * (y0 * $cos(z0) + x0 * $sin(z0));
        z = 0.0;
      end
      {CS_CIRCULAR, MODE_VECTORING}: begin
        x = k * $sqrt(x0 * x0 + y0 * y0);
        y = 0.0;
        z = z0 + $atan2(y0, x0);
      end
      {CS_LINEAR, MODE_ROTATION}: begin
        x = x0; y = y0 + x0 * z0; z = 0.0;
      end
      {CS_LINEAR, MODE_VECTORING}: begin
        x = x0; y = 0.0; z = z0 + y0 / x0;
      end
      {CS_HYPERBOLIC, MODE_ROTATION}: begin
        x = k * (x0 * $cosh(z0) + y0 * $sinh(z0));
        y = k * (y0 * $cosh(z0) + x0 * $sinh(z0));
        z = 0.0;
      end
      default: begin
        x = k * $sqrt(x0 * x0 - y0 * y0);
        y = 0.0;
        z = z0 + atanh_r(y0 / x0);
      end
    endcase
  endtask

endpackage
