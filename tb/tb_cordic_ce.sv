// tb_cordic_ce: self-checking test of one CORDIC micro-rotation.
//
// Four elements at stages 0, 4, 5 and 14 are driven with random x, y, z
// and step angles in every coordinate system and mode. The expected
// outputs come from the iteration equations evaluated here with real
// arithmetic, using shift distances written out by hand (including the
// repeated hyperbolic shift 4 at stage 4 and 13 at stage 14).
`timescale 1ns / 1ps
module tb_cordic_ce;
  import cordic_pkg::*;

  localparam int W = 20;
  localparam int NS = 4;
  localparam int STAGES [NS] = '{0, 4, 5, 14};
  localparam int SH_C [NS] = '{0, 4, 5, 14};
  localparam int SH_L [NS] = '{1, 5, 6, 15};
  localparam int SH_H [NS] = '{1, 4, 5, 13};

  int checks = 0;
  int failures = 0;

  op_t                 op;
  logic signed [W-1:0] x, y, z, a;
  logic signed [W-1:0] xo [NS];
  logic signed [W-1:0] yo [NS];
  logic signed [W-1:0] zo [NS];

  for (genvar k = 0; k < NS; k++) begin : g_dut
    cordic_ce #(.W(W), .STAGE(STAGES[k])) dut (
      .op(op), .x_i(x), .y_i(y), .z_i(z), .alpha_i(a),
      .x_o(xo[k]), .y_o(yo[k]), .z_o(zo[k])
    );
  end

  function automatic logic signed [W-1:0] wrap(real v);
    longint t;
    t = longint'(v);
    return W'(t);
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, mm, sh, xs, ys, ex, ey, ez;
    for (int t = 0; t < 3000; t++) begin
      case (t % 3)
        0: op.m = CS_CIRCULAR;
        1: op.m = CS_LINEAR;
        default: op.m = CS_HYPERBOLIC;
      endcase
      op.mode = mode_e'((t / 3) % 2);
      x = W'($urandom_range(0, 2 ** 19 - 1)) - W'(2 ** 18);
      y = W'($urandom_range(0, 2 ** 19 - 1)) - W'(2 ** 18);
      z = W'($urandom_range(0, 2 ** 19 - 1)) - W'(2 ** 18);
      a = W'($urandom_range(0, 2 ** 17));
      if (t % 50 == 0) y = 0;
      #1;
      for (int k = 0; k < NS; k++) begin
        case (op.m)
          CS_CIRCULAR: begin sh = SH_C[k]; mm = 1.0; end
          CS_LINEAR:   begin sh = SH_L[k]; mm = 0.0; end
          default:     begin sh = SH_H[k]; mm = -1.0; end
        endcase
        if (op.mode == MODE_ROTATION) c = (z >= 0) ? 1.0 : -1.0;
        else c = ((x < 0) != (y < 0)) ? 1.0 : -1.0;  // y = 0 counts as positive
        xs = $floor(real'(x) / (2.0 ** sh));
        ys = $floor(real'(y) / (2.0 ** sh));
        ex = real'(x) - mm * c * ys;
        ey = real'(y) + c * xs;
        ez = real'(z) - c * real'(a);
        checks++;
        if (xo[k] !== wrap(ex) || yo[k] !== wrap(ey) || zo[k] !== wrap(ez)) begin
          failures++;
          if (failures < 10)
            $display("stage %0d m=%s mode=%s x=%0d y=%0d z=%0d: got %0d %0d %0d exp %0d %0d %0d",
                     STAGES[k], op.m.name(), op.mode.name(), x, y, z,
                     xo[k], yo[k], zo[k], wrap(ex), wrap(ey), wrap(ez));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
