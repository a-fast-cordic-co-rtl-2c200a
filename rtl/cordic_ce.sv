// cordic_ce: CORDIC element (C.E.), one micro-rotation of the unified
// CORDIC algorithm, purely combinational.
//
// For iteration STAGE it computes
//   x' = x - m * c * 2^-S(m,STAGE) * y
//   y' = y +     c * 2^-S(m,STAGE) * x
//   z' = z -     c * alpha(m,STAGE)
// with three adder/subtractors and two shifters, as a cross-addition of
// the shifted x into y and the shifted y into x. The shift distances are
// fixed for a given stage: each shifter is a three-way choice among
// hard-wired shifts (one per coordinate system), never a barrel shifter.
// The direction c is +1 or -1:
//   rotation mode  c = +1 when z >= 0, else -1        (drives z to 0)
//   vectoring mode c = +1 when x*y < 0, else -1       (drives y to 0)
// The sign of x*y is taken from the two sign bits, so no multiplier is
// needed; y = 0 counts as positive.
//
// Interface: op selects m and the mode; alpha_i is the stage's step angle
// from the ATR block. All values are W-bit two's complement with the same
// binary point. Shifts are arithmetic and truncate towards minus infinity;
// sums wrap on overflow (inputs must respect the range given in the top).
// The equations and the adder/shifter structure follow the source
// algorithm; the sign convention for y = 0 and the truncation are this
// design's choices.
module cordic_ce
  import cordic_pkg::*;
#(
  parameter int W     = 20,  // data width
  parameter int STAGE = 0    // iteration index i
) (
  input  op_t                 op,
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  input  logic signed [W-1:0] z_i,
  input  logic signed [W-1:0] alpha_i,
  output logic signed [W-1:0] x_o,
  output logic signed [W-1:0] y_o,
  output logic signed [W-1:0] z_o
);

  localparam int SH_C = shift_amt(CS_CIRCULAR, STAGE);
  localparam int SH_L = shift_amt(CS_LINEAR, STAGE);
  localparam int SH_H = shift_amt(CS_HYPERBOLIC, STAGE);

  logic signed [W-1:0] xs, ys;  // shifted copies for the cross-addition
  logic                c_pos;   // c = +1 when set, -1 otherwise

  // Fixed shifters, selected by the coordinate system
  always_comb begin
    case (op.m)
      CS_CIRCULAR: begin
        xs = x_i >>> SH_C;
        ys = y_i >>> SH_C;
      end
      CS_LINEAR: begin
        xs = x_i >>> SH_L;
        ys = y_i >>> SH_L;
      end
      default: begin
        xs = x_i >>> SH_H;
        ys = y_i >>> SH_H;
      end
    endcase
  end

  // Direction of this micro-rotation
  always_comb begin
    if (op.mode == MODE_ROTATION) c_pos = ~z_i[W-1];
    else                          c_pos = x_i[W-1] ^ y_i[W-1];
  end

  // Three adder/subtractors
  always_comb begin
    // x: subtract m*c*ys
    case (op.m)
      CS_CIRCULAR:   x_o = c_pos ? x_i - ys : x_i + ys;
      CS_HYPERBOLIC: x_o = c_pos ? x_i + ys : x_i - ys;
      default:       x_o = x_i;
    endcase
    y_o = c_pos ? y_i + xs : y_i - xs;
    z_o = c_pos ? z_i - alpha_i : z_i + alpha_i;
  end

endmodule
