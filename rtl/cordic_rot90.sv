// cordic_rot90: range-extension block (R), an exact rotation by +90 or
// -90 degrees in front of the pseudorotation pipeline.
//
// The circular iterations converge only for angles up to about 1.74 rad.
// This stage turns the vector by a quarter turn, which needs no gain
// correction (it is a swap and a negation), and moves the quarter turn into
// z, so that the iterations only have to cover the remaining angle:
//   rotation mode,  z >  pi/2: (x,y) -> (-y, x), z -> z - pi/2  (+90)
//   rotation mode,  z < -pi/2: (x,y) -> ( y,-x), z -> z + pi/2  (-90)
//   vectoring mode, x < 0, y >= 0: (x,y) -> ( y,-x), z -> z + pi/2  (-90)
//   vectoring mode, x < 0, y <  0: (x,y) -> (-y, x), z -> z - pi/2  (+90)
// Rotation mode thus accepts any z in [-pi, pi] and vectoring mode any
// vector in the plane. Linear and hyperbolic samples pass unchanged.
//
// Interface and timing: one register stage; when en is high the result of
// the current input is loaded, when low the register holds. turn_o tells
// which quarter turn was applied to the sample in the register.
// Rotating by +/-90 degrees to extend the range follows the source design;
// the selection rules above, pi/2 rounded to FRAC bits and the single
// register stage are this design's choices.
module cordic_rot90
  import cordic_pkg::*;
#(
  parameter int W    = 20,  // data width
  parameter int FRAC = 16   // fraction bits
) (
  input  logic                clk,
  input  logic                en,
  input  op_t                 op_i,
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  input  logic signed [W-1:0] z_i,
  output op_t                 op_o,
  output logic signed [W-1:0] x_o,
  output logic signed [W-1:0] y_o,
  output logic signed [W-1:0] z_o,
  output turn_e               turn_o
);

  localparam logic signed [W-1:0] HALF_PI = W'(half_pi_fix(FRAC));

  turn_e               turn;
  logic signed [W-1:0] x_n, y_n, z_n;

  // Choose the quarter turn
  always_comb begin
    turn = TURN_NONE;
    if (op_i.m == CS_CIRCULAR) begin
      if (op_i.mode == MODE_ROTATION) begin
        if (z_i > HALF_PI)       turn = TURN_POS;
        else if (z_i < -HALF_PI) turn = TURN_NEG;
      end else if (x_i[W-1]) begin
        turn = y_i[W-1] ? TURN_POS : TURN_NEG;
      end
    end
  end

  // Apply it
  always_comb begin
    case (turn)
      TURN_POS: begin
        x_n = -y_i;
        y_n = x_i;
        z_n = z_i - HALF_PI;
      end
      TURN_NEG: begin
        x_n = y_i;
        y_n = -x_i;
        z_n = z_i + HALF_PI;
      end
      default: begin
        x_n = x_i;
        y_n = y_i;
        z_n = z_i;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (en) begin
      op_o   <= op_i;
      x_o    <= x_n;
      y_o    <= y_n;
      z_o    <= z_n;
      turn_o <= turn;
    end
  end

endmodule
