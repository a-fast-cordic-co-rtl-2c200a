// cordic_atr: arc tangent radix (ATR) constants, the step angle of every
// pipeline stage.
//
// Each of the N pseudorotation stages gets its own constant, chosen by the
// coordinate system of the sample that currently occupies that stage:
//   circular    alpha = atan(2^-S(1,i))
//   linear      alpha = 2^-S(0,i)
//   hyperbolic  alpha = atanh(2^-S(-1,i))
// The three tables are computed at elaboration (cordic_pkg::atr_fix,
// rounded to nearest with FRAC fraction bits) and stored as hard-wired
// constants per stage, so no shared ROM or address decoder is needed: the
// logic per stage is a three-input multiplexer. Delivering each stage its
// own constants instead of reading a ROM follows the source design; the
// rounding and the per-stage multiplexer are this design's choices.
//
// Interface: m_i[i] is the coordinate system in stage i, alpha_o[i] the
// step angle for it. Purely combinational.
module cordic_atr
  import cordic_pkg::*;
#(
  parameter int W    = 20,  // data width
  parameter int FRAC = 16,  // fraction bits
  parameter int N    = 16   // number of iterations
) (
  input  coord_e              m_i     [N],
  output logic signed [W-1:0] alpha_o [N]
);

  for (genvar i = 0; i < N; i++) begin : g_stage
    localparam logic signed [W-1:0] A_CIRC = W'(atr_fix(CS_CIRCULAR, i, FRAC));
    localparam logic signed [W-1:0] A_LIN  = W'(atr_fix(CS_LINEAR, i, FRAC));
    localparam logic signed [W-1:0] A_HYP  = W'(atr_fix(CS_HYPERBOLIC, i, FRAC));

    always_comb begin
      case (m_i[i])
        CS_CIRCULAR: alpha_o[i] = A_CIRC;
        CS_LINEAR:   alpha_o[i] = A_LIN;
        default:     alpha_o[i] = A_HYP;
      endcase
    end
  end

endmodule
