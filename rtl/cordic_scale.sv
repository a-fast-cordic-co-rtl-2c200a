// cordic_scale: scaling block (S), a pipelined constant multiplier that
// removes the CORDIC gain from x and y.
//
// After N pseudorotations x and y are K_m(N) times too long (eq. 5). This
// block multiplies both by C = 1/K_m(N), chosen per sample by its
// coordinate system:
//   circular    C = 1/prod sqrt(1 + 2^-2S(1,i))   ~ 0.6073
//   hyperbolic  C = 1/prod sqrt(1 - 2^-2S(-1,i))  ~ 1.2075
//   linear      C = 1 (no gain)
// C is held as an unsigned number with FRAC fraction bits and one integer
// bit (NB = FRAC+1 bits). The product is built as a shift-and-add array:
// stage j adds x*2^j (a fixed shift) to an accumulator when bit j of C is
// set, then a register follows, so no multiplier and no programmable
// shifter is used. The accumulators are wide enough to hold the exact
// product; the result is rounded to nearest once, at the output, and its
// bits above the W-bit output range are dropped (inputs must keep the
// scaled result in range, so those bits are only sign copies). z and the
// operation tag travel alongside unchanged.
//
// Interface and timing: NB register stages; with en high a sample appears
// on the outputs NB enabled edges after it entered, one sample per cycle;
// with en low all stages hold. No data reset: valid tracking is in the
// control block.
// The scaling by 1/K_m(n) as a fast pipelined block follows the source
// design; the one-bit-per-stage shift-and-add form, the rounding and the
// precision of C are this design's choices.
module cordic_scale
  import cordic_pkg::*;
#(
  parameter int W    = 20,  // data width
  parameter int FRAC = 16,  // fraction bits
  parameter int N    = 16   // iterations of the pseudorotation block
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
  output logic signed [W-1:0] z_o
);

  localparam int NB = FRAC + 1;   // bits of the scale constant = stages
  localparam int AW = W + NB + 1; // accumulator width

  localparam logic [NB-1:0] C_CIRC = NB'(inv_gain_fix(CS_CIRCULAR, N, FRAC));
  localparam logic [NB-1:0] C_HYP  = NB'(inv_gain_fix(CS_HYPERBOLIC, N, FRAC));
  localparam logic [NB-1:0] C_LIN  = NB'(inv_gain_fix(CS_LINEAR, N, FRAC));

  op_t                  op_s [NB+1];
  logic signed [W-1:0]  x_s  [NB+1];
  logic signed [W-1:0]  y_s  [NB+1];
  logic signed [W-1:0]  z_s  [NB+1];
  logic signed [AW-1:0] ax_s [NB+1];
  logic signed [AW-1:0] ay_s [NB+1];

  assign op_s[0] = op_i;
  assign x_s[0]  = x_i;
  assign y_s[0]  = y_i;
  assign z_s[0]  = z_i;
  assign ax_s[0] = '0;
  assign ay_s[0] = '0;

  for (genvar j = 0; j < NB; j++) begin : g_stage
    logic                 bit_j;
    logic signed [AW-1:0] ax_n, ay_n;

    always_comb begin
      case (op_s[j].m)
        CS_CIRCULAR:   bit_j = C_CIRC[j];
        CS_HYPERBOLIC: bit_j = C_HYP[j];
        default:       bit_j = C_LIN[j];
      endcase
      ax_n = ax_s[j];
      ay_n = ay_s[j];
      if (bit_j) begin
        ax_n = ax_s[j] + (AW'(x_s[j]) <<< j);
        ay_n = ay_s[j] + (AW'(y_s[j]) <<< j);
      end
    end

    always_ff @(posedge clk) begin
      if (en) begin
        op_s[j+1] <= op_s[j];
        x_s[j+1]  <= x_s[j];
        y_s[j+1]  <= y_s[j];
        z_s[j+1]  <= z_s[j];
        ax_s[j+1] <= ax_n;
        ay_s[j+1] <= ay_n;
      end
    end
  end

  // Round to nearest and drop the FRAC extra fraction bits
  localparam logic signed [AW-1:0] HALF = AW'(1) <<< (FRAC - 1);

  logic signed [AW-1:0] ax_r, ay_r;
  assign ax_r = (ax_s[NB] + HALF) >>> FRAC;
  assign ay_r = (ay_s[NB] + HALF) >>> FRAC;

  assign op_o = op_s[NB];
  assign x_o  = ax_r[W-1:0];
  assign y_o  = ay_r[W-1:0];
  assign z_o  = z_s[NB];

endmodule
