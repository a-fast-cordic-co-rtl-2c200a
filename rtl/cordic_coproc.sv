// cordic_coproc: fast pipelined CORDIC co-processor.
//
// One unrolled pipeline evaluates the unified CORDIC algorithm in all
// three coordinate systems (circular, linear, hyperbolic) and both modes
// (rotation, vectoring), chosen per sample, at one result per clock:
//
//   in -> R (quarter turn) -> P (N pseudorotations) -> S (1/K scaling) -> out
//                                  ^
//                                 ATR (step angles for each stage)
//   control: valid bits, handshakes and the common stall enable
//
// Results, for inputs (x0, y0, z0):
//   circular  rotation : x = x0 cos z0 - y0 sin z0, y = y0 cos z0 + x0 sin z0, z ~ 0
//   circular  vectoring: x = sqrt(x0^2 + y0^2),     y ~ 0, z = z0 + atan2(y0, x0)
//   linear    rotation : x = x0, y = y0 + x0 z0,    z ~ 0
//   linear    vectoring: x = x0, y ~ 0,             z = z0 + y0 / x0
//   hyperbolic rotation: x = x0 cosh z0 + y0 sinh z0, y = y0 cosh z0 + x0 sinh z0
//   hyperbolic vectoring: x = sqrt(x0^2 - y0^2), y ~ 0, z = z0 + atanh(y0 / x0)
// Number format: W-bit two's complement with FRAC fraction bits; angles in
// radians. With the defaults (W = 20, FRAC = 16) values lie in [-8, 8).
// Valid ranges: circular rotation |z0| <= pi; linear |z0| <= 1 (rotation)
// and |y0/x0| <= 1 (vectoring); hyperbolic |z0| <= 1.118 (rotation) and
// |y0/x0| <= 0.806 (vectoring, x0 > 0). Keep |x0|, |y0| below about 2 for
// circular work so that the gain of 1.65 cannot overflow.
//
// Interface and timing: valid/ready on input and output. With out_ready
// high a sample is on the outputs LAT = N + FRAC + 2 clock edges after it
// was presented, counting the edge that accepts it (34 with the
// defaults), and a new sample may enter every cycle.
// When a result waits with out_ready low the whole pipeline stalls.
// The R/P/S/ATR split, the pipelined array of CORDIC elements and the
// ATR constants per stage follow the source design; widths, iteration
// count, handshake and the scaling structure are this design's choices.
module cordic_coproc
  import cordic_pkg::*;
#(
  parameter int W    = 20,  // data width
  parameter int FRAC = 16,  // fraction bits
  parameter int N    = 16   // CORDIC iterations
) (
  input  logic                clk,
  input  logic                rst_n,
  // operation from the host processor
  input  logic                in_valid,
  output logic                in_ready,
  input  op_t                 in_op,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  input  logic signed [W-1:0] in_z,
  // result to the host processor
  output logic                out_valid,
  input  logic                out_ready,
  output op_t                 out_op,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y,
  output logic signed [W-1:0] out_z,
  output logic                busy
);

  localparam int LAT = 1 + N + (FRAC + 1);

  logic en;

  cordic_ctrl #(.LAT(LAT)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .en       (en),
    .busy     (busy)
  );

  // R: quarter-turn range extension. r_turn reports the turn applied; the
  // datapath does not need it, it is kept for observation in simulation.
  op_t                 r_op;
  logic signed [W-1:0] r_x, r_y, r_z;
  turn_e               r_turn;

  cordic_rot90 #(.W(W), .FRAC(FRAC)) u_r (
    .clk   (clk),
    .en    (en),
    .op_i  (in_op),
    .x_i   (in_x),
    .y_i   (in_y),
    .z_i   (in_z),
    .op_o  (r_op),
    .x_o   (r_x),
    .y_o   (r_y),
    .z_o   (r_z),
    .turn_o(r_turn)
  );

  // ATR: step angle for every stage of P
  coord_e              stage_m     [N];
  logic signed [W-1:0] stage_alpha [N];

  cordic_atr #(.W(W), .FRAC(FRAC), .N(N)) u_atr (
    .m_i    (stage_m),
    .alpha_o(stage_alpha)
  );

  // P: pseudorotations
  op_t                 p_op;
  logic signed [W-1:0] p_x, p_y, p_z;

  cordic_pseudorot #(.W(W), .N(N)) u_p (
    .clk    (clk),
    .en     (en),
    .op_i   (r_op),
    .x_i    (r_x),
    .y_i    (r_y),
    .z_i    (r_z),
    .m_o    (stage_m),
    .alpha_i(stage_alpha),
    .op_o   (p_op),
    .x_o    (p_x),
    .y_o    (p_y),
    .z_o    (p_z)
  );

  // S: gain correction
  cordic_scale #(.W(W), .FRAC(FRAC), .N(N)) u_s (
    .clk (clk),
    .en  (en),
    .op_i(p_op),
    .x_i (p_x),
    .y_i (p_y),
    .z_i (p_z),
    .op_o(out_op),
    .x_o (out_x),
    .y_o (out_y),
    .z_o (out_z)
  );

endmodule
