// cordic_pseudorot: the pseudorotation block (P), an unrolled, pipelined
// array of N CORDIC elements.
//
// Stage i holds one C.E. (cordic_ce with STAGE = i) followed by a pipeline
// register, so every stage works on a different sample in the same clock
// cycle: C.E. -> Reg -> C.E. -> Reg -> ... The block performs all N
// iterations of eq. (3) and the angle update of eq. (4); it does not
// scale, so x and y leave it multiplied by the gain K_m(N).
// The operation tag (coordinate system and mode) travels with the sample,
// so different functions can follow each other back to back.
//
// The step angles come from outside (the ATR block): m_o[i] tells the ATR
// which coordinate system stage i is working in, and alpha_i[i] returns the
// matching constant in the same cycle.
//
// Interface and timing: when en is high every register loads, so a sample
// presented on op_i/x_i/y_i/z_i appears on the outputs N enabled clock
// edges later; when en is low the whole array holds (stall). Throughput is
// one sample per enabled cycle. The data registers have no reset: which
// stages hold valid samples is tracked by the control block.
// The array-of-elements-with-registers structure follows the source
// design; the enable, the tag pipeline and the absence of a data reset are
// this design's choices.
module cordic_pseudorot
  import cordic_pkg::*;
#(
  parameter int W = 20,  // data width
  parameter int N = 16   // number of iterations (pipeline stages)
) (
  input  logic                clk,
  input  logic                en,
  input  op_t                 op_i,
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  input  logic signed [W-1:0] z_i,
  output coord_e              m_o     [N],  // coordinate system at each C.E.
  input  logic signed [W-1:0] alpha_i [N],  // step angle for each C.E.
  output op_t                 op_o,
  output logic signed [W-1:0] x_o,
  output logic signed [W-1:0] y_o,
  output logic signed [W-1:0] z_o
);

  // Inputs of each C.E. (index i) and pipeline registers (index i+1)
  op_t                 op_s [N+1];
  logic signed [W-1:0] x_s  [N+1];
  logic signed [W-1:0] y_s  [N+1];
  logic signed [W-1:0] z_s  [N+1];

  assign op_s[0] = op_i;
  assign x_s[0]  = x_i;
  assign y_s[0]  = y_i;
  assign z_s[0]  = z_i;

  for (genvar i = 0; i < N; i++) begin : g_stage
    logic signed [W-1:0] x_n, y_n, z_n;

    assign m_o[i] = op_s[i].m;

    cordic_ce #(.W(W), .STAGE(i)) u_ce (
      .op     (op_s[i]),
      .x_i    (x_s[i]),
      .y_i    (y_s[i]),
      .z_i    (z_s[i]),
      .alpha_i(alpha_i[i]),
      .x_o    (x_n),
      .y_o    (y_n),
      .z_o    (z_n)
    );

    always_ff @(posedge clk) begin
      if (en) begin
        op_s[i+1] <= op_s[i];
        x_s[i+1]  <= x_n;
        y_s[i+1]  <= y_n;
        z_s[i+1]  <= z_n;
      end
    end
  end

  assign op_o = op_s[N];
  assign x_o  = x_s[N];
  assign y_o  = y_s[N];
  assign z_o  = z_s[N];

endmodule
