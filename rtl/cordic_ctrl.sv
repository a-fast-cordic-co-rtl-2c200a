// cordic_ctrl: system control logic of the co-processor.
//
// The datapath (R, P and S blocks) is a plain register pipeline of LAT
// stages that moves only when its common enable is high. This block keeps
// one valid bit per pipeline stage and generates that enable:
//   en = !out_valid || out_ready
// so the pipeline advances every cycle except when a finished result sits
// at the output and the host has not taken it; then every stage holds
// (stall) and no input is accepted. Bubbles are not squeezed out during a
// stall, which keeps the control to one gate and a shift register.
//
// Host side: valid/ready handshakes on both ends. A sample is accepted on
// a clock edge where in_valid && in_ready; a result is delivered on an edge
// where out_valid && out_ready. in_ready equals en. With out_ready held
// high the latency is exactly LAT cycles and the throughput one result per
// cycle. busy is high while any stage holds a sample.
// The source design names this block but does not describe it; the
// handshake, the stall rule and the valid shift register are this design's
// choices.
module cordic_ctrl #(
  parameter int LAT = 34  // pipeline depth of R + P + S
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic out_valid,
  input  logic out_ready,
  output logic en,
  output logic busy
);

  logic [LAT-1:0] vld;

  assign out_valid = vld[LAT-1];
  assign en        = ~out_valid | out_ready;
  assign in_ready  = en;
  assign busy      = |vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vld <= '0;
    else if (en) vld <= {vld[LAT-2:0], in_valid};
  end

  // A result that is not taken stays at the output
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            out_valid && !out_ready |=> out_valid);

endmodule
