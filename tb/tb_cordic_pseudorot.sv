// tb_cordic_pseudorot: self-checking test of the pseudorotation pipeline.
//
// The pipeline, fed by the step-angle block, receives a random stream of
// all six operations, back to back, while its enable is dropped at random.
// Every result is compared with the exact function times the CORDIC gain
// K_m(16) (the pipeline does not scale). The first samples rotate by
// angles just inside each system's convergence limit. The test also checks that each
// sample leaves after exactly N enabled clock edges and that every stage
// reports the coordinate system of the sample it holds.
`timescale 1ns / 1ps
module tb_cordic_pseudorot;
  import cordic_pkg::*;
  import tb_cordic_model_pkg::*;

  localparam int W = 20;
  localparam int FRAC = 16;
  localparam int N = 16;
  localparam real SC = 2.0 ** FRAC;
  localparam real TOL = 8.0e-4;

  int checks = 0;
  int failures = 0;
  int done = 0;

  logic                clk = 0;
  logic                en;
  op_t                 op_i, op_o;
  logic signed [W-1:0] x_i, y_i, z_i, x_o, y_o, z_o;
  coord_e              m     [N];
  logic signed [W-1:0] alpha [N];

  cordic_atr #(.W(W), .FRAC(FRAC), .N(N)) u_atr (.m_i(m), .alpha_o(alpha));

  cordic_pseudorot #(.W(W), .N(N)) dut (
    .clk(clk), .en(en), .op_i(op_i), .x_i(x_i), .y_i(y_i), .z_i(z_i),
    .m_o(m), .alpha_i(alpha), .op_o(op_o), .x_o(x_o), .y_o(y_o), .z_o(z_o)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // In-flight samples, oldest first; age counts enabled edges
  typedef struct {
    op_t op;
    real x0, y0, z0;
    int  age;
  } sample_t;
  sample_t q[$];

  task automatic check_val(string nm, op_t op, real got, real exp);
    checks++;
    if (got - exp > TOL || exp - got > TOL) begin
      failures++;
      if (failures < 10) $display("%s %s %s: got %f expected %f", nm, op.m.name(),
                                  op.mode.name(), got, exp);
    end
  endtask

  initial begin
    real xr, yr, zr, ex, ey, ez;
    op_t op;

    en = 0;
    op_i = '0; x_i = 0; y_i = 0; z_i = 0;
    for (int t = 0; t < 3000; t++) begin
      // new stimulus each cycle
      case ($urandom_range(0, 2))
        0: op.m = CS_LINEAR;
        1: op.m = CS_CIRCULAR;
        default: op.m = CS_HYPERBOLIC;
      endcase
      op.mode = mode_e'($urandom_range(0, 1));
      gen_input(op, 1'b0, xr, yr, zr);
      // first samples: rotation at 99.9 % of each system's convergence
      // limit (1.743287 circular, 1.0 linear, 1.118173 hyperbolic)
      if (t < 6) begin
        op.m = coord_e'(t / 2);
        op.mode = MODE_ROTATION;
        xr = 0.8; yr = 0.1;
        zr = (t % 2 ? -0.999 : 0.999) * (t < 2 ? 1.0 : t < 4 ? 1.743287 : 1.118173);
      end
      op_i = op;
      x_i = W'(int'(xr * SC)); y_i = W'(int'(yr * SC)); z_i = W'(int'(zr * SC));
      en = ($urandom_range(0, 3) != 0);
      #1;
      // stage 0 must see the incoming tag, stage N-1 the oldest in flight
      checks++;
      if (m[0] != op.m) failures++;
      if (q.size() >= N - 1 && q[q.size() - (N - 1)].age == N - 1) begin
        checks++;
        if (m[N-1] != q[q.size() - (N - 1)].op.m) failures++;
      end
      @(posedge clk);
      if (en) begin
        foreach (q[i]) q[i].age++;
        q.push_back('{op, x_i / SC, y_i / SC, z_i / SC, 1});
      end
      #1;
      if (q.size() > 0 && q[0].age == N) begin
        ref_result(q[0].op, q[0].x0, q[0].y0, q[0].z0, 1'b1, ex, ey, ez);
        checks++;
        if (op_o != q[0].op) failures++;
        check_val("x", q[0].op, x_o / SC, ex);
        check_val("y", q[0].op, y_o / SC, ey);
        check_val("z", q[0].op, z_o / SC, ez);
        void'(q.pop_front());
        done++;
      end
    end
    checks++;
    if (done < 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
