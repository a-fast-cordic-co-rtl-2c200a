// tb_cordic_scale: self-checking test of the gain-correction pipeline.
//
// Random x, y (over the whole input range) and coordinate systems enter
// while the enable drops at random. Each result must equal x/K_m(16) and
// y/K_m(16), with the gain computed here from its product formula, to
// within half an LSB plus the effect of rounding the constant to FRAC bits;
// linear samples (K = 1) must come out unchanged, and z and the tag must
// pass exactly. Each sample must leave after exactly FRAC+1 enabled edges.
`timescale 1ns / 1ps
module tb_cordic_scale;
  import cordic_pkg::*;
  import tb_cordic_model_pkg::*;

  localparam int W = 20;
  localparam int FRAC = 16;
  localparam int N = 16;
  localparam int LAT = FRAC + 1;

  int checks = 0;
  int failures = 0;

  logic                clk = 0;
  logic                en;
  op_t                 op_i, op_o;
  logic signed [W-1:0] x_i, y_i, z_i, x_o, y_o, z_o;

  cordic_scale #(.W(W), .FRAC(FRAC), .N(N)) dut (
    .clk(clk), .en(en), .op_i(op_i), .x_i(x_i), .y_i(y_i), .z_i(z_i),
    .op_o(op_o), .x_o(x_o), .y_o(y_o), .z_o(z_o)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    op_t op;
    int  x, y, z;
    int  age;
  } sample_t;
  sample_t q[$];

  task automatic check_one(string nm, op_t op, int in, logic signed [W-1:0] got);
    real exp, tol;
    exp = real'(in) / gain(op.m, N);
    // half an LSB for the output rounding, half an LSB of C times |in|
    tol = 0.51 + (in < 0 ? -in : in) / (2.0 ** (FRAC + 1));
    checks++;
    if (real'(got) - exp > tol || exp - real'(got) > tol ||
        (op.m == CS_LINEAR && got != W'(in))) begin
      failures++;
      if (failures < 10) $display("%s %s: in %0d got %0d expected %f", nm, op.m.name(), in, got,
                                  exp);
    end
  endtask

  initial begin
    op_t op;
    en = 0;
    op_i = '0; x_i = 0; y_i = 0; z_i = 0;
    for (int t = 0; t < 3000; t++) begin
      case ($urandom_range(0, 2))
        0: op.m = CS_LINEAR;
        1: op.m = CS_CIRCULAR;
        default: op.m = CS_HYPERBOLIC;
      endcase
      op.mode = mode_e'($urandom_range(0, 1));
      op_i = op;
      // hyperbolic gain is > 1: keep its input inside the range
      x_i = W'($urandom_range(0, 2 ** 19 - 1)) - W'(2 ** 18);
      y_i = W'($urandom_range(0, 2 ** 19 - 1)) - W'(2 ** 18);
      if (op.m != CS_HYPERBOLIC && t % 2 == 0) begin
        x_i = W'($urandom);
        y_i = W'($urandom);
      end
      z_i = W'($urandom);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        foreach (q[i]) q[i].age++;
        q.push_back('{op, int'(x_i), int'(y_i), int'(z_i), 1});
      end
      #1;
      if (q.size() > 0 && q[0].age == LAT) begin
        check_one("x", q[0].op, q[0].x, x_o);
        check_one("y", q[0].op, q[0].y, y_o);
        checks++;
        if (z_o != W'(q[0].z) || op_o != q[0].op) failures++;
        void'(q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
