// tb_cordic_coproc: end-to-end test of the co-processor at its default
// size (20-bit data, 16 fraction bits, 16 iterations).
//
// Phase 1 sends a single circular rotation into the empty pipeline and
// checks that the result is on the outputs exactly LAT = 34 clock edges
// after it was presented, counting the edge that accepted it.
// Phase 2 streams 4000 random operations, all six kinds mixed back to
// back, with random gaps on the input and random stalls on the output.
// Circular samples use the full angle range (|z| up to pi, vectors in all
// four quadrants), so the quarter-turn stage is exercised both ways.
// Results must come out in order and match the exact functions within
// 5e-4. The test counts how often each mechanism occurred (each operation,
// a +90 and a -90 turn, an output stall, a change of operation between
// consecutive samples, a hyperbolic sample passing the repeated shift
// stages) and counts a failure for any that never happened. Phase 3 checks
// one result per cycle with the output always ready.
`timescale 1ns / 1ps
module tb_cordic_coproc;
  import cordic_pkg::*;
  import tb_cordic_model_pkg::*;

  localparam int W = 20;
  localparam int FRAC = 16;
  localparam int LAT = 34;
  localparam real SC = 2.0 ** FRAC;
  localparam real TOL = 5.0e-4;

  int checks = 0;
  int failures = 0;

  logic                clk = 0;
  logic                rst_n = 1;
  logic                in_valid = 0, in_ready, out_valid, out_ready = 0, busy;
  op_t                 in_op, out_op;
  logic signed [W-1:0] in_x = 0, in_y = 0, in_z = 0, out_x, out_y, out_z;

  cordic_coproc dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_op(in_op),
    .in_x(in_x), .in_y(in_y), .in_z(in_z),
    .out_valid(out_valid), .out_ready(out_ready), .out_op(out_op),
    .out_x(out_x), .out_y(out_y), .out_z(out_z), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters
  int n_op [6];
  int n_turn_pos = 0, n_turn_neg = 0, n_stall = 0, n_switch = 0, n_hyp_repeat = 0;

  typedef struct {
    op_t op;
    real x0, y0, z0;
  } sample_t;
  sample_t q[$];
  int received = 0;

  task automatic check_val(string nm, op_t op, real got, real exp);
    checks++;
    if (got - exp > TOL || exp - got > TOL) begin
      failures++;
      if (failures < 10) $display("%s %s %s: got %f expected %f", nm, op.m.name(),
                                  op.mode.name(), got, exp);
    end
  endtask

  // Scoreboard: compare each delivered result with the oldest sent sample
  always @(posedge clk) begin
    real ex, ey, ez;
    if (rst_n && out_valid && out_ready) begin
      if (q.size() == 0) begin
        failures++;
        $display("result with nothing outstanding");
      end else begin
        ref_result(q[0].op, q[0].x0, q[0].y0, q[0].z0, 1'b0, ex, ey, ez);
        checks++;
        if (out_op != q[0].op) failures++;
        check_val("x", q[0].op, out_x / SC, ex);
        check_val("y", q[0].op, out_y / SC, ey);
        check_val("z", q[0].op, out_z / SC, ez);
        void'(q.pop_front());
        received++;
      end
    end
    if (rst_n && out_valid && !out_ready) n_stall++;
    // quarter turns and hyperbolic repeat stages, seen inside the pipeline
    if (rst_n && dut.en && dut.u_ctrl.vld[0]) begin
      if (dut.r_turn == TURN_POS) n_turn_pos++;
      if (dut.r_turn == TURN_NEG) n_turn_neg++;
    end
    if (rst_n && dut.en && dut.u_ctrl.vld[4] && dut.stage_m[4] == CS_HYPERBOLIC) n_hyp_repeat++;
  end

  task automatic drive(op_t op);
    real xr, yr, zr;
    gen_input(op, 1'b1, xr, yr, zr);
    in_op = op;
    in_x = W'(int'(xr * SC));
    in_y = W'(int'(yr * SC));
    in_z = W'(int'(zr * SC));
  endtask

  initial begin
    op_t op, last_op;
    int  lat;
    in_op = '0;
    #1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;

    // Phase 1: latency of a single sample
    out_ready = 1;
    op = '{CS_CIRCULAR, MODE_ROTATION};
    drive(op);
    in_valid = 1;
    #1;
    checks++;
    if (!in_ready) failures++;
    @(posedge clk);
    q.push_back('{op, in_x / SC, in_y / SC, in_z / SC});
    #1;
    in_valid = 0;
    lat = 1;  // the accepting edge counts
    while (!out_valid && lat < 100) begin
      @(posedge clk);
      lat++;
      #1;
    end
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", lat, LAT);
    end
    @(posedge clk);
    #1;

    // Phase 2: mixed stream with gaps and stalls
    last_op = op;
    for (int t = 0; t < 4000; t++) begin
      int k;
      k = $urandom_range(0, 5);
      op.m = (k < 2) ? CS_CIRCULAR : (k < 4) ? CS_LINEAR : CS_HYPERBOLIC;
      op.mode = mode_e'(k % 2);
      drive(op);
      in_valid  = ($urandom_range(0, 4) != 0);
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      while (in_valid && !in_ready) begin
        @(posedge clk);
        #1;
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
      end
      @(posedge clk);
      if (in_valid) begin
        q.push_back('{op, in_x / SC, in_y / SC, in_z / SC});
        n_op[k]++;
        if (op != last_op) n_switch++;
        last_op = op;
      end
      #1;
    end

    // Phase 3: drain with the output always ready, then full-rate burst
    in_valid = 0;
    out_ready = 1;
    repeat (LAT + 2) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0 || busy) begin
      failures++;
      $display("%0d results missing after drain", q.size());
    end
    begin
      int r0;
      r0 = received;
      for (int t = 0; t < 200; t++) begin
        op = '{CS_LINEAR, MODE_ROTATION};
        drive(op);
        in_valid = 1;
        #1;
        checks++;
        if (!in_ready) failures++;
        @(posedge clk);
        q.push_back('{op, in_x / SC, in_y / SC, in_z / SC});
        #1;
      end
      in_valid = 0;
      repeat (LAT) @(posedge clk);
      #1;
      checks++;
      if (received - r0 != 200) begin
        failures++;
        $display("burst: %0d of 200 results in %0d cycles", received - r0, 200 + LAT);
      end
    end

    // Every mechanism must have happened
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_op[k] == 0) begin
        failures++;
        $display("operation %0d never issued", k);
      end
    end
    checks++;
    if (n_turn_pos == 0 || n_turn_neg == 0 || n_stall == 0 || n_switch == 0 ||
        n_hyp_repeat == 0) failures++;
    $display("ops: circ rot %0d vec %0d, lin rot %0d vec %0d, hyp rot %0d vec %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5]);
    $display("turns +90 %0d -90 %0d, stall cycles %0d, op changes %0d, hyp repeat %0d",
             n_turn_pos, n_turn_neg, n_stall, n_switch, n_hyp_repeat);
    $display("results received %0d", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
