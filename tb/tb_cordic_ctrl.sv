// tb_cordic_ctrl: self-checking test of the pipeline control.
//
// Random in_valid and out_ready drive a 6-stage instance. The test keeps
// its own list of accepted samples with the number of enabled edges each
// has seen, and checks every cycle that out_valid, in_ready and busy agree
// with it: a result appears after exactly LAT enabled edges, stays while
// out_ready is low, and the input is refused exactly during a stall.
// It counts stalls and requires that some happened.
`timescale 1ns / 1ps
module tb_cordic_ctrl;

  localparam int LAT = 6;

  int checks = 0;
  int failures = 0;
  int stalls = 0;
  int delivered = 0;

  logic clk = 0;
  logic rst_n = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, en, busy;

  cordic_ctrl #(.LAT(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .out_valid(out_valid), .out_ready(out_ready), .en(en), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ages[$];

  initial begin
    bit pre_en, pre_in, pre_ov, pre_or;
    bit exp_ov;
    #1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    checks++;
    if (out_valid || busy) failures++;
    for (int t = 0; t < 5000; t++) begin
      in_valid  = ($urandom_range(0, 2) != 0);
      out_ready = (t < 500) ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      exp_ov = (ages.size() > 0 && ages[0] == LAT);
      checks++;
      if (out_valid != exp_ov || in_ready != (!exp_ov || out_ready) || en != in_ready ||
          busy != (ages.size() > 0)) begin
        failures++;
        if (failures < 10)
          $display("t=%0d out_valid=%b exp %b in_ready=%b busy=%b", t, out_valid, exp_ov,
                   in_ready, busy);
      end
      if (out_valid && !out_ready) stalls++;
      pre_en = en; pre_in = in_valid; pre_ov = out_valid; pre_or = out_ready;
      @(posedge clk);
      if (pre_ov && pre_or) begin
        void'(ages.pop_front());
        delivered++;
      end
      if (pre_en) begin
        foreach (ages[i]) ages[i]++;
        if (pre_in) ages.push_back(1);
      end
      #1;
    end
    checks++;
    if (stalls == 0 || delivered < 1000) failures++;
    $display("stalls=%0d delivered=%0d", stalls, delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
