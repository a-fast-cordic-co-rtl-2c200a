// tb_cordic_atr: self-checking test of the step-angle constants.
//
// Every stage is set to each coordinate system in turn (and to a random
// mix), and its constant is compared with atan(2^-s), 2^-s or atanh(2^-s)
// computed here, where s is the shift sequence written out by hand:
// circular 0..15, linear 1..16, hyperbolic 1,2,3,4,4,5,...,13,13,14.
// A constant may differ from the exact value by at most half an LSB.
`timescale 1ns / 1ps
module tb_cordic_atr;
  import cordic_pkg::*;

  localparam int W = 20;
  localparam int FRAC = 16;
  localparam int N = 16;
  localparam int SH_H [N] = '{1, 2, 3, 4, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 13, 14};

  int checks = 0;
  int failures = 0;

  coord_e              m     [N];
  logic signed [W-1:0] alpha [N];

  cordic_atr #(.W(W), .FRAC(FRAC), .N(N)) dut (.m_i(m), .alpha_o(alpha));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(coord_e mm, int i);
    real t;
    case (mm)
      CS_CIRCULAR: begin t = 2.0 ** (-i); return $atan(t); end
      CS_LINEAR:   begin t = 2.0 ** (-(i + 1)); return t; end
      default:     begin t = 2.0 ** (-SH_H[i]); return $atanh(t); end
    endcase
  endfunction

  initial begin
    real err;
    for (int pass = 0; pass < 43; pass++) begin
      for (int i = 0; i < N; i++) begin
        if (pass < 3) m[i] = coord_e'(pass);
        else begin
          case ($urandom_range(0, 2))
            0: m[i] = CS_LINEAR;
            1: m[i] = CS_CIRCULAR;
            default: m[i] = CS_HYPERBOLIC;
          endcase
        end
      end
      #1;
      for (int i = 0; i < N; i++) begin
        err = real'(alpha[i]) / (2.0 ** FRAC) - expected(m[i], i);
        checks++;
        if (err > 0.5 / (2.0 ** FRAC) || err < -0.5 / (2.0 ** FRAC)) begin
          failures++;
          if (failures < 10)
            $display("stage %0d %s: got %0d expected %f", i, m[i].name(), alpha[i],
                     expected(m[i], i) * (2.0 ** FRAC));
        end
      end
    end
    // spot values: atan(1) = pi/4, atanh(1/2) = 0.549306
    m[0] = CS_CIRCULAR;
    #1;
    checks++;
    if (alpha[0] !== 20'sd51472) failures++;
    m[0] = CS_HYPERBOLIC;
    #1;
    checks++;
    if (alpha[0] !== 20'sd35999) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
