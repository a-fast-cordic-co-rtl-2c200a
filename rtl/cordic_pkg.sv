// cordic_pkg: types and elaboration-time constants shared by the CORDIC
// co-processor.
//
// The unified CORDIC iteration works in one of three coordinate systems
// (m = 1 circular, m = 0 linear, m = -1 hyperbolic) and in one of two
// modes (rotation: drive z to zero; vectoring: drive y to zero). Each
// operation carries these two fields as an op_t tag through the pipeline,
// so consecutive samples may use different functions.
//
// The functions below are evaluated only at elaboration. They give, for
// pipeline stage i:
//   * shift_amt(m, i): the shift sequence S(m,i). Circular 0,1,2,...;
//     linear 1,2,3,...; hyperbolic 1,2,3,4,4,5,...,13,13,14,... where
//     shifts 4, 13, 40, ... (k -> 3k+1) are repeated so that the
//     hyperbolic iteration converges.
//   * atr_fix(m, i, frac): the step angle alpha(m,i) in fixed point with
//     frac fraction bits: atan(2^-S), 2^-S or atanh(2^-S).
//   * inv_gain_fix(m, n, frac): 1/K_m(n), the reciprocal of the product of
//     sqrt(1 + m*2^(-2S(m,i))) over the n iterations, in fixed point.
// Number format everywhere: two's complement, frac fraction bits; angles
// are in radians.
package cordic_pkg;

  // Coordinate system m
  typedef enum logic [1:0] {
    CS_LINEAR     = 2'b00,  // m = 0
    CS_CIRCULAR   = 2'b01,  // m = 1
    CS_HYPERBOLIC = 2'b10   // m = -1
  } coord_e;

  // Computing mode
  typedef enum logic {
    MODE_ROTATION  = 1'b0,  // c_i = sign z(i)
    MODE_VECTORING = 1'b1   // c_i = -sign x(i)y(i)
  } mode_e;

  // Operation tag that travels with every sample
  typedef struct packed {
    coord_e m;
    mode_e  mode;
  } op_t;

  // Quarter turn applied by the range-extension block
  typedef enum logic [1:0] {
    TURN_NONE = 2'b00,
    TURN_POS  = 2'b01,  // +90 degrees: (x, y) -> (-y, x)
    TURN_NEG  = 2'b10   // -90 degrees: (x, y) -> (y, -x)
  } turn_e;

  // Shift sequence S(m,i)
  function automatic int shift_amt(coord_e m, int i);
    int s;
    int rep;
    int k;
    case (m)
      CS_CIRCULAR: return i;
      CS_LINEAR:   return i + 1;
      default: begin
        s   = 1;
        rep = 4;
        k   = 0;
        for (int guard = 0; guard < 4 * i + 8; guard++) begin
          if (k == i) return s;
          k++;
          if (s == rep) begin
            if (k == i) return s;
            k++;
            rep = 3 * rep + 1;
          end
          s++;
        end
        return s;
      end
    endcase
  endfunction

  // Real value of 2^-s
  function automatic real pow2neg(int s);
    real r;
    r = 1.0;
    for (int j = 0; j < s; j++) r = r / 2.0;
    return r;
  endfunction

  // Round a non-negative real to fixed point with frac fraction bits
  function automatic longint to_fix(real v, int frac);
    real scaled;
    scaled = v;
    for (int j = 0; j < frac; j++) scaled = scaled * 2.0;
    return longint'($rtoi(scaled + 0.5));
  endfunction

  // Step angle alpha(m,i)
  function automatic longint atr_fix(coord_e m, int i, int frac);
    real t;
    t = pow2neg(shift_amt(m, i));
    case (m)
      CS_CIRCULAR: return to_fix($atan(t), frac);
      CS_LINEAR:   return to_fix(t, frac);
      default:     return to_fix($atanh(t), frac);
    endcase
  endfunction

  // pi/2 in fixed point
  function automatic longint half_pi_fix(int frac);
    return to_fix(2.0 * $atan(1.0), frac);
  endfunction

  // Reciprocal gain 1/K_m(n)
  function automatic longint inv_gain_fix(coord_e m, int n, int frac);
    real k;
    real t;
    k = 1.0;
    for (int i = 0; i < n; i++) begin
      t = pow2neg(2 * shift_amt(m, i));
      case (m)
        CS_CIRCULAR:   k = k * $sqrt(1.0 + t);
        CS_HYPERBOLIC: k = k * $sqrt(1.0 - t);
        default:       k = k;
      endcase
    end
    return to_fix(1.0 / k, frac);
  endfunction

endpackage
