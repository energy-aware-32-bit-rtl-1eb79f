// tb_alu_ref_pkg - reference model of the ALU lanes for the testbenches.
//
// Computes the expected 16-bit lane result with plain integer arithmetic,
// written independently of the RTL: truncation is done by subtracting the
// remainder modulo 16, shifts by multiplying or dividing by powers of two,
// complements by subtracting from 255 or 256.
package tb_alu_ref_pkg;

  typedef enum int { LANE_EXACT = 0, LANE_SEMI = 1, LANE_APX = 2 } lane_kind_e;

  // Is instruction `op` approximated in a lane of this kind?
  function automatic bit is_approx(lane_kind_e kind, int op);
    case (kind)
      LANE_SEMI: return (op == 2) || (op == 4);   // multiply, square
      LANE_APX:  return (op <= 5) || (op == 13);  // all arithmetic, two's complement
      default:   return 0;
    endcase
  endfunction

  function automatic int ref_lane(lane_kind_e kind, int op, int a, int b);
    int x, y, r;
    bit apx;
    apx = is_approx(kind, op);
    x = a;
    y = b;
    if (apx && op <= 5) begin
      x = a - (a % 16);
      y = b - (b % 16);
    end
    case (op)
      0:  r = x + y;
      1:  r = (x - y + 65536) % 65536;
      2:  r = x * y;
      3:  r = (y == 0) ? 255 : x / y;
      4:  r = x * x;
      5:  r = (y == 0) ? x : x % y;
      6:  r = a & b;
      7:  r = a | b;
      8:  r = 255 - (a | b);
      9:  r = 255 - (a & b);
      10: r = a ^ b;
      11: r = 255 - (a ^ b);
      12: r = 255 - a;
      13: r = apx ? 255 - a : (256 - a) % 256;
      14: r = a / (2 ** (b % 8));
      15: r = a * (2 ** (b % 8));
      default: r = -1;
    endcase
    return r;
  endfunction

endpackage
