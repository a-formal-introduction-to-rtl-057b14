// alu_model_pkg: reference model of the N-bit ALU for the testbenches (see
// the class alu_model below).
package alu_model_pkg;
// alu_model: reference model of the N-bit ALU for the testbenches.
//
// Computes result, carry and overflow from wide integer arithmetic, not from
// the ALU's structure: sums and differences are formed two bits wider than
// the operands, the carry is the bit above the result (inverted into a borrow
// for subtract-type operations), and signed overflow is flagged when the
// wide signed result does not fit in N bits.
class alu_model #(int unsigned N = 32);
  typedef logic [N-1:0]        word_t;
  typedef logic signed [N+1:0] wide_t;

  static function automatic logic fits(wide_t x);
    wide_t ext;
    ext = wide_t'(signed'(x[N-1:0]));
    return x == ext;
  endfunction

  static function automatic wide_t sx(word_t v);
    return wide_t'(signed'(v));
  endfunction

  static function automatic wide_t zx(word_t v);
    return wide_t'({2'b00, v});
  endfunction

  // Returns {carry, overflow, out}.
  static function automatic logic [N+1:0] eval(logic c, word_t a, word_t b, logic [3:0] op);
    wide_t u, s;
    word_t out;
    logic  cy, ov;
    cy = 1'b0; ov = 1'b0; out = a;
    case (op)
      4'b0001: begin u = zx(a) + 1;          s = sx(a) + 1;          out = u[N-1:0]; cy = u[N];  ov = !fits(s); end
      4'b0010: begin u = zx(a) + zx(b) + wide_t'(c); s = sx(a) + sx(b) + wide_t'(c); out = u[N-1:0]; cy = u[N]; ov = !fits(s); end
      4'b0011: begin u = zx(a) + zx(b);      s = sx(a) + sx(b);      out = u[N-1:0]; cy = u[N];  ov = !fits(s); end
      4'b0100: begin u = 0 - zx(a);          s = 0 - sx(a);          out = u[N-1:0]; cy = (a != 0); ov = !fits(s); end
      4'b0101: begin u = zx(a) - 1;          s = sx(a) - 1;          out = u[N-1:0]; cy = (a == 0); ov = !fits(s); end
      4'b0110: begin u = zx(b) - zx(a) - wide_t'(c); s = sx(b) - sx(a) - wide_t'(c); out = u[N-1:0]; cy = u < 0; ov = !fits(s); end
      4'b0111: begin u = zx(b) - zx(a);      s = sx(b) - sx(a);      out = u[N-1:0]; cy = u < 0; ov = !fits(s); end
      4'b1000: begin out = (a >> 1) | (word_t'(c) << (N-1));      cy = a[0]; end
      4'b1001: begin out = (a >> 1) | (word_t'(a[N-1]) << (N-1)); cy = a[0]; end
      4'b1010: begin out = a >> 1;  cy = a[0]; end
      4'b1011: out = a ^ b;
      4'b1100: out = a | b;
      4'b1101: out = a & b;
      4'b1110: out = ~a;
      default: out = a;
    endcase
    return {cy, ov, out};
  endfunction

  // Operand values worth trying at every width: zero, one, all ones, the
  // most negative and most positive two's-complement numbers.
  static function automatic word_t corner(int k);
    case (k)
      0: return '0;
      1: return word_t'(1);
      2: return '1;
      3: return word_t'(1) << (N-1);
      default: return ~(word_t'(1) << (N-1));
    endcase
  endfunction

  static function automatic word_t random_word();
    word_t v;
    for (int i = 0; i < N; i += 32) v = (v << 32) | word_t'($urandom);
    return v;
  endfunction
endclass
endpackage
