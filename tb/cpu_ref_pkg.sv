// cpu_ref_pkg: reference arithmetic used by the testbenches. The results
// are worked out with integer arithmetic rather than with bit-vector
// operations like the RTL, so that the two can disagree.
package cpu_ref_pkg;

  typedef struct {
    int unsigned result;
    bit z, n, c, v;
  } ref_alu_t;

  // One-bit shift of a 16-bit value, by shift code 0..3
  function automatic int unsigned ref_shift(int unsigned x, int unsigned code);
    case (code)
      0: return x;
      1: return (x * 2) % 65536;
      2: return x / 2;
      default: return (x / 2) + ((x >= 32768) ? 32768 : 0);
    endcase
  endfunction

  function automatic int to_signed16(int unsigned x);
    return (x >= 32768) ? int'(x) - 65536 : int'(x);
  endfunction

  // ALU operation 0..7 on 16-bit values with carry input cin
  function automatic ref_alu_t ref_alu(int unsigned a, int unsigned b,
                                       int unsigned op, bit cin);
    ref_alu_t r;
    int sa, sb, sr;
    int unsigned nb;
    sa = to_signed16(a);
    sb = to_signed16(b);
    nb = 65535 - b;
    r.c = cin;
    r.v = 0;
    case (op)
      0: begin r.result = (a + b) % 65536;       r.c = (a + b) > 65535;
               sr = sa + sb;                      r.v = (sr > 32767) || (sr < -32768); end
      1: begin r.result = (a + 65536 - b) % 65536; r.c = a < b;
               sr = sa - sb;                      r.v = (sr > 32767) || (sr < -32768); end
      2: begin r.result = (a + b + cin) % 65536; r.c = (a + b + cin) > 65535;
               sr = sa + sb + int'(cin);          r.v = (sr > 32767) || (sr < -32768); end
      3: begin r.result = (a + 131072 - b - cin) % 65536; r.c = a < (b + cin);
               sr = sa - sb - int'(cin);          r.v = (sr > 32767) || (sr < -32768); end
      4: r.result = a & b;
      5: r.result = a & nb;
      6: r.result = a | b;
      default: r.result = a | nb;
    endcase
    r.z = (r.result == 0);
    r.n = (r.result >= 32768);
    return r;
  endfunction

  // Instruction encoders
  function automatic logic [15:0] enc_r(int unsigned op3, int unsigned rd,
                                        int unsigned ra, int unsigned sh,
                                        int unsigned rb);
    return {2'b00, op3[2:0], rd[2:0], ra[2:0], sh[1:0], rb[2:0]};
  endfunction

  function automatic logic [15:0] enc_i(bit sub, int unsigned rd,
                                        int unsigned ra, int unsigned imm5);
    return {4'b0100, sub, rd[2:0], ra[2:0], imm5[4:0]};
  endfunction

  function automatic logic [15:0] enc_ld(bit upper, int unsigned rd,
                                         int unsigned imm8);
    return {4'b1000, upper, rd[2:0], imm8[7:0]};
  endfunction

endpackage
