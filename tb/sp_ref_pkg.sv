// sp_ref_pkg: reference model of the ALU for the testbenches. It states
// each operation of the instruction set in integer arithmetic, separately
// from the RTL: sums and differences modulo 512, products modulo 2^yw,
// byte-wide logic and one-position shifts, compare as {a>b, a==b, a<b}.
package sp_ref_pkg;
  function automatic int alu_ref(input int op, input int a, input int b, input int yw);
    int msb, lsb, r;
    msb = a / 128; lsb = a % 2;
    case (op)
      0:  r = (a + b) % 512;
      1:  r = (a - b + 512) % 512;
      2:  r = (a + 1) % 512;
      3:  r = (a - 1 + 512) % 512;
      4:  r = (a * b) % (1 << yw);
      5:  r = (a * a) % (1 << yw);
      6:  r = a ^ b;
      7:  r = 255 - (a ^ b);
      8:  r = a & b;
      9:  r = 255 - (a & b);
      10: r = 255 - (a | b);
      11: r = a | b;
      12: r = 255 - a;
      13: r = ((a % 64) * 2) + 128 * msb;
      14: r = a / 2 + 128 * msb;
      15: r = (a * 2) % 256 + msb;
      16: r = a / 2 + 128 * lsb;
      17: r = a > b ? 4 : (a == b ? 2 : 1);
      18: r = (a * 2) % 256;
      19: r = a / 2;
      20: r = (a + b + 1) % 512;
      21: r = (a - b + 1 + 512) % 512;
      default: r = 0;
    endcase
    return r;
  endfunction
endpackage
