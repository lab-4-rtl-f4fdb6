// alu_ref_pkg: reference model of the ALU for the testbenches.
//
// alu_ref() works out result and flags for a word of w bits (w <= 32) from
// integer arithmetic and bit-by-bit loops, independently of how the RTL
// computes them: operands are read as two's-complement numbers, a result is
// the answer modulo 2**w, ovf is set when the exact signed answer of ADD,
// SUB, MULT, INC, DEC or SHL_ARTH lies outside [-2**(w-1), 2**(w-1)-1],
// neg is bit w-1 of the result and zro is set for an all-zero result.
package alu_ref_pkg;
  import micro_pk::*;

  function automatic longint sext(input logic [63:0] v, input int w);
    longint r;
    r = longint'(v & ((64'd1 << w) - 1));
    if (v[w-1]) r = r - (longint'(1) << w);
    return r;
  endfunction

  function automatic bit out_of_range(input longint v, input int w);
    return (v > (longint'(1) << (w-1)) - 1) || (v < -(longint'(1) << (w-1)));
  endfunction

  function automatic void alu_ref(input int w, input alu_op_e op,
                                  input logic [63:0] a, input logic [63:0] b,
                                  input int cnt,
                                  output logic [63:0] res,
                                  output cond_flags_t fl);
    longint sa, sb, exact;
    bit     ovf;
    logic [63:0] mask;
    mask  = (64'd1 << w) - 1;
    sa    = sext(a, w);
    sb    = sext(b, w);
    ovf   = 1'b0;
    res   = '0;
    exact = 0;
    case (op)
      ADD_OP:  begin exact = sa + sb; ovf = out_of_range(exact, w); res = 64'(exact); end
      SUB_OP:  begin exact = sa - sb; ovf = out_of_range(exact, w); res = 64'(exact); end
      MULT_OP: begin exact = sa * sb; ovf = out_of_range(exact, w); res = 64'(exact); end
      INC_OP:  begin exact = sa + 1;  ovf = out_of_range(exact, w); res = 64'(exact); end
      DEC_OP:  begin exact = sa - 1;  ovf = out_of_range(exact, w); res = 64'(exact); end
      AND_OP:  res = a & b;
      OR_OP:   res = a | b;
      XOR_OP:  res = a ^ b;
      INV_OP:  res = ~a;
      ZRO_OP:  res = '0;
      PASS_A:  res = a;
      PASS_B:  res = b;
      SHR_ARTH: for (int i = 0; i < w; i++) res[i] = (i + cnt < w) ? a[i+cnt] : a[w-1];
      SHR_LGC:  for (int i = 0; i < w; i++) res[i] = (i + cnt < w) ? a[i+cnt] : 1'b0;
      SHL_LGC:  for (int i = 0; i < w; i++) res[i] = (i >= cnt) ? a[i-cnt] : 1'b0;
      SHL_ARTH: begin
        for (int i = 0; i < w - 1; i++) res[i] = (i >= cnt) ? a[i-cnt] : 1'b0;
        res[w-1] = a[w-1];
        if (cnt >= w) ovf = sa != 0;
        else          ovf = out_of_range(sa * (longint'(1) << cnt), w);
      end
      ROTR: for (int i = 0; i < w; i++) res[i] = a[(i + cnt) % w];
      ROTL: for (int i = 0; i < w; i++) res[(i + cnt) % w] = a[i];
      default: res = '0;   // DIV_OP, REM_OP are not implemented
    endcase
    res    = res & mask;
    fl.neg = res[w-1];
    fl.ovf = ovf;
    fl.zro = res == 0;
  endfunction
endpackage
