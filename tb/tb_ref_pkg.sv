// tb_ref_pkg: plain integer reference model of the ALU operations, used by
// the testbenches to work out expected results independently of the RTL.
package tb_ref_pkg;

  import dr_pkg::*;

  function automatic logic [31:0] shl_ref(logic [31:0] a, logic [4:0] n, logic ari, logic rot);
    logic [31:0] r;
    r = rot ? ((a << n) | (n == 0 ? 32'd0 : a >> (32 - n))) : (a << n);
    if (ari) r[31] = a[31];
    return r;
  endfunction

  function automatic logic [31:0] shr_ref(logic [31:0] a, logic [4:0] n, logic ari, logic rot);
    if (rot) return (a >> n) | (n == 0 ? 32'd0 : a << (32 - n));
    if (ari) return 32'($signed(a) >>> n);
    return a >> n;
  endfunction

  // One ALU: code 0001..1000, mode[0] = subtract / arithmetic, mode[1] = rotate.
  function automatic logic [31:0] alu_ref(logic [3:0] code, logic [1:0] mode,
                                          logic [31:0] a, logic [31:0] b);
    case (code)
      FN_ADDSUB: return mode[0] ? a - b : a + b;
      FN_MUL:    return {16'd0, a[15:0]} * {16'd0, b[15:0]};
      FN_AND:    return a & b;
      FN_OR:     return a | b;
      FN_NOT:    return ~a;
      FN_XOR:    return a ^ b;
      FN_SHL:    return shl_ref(a, b[4:0], mode[0], mode[1]);
      FN_SHR:    return shr_ref(a, b[4:0], mode[0], mode[1]);
      default:   return 32'hDEAD_BEEF;
    endcase
  endfunction

  // Whole two-stage ALU.
  function automatic logic [31:0] flex_ref(logic [3:0] fn1, logic [1:0] m1,
                                           logic [3:0] fn2, logic [1:0] m2,
                                           logic [31:0] s1, logic [31:0] s2, logic [31:0] s3);
    logic [31:0] r1;
    r1 = alu_ref(fn1, m1, s1, s2);
    return fn2 == 4'd0 ? r1 : alu_ref(fn2, m2, r1, s3);
  endfunction

  // Random mode that avoids the undefined rotate + arithmetic pair.
  function automatic logic [1:0] pick_mode();
    logic [1:0] m;
    m = 2'($urandom_range(0, 2));
    return m;
  endfunction

endpackage
