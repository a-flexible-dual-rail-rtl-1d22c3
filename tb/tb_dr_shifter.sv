// tb_dr_shifter: 32-bit right and left dual-rail shifters at their default
// width. The six operations of the shifter table (logical, arithmetic,
// rotate in both directions) for every shift amount and random data,
// against an integer model; checks emptiness before the amount is valid and
// after the inputs return to empty.
module tb_dr_shifter;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int W = 32;
  logic [W-1:0] a_t, a_f, rr_t, rr_f, rl_t, rl_f;
  logic [4:0]   b_t, b_f;
  logic ari_t, ari_f, rot_t, rot_f;

  dr_shifter #(.W(W), .LEFT(1'b0)) u_r (.a_t, .a_f, .b_t, .b_f, .ari_t, .ari_f, .rot_t, .rot_f, .r_t(rr_t), .r_f(rr_f));
  dr_shifter #(.W(W), .LEFT(1'b1)) u_l (.a_t, .a_f, .b_t, .b_f, .ari_t, .ari_f, .rot_t, .rot_f, .r_t(rl_t), .r_f(rl_f));

  task automatic one(input logic [W-1:0] a, input logic [4:0] n, input logic ari, input logic rot);
    logic [W-1:0] er, el;
    er = shr_ref(a, n, ari, rot);
    el = shl_ref(a, n, ari, rot);
    a_t = a; a_f = ~a; ari_t = ari; ari_f = !ari; rot_t = rot; rot_f = !rot;
    #1;
    // only the kept sign bit of an arithmetic left shift may be known early
    check((rr_t | rr_f) == '0 && (rl_t[W-2:0] | rl_f[W-2:0]) == '0, "output before shift amount");
    b_t = n; b_f = ~n;
    #1;
    check(rr_t == er && rr_f == ~er, $sformatf("right a=%h n=%0d ari=%0d rot=%0d got %h exp %h", a, n, ari, rot, rr_t, er));
    check(rl_t == el && rl_f == ~el, $sformatf("left a=%h n=%0d ari=%0d rot=%0d got %h exp %h", a, n, ari, rot, rl_t, el));
    {a_t, a_f, b_t, b_f, ari_t, ari_f, rot_t, rot_f} = '0;
    #1;
    check((rr_t | rr_f | rl_t | rl_f) == '0, "not empty");
  endtask

  initial begin
    {a_t, a_f, b_t, b_f, ari_t, ari_f, rot_t, rot_f} = '0;
    #1;
    for (int n = 0; n < 32; n++)
      for (int op = 0; op < 3; op++) begin
        one(32'h8765_4321, 5'(n), op == 1, op == 2);
        one($urandom, 5'(n), op == 1, op == 2);
      end
    for (int i = 0; i < 500; i++) begin
      int op = $urandom_range(0, 2);
      one($urandom, 5'($urandom), op == 1, op == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
