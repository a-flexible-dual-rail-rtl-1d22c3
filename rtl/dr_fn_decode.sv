// dr_fn_decode: decodes a dual-rail 4-bit FnCode.
//
// Sixteen 4-input C-elements detect the sixteen minterms of the code; once
// the code is valid exactly one line sel[v] rises (v = the code's value) and
// it falls when the code returns to empty. sel[1]..sel[8] steer the function
// blocks of an ALU (the FnCode table in dr_pkg). From the same minterms the
// dual-rail bypass_or_not = FnCode[3] | FnCode[2] | FnCode[1] | FnCode[0] is
// formed: false rail = minterm 0000 (bypass the second ALU), true rail = any
// other minterm.
//
// Interface: code (4-bit dual-rail) in; sel[15:0] (one-hot when valid) and
// bno (dual-rail bypass_or_not) out.
// Timing: combinational with C-element state.
module dr_fn_decode
  import dr_pkg::*;
(
  input  logic [FNW-1:0]     code_t, code_f,
  output logic [2**FNW-1:0]  sel,
  output logic               bno_t, bno_f
);

  for (genvar v = 0; v < 2**FNW; v++) begin : g_min
    logic [FNW-1:0] pick;
    for (genvar i = 0; i < FNW; i++) begin : g_bit
      assign pick[i] = ((v >> i) & 1) != 0 ? code_t[i] : code_f[i];
    end
    c_element #(.N(FNW), .W(1)) u_c (.in(pick), .y(sel[v]));
  end

  assign bno_f = sel[0];
  assign bno_t = |sel[2**FNW-1:1];

endmodule
