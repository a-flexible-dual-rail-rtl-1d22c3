// dr_cla_dmod: the "D module" of the delay-insensitive carry-lookahead adder.
//
// It merges the one-hot codes of two adjacent bit groups, an upper group
// [i:j] and a lower group [j-1:k], into the code of [i:k]:
//   P(i,k) = P(i,j) P(j-1,k)
//   K(i,k) = K(i,j) + P(i,j) K(j-1,k)
//   G(i,k) = G(i,j) + P(i,j) G(j-1,k)
// and, from the carry C_k into the lower group, returns the carry into the
// upper group:
//   C_j^0 = K(j-1,k) + P(j-1,k) C_k^0,   C_j^1 = G(j-1,k) + P(j-1,k) C_k^1.
// Products are C-elements, sums OR gates. A group that kills or generates
// produces its carry without waiting for C_k, which is where the adder's
// data-dependent (average-case) speed comes from.
//
// Interface: upper code (hk,hg,hp), lower code (lk,lg,lp), carry ck in;
// merged code (ok,og,op) and carry cj out. All single wires.
// Timing: combinational with C-element state.
module dr_cla_dmod (
  input  logic hk, hg, hp,
  input  logic lk, lg, lp,
  input  logic ck_t, ck_f,
  output logic ok, og, op,
  output logic cj_t, cj_f
);

  logic pk, pg, cp0, cp1;

  c_element #(.N(2), .W(1)) u_pp (.in({hp, lp}),   .y(op));
  c_element #(.N(2), .W(1)) u_pk (.in({hp, lk}),   .y(pk));
  c_element #(.N(2), .W(1)) u_pg (.in({hp, lg}),   .y(pg));
  c_element #(.N(2), .W(1)) u_c0 (.in({lp, ck_f}), .y(cp0));
  c_element #(.N(2), .W(1)) u_c1 (.in({lp, ck_t}), .y(cp1));

  assign ok   = hk | pk;
  assign og   = hg | pg;
  assign cj_f = lk | cp0;
  assign cj_t = lg | cp1;

endmodule
