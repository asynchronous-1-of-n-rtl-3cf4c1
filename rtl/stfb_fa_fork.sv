// stfb_fa_fork: dual-rail single-track full adder built from forks.
//
// The same function as stfb_fa (s = a XOR b XOR ci, co = MAJ(a, b, ci)),
// built the other way: each input channel goes through a 1-to-2 fork, one
// copy of each feeds a three-input XOR for the sum and the other a
// three-input majority gate for the carry. The majority gate still sends
// its carry early when a and b agree. Each fork releases its input as soon
// as it has sent both copies on, so an input is not held until both
// results have left.
// The cost is the fork in front of both gates: two more gate delays on the
// sum and on the carry path, which matters in a carry chain. stfb_fa
// avoids it by sharing one acknowledge between the two gates.
// This structure is the alternative named alongside the full adder; its
// internal channels use st_wire like any other channel, and the gate
// details are those of stfb_xor3 and stfb_maj3.
// Interface: a/a_dn, b/b_dn, ci/ci_dn input wires and pull-downs; s/s_up
// and co/co_up output wires and pull-ups, as in stfb_fa. Timing (cycles =
// gate delays): each result rises 4 cycles after the last input it needs
// (2 in the fork with its internal wire, 2 in the gate).
module stfb_fa_fork
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  a,
  output dr_t  a_dn,
  input  dr_t  b,
  output dr_t  b_dn,
  input  dr_t  ci,
  output dr_t  ci_dn,
  input  dr_t  s,
  output dr_t  s_up,
  input  dr_t  co,
  output dr_t  co_up
);

  // x* feed the sum gate, m* feed the carry gate
  dr_t xa, xa_up, xa_dn, xb, xb_up, xb_dn, xc, xc_up, xc_dn;
  dr_t ma, ma_up, ma_dn, mb, mb_up, mb_dn, mc, mc_up, mc_dn;

  stfb_fork u_fa (.clk, .rst, .l(a),  .l_dn(a_dn),  .ra(xa), .ra_up(xa_up), .rb(ma), .rb_up(ma_up));
  stfb_fork u_fb (.clk, .rst, .l(b),  .l_dn(b_dn),  .ra(xb), .ra_up(xb_up), .rb(mb), .rb_up(mb_up));
  stfb_fork u_fc (.clk, .rst, .l(ci), .l_dn(ci_dn), .ra(xc), .ra_up(xc_up), .rb(mc), .rb_up(mc_up));

  st_wire u_wxa (.clk, .rst, .up(xa_up), .dn(xa_dn), .rail(xa));
  st_wire u_wxb (.clk, .rst, .up(xb_up), .dn(xb_dn), .rail(xb));
  st_wire u_wxc (.clk, .rst, .up(xc_up), .dn(xc_dn), .rail(xc));
  st_wire u_wma (.clk, .rst, .up(ma_up), .dn(ma_dn), .rail(ma));
  st_wire u_wmb (.clk, .rst, .up(mb_up), .dn(mb_dn), .rail(mb));
  st_wire u_wmc (.clk, .rst, .up(mc_up), .dn(mc_dn), .rail(mc));

  stfb_xor3 u_sum (.clk, .rst, .a(xa), .a_dn(xa_dn), .b(xb), .b_dn(xb_dn),
                   .d(xc), .d_dn(xc_dn), .c(s), .c_up(s_up));
  stfb_maj3 u_cry (.clk, .rst, .a(ma), .a_dn(ma_dn), .b(mb), .b_dn(mb_dn),
                   .d(mc), .d_dn(mc_dn), .c(co), .c_up(co_up));

endmodule
