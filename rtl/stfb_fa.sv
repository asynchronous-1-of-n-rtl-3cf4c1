// stfb_fa: dual-rail single-track full adder with early carry.
//
// Adds the bits on channels a, b and ci and sends the sum on s and the
// carry on co. Both results are computed in parallel, and the three inputs
// are acknowledged together once both have been sent.
//  - Sum: a three-input XOR. S0s (S1s) is discharged when a, b and ci are
//    all present with even (odd) parity, footed by /As and Bs.
//  - Carry: a three-input majority. S1c is discharged by a1 b1, a1 b0 ci1
//    or a0 b1 ci1; S0c by a0 b0, a0 b1 ci0 or a1 b0 ci0; footed by /Ac and
//    Bc. When a and b agree the carry leaves before ci has arrived.
//  - A low S node pulls the matching output rail high. Bs = NOR(s0, s1,
//    Reset) and Bc = NOR(co0, co1, Reset) precharge the S nodes.
//  - As (Ac) is a dynamic node set by a low S0s or S1s (S0c or S1c) and
//    discharged by the acknowledge. /As and /Ac stop a second evaluation.
//  - ack = NAND(NAND(As, Ac), /Reset) is high once both results have been
//    sent. It pulls a, b and ci low and discharges As and Ac.
// The pull-down networks and the acknowledge path follow the full adder's
// transistor diagrams; the unit-delay registers and synchronous reset are
// choices of this model.
// Interface: a/a_dn, b/b_dn, ci/ci_dn input wires and pull-downs; s/s_up and
// co/co_up output wires and pull-ups. Timing (cycles = gate delays): each
// result rises 2 cycles after the last input it needs; the inputs are
// cleared 4 cycles after the later of the two results was started.
module stfb_fa
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

  dr_t  ss, sc;                 // sum and carry state nodes (active low)
  logic as_node, ac_node, as_n, ac_n;
  logic both_n, ack, bs, bc;
  logic s_pd0, s_pd1, c_pd0, c_pd1;

  always_comb begin
    // three-input XOR (needs all inputs)
    s_pd0 = (a[0] & b[0] & ci[0]) | (a[0] & b[1] & ci[1]) |
            (a[1] & b[0] & ci[1]) | (a[1] & b[1] & ci[0]);
    s_pd1 = (a[1] & b[0] & ci[0]) | (a[0] & b[1] & ci[0]) |
            (a[0] & b[0] & ci[1]) | (a[1] & b[1] & ci[1]);
    // three-input majority with early carry when a and b agree
    c_pd0 = (a[0] & b[0]) | (a[0] & b[1] & ci[0]) | (a[1] & b[0] & ci[0]);
    c_pd1 = (a[1] & b[1]) | (a[1] & b[0] & ci[1]) | (a[0] & b[1] & ci[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ss      <= 2'b11;
      sc      <= 2'b11;
      as_node <= 1'b0;
      ac_node <= 1'b0;
      as_n    <= 1'b1;
      ac_n    <= 1'b1;
      both_n  <= 1'b1;
      ack     <= 1'b1;
      bs      <= 1'b0;
      bc      <= 1'b0;
    end else begin
      if (!bs) ss <= 2'b11;
      else if (as_n) begin
        if (s_pd0) ss[0] <= 1'b0;
        if (s_pd1) ss[1] <= 1'b0;
      end
      if (!bc) sc <= 2'b11;
      else if (ac_n) begin
        if (c_pd0) sc[0] <= 1'b0;
        if (c_pd1) sc[1] <= 1'b0;
      end
      if (!(ss[0] & ss[1])) as_node <= 1'b1;
      else if (ack)         as_node <= 1'b0;
      if (!(sc[0] & sc[1])) ac_node <= 1'b1;
      else if (ack)         ac_node <= 1'b0;
      as_n   <= ~as_node;
      ac_n   <= ~ac_node;
      both_n <= ~(as_node & ac_node);
      ack    <= ~both_n;                     // NAND(both_n, /Reset)
      bs     <= ~(s[0] | s[1]);
      bc     <= ~(co[0] | co[1]);
    end
  end

  assign s_up  = ~ss;
  assign co_up = ~sc;
  assign a_dn  = {ack, ack};
  assign b_dn  = {ack, ack};
  assign ci_dn = {ack, ack};

endmodule
