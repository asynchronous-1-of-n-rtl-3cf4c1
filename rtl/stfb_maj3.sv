// stfb_maj3: three-input dual-rail single-track majority gate, early output.
//
// c = MAJ(a, b, d), the carry half of the full adder as a cell of its own.
// When a and b agree the result is already decided, so it is sent before d
// has arrived; all three inputs are still acknowledged together, once all
// are present.
//  - S1 falls when /A and B are high and a1 b1, a1 b0 d1 or a0 b1 d1;
//    S0 falls when /A and B are high and a0 b0, a0 b1 d0 or a1 b0 d0.
//    A low S0/S1 pulls c0/c1 high; B = NOR(c0, c1, Reset) precharges S.
//  - A is a dynamic node set high by a low S0 or S1 and discharged by the
//    acknowledge. /A = NOT(A) blocks evaluation while an acknowledge is
//    pending, so a late d cannot fire the gate a second time.
//  - The LCD is a dynamic node, precharged while A is low and discharged
//    while A is high once a, b and d each have a rail high.
//    ack = NAND(LCD, /Reset) pulls the six input rails low and clears A.
// The pull-down functions are those of the full adder's carry gate; the
// pending-acknowledge node, /A footer and LCD are taken from the improved
// OR gate and widened to three inputs, which is this design's choice, as
// are the unit-delay registers and synchronous reset.
// Interface: a/b/d input wire levels with this cell's pull-downs
// a_dn/b_dn/d_dn; c output wire level with this cell's pull-up c_up.
// Timing (cycles = gate delays): c rises 2 cycles after the last input it
// needs; the inputs are cleared 5 cycles after all are present and A is
// high.
module stfb_maj3
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  a,
  output dr_t  a_dn,
  input  dr_t  b,
  output dr_t  b_dn,
  input  dr_t  d,
  output dr_t  d_dn,
  input  dr_t  c,
  output dr_t  c_up
);

  dr_t  s;
  logic a_node, a_n, lcd, ack, busy_n;
  logic pd0, pd1;

  always_comb begin
    pd0 = (a[0] & b[0]) | (a[0] & b[1] & d[0]) | (a[1] & b[0] & d[0]);
    pd1 = (a[1] & b[1]) | (a[1] & b[0] & d[1]) | (a[0] & b[1] & d[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s      <= 2'b11;
      a_node <= 1'b0;
      a_n    <= 1'b1;
      lcd    <= 1'b1;
      ack    <= 1'b1;
      busy_n <= 1'b0;
    end else begin
      if (!busy_n) s <= 2'b11;
      else if (a_n) begin
        if (pd0)   s[0] <= 1'b0;
        if (pd1)   s[1] <= 1'b0;
      end
      if (!(s[0] & s[1])) a_node <= 1'b1;
      else if (ack)       a_node <= 1'b0;
      a_n <= ~a_node;
      if (!a_node)                                          lcd <= 1'b1;
      else if ((a[0] | a[1]) & (b[0] | b[1]) & (d[0] | d[1])) lcd <= 1'b0;
      ack    <= ~lcd;
      busy_n <= ~(c[0] | c[1]);
    end
  end

  assign c_up = ~s;
  assign a_dn = {ack, ack};
  assign b_dn = {ack, ack};
  assign d_dn = {ack, ack};

endmodule
