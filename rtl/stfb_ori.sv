// stfb_ori: two-input dual-rail single-track OR gate with early output.
//
// c = a OR b. The result is sent as soon as it is certain: a 1 on either input gives c = 1. This
// is forwarded even when the other operand has not arrived yet. Both inputs
// are acknowledged only after both are present.
//  - S0 falls when /A and B are high and a b is 00
//    S1 falls when /A and B are high and a or b is 1
//    A low S0/S1 pulls c0/c1 high; B = NOR(c0, c1, Reset) precharges S.
//  - A is a dynamic node set high by a low S0 or S1 (the SCD) and
//    discharged by the acknowledge. /A = NOT(A) turns evaluation off while
//    an acknowledge is pending, so the gate fires only once per operand pair.
//  - The LCD (left-environment completion detector) is a dynamic node,
//    precharged while A is low and discharged while A is high once one rail
//    of a and one rail of b are high. ack = NAND(LCD, /Reset) pulls the four
//    input rails low and discharges A.
// The LCD enables the acknowledge only; it does not gate evaluation.
// The structure follows the improved OR cell's diagram; the unit-delay
// registers and synchronous reset are choices of this model.
// Interface: a/b input wire levels with this cell's pull-downs a_dn/b_dn;
// c output wire level with this cell's pull-up c_up. Timing (cycles = gate
// delays): c rises 2 cycles after the deciding input; the inputs are
// cleared 5 cycles after both are present and A is high.
module stfb_ori
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  a,
  output dr_t  a_dn,
  input  dr_t  b,
  output dr_t  b_dn,
  input  dr_t  c,
  output dr_t  c_up
);

  dr_t  s;
  logic a_node, a_n, lcd, ack, busy_n;
  logic pd0, pd1;

  always_comb begin
    pd0 = a[0] & b[0];
    pd1 = a[1] | b[1];
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
      if (!(s[0] & s[1])) a_node <= 1'b1;      // SCD pull-up
      else if (ack)       a_node <= 1'b0;      // discharged by acknowledge
      a_n    <= ~a_node;
      if (!a_node)                                lcd <= 1'b1;
      else if ((a[0] | a[1]) & (b[0] | b[1]))     lcd <= 1'b0;
      ack    <= ~lcd;
      busy_n <= ~(c[0] | c[1]);
    end
  end

  assign c_up = ~s;
  assign a_dn = {ack, ack};
  assign b_dn = {ack, ack};

endmodule
