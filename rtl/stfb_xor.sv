// stfb_xor: two-input dual-rail single-track XOR gate.
//
// c = a XOR b, with a, b and c dual-rail single-track channels. The gate is a
// full buffer with logic in its pull-down networks:
//   S0 falls when B is high and a equals b (a0 b0 or a1 b1)
//   S1 falls when B is high and a differs from b (a1 b0 or a0 b1)
// Every input combination that discharges a state node includes one rail
// of each input, so the result is formed only after both operands have
// arrived. A = NAND(S0, S1, /Reset) then pulls all four input rails low,
// acknowledging both senders at once. B = NOR(c0, c1, Reset) precharges S0
// and S1 and blocks evaluation while the output still holds data. A low
// S0/S1 pulls c0/c1 high. The inverted gate (XNOR) is this cell with c0 and
// c1 swapped where it is used.
// The pull-down functions are those of the cell's transistor diagram and
// description. The Reset inputs of the A and B gates are added as in the
// reset-capable buffer; the unit-delay registers and synchronous reset are
// choices of this model.
// Interface: a/b are the input wire levels, a_dn/b_dn this cell's
// pull-downs on them; c is the output wire level and c_up this cell's
// pull-up on it. Timing (cycles = gate delays): c rises 2 cycles after the
// later input, and the inputs are cleared 3 cycles after it.
module stfb_xor
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
  logic ack, busy_n;
  logic pd0, pd1;

  always_comb begin
    pd0 = (a[0] & b[0]) | (a[1] & b[1]);
    pd1 = (a[1] & b[0]) | (a[0] & b[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s      <= 2'b11;
      ack    <= 1'b1;
      busy_n <= 1'b0;
    end else begin
      if (!busy_n) s    <= 2'b11;
      else begin
        if (pd0)     s[0] <= 1'b0;
        if (pd1)     s[1] <= 1'b0;
      end
      ack    <= ~(s[0] & s[1]);
      busy_n <= ~(c[0] | c[1]);
    end
  end

  assign c_up = ~s;
  assign a_dn = {ack, ack};
  assign b_dn = {ack, ack};

endmodule
