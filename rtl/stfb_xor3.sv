// stfb_xor3: three-input dual-rail single-track XOR gate.
//
// c = a XOR b XOR d, with all four channels dual-rail single-track. This is
// the sum half of the full adder as a cell of its own, for building the
// adder from forks and separate gates. It is a full buffer with logic in
// its pull-down networks:
//   S0 falls when B is high and a, b, d are all present with even parity
//   S1 falls when B is high and a, b, d are all present with odd parity
// Every discharge path holds one rail of each input, so the result is
// formed only once all three operands are there; no early output is
// possible for an XOR. A = NAND(S0, S1, /Reset) pulls all six input rails
// low. B = NOR(c0, c1, Reset) precharges S0/S1 and blocks evaluation while
// the output is busy. A low S0/S1 pulls c0/c1 high.
// The pull-down functions are those of the full adder's sum gate; using it
// on its own with a plain acknowledge (as in the two-input XOR) is this
// design's choice, as are the unit-delay registers and synchronous reset.
// Interface: a/b/d input wire levels with this cell's pull-downs
// a_dn/b_dn/d_dn; c output wire level with this cell's pull-up c_up.
// Timing (cycles = gate delays): c rises 2 cycles after the last input,
// and the inputs are cleared 3 cycles after it.
module stfb_xor3
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
  logic ack, busy_n;
  logic pd0, pd1;

  always_comb begin
    pd0 = (a[0] & b[0] & d[0]) | (a[0] & b[1] & d[1]) |
          (a[1] & b[0] & d[1]) | (a[1] & b[1] & d[0]);
    pd1 = (a[1] & b[0] & d[0]) | (a[0] & b[1] & d[0]) |
          (a[0] & b[0] & d[1]) | (a[1] & b[1] & d[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s      <= 2'b11;
      ack    <= 1'b1;
      busy_n <= 1'b0;
    end else begin
      if (!busy_n) s <= 2'b11;
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
  assign d_dn = {ack, ack};

endmodule
