// stfb_fork: dual-rail single-track 1-to-2 fork buffer.
//
// Copies the bit on L to both outputs Ra and Rb, but only when both output
// channels are free. B = NOR(R0a, R0b, R1a, R1b, Reset) is high only when
// both outputs are blank. With B high, L0/L1 discharges S0/S1. A low S0
// pulls R0a and R0b high together, and a low S1 pulls R1a and R1b. A =
// NAND(S0, S1, /Reset) pulls L0 and L1 low. The structure follows the fork
// cell's diagram; the unit-delay registers and synchronous reset are
// choices of this model.
// Interface: l/l_dn left wire level and pull-down; ra/ra_up and rb/rb_up
// the two output wires and this cell's pull-ups. Timing (cycles = gate
// delays): both outputs rise 2 cycles after L; L is cleared 3 cycles after
// it rises; a busy output holds the fork until it has been consumed.
module stfb_fork
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output dr_t  l_dn,
  input  dr_t  ra,
  output dr_t  ra_up,
  input  dr_t  rb,
  output dr_t  rb_up
);

  dr_t  s;
  logic a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      s <= 2'b11;
      a <= 1'b1;
      b <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (!b)        s[i] <= 1'b1;
        else if (l[i]) s[i] <= 1'b0;
      end
      a <= ~(s[0] & s[1]);
      b <= ~(ra[0] | ra[1] | rb[0] | rb[1]);
    end
  end

  assign ra_up = ~s;
  assign rb_up = ~s;
  assign l_dn  = {a, a};

endmodule
