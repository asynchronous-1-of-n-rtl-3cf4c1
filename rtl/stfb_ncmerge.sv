// stfb_ncmerge: dual-rail single-track 2-to-1 non-conditional merge buffer.
//
// Passes a bit arriving on either input La or Lb to R, when R is free. The
// left environment guarantees that La and Lb never hold data at the same
// time. S0 is discharged by L0a or L0b, S1 by L1a or L1b, both footed by B =
// NOR(R0, R1, Reset). A low S0/S1 pulls R0/R1 high. A = NAND(S0, S1, /Reset)
// pulls all four input rails low, which clears whichever input was used.
// The structure follows the merge cell's diagram; the unit-delay registers
// and synchronous reset are choices of this model, and the mutual
// exclusion of the inputs is checked by an assertion.
// Interface: la/la_dn, lb/lb_dn input wires and pull-downs; r/r_up output
// wire and pull-up. Timing (cycles = gate delays): R rises 2 cycles after
// an input; the input is cleared 3 cycles after it rises.
module stfb_ncmerge
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  la,
  output dr_t  la_dn,
  input  dr_t  lb,
  output dr_t  lb_dn,
  input  dr_t  r,
  output dr_t  r_up
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
        if (!b)                s[i] <= 1'b1;
        else if (la[i] | lb[i]) s[i] <= 1'b0;
      end
      a <= ~(s[0] & s[1]);
      b <= ~(r[0] | r[1]);
    end
  end

  assign r_up  = ~s;
  assign la_dn = {a, a};
  assign lb_dn = {a, a};

  a_excl: assert property (@(posedge clk) disable iff (rst)
                           !(dr_full(la) && dr_full(lb)))
    else $error("stfb_ncmerge: both inputs hold data");

endmodule
