// stfb_merge: dual-rail single-track 2-to-1 merge buffer.
//
// Chooses input La when the control channel C carries 0 and Lb when it
// carries 1, sends the chosen bit to R, then consumes the chosen input and
// C. The other input is left untouched. S0a/S1a are discharged by L0a/L1a
// with C0 and B in series, S0b/S1b by L0b/L1b with C1 and B. R0 is pulled
// high by a low S0a or S0b, R1 by a low S1a or S1b. B = NOR(R0, R1, Reset)
// precharges all four nodes. Aa = NAND(S0a, S1a, /Reset) pulls L0a, L1a and
// rail C0 low; Ab = NAND(S0b, S1b, /Reset) pulls L0b, L1b and rail C1 low.
// The structure follows the merge cell's diagram; the unit-delay registers
// and synchronous reset are choices of this model.
// Interface: la/la_dn, lb/lb_dn data inputs, c/c_dn control input, r/r_up
// output. Timing (cycles = gate delays): R rises 2 cycles after the later
// of C and the chosen input; those two are cleared 3 cycles after that.
module stfb_merge
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  la,
  output dr_t  la_dn,
  input  dr_t  lb,
  output dr_t  lb_dn,
  input  dr_t  c,
  output dr_t  c_dn,
  input  dr_t  r,
  output dr_t  r_up
);

  dr_t  sa, sb;
  logic aa, ab, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      sa <= 2'b11;
      sb <= 2'b11;
      aa <= 1'b1;
      ab <= 1'b1;
      b  <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (!b) begin
          sa[i] <= 1'b1;
          sb[i] <= 1'b1;
        end else begin
          if (la[i] & c[0]) sa[i] <= 1'b0;
          if (lb[i] & c[1]) sb[i] <= 1'b0;
        end
      end
      aa <= ~(sa[0] & sa[1]);
      ab <= ~(sb[0] & sb[1]);
      b  <= ~(r[0] | r[1]);
    end
  end

  assign r_up  = ~(sa & sb);
  assign la_dn = {aa, aa};
  assign lb_dn = {ab, ab};
  assign c_dn  = {ab, aa};

endmodule
