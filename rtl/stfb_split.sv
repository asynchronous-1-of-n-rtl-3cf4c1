// stfb_split: dual-rail single-track 1-to-2 split buffer.
//
// Routes the bit on L to output Ra when the control channel C carries 0 and
// to Rb when it carries 1, then consumes both L and C. Each output has its
// own pair of state nodes: S0a/S1a are discharged by L0/L1 with C0 and Ba
// in series, S0b/S1b by L0/L1 with C1 and Bb. Ba = NOR(R0a, R1a, Reset) and
// Bb = NOR(R0b, R1b, Reset) precharge them, so only the chosen output needs
// to be free. A = NAND(S0a, S0b, S1a, S1b, /Reset) pulls L0, L1, C0 and C1
// low. The structure follows the split cell's diagram; the unit-delay
// registers and synchronous reset are choices of this model.
// Interface: l/l_dn data input, c/c_dn control input, ra/ra_up and
// rb/rb_up outputs. Timing (cycles = gate delays): the chosen output rises
// 2 cycles after the later of L and C; both inputs are cleared 3 cycles
// after that.
module stfb_split
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output dr_t  l_dn,
  input  dr_t  c,
  output dr_t  c_dn,
  input  dr_t  ra,
  output dr_t  ra_up,
  input  dr_t  rb,
  output dr_t  rb_up
);

  dr_t  sa, sb;
  logic a, ba, bb;

  always_ff @(posedge clk) begin
    if (rst) begin
      sa <= 2'b11;
      sb <= 2'b11;
      a  <= 1'b1;
      ba <= 1'b0;
      bb <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (!ba)              sa[i] <= 1'b1;
        else if (l[i] & c[0]) sa[i] <= 1'b0;
        if (!bb)              sb[i] <= 1'b1;
        else if (l[i] & c[1]) sb[i] <= 1'b0;
      end
      a  <= ~(sa[0] & sa[1] & sb[0] & sb[1]);
      ba <= ~(ra[0] | ra[1]);
      bb <= ~(rb[0] | rb[1]);
    end
  end

  assign ra_up = ~sa;
  assign rb_up = ~sb;
  assign l_dn  = {a, a};
  assign c_dn  = {a, a};

endmodule
