// stfb_tx: dual-rail four-phase to single-track transmitter.
//
// Takes a bit from a four-phase (return-to-zero) dual-rail sender on L and
// sends it on the single-track channel R. Le is the enable returned to the
// four-phase side: high means "ready for data".
//  - S0/S1 are discharged by L0/L1 with Le and B in series and precharged
//    by B = NOR(R0, R1, Reset). A low S0/S1 pulls R0/R1 high.
//  - A is a dynamic node set by a low S0 or S1 and discharged by
//    NOR(L0, L1). Le = NOT(A).
// So a bit is sent once, Le falls, and Le rises again only after the
// four-phase side has returned both L rails to zero; this also keeps the
// same data from being sent twice. The L rails are four-phase signals: this
// cell never drives them.
// The structure follows the transmitter's diagram; the unit-delay
// registers and synchronous reset are choices of this model.
// Interface: l (four-phase data in), le (enable out), r/r_up (single-track
// output wire and pull-up). Timing (cycles = gate delays): R rises 2
// cycles after L when Le and B are high; Le falls 3 cycles after L and
// rises 3 cycles after L returns to zero.
module stfb_tx
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output logic le,
  input  dr_t  r,
  output dr_t  r_up
);

  dr_t  s;
  logic a_node, nor_l, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      s      <= 2'b11;
      a_node <= 1'b0;
      le     <= 1'b0;
      nor_l  <= 1'b1;
      b      <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (!b)              s[i] <= 1'b1;
        else if (l[i] & le)  s[i] <= 1'b0;
      end
      if (!(s[0] & s[1])) a_node <= 1'b1;
      else if (nor_l)     a_node <= 1'b0;
      le    <= ~a_node;
      nor_l <= ~(l[0] | l[1]);
      b     <= ~(r[0] | r[1]);
    end
  end

  assign r_up = ~s;

endmodule
