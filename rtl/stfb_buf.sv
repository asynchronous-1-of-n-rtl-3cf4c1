// stfb_buf: dual-rail single-track full buffer (STFB), optimized form.
//
// The buffer holds one bit and passes it from its left channel L to its
// right channel R. It has no control wires: the data rails carry the whole
// handshake.
//  - S0/S1 are dynamic state nodes. While the right channel is free (B high)
//    a high L0/L1 discharges S0/S1. Only B precharges them again.
//  - A low S node turns on the pull-up of the matching R rail.
//  - A = NAND(S0, S1, /Reset) is the state completion detector (SCD). A high
//    A pulls both L rails low, which consumes the input and is the
//    acknowledge seen by the left neighbour.
//  - B = NOR(R0, R1, Reset) is the right-environment completion detector
//    (RCD). B low means R still holds data, so new input waits.
// Interface: l is the left wire level, l_dn the pull-down this cell applies
// to it. r is the right wire level, r_up the pull-up this cell applies.
// Timing (one cycle = one gate delay): forward latency L+ to R+ is 2,
// backward latency R- to L- is 4 when data is waiting, and in a pipeline of
// these buffers a new token passes every 6 cycles. With the zero timing
// margin of this form, the left sender stops driving in the same cycle
// that this cell starts pulling the rail low.
// Reset (synchronous, active high) also drives the /Reset and Reset inputs
// of the two gates, so A stays high and clears the left wire during reset.
// Node structure follows the cell's transistor diagram. Treating every node
// as a unit-delay register, and the synchronous reset, are choices of this
// model.
module stfb_buf
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output dr_t  l_dn,
  input  dr_t  r,
  output dr_t  r_up
);

  dr_t  s;       // state nodes S1:S0 (active low)
  logic a, b;    // SCD and RCD outputs

  always_ff @(posedge clk) begin
    if (rst) begin
      s <= 2'b11;
      a <= 1'b1;
      b <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (!b)            s[i] <= 1'b1;   // precharge by B
        else if (l[i])     s[i] <= 1'b0;   // evaluate: L_i and B
      end
      a <= ~(s[0] & s[1]);
      b <= ~(r[0] | r[1]);
    end
  end

  assign r_up = ~s;
  assign l_dn = {a, a};

endmodule
