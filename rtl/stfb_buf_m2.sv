// stfb_buf_m2: dual-rail STFB buffer with a 2 gate-delay timing margin.
//
// In the plain buffer the left sender releases a rail in the same gate
// delay in which this cell starts pulling it low. This variant makes each
// rail driver a 3 gate-delay pulse so the sender is always off 2 gate
// delays before the receiver pulls down:
//   n_i = NAND(L_i, S_i)   input stage, enabled while S_i is high
//   x_i = NOT(n_i)
//   S_i = NAND(x_i, B)     fires when data is present and R is free
// Once S_i falls, n_i rises, x_i falls and S_i returns high 3 cycles later
// on its own. A = NAND(S0, S1, /Reset) pulls the L rails low; B =
// NOR(R0, R1, Reset) as in the plain buffer. A low S_i pulls R_i high.
// Timing (cycles = gate delays): forward latency 4, backward latency
// (R- to L- with data waiting) 4, one token per 8 cycles in a pipeline.
// The connection of the first NAND's second input to S_i is this model's
// reading of the cell's diagram; it is the reading that gives exactly
// those latencies and the 3 gate-delay driver pulse stated for the cell.
// Interface: l / l_dn and r / r_up as in stfb_buf. Reset is synchronous,
// active high.
module stfb_buf_m2
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output dr_t  l_dn,
  input  dr_t  r,
  output dr_t  r_up
);

  dr_t  n, x, s;
  logic a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      n <= 2'b11;
      x <= 2'b00;
      s <= 2'b11;
      a <= 1'b1;
      b <= 1'b0;
    end else begin
      n <= ~(l & s);
      x <= ~n;
      s <= ~(x & {b, b});
      a <= ~(s[0] & s[1]);
      b <= ~(r[0] | r[1]);
    end
  end

  assign r_up = ~s;
  assign l_dn = {a, a};

endmodule
