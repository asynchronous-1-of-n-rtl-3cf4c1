// stfb_buf_1ofn: 1-of-n single-track full buffer.
//
// Same scheme as the dual-rail buffer, widened to N rails: one state node
// per rail, S_i = NAND(L_i, B); A = NAND of all S_i (the SCD) pulls every L
// rail low; B = NOR of all R rails (the RCD) holds new input back while the
// right channel is busy. A low S_i pulls R_i high. The cell structure is
// the one of the 1-of-n buffer diagram; the width N is free there, and the
// default of 4 here is this model's choice.
// Interface: l / l_dn for the left wire (level, pull-down), r / r_up for
// the right wire (level, pull-up). Timing as the dual-rail buffer: forward
// latency 2 cycles (gate delays), 6 cycles per token in a pipeline.
// Reset (synchronous, active high) forces A high and B low.
module stfb_buf_1ofn #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] l,
  output logic [N-1:0] l_dn,
  input  logic [N-1:0] r,
  output logic [N-1:0] r_up
);

  logic [N-1:0] s;
  logic         a, b;

  always_ff @(posedge clk) begin
    if (rst) begin
      s <= '1;
      a <= 1'b1;
      b <= 1'b0;
    end else begin
      s <= ~(l & {N{b}});     // static NAND per rail
      a <= ~(&s);
      b <= ~(|r);
    end
  end

  assign r_up = ~s;
  assign l_dn = {N{a}};

endmodule
