// st_wire: one single-track channel of N rails with its level keeper.
//
// Each rail is a wire that the sender may only pull high ("request") and
// the receiver may only pull low ("acknowledge"). When neither drives it,
// the keeper holds the last level, as the staticizers of the protocol do
// during long idle periods. In the no-fight holder arrangement the side
// that drives high holds low and the other way round, so a correctly timed
// pair never drives a rail both ways at once; the assertion below flags a
// cycle in which they do, which would be a short circuit in silicon.
//
// Interface: rst only disables the check below; up[i] is the sender's pull-up of rail i, dn[i] the receiver's
// pull-down, rail[i] the level. Timing: the rail takes the driven level one
// cycle (one gate delay: the driver transistor) after up/dn are asserted.
// No reset: the rails are cleared by the receiver, whose acknowledge is
// forced on while Reset is high. Pull-up wins in a fight (a design choice;
// a fight is already an error).
module st_wire #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] up,
  input  logic [N-1:0] dn,
  output logic [N-1:0] rail
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (up[i])      rail[i] <= 1'b1;
      else if (dn[i]) rail[i] <= 1'b0;
    end
  end

  // Sender and receiver must never drive a rail in opposite directions.
  // Reset is used only to leave the reset sequence unchecked.
  a_no_fight: assert property (@(posedge clk) disable iff (rst) (up & dn) == '0)
    else $error("st_wire: rail driven high and low in the same cycle");

endmodule
