// stfb_dc: dual-rail single-track data consumer.
//
// A sink that discards whatever bit arrives on its channel, so that unused
// results do not block the cell that produced them. A detector D =
// NOR(L0, L1) and an inverter drive the pull-downs of both rails, so data is
// removed two gate delays after it arrives, the same delay with which a
// buffer acknowledges. The function is that of the data consumer cell; the
// two-gate detector (chosen so that a sender with zero timing margin has
// released the rail before it is pulled low), the unit-delay registers and
// the synchronous reset are choices of this model.
// Interface: l/l_dn (input wire and pull-down), consumed (pulse for one
// cycle per bit removed, for observation). Timing (cycles = gate delays):
// the rail is low again 3 cycles after it rose.
module stfb_dc
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output dr_t  l_dn,
  output logic consumed
);

  logic d_n, ack, ack_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_n   <= 1'b1;
      ack   <= 1'b1;
      ack_q <= 1'b1;
    end else begin
      d_n   <= ~(l[0] | l[1]);
      ack   <= ~d_n;
      ack_q <= ack;
    end
  end

  assign l_dn     = {ack, ack};
  assign consumed = ack & ~ack_q;

endmodule
