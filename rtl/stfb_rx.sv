// stfb_rx: dual-rail single-track to four-phase receiver.
//
// Takes a bit from the single-track channel L and presents it on the
// four-phase (return-to-zero) dual-rail output R. Re is the enable from the
// four-phase receiver: high means "ready".
//  - S0/S1 are discharged by L0/L1 when Re is high and precharged while Re
//    is low. R0 = NOT(S0), R1 = NOT(S1).
//  - When Re falls (the four-phase acknowledge), the NOR of Re and Re
//    delayed through three inverters gives a pulse of three gate delays.
//    The pulse pulls L0 and L1 low, consuming the single-track data. At the
//    same time the low Re resets S0/S1, so R returns to zero.
//  - While Re is low nothing new is taken; when it rises again the cell is
//    ready for the next bit.
// The structure follows the receiver's diagram. Forcing the pull-down
// pulse on during Reset (so the input wire is cleared), the unit-delay
// registers and the synchronous reset are choices of this model.
// Interface: l/l_dn (single-track input wire and pull-down), r (four-phase
// data out), re (enable in). Timing (cycles = gate delays): R rises 2
// cycles after L when Re is high; after Re falls, R falls 2 cycles later
// and L is pulled low during cycles 1 to 3.
module stfb_rx
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  dr_t  l,
  output dr_t  l_dn,
  output dr_t  r,
  input  logic re
);

  dr_t        s;
  logic [2:0] inv;               // three-inverter delay line on Re
  logic       pulse;

  always_ff @(posedge clk) begin
    if (rst) begin
      s     <= 2'b11;
      r     <= 2'b00;
      inv   <= 3'b010;
      pulse <= 1'b1;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (!re)       s[i] <= 1'b1;
        else if (l[i]) s[i] <= 1'b0;
      end
      r     <= ~s;
      inv   <= {~inv[1], ~inv[0], ~re};
      pulse <= ~(re | inv[2]);
    end
  end

  assign l_dn = {pulse, pulse};

endmodule
