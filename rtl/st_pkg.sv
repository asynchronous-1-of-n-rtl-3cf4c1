// st_pkg: shared types for the single-track 1-of-n cell library.
//
// A single-track channel is a bundle of n wires ("rails"). It is blank when
// all rails are low. A sender raises exactly one rail to send the value
// with that index. The receiver pulls the raised rail low again, and that
// is the only acknowledge there is. The dual-rail (1-of-2) case carries one
// bit: rail 0 high means 0 and rail 1 high means 1.
//
// Timing model used by every cell: one clock period stands for one gate
// delay. Every gate output, dynamic node and wire keeper in the cells is a
// register that takes the value its driving gate computes from the previous
// period's values. Latencies that the cell descriptions give in gate delays
// therefore appear here as clock cycles.
package st_pkg;

  // Dual-rail channel: bit 0 = rail "0", bit 1 = rail "1".
  typedef logic [1:0] dr_t;

  // Encode a bit as a dual-rail code word.
  function automatic dr_t dr_enc(input logic v);
    return v ? 2'b10 : 2'b01;
  endfunction

  // Decode a dual-rail code word: 1 only for rail 1 high, rail 0 low.
  function automatic logic dr_dec(input dr_t d);
    return d[1] & ~d[0];
  endfunction

  // A dual-rail word holds data when one of its rails is high.
  function automatic logic dr_full(input dr_t d);
    return d[0] | d[1];
  endfunction

endpackage
