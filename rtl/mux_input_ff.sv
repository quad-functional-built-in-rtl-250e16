// Multiplexed-input flip-flop: the cell the built-in test circuit is made of.
//
// A data multiplexer in front of a master-slave latch pair. TS low selects D1
// (the Q of the previous cell, used for shifting), TS high selects D2 (the
// memory bitline, used for parallel latching). The master latch is transparent
// while CK1 is high and the slave latch while CK2 is high; CK1 and CK2 are
// non-overlapping phases, so a whole chain of these cells shifts by exactly one
// position per CK1/CK2 pair without racing through.
//
// Timing: D1/D2/TS must be stable while CK1 is high; Q changes only while CK2
// is high. No reset: the cell holds whatever it last captured.
//
// The mux, the two clocks and the D1/D2/TS behaviour follow the original design; the
// master/slave latch split is this design's reading of the two clock inputs.
// The latches are intended (they are the cell); they are the only storage.
module mux_input_ff (
  input  logic d1,   // serial data: Q of the previous cell
  input  logic d2,   // parallel data: memory output
  input  logic ts,   // 0: D1, 1: D2
  input  logic ck1,  // master clock phase
  input  logic ck2,  // slave clock phase
  output logic q
);

  logic master;

  always_latch begin
    if (ck1) master = ts ? d2 : d1;
  end

  always_latch begin
    if (ck2) q = master;
  end

endmodule
