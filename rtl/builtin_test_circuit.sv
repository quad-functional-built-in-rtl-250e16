// Quad-functional built-in test circuit (replaces the plain output register).
//
// N_FF multiplexed-input flip-flops sit between the DRAM bitlines and the
// decoder. Cell i takes D2 from memory bit i and D1 from the Q of cell i-1;
// cell 0 takes D1 from the serial input. Every Q drives the decoder (parallel
// output) and the Q of the last cell is the serial output. With TS high one
// CK1/CK2 pair latches a whole memory row in parallel; with TS low each pair
// shifts the chain by one towards the serial output. Combining parallel or
// serial input with parallel or serial output gives the four operations:
//   memory test      parallel in  -> serial out
//   display test     serial in    -> parallel out (to the display)
//   serial test      serial in    -> serial out
//   normal/parallel  parallel in  -> parallel out (to the display)
//
// Clock and control selection: CK1, CK2 (and with them TS and the serial
// input) come either from the on-glass controller (sel_test = 0) or from
// test-mode pins (sel_test = 1). The clock multiplexer follows the original design;
// muxing TS and the serial input along with the clocks is this design's choice.
//
// Timing: as for mux_input_ff. The two selected clocks must never be high
// together; an assertion checks this at every rising CK1.
module builtin_test_circuit #(
  parameter int unsigned N_FF = 640
) (
  // system side (controller)
  input  logic            sys_ck1,
  input  logic            sys_ck2,
  input  logic            sys_ts,
  input  logic            sys_sin,
  // test-mode side (pins)
  input  logic            tst_ck1,
  input  logic            tst_ck2,
  input  logic            tst_ts,
  input  logic            tst_sin,
  input  logic            sel_test,
  // data
  input  logic [N_FF-1:0] mem_data,   // D2 of every cell: memory bitlines
  output logic [N_FF-1:0] q,          // parallel output to the decoder
  output logic            sout        // serial output (Q of the last cell)
);

  logic ck1, ck2, ts, sin;

  assign ck1 = sel_test ? tst_ck1 : sys_ck1;
  assign ck2 = sel_test ? tst_ck2 : sys_ck2;
  assign ts  = sel_test ? tst_ts  : sys_ts;
  assign sin = sel_test ? tst_sin : sys_sin;

  logic [N_FF-1:0] d1;
  assign d1 = {q[N_FF-2:0], sin};

  for (genvar i = 0; i < N_FF; i++) begin : g_cell
    mux_input_ff u_ff (
      .d1 (d1[i]),
      .d2 (mem_data[i]),
      .ts (ts),
      .ck1(ck1),
      .ck2(ck2),
      .q  (q[i])
    );
  end

  assign sout = q[N_FF-1];

  // The two phases must not overlap, or a shift would race through the chain.
  a_nonoverlap: assert property (@(posedge ck1) !ck2)
    else $error("CK1 and CK2 overlap");

endmodule
