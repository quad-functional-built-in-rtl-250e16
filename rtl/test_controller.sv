// Controller: sequences the frame memory and the built-in test circuit.
//
// One operation runs per start pulse; op selects which of the four:
//   OP_NORMAL   one display frame. For every line 0..LINES-1: read the DRAM
//               row, latch it into the test circuit in parallel (TS high, one
//               CK1/CK2 pair), then pulse line_load with line_addr for the
//               horizontal and vertical drivers. Reading every row once per
//               frame is also what refreshes the DRAM.
//   OP_MEMTEST  memory test of row test_row: read and latch the row in
//               parallel, then present its N_FF bits one by one on the serial
//               output (so_valid marks each bit), shifting with TS low.
//               The last cell (row bit N_FF-1) comes out first.
//   OP_DISPTEST display test: take N_FF bits from the serial input (si_valid
//               / si_ready handshake), shifting each into the chain, then
//               pulse line_load for every line so that the shifted-in coded
//               line is written to the whole panel.
//   OP_SERTEST  serial transfer self test: for each of N_FF input bits, the
//               bit at the serial output before the shift is presented with
//               so_valid, then the input bit is shifted in. Two runs show a
//               pattern shifted in by the first come out of the second.
//
// Clocking of the test circuit: every latch or shift is the sequence
// CK1 high, both low, CK2 high, both low, one system clock each, so the
// phases never overlap. CK1, CK2, TS and the serial input bit are registers.
// Costs in system clocks: normal 7 per line (2521 from start to done for 360
// lines), memory test 5*N_FF+3 (3203 for 640), serial test 5*N_FF+1 with
// si_valid held high, display test 5*N_FF+LINES+1 likewise.
//
// The four operations, their inputs and outputs and the row read per display
// line follow the original design. The state sequence, the handshakes, the single
// clock per phase and loading every line in the display test are this
// design's choices. Reset is asynchronous, active low.
module test_controller
  import sog_pkg::*;
#(
  parameter int unsigned N_LINES = 360,
  parameter int unsigned N_FF    = 640,
  localparam int unsigned RA_W   = $clog2(N_LINES),
  localparam int unsigned BC_W   = $clog2(N_FF)
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            start,
  input  op_e             op,
  input  logic [RA_W-1:0] test_row,
  output logic            busy,
  output logic            done,
  // frame memory row read
  output logic            mem_rd_en,
  output logic [RA_W-1:0] mem_rd_row,
  // built-in test circuit control
  output logic            ck1,
  output logic            ck2,
  output logic            ts,
  output logic            sin,
  // serial input pin stream
  input  logic            si,
  input  logic            si_valid,
  output logic            si_ready,
  // serial output strobe (data is the test circuit's serial output)
  output logic            so_valid,
  // to the horizontal / vertical drivers
  output logic            line_load,
  output logic [RA_W-1:0] line_addr
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_RDW, S_PH1, S_G1, S_PH2, S_G2, S_EMIT, S_REQ, S_LOAD, S_DONE
  } state_e;

  state_e          state, state_d;
  op_e             op_q;
  logic [RA_W-1:0] line;
  logic [BC_W-1:0] bitcnt;

  localparam logic [RA_W-1:0] LAST_LINE = RA_W'(N_LINES - 1);
  localparam logic [BC_W-1:0] LAST_BIT  = BC_W'(N_FF - 1);

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE: if (start) state_d = (op == OP_NORMAL || op == OP_MEMTEST) ? S_RD : S_REQ;
      S_RD:   state_d = S_RDW;
      S_RDW:  state_d = S_PH1;
      S_PH1:  state_d = S_G1;
      S_G1:   state_d = S_PH2;
      S_PH2:  state_d = S_G2;
      S_G2: begin
        unique case (op_q)
          OP_NORMAL:   state_d = S_LOAD;
          OP_MEMTEST:  state_d = S_EMIT;
          OP_DISPTEST: state_d = (bitcnt == LAST_BIT) ? S_LOAD : S_REQ;
          OP_SERTEST:  state_d = (bitcnt == LAST_BIT) ? S_DONE : S_REQ;
        endcase
      end
      S_EMIT: state_d = (bitcnt == LAST_BIT) ? S_DONE : S_PH1;
      S_REQ:  if (si_valid) state_d = S_PH1;
      S_LOAD: begin
        if (line == LAST_LINE) state_d = S_DONE;
        else if (op_q == OP_NORMAL) state_d = S_RD;
        else state_d = S_LOAD;
      end
      S_DONE: state_d = S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      op_q   <= OP_NORMAL;
      line   <= '0;
      bitcnt <= '0;
      ck1    <= 1'b0;
      ck2    <= 1'b0;
      ts     <= 1'b0;
      sin    <= 1'b0;
    end else begin
      state <= state_d;
      ck1   <= (state_d == S_PH1);
      ck2   <= (state_d == S_PH2);
      unique case (state)
        S_IDLE: if (start) begin
          op_q   <= op;
          line   <= (op == OP_MEMTEST) ? test_row : '0;
          bitcnt <= '0;
        end
        S_RD: begin
          ts  <= 1'b1;     // parallel latch from the memory
          sin <= 1'b0;
        end
        S_G2: begin
          if (op_q == OP_DISPTEST || op_q == OP_SERTEST) begin
            if (bitcnt != LAST_BIT) bitcnt <= bitcnt + 1'b1;
          end
        end
        S_EMIT: begin
          bitcnt <= bitcnt + 1'b1;
          ts     <= 1'b0;  // shift towards the serial output
          sin    <= 1'b0;
        end
        S_REQ: if (si_valid) begin
          ts  <= 1'b0;
          sin <= si;
        end
        S_LOAD: if (line != LAST_LINE) line <= line + 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    busy       = (state != S_IDLE);
    done       = (state == S_DONE);
    mem_rd_en  = (state == S_RD);
    mem_rd_row = line;
    si_ready   = (state == S_REQ);
    so_valid   = (state == S_EMIT) ||
                 (state == S_REQ && si_valid && op_q == OP_SERTEST);
    line_load  = (state == S_LOAD);
    line_addr  = line;
  end

  a_phases: assert property (@(posedge clk) disable iff (!rst_n) !(ck1 && ck2))
    else $error("CK1 and CK2 overlap");

endmodule
