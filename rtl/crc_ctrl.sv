// crc_ctrl: the three-state sequencer of the serial CRC generator.
//
// State 1 (ST_INIT) clears the bit counter and the CRC register and moves on
// when START is high. State 2 (ST_GEN) lasts MSG_BITS clocks: each clock one
// message bit is passed to the output and divided into the CRC register, and
// the machine leaves when the counter reads all ones (the last message bit).
// The counter then wraps to zero, and state 3 (ST_SEND) lasts CRC_WIDTH
// clocks, shifting the CRC out; it ends when the low log2(CRC_WIDTH) counter
// bits read all ones, and the machine returns to state 1. With the default
// 64-bit message and 16-bit CRC, and START already high, state 1 is clock 1,
// state 2 clocks 2 to 65 and state 3 clocks 66 to 81: message length plus
// polynomial degree clocks from the first message bit to the last CRC bit.
//
// The sequence, the all-ones exit tests and the reset to state 1 follow the
// original description. The control flip-flops are cleared asynchronously by
// RESET, as the flip-flops of the original cell library allowed; the one-hot
// code follows its state trace. Both sizes must be powers of two, because
// the exits are all-ones tests on a wrapping counter.
//
// Interface: clk; reset (asynchronous, active high); start; count (from
// crc_counter); the one-hot state bits st_init/st_gen/st_send.
// Timing: the state register changes on the rising clock edge; the outputs
// are its bits, straight from the flip-flops.
module crc_ctrl
  import crc_pkg::*;
#(
  parameter  int unsigned MSG_BITS  = 64,
  parameter  int unsigned CRC_WIDTH = 16,
  localparam int unsigned CNT_W     = $clog2(MSG_BITS),
  localparam int unsigned SEND_W    = $clog2(CRC_WIDTH)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [CNT_W-1:0] count,
  output logic             st_init,
  output logic             st_gen,
  output logic             st_send
);

  if ((1 << CNT_W) != MSG_BITS || (1 << SEND_W) != CRC_WIDTH || CRC_WIDTH > MSG_BITS || CRC_WIDTH < 2)
  begin : gen_size_check
    $error("crc_ctrl: MSG_BITS and CRC_WIDTH must be powers of two with 2 <= CRC_WIDTH <= MSG_BITS");
  end

  crc_state_e state, state_next;
  logic       gen_done;   // all bits of COUNT high
  logic       send_done;  // low log2(CRC_WIDTH) bits of COUNT high

  always_comb begin
    gen_done  = &count;
    send_done = &count[SEND_W-1:0];
    unique case (state)
      ST_INIT: state_next = start     ? ST_GEN  : ST_INIT;
      ST_GEN:  state_next = gen_done  ? ST_SEND : ST_GEN;
      ST_SEND: state_next = send_done ? ST_INIT : ST_SEND;
      default: state_next = ST_INIT;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= ST_INIT;
    else       state <= state_next;
  end

  always_comb begin
    st_init = state[2];
    st_gen  = state[1];
    st_send = state[0];
  end

  // Exactly one control flip-flop is set once reset has been applied. The
  // check is disabled while reset is high, when the flip-flops may still hold
  // their power-up values; for this reason Verilator notes that reset is used
  // both asynchronously and in a clocked check, which is intended.
  a_onehot: assert property (@(posedge clk) disable iff (reset) $onehot(state));

endmodule
