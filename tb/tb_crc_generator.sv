// tb_crc_generator: end-to-end test of the serial CRC generator at its
// default size (16-bit CRC, 64-bit message).
//
// Every message is checked bit by bit on z: the 64 message bits must come
// back unchanged with cout low, then the 16 CRC bits (compared with long
// division in crc_ref_pkg) with cout high, then z and cout must drop. Clock
// pulses are numbered from the state-1 clock in which START is taken: the CRC
// must be ready (cout rising) in clock 66 and the 16th CRC bit must leave in
// clock 81, i.e. message length plus degree clocks after state 1.
//
// Cases: the reference run of the original chip (64 ones, CRC-CCITT, CRC
// A6E1); the other named polynomials (CRC-16 and the two reversed forms);
// random messages under random polynomials with a random, unused vec[15].
// Mechanisms counted, each of which must occur: START held low in state 1
// (waiting), START held high across the end of a message (back-to-back
// messages), RESET in the middle of a message (abort to state 1), and the
// CRC send phase itself.
module tb_crc_generator;
  import crc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        reset, start, mesin;
  logic [15:0] vec;
  logic        z, cout;

  int checks = 0, failures = 0;
  int n_wait = 0, n_b2b = 0, n_abort = 0, n_send = 0;

  crc_generator dut (
    .clk(clk), .reset(reset), .start(start), .mesin(mesin),
    .vec(vec), .z(z), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Inputs change after the falling edge; outputs are sampled 1 time unit
  // later, well before the rising edge that ends the clock pulse.
  task automatic next_pulse();
    @(negedge clk);
  endtask

  // Starts with the generator in state 1 (at a falling edge). Waits `wait_n`
  // clocks with START low, then sends one message. If `abort_at` is below 80,
  // RESET is pulsed in that clock pulse of the message instead of finishing.
  // With `keep_start` START stays high through the CRC phase, so the next
  // message starts straight away.
  task automatic send_msg(input logic [63:0] msg, input logic [15:0] poly,
                          input int wait_n, input int abort_at,
                          input bit keep_start);
    logic [15:0] exp;
    int pulse;
    exp = crc_div(msg, 64, poly);
    vec = poly_to_vec(poly);
    vec[15] = 1'($urandom);
    for (int w = 0; w < wait_n; w++) begin
      start = 0; mesin = 1'($urandom);
      #1 check(z == 1'b0 && cout == 1'b0, "outputs low while waiting in state 1");
      n_wait++;
      next_pulse();
    end
    // clock pulse 1: state 1, START taken
    start = 1; mesin = 1'($urandom);
    #1 check(z == 1'b0 && cout == 1'b0, "outputs low in state 1");
    next_pulse();
    pulse = 2;
    // clock pulses 2..65: message bits, passed straight to z
    for (int i = 63; i >= 0; i--) begin
      start = 1'($urandom);
      mesin = msg[i];
      #1;
      check(z == msg[i], "message bit on z");
      check(cout == 1'b0, "cout low during message");
      if (pulse == abort_at) begin
        reset = 1;
        #1 check(z == 1'b0 && cout == 1'b0, "reset forces state 1");
        n_abort++;
        next_pulse();
        reset = 0;
        return;
      end
      next_pulse();
      pulse++;
    end
    // clock pulses 66..81: CRC bits, MSB first
    for (int i = 15; i >= 0; i--) begin
      start = keep_start ? 1'b1 : 1'($urandom);
      mesin = 1'($urandom);
      #1;
      if (pulse == 66) check(cout == 1'b1, "CRC ready in clock 66");
      if (i == 0) check(pulse == 81, "16th CRC bit in clock 81");
      check(cout == 1'b1, "cout high during CRC");
      check(z == exp[i], "CRC bit on z");
      if (z != exp[i])
        $display("  poly=%h msg=%h bit %0d expected CRC %h", poly, msg, i, exp);
      if (pulse == abort_at) begin
        reset = 1;
        #1 check(z == 1'b0 && cout == 1'b0, "reset forces state 1");
        n_abort++;
        next_pulse();
        reset = 0;
        return;
      end
      next_pulse();
      pulse++;
    end
    n_send++;
    // clock pulse 82 is state 1 again
    if (keep_start) n_b2b++;
  endtask

  initial begin
    logic [15:0] p;
    reset = 1; start = 0; mesin = 0; vec = '0;
    next_pulse();
    next_pulse();
    reset = 0;
    // Reference run: 64 ones, CRC-CCITT, the CRC must be A6E1.
    check(crc_div({64{1'b1}}, 64, POLY_CCITT) == 16'hA6E1, "reference gives A6E1");
    send_msg({64{1'b1}}, POLY_CCITT, 0, 999, 1'b0);
    send_msg({$urandom, $urandom}, POLY_CRC16, 2, 999, 1'b1);
    send_msg({$urandom, $urandom}, POLY_CRC16_REV, 0, 999, 1'b0);
    send_msg({$urandom, $urandom}, POLY_CCITT_REV, 3, 999, 1'b0);
    send_msg({$urandom, $urandom}, POLY_CCITT, 0, 30, 1'b0);
    for (int t = 0; t < 400; t++) begin
      case (t % 5)
        0: p = POLY_CRC16;
        1: p = POLY_CCITT;
        2: p = POLY_CRC16_REV;
        3: p = POLY_CCITT_REV;
        default: p = 16'($urandom) | 16'h0001;
      endcase
      send_msg({$urandom, $urandom}, p,
               ($urandom_range(0, 2) == 0) ? $urandom_range(1, 5) : 0,
               ($urandom_range(0, 19) == 0) ? $urandom_range(2, 81) : 999,
               $urandom_range(0, 1) == 1);
    end
    check(n_wait > 0, "START wait in state 1 exercised");
    check(n_b2b > 0, "back-to-back messages exercised");
    check(n_abort > 0, "reset during a message exercised");
    check(n_send > 0, "CRC send phase exercised");
    $display("messages=%0d back_to_back=%0d waits=%0d aborts=%0d", n_send, n_b2b, n_wait, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
