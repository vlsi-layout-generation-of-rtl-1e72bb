// tb_crc_ctrl: self-checking test of the three-state sequencer.
//
// The testbench plays the bit counter itself: cleared while st_init is high,
// incremented otherwise, as in the generator. It drives START at random and
// checks, clock by clock, that exactly one state bit is high; that state 1 is
// left only with START high and always for state 2; that state 2 lasts
// exactly 64 clocks and state 3 exactly 16; and that state 3 returns to
// state 1. RESET is raised between clock edges at random points of the
// sequence and must force state 1 at once, without waiting for a clock.
module tb_crc_ctrl;

  localparam int MSG = 64, CRC = 16;

  logic       clk = 1'b0;
  logic       reset, start;
  logic [5:0] count;
  logic       st_init, st_gen, st_send;
  int checks = 0, failures = 0;
  int n_msgs = 0, n_waits = 0, n_resets = 0;

  crc_ctrl #(.MSG_BITS(MSG), .CRC_WIDTH(CRC)) dut (
    .clk(clk), .reset(reset), .start(start), .count(count),
    .st_init(st_init), .st_gen(st_gen), .st_send(st_send)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (st_init) count <= '0;
    else         count <= count + 6'd1;
  end

  initial begin
    repeat (100000) @(posedge clk);
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

  // state seen in the previous clock, and how long it has lasted
  int run_len;
  logic [2:0] prev;

  initial begin
    reset = 1; start = 0;
    #12;
    check(st_init && !st_gen && !st_send, "state 1 after reset");
    @(negedge clk);
    reset = 0;
    prev = 3'b100; run_len = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      start = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      #1;
      check($onehot({st_init, st_gen, st_send}), "one-hot state");
      case (prev)
        3'b100: begin
          if (start) check(st_gen, "state 1 -> 2 with START");
          else begin
            check(st_init, "state 1 holds without START");
            n_waits++;
          end
        end
        3'b010: begin
          if (run_len < MSG) check(st_gen, "state 2 lasts 64 clocks");
          else begin
            check(st_send, "state 2 -> 3 after 64 clocks");
          end
        end
        3'b001: begin
          if (run_len < CRC) check(st_send, "state 3 lasts 16 clocks");
          else begin
            check(st_init, "state 3 -> 1 after 16 clocks");
            n_msgs++;
          end
        end
        default: ;
      endcase
      if ({st_init, st_gen, st_send} == prev) run_len++;
      else run_len = 1;
      prev = {st_init, st_gen, st_send};
      // occasional asynchronous reset, between clock edges
      if ($urandom_range(0, 399) == 0) begin
        #2 reset = 1;
        #1 check(st_init && !st_gen && !st_send, "asynchronous reset to state 1");
        n_resets++;
        @(negedge clk);
        reset = 0;
        prev = 3'b100; run_len = 1;
      end
    end
    check(n_msgs > 10, "complete messages seen");
    check(n_waits > 10, "START waits seen");
    check(n_resets > 3, "resets seen");
    $display("messages=%0d waits=%0d resets=%0d", n_msgs, n_waits, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
