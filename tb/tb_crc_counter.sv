// tb_crc_counter: self-checking test of the bit counter.
//
// Drives random clear and increment requests and compares the count after
// every clock with a model that counts modulo 64. A run of 200 increments
// checks the wrap from 63 to 0, which the generator relies on between the
// message and the CRC phases.
module tb_crc_counter;

  logic       clk = 1'b0;
  logic       clear, inc;
  logic [5:0] count;
  logic [5:0] model;
  int checks = 0, failures = 0, wraps = 0;

  crc_counter #(.WIDTH(6)) dut (.clk(clk), .clear(clear), .inc(inc), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic i);
    clear = c; inc = i;
    @(posedge clk);
    if (c) model = 6'd0;
    else if (i) begin
      if (model == 6'd63) wraps++;
      model = (model == 6'd63) ? 6'd0 : model + 6'd1;
    end
    #1;
    checks++;
    if (count !== model) begin
      failures++;
      $display("FAIL count=%0d expected %0d (clear=%b inc=%b)", count, model, c, i);
    end
  endtask

  initial begin
    model = 0;
    step(1'b1, 1'b1);       // clear wins over inc
    for (int k = 0; k < 200; k++) step(1'b0, 1'b1);
    for (int k = 0; k < 3000; k++)
      step($urandom_range(0, 49) == 0, $urandom_range(0, 3) != 0);
    checks++;
    if (wraps < 3) begin
      failures++;
      $display("FAIL counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
