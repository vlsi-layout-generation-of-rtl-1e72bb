// tb_crc_lfsr: self-checking test of the programmable CRC register.
//
// For each trial the register is cleared, fed a message of random length
// (1 to 64 bits) under a polynomial with the +1 term, then shifted out for 16
// clocks. The 16 serial bits must equal the remainder computed by long
// division in crc_ref_pkg. Random idle clocks (no operation enabled) are put
// between message bits to check that the register holds. Trials cover the
// all-ones message with CRC-CCITT (remainder A6E1), the four named
// polynomials and random ones. The shift-out must fill with zeros: after the
// 16 CRC bits, 16 more send clocks must give zeros.
module tb_crc_lfsr;
  import crc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        clear, gen, send, mesin;
  logic [14:0] poly;
  logic        crc_msb;

  int checks = 0, failures = 0;

  crc_lfsr #(.WIDTH(16)) dut (
    .clk(clk), .clear(clear), .gen(gen), .send(send),
    .mesin(mesin), .poly(poly), .crc_msb(crc_msb)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    clear = 0; gen = 0; send = 0; mesin = 1'($urandom);
    @(negedge clk);
  endtask

  task automatic run(input logic [63:0] msg, input int unsigned nbits,
                     input logic [15:0] p, input bit with_idle);
    logic [15:0] got, exp;
    poly = p[15:1];
    clear = 1; gen = 0; send = 0; mesin = 0;
    @(negedge clk);
    clear = 0;
    for (int i = int'(nbits) - 1; i >= 0; i--) begin
      if (with_idle && $urandom_range(0, 3) == 0) idle();
      gen = 1; send = 0; mesin = msg[i];
      @(negedge clk);
    end
    gen = 0;
    for (int i = 15; i >= 0; i--) begin
      got[i] = crc_msb;
      send = 1;
      @(negedge clk);
      if (with_idle && $urandom_range(0, 3) == 0) idle();
    end
    exp = crc_div(msg, nbits, p);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL crc poly=%h n=%0d msg=%h got=%h exp=%h", p, nbits, msg, got, exp);
    end
    // zero fill behind the CRC
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (crc_msb !== 1'b0) begin
        failures++;
        $display("FAIL zero fill bit %0d", i);
      end
      send = 1;
      @(negedge clk);
    end
    send = 0;
  endtask

  initial begin
    logic [15:0] p;
    logic [63:0] m;
    clear = 0; gen = 0; send = 0; mesin = 0; poly = '0;
    @(negedge clk);
    // The original chip's own test: 64 ones, CRC-CCITT, gives A6E1.
    checks++;
    if (crc_div({64{1'b1}}, 64, POLY_CCITT) !== 16'hA6E1) begin
      failures++;
      $display("FAIL reference model does not give A6E1");
    end
    run({64{1'b1}}, 64, POLY_CCITT, 1'b0);
    run({64{1'b1}}, 64, POLY_CRC16, 1'b0);
    run({64{1'b1}}, 64, POLY_CRC16_REV, 1'b0);
    run({64{1'b1}}, 64, POLY_CCITT_REV, 1'b0);
    for (int t = 0; t < 300; t++) begin
      m = {$urandom, $urandom};
      case (t % 5)
        0: p = POLY_CRC16;
        1: p = POLY_CCITT;
        2: p = POLY_CRC16_REV;
        3: p = POLY_CCITT_REV;
        default: p = 16'($urandom) | 16'h0001;
      endcase
      run(m, (t < 100) ? 64 : $urandom_range(1, 64), p, t % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
