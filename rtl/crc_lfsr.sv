// crc_lfsr: the programmable CRC register CREG, an internal-EXOR LFSR.
//
// Stage 0 receives the feedback bit Y; stage i (1 <= i <= WIDTH-1) receives
// stage i-1, EXORed with Y when the programming input p_i is 1. The last stage
// is the register's serial output. With Y = message bit XOR last stage this
// divides the message, multiplied by x^WIDTH, by
//     G(x) = x^WIDTH + p_(WIDTH-1) x^(WIDTH-1) + ... + p_1 x + 1
// and leaves the remainder in the register, the coefficient of x^(WIDTH-1) in
// the last stage. The x^WIDTH and x^0 terms are fixed, so a 16-bit register
// covers 2^15 polynomials. Input poly[i-1] is p_i.
//
// Three operations, selected by the controller:
//   clear : CREG <= 0                                   (state 1)
//   gen   : CREG <= {CREG[W-2:0] ^ (poly & Y), Y}       (state 2)
//   send  : CREG <= {CREG[W-2:0], 0}, serial out = MSB  (state 3)
// The structure, the clear, the divide step and the zero-filling shift-out are
// those of the original design; the priority among the three enables is this
// design's choice (the controller only ever raises one).
//
// Interface: clk; clear, gen, send (one-hot operation select); mesin (message
// bit); poly (p_1..p_(W-1)); crc_msb (last stage, the next CRC bit to send).
// Timing: one bit per clock; the remainder of an n-bit message is complete
// one clock after the n-th gen cycle.
module crc_lfsr #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             gen,
  input  logic             send,
  input  logic             mesin,
  input  logic [WIDTH-2:0] poly,
  output logic             crc_msb
);

  logic [WIDTH-1:0] creg;
  logic             fb;  // Y = MESIN xor CREG{15}

  always_comb begin
    fb      = mesin ^ creg[WIDTH-1];
    crc_msb = creg[WIDTH-1];
  end

  always_ff @(posedge clk) begin
    if (clear)     creg <= '0;
    else if (gen)  creg <= {creg[WIDTH-2:0] ^ (poly & {(WIDTH-1){fb}}), fb};
    else if (send) creg <= {creg[WIDTH-2:0], 1'b0};
  end

endmodule
