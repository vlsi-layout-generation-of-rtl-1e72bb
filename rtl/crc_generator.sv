// crc_generator: a programmable 16-bit serial CRC generator chip.
//
// A fixed-length message enters one bit per clock on mesin and leaves on z
// unchanged; meanwhile it is divided, modulo 2, by a degree-16 generator
// polynomial chosen on the vec inputs. When the last message bit has gone,
// the 16-bit remainder (the CRC) follows on z, most significant bit first,
// while cout is high. Any polynomial x^16 + p15 x^15 + ... + p1 x + 1 can be
// chosen, 2^15 in all, covering CRC-16, CRC-CCITT and their reversed forms.
//
// Structure: crc_ctrl sequences three states (initialise, generate, send);
// crc_counter counts the message and CRC bits; crc_lfsr is the CRC register
// with its switchable EXOR gates. z is a multiplexer: the message bit in the
// generate state, the CRC register's last stage in the send state, 0 in the
// initialise state. The path from mesin to z is combinational, as in the
// original chip.
//
// Interface (names of the original chip in capitals):
//   clk   CLK    the clock
//   reset RESET  asynchronous, active high; returns the controller to state 1
//   start START  sampled in state 1; high starts a message on the next clock
//   mesin MESIN  message bit, sampled on each clock of state 2
//   vec   VEC    vec[i] = p(i+1), i = 0..14; vec[15] exists on the original
//                bus but no EXOR gate uses it, so it is left unconnected
//   z     Z      serial output: message, then CRC
//   cout  COUT   CRCRDY, high during the CRC bits
// Timing with the defaults and start held high: clock 1 is state 1, clocks 2
// to 65 take the 64 message bits, the CRC is ready in clock 66 and its 16th
// bit leaves in clock 81; clock 82 is state 1 again. Everything above follows
// the original design; the parameterisation of the two sizes is this design's.
module crc_generator #(
  parameter  int unsigned CRC_WIDTH = 16,
  parameter  int unsigned MSG_BITS  = 64,
  localparam int unsigned CNT_W     = $clog2(MSG_BITS)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 start,
  input  logic                 mesin,
  input  logic [CRC_WIDTH-1:0] vec,
  output logic                 z,
  output logic                 cout
);

  logic             st_init, st_gen, st_send;
  logic [CNT_W-1:0] count;
  logic             crc_msb;

  crc_ctrl #(
    .MSG_BITS (MSG_BITS),
    .CRC_WIDTH(CRC_WIDTH)
  ) u_ctrl (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .count  (count),
    .st_init(st_init),
    .st_gen (st_gen),
    .st_send(st_send)
  );

  crc_counter #(
    .WIDTH(CNT_W)
  ) u_count (
    .clk  (clk),
    .clear(st_init),
    .inc  (st_gen | st_send),
    .count(count)
  );

  crc_lfsr #(
    .WIDTH(CRC_WIDTH)
  ) u_lfsr (
    .clk    (clk),
    .clear  (st_init),
    .gen    (st_gen),
    .send   (st_send),
    .mesin  (mesin),
    .poly   (vec[CRC_WIDTH-2:0]),
    .crc_msb(crc_msb)
  );

  // Z = ZOUT, COUT = CRCRDY
  always_comb begin
    unique case (1'b1)
      st_gen:  z = mesin;
      st_send: z = crc_msb;
      default: z = 1'b0;
    endcase
    cout = st_send;
  end

endmodule
