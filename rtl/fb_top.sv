// fb_top: 18-band ANSI S1.11 1/3-octave analysis filter bank (bands 22..39)
// for a 24 kHz, 16-bit audio stream.
//
// The six octaves of the bank are folded onto one MAC unit. Octave 1 filters
// the input with F37/F38/F39 (bands 37..39) and with the low-pass
// D; D's output, decimated by two, is the input of octave 2, which reuses
// the same filters to produce bands 34..36, and so on down to octave 6
// (bands 22..24). The system controller interleaves the octaves with the
// recursive pyramid schedule: two octave computations of 126 cycles plus one
// input-write cycle per sample, 253 cycles in all, so the clock must be at
// least 253 x 24 kHz = 6.07 MHz (6.13 MHz in the source design).
//
// Blocks (as in the source's chip): deserializer -> memory controller ->
// memory (data RAM with the six delay lines, coefficient ROM) -> MAC ->
// serializer, with the MAC's D output fed back through the memory
// controller, all sequenced by the system controller.
//
// Interface: clk, rst (synchronous, active high; polarity is this design's
// choice), serial input sdi/sdisel/sdiclk, serial output sdo/sdosel/sdoclk
// (16-bit words, MSB first, sel marks bit cycles, clk marks the first bit of
// a word). Each computed octave emits three words: its lowest, middle and
// highest band. Octaves follow the schedule: in sample period n (counted from
// reset), octave 1 and then octave 2 + (trailing ones of n mod 32), none when
// n mod 32 = 31. After reset the chip clears its data RAM for 256 cycles;
// samples sent meanwhile wait (one deep).
//
// The status signals of the blocks (controller busy and overrun, result
// octave and keep flag, serializer busy and overflow, accumulator enable)
// stay internal: the chip has only the eight pins above. They are left
// unconnected on purpose; testbenches observe them hierarchically.
module fb_top
  import fb_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic sdi,
  input  logic sdisel,
  input  logic sdiclk,
  output logic sdo,
  output logic sdosel,
  output logic sdoclk
);

  logic [DW-1:0]     in_sample;
  logic              in_valid;
  mem_cmd_t          mem_cmd;
  mac_cmd_t          mac_cmd;
  logic              res_valid, res_keep_d, busy, overrun, ser_busy, ser_overflow;
  logic [2:0]        res_oct;
  logic              mem_cen, mem_wen, mem_neg, acc_en_any;
  logic [ADDR_W-1:0] mem_addr;
  logic [DW-1:0]     mem_wdata, mem_out;
  logic [DW-1:0]     f37, f38, f39, d;

  fb_deserializer u_deser (
    .clk, .rst, .sdi, .sdisel, .sdiclk, .sample(in_sample), .sample_valid(in_valid)
  );

  fb_sys_ctrl u_ctrl (
    .clk, .rst, .start(in_valid), .mem_cmd, .mac_cmd, .res_valid, .res_oct,
    .res_keep_d, .busy, .overrun
  );

  fb_mem_ctrl u_memctrl (
    .clk, .rst, .cmd(mem_cmd), .in_sample, .d, .mem_cen, .mem_wen, .mem_addr, .mem_wdata
  );

  fb_memory u_mem (
    .clk, .rst, .mem_cen, .mem_wen, .mem_addr, .mem_wdata, .mem_out, .mem_neg
  );

  fb_mac u_mac (
    .clk, .rst, .cmd(mac_cmd), .data(mem_out), .neg(mem_neg), .f37, .f38, .f39, .d, .acc_en_any
  );

  fb_serializer u_ser (
    .clk, .rst, .load(res_valid), .f37, .f38, .f39, .sdo, .sdosel, .sdoclk,
    .busy(ser_busy), .overflow(ser_overflow)
  );

endmodule
