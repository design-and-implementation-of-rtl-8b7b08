// fb_coef_rom: coefficient ROM of the four filters F37, F38, F39 and D.
//
// 84 words of 17 bits: a 16-bit coefficient and its negate flag. Word
// tap*4 + k holds the coefficient of tap `tap` (tap 0 is the centre tap,
// taps 1..20 the symmetric pairs from the outside in) of filter
// FILT_ORDER[k]. The contents come from fb_pkg::build_rom, which applies
// selective coefficient negation along this read order. Synchronous read:
// when en is high, word addr appears on the outputs in the next cycle;
// otherwise the outputs hold.
module fb_coef_rom
  import fb_pkg::*;
(
  input  logic          clk,
  input  logic          en,
  input  logic [6:0]    addr,
  output logic [DW-1:0] val,
  output logic          neg
);

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (en) {neg, val} <= (32'(addr) < ROM_WORDS) ? ROM[addr] : '0;
  end

endmodule
