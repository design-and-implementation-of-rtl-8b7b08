// fb_data_ram: single-port 256 x 16 data RAM that holds the six 41-word
// delay lines of the filter bank (246 of its 256 words are used).
//
// It stands for the register-file macro of the source design, written here as
// an array. One access per cycle: when en is high, we selects a write of
// wdata to addr, otherwise addr is read and rdata shows the word in the next
// cycle. When en is low the output register keeps its value. The array has no
// reset; the system controller clears it after reset.
module fb_data_ram
  import fb_pkg::*;
#(
  parameter int unsigned DEPTH = RAM_DEPTH,
  parameter int unsigned AW    = RAM_AW
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
