// fb_memory: the memory block, a data RAM (delay lines) and a coefficient
// ROM behind one address port.
//
// Address map of the 16-bit mem_addr: words 0..255 are the data RAM,
// words 256..339 the coefficient ROM. mem_cen requests an access in this
// cycle, mem_wen makes it a write (RAM only). Reads have one cycle of
// latency: mem_out/mem_neg show the word addressed in the previous access
// cycle and hold between accesses; mem_neg is the negate flag of a ROM word
// and is 0 for RAM words.
//
// Operand isolation: the RAM and the ROM are never accessed in the same
// cycle, so the address, data and enable inputs of the one not addressed
// are forced to zero (AND gates); its inputs then do not toggle and it
// dissipates no access power.
module fb_memory
  import fb_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              mem_cen,
  input  logic              mem_wen,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [DW-1:0]     mem_wdata,
  output logic [DW-1:0]     mem_out,
  output logic              mem_neg
);

  logic ram_sel, rom_sel, rd_rom_q;
  logic              ram_en, ram_we;
  logic [RAM_AW-1:0] ram_addr;
  logic [DW-1:0]     ram_wdata, ram_rdata;
  logic              rom_en;
  logic [6:0]        rom_addr;
  logic [DW-1:0]     rom_val;
  logic              rom_neg;
  logic [ADDR_W-1:0] rom_off;

  assign ram_sel = mem_cen && (32'(mem_addr) < ROM_BASE);
  assign rom_sel = mem_cen && (32'(mem_addr) >= ROM_BASE);
  assign rom_off = mem_addr - ADDR_W'(ROM_BASE);

  // Operand isolation.
  assign ram_en    = ram_sel;
  assign ram_we    = ram_sel & mem_wen;
  assign ram_addr  = mem_addr[RAM_AW-1:0] & {RAM_AW{ram_sel}};
  assign ram_wdata = mem_wdata & {DW{ram_sel & mem_wen}};
  assign rom_en    = rom_sel;
  assign rom_addr  = rom_off[6:0] & {7{rom_sel}};

  fb_data_ram u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .rdata(ram_rdata)
  );

  fb_coef_rom u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .val(rom_val), .neg(rom_neg)
  );

  // Remember which memory the last read went to.
  always_ff @(posedge clk) begin
    if (rst)                     rd_rom_q <= 1'b0;
    else if (mem_cen && !mem_wen) rd_rom_q <= rom_sel;
  end

  assign mem_out = rd_rom_q ? rom_val : ram_rdata;
  assign mem_neg = rd_rom_q & rom_neg;

  // Only RAM words are written; every access falls inside RAM or ROM.
  a_wr_ram: assert property (@(posedge clk) disable iff (rst)
    (mem_cen && mem_wen) |-> (32'(mem_addr) < RAM_DEPTH))
    else $error("write to address %0d", mem_addr);
  a_map: assert property (@(posedge clk) disable iff (rst)
    mem_cen |-> (32'(mem_addr) < ROM_BASE + ROM_WORDS))
    else $error("access to unmapped address %0d", mem_addr);

endmodule
