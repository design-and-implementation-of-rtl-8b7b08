// fb_memory_tb: self-checking test of the memory block (data RAM, coefficient
// ROM, operand isolation).
//
// 1. Writes random words to all 256 RAM addresses and reads them back in a
//    random order (one-cycle read latency), comparing with a model array.
// 2. Reads the 84 ROM words and checks that the stored word, negated when
//    its flag is set, equals the filter coefficient the read order calls
//    for (half responses of fb_pkg, centre tap first), and that selective
//    negation lowers the Hamming distance between consecutive words.
// 3. Checks operand isolation: during a ROM access the RAM's enable,
//    address and data inputs are all zero, and during a RAM access the ROM's
//    enable and address are zero.
// 4. Checks that the output holds while no access is made.
module fb_memory_tb;
  import fb_pkg::*;

  logic clk = 0, rst = 1;
  logic mem_cen = 0, mem_wen = 0;
  logic [ADDR_W-1:0] mem_addr = '0;
  logic [DW-1:0] mem_wdata = '0, mem_out;
  logic mem_neg;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [256];

  fb_memory dut (.clk, .rst, .mem_cen, .mem_wen, .mem_addr, .mem_wdata, .mem_out, .mem_neg);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hd(logic [15:0] a, logic [15:0] b);
    return $countones(a ^ b);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic access(logic cen, logic wen, logic [15:0] a, logic [15:0] w);
    mem_cen = cen; mem_wen = wen; mem_addr = a; mem_wdata = w;
    #1;
    if (cen && a >= 16'(ROM_BASE))
      check(!dut.ram_en && dut.ram_addr == '0 && dut.ram_wdata == '0, "RAM not isolated during ROM access");
    if (cen && a < 16'(ROM_BASE))
      check(!dut.rom_en && dut.rom_addr == '0, "ROM not isolated during RAM access");
    @(posedge clk);
    #1;
  endtask

  initial begin
    int hd_stored, hd_plain, nneg;
    logic [15:0] prev_s, prev_p;
    hd_stored = 0; hd_plain = 0; nneg = 0;
    prev_s = '0; prev_p = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // RAM
    for (int a = 0; a < 256; a++) begin
      model[a] = 16'($urandom);
      access(1, 1, 16'(a), model[a]);
    end
    for (int k = 0; k < 600; k++) begin
      automatic int a = $urandom % 256;
      access(1, 0, 16'(a), '0);
      check(mem_out == model[a] && !mem_neg, $sformatf("RAM word %0d", a));
      if (k % 50 == 0) begin
        automatic logic [15:0] held = mem_out;
        access(0, 0, 16'($urandom), 16'($urandom));
        access(0, 1, 16'($urandom % 256), 16'($urandom));
        check(mem_out == held, "output not held while idle");
      end
    end
    // ROM
    for (int k = 0; k < int'(ROM_WORDS); k++) begin
      automatic int t = k / 4;
      automatic int idx = (t == 0) ? 20 : t - 1;
      automatic filt_e f = FILT_ORDER[k % 4];
      automatic int h;
      automatic logic [15:0] decoded;
      case (f)
        FIL_F37: h = H37[idx];
        FIL_F38: h = H38[idx];
        FIL_F39: h = H39[idx];
        default: h = HD[idx];
      endcase
      access(1, 0, 16'(ROM_BASE + k), '0);
      decoded = mem_neg ? -mem_out : mem_out;
      check(decoded == 16'(h), $sformatf("ROM word %0d: %h expected %h", k, decoded, 16'(h)));
      hd_stored += hd(mem_out, prev_s); prev_s = mem_out;
      hd_plain  += hd(16'(h), prev_p);  prev_p = 16'(h);
      if (mem_neg) nneg++;
    end
    $display("ROM Hamming distance: %0d stored, %0d without negation; %0d words negated", hd_stored, hd_plain, nneg);
    check(nneg > 0 && hd_stored < hd_plain, "selective negation has no effect");
    // RAM contents survive ROM accesses
    for (int a = 0; a < 256; a += 17) begin
      access(1, 0, 16'(a), '0);
      check(mem_out == model[a], "RAM word after ROM reads");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
