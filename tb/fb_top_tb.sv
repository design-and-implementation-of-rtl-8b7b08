// fb_top_tb: end-to-end test of the filter bank at its default size.
//
// Sends NS random 16-bit samples (6000 = 250 ms at 24 kHz) through the
// serial input, one every 255 clocks (6.13 MHz clock / 24 kHz), decodes the
// serial output and compares every band word with a reference model.
//
// Reference model (independent of the RTL's schedule and memory layout):
//   x1 = input; for octave k, every output sample n of band filter F is
//   sat16((sum_j h_F[j] * xk[n-j]) >>> 15) over the 41-tap centre-aligned
//   responses (zero history before the first sample), and
//   x(k+1)[m] = sat16((sum_j h_D[j] * xk[2m-j]) >>> 15).
// Expected output order: in sample period p, octave 1 and then octave
// 1 + (trailing ones of 2p+1 mod 64), none if that exceeds 6; each
// octave's results come in run order, three words (F37, F38, F39 outputs).
//
// Also checked: 253 busy controller cycles per sample period, no lost
// sample and no serializer overflow, and that each mechanism of the design
// happened: all six octaves computed, decimated samples kept and
// discarded, idle slot, symmetric-pair additions, centre taps, selective
// negation (subtracting accumulations), gated accumulator cycles, isolated
// RAM and ROM accesses, serial words in and out.
module fb_top_tb;
  import fb_pkg::*;

  localparam int NS      = 6000;
  localparam int SPACING = 255;

  logic clk = 0, rst = 1;
  logic sdi = 0, sdisel = 0, sdiclk = 0;
  logic sdo, sdosel, sdoclk;
  int checks = 0, failures = 0;

  fb_top dut (.clk, .rst, .sdi, .sdisel, .sdiclk, .sdo, .sdosel, .sdoclk);

  always #5 clk = ~clk;

  initial begin
    repeat (NS * SPACING + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  int x   [6][$];          // octave inputs
  int y   [6][3][$];       // band outputs per octave: F37, F38, F39

  function automatic int h41(int f, int j);   // 41-tap centre-aligned response
    int i = (j <= 20) ? j : 40 - j;
    case (f)
      0: return H37[i];
      1: return H38[i];
      2: return H39[i];
      default: return HD[i];
    endcase
  endfunction

  function automatic int sat16(longint a);
    longint s = a >>> 15;
    if (s > 32767) return 32767;
    if (s < -32768) return -32768;
    return int'(s);
  endfunction

  function automatic int fir(int f, int k, int n);
    longint acc = 0;
    for (int j = 0; j < 41; j++)
      if (n - j >= 0) acc += longint'(h41(f, j)) * x[k][n - j];
    return sat16(acc);
  endfunction

  task automatic build_reference();
    for (int k = 0; k < 6; k++) begin
      if (k > 0)
        for (int m = 0; 2 * m < x[k-1].size(); m++) x[k].push_back(fir(3, k - 1, 2 * m));
      for (int n = 0; n < x[k].size(); n++)
        for (int f = 0; f < 3; f++) y[k][f].push_back(fir(f, k, n));
    end
  endtask

  function automatic int rule_oct(int t);
    int k = 1;
    while (t % 2 == 1) begin k++; t = t / 2; end
    return k;
  endfunction

  // ---------------- serial output decoder ----------------
  logic [15:0] words [$];
  logic [15:0] sh;
  int nb = -1;
  always @(posedge clk) begin
    if (!rst && sdosel) begin
      if (sdoclk) begin sh = {15'b0, sdo}; nb = 1; end
      else if (nb > 0) begin sh = {sh[14:0], sdo}; nb++; end
      if (nb == 16) begin words.push_back(sh); nb = -1; end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_oct_runs [6];
  int n_keep = 0, n_discard = 0, n_idle = 0, n_pair = 0, n_centre = 0, n_neg = 0;
  int n_gated = 0, n_rom_iso = 0, n_ram_iso = 0, n_in_words = 0, busy_cyc = 0;
  int n_overrun = 0, n_ovf = 0, n_wrd = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_ctrl.res_valid) begin
        n_oct_runs[dut.u_ctrl.res_oct]++;
        if (dut.u_ctrl.res_keep_d) n_keep++;
        else if (dut.u_ctrl.res_oct < 3'd5) n_discard++;
      end
      if (dut.u_ctrl.last_op && dut.u_ctrl.idle_slot) n_idle++;
      if (dut.mac_cmd.op == MAC_ADD) n_pair++;
      if (dut.mac_cmd.op == MAC_LOAD && dut.u_ctrl.mem_cmd.op != MEM_RD_DATA) n_centre++;
      if (dut.mac_cmd.op == MAC_ACC && dut.mem_neg) n_neg++;
      if (dut.mac_cmd.op != MAC_NOP && !dut.acc_en_any) n_gated++;
      if (dut.mem_cen && dut.mem_addr >= 16'(ROM_BASE) && !dut.u_mem.ram_en && dut.u_mem.ram_addr == '0) n_rom_iso++;
      if (dut.mem_cen && dut.mem_addr < 16'(ROM_BASE) && !dut.u_mem.rom_en && dut.u_mem.rom_addr == '0) n_ram_iso++;
      if (dut.in_valid) n_in_words++;
      if (dut.u_ctrl.state == dut.u_ctrl.S_IN || dut.u_ctrl.state == dut.u_ctrl.S_SLOT) busy_cyc++;
      if (dut.overrun) n_overrun++;
      if (dut.ser_overflow) n_ovf++;
      if (dut.mem_cmd.op == MEM_WR_D) n_wrd++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic send_word(logic [15:0] v);
    for (int b = 15; b >= 0; b--) begin
      sdi = v[b]; sdisel = 1; sdiclk = (b == 15);
      @(negedge clk);
    end
    sdi = 0; sdisel = 0; sdiclk = 0;
  endtask

  initial begin
    int wi, run [7];
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NS; n++) begin
      // white noise with a slowly varying level, full scale at times
      automatic int amp = (n % 1000 < 500) ? 32767 : 4096 + (n % 7) * 2000;
      automatic int v = int'($signed(16'($urandom))) * amp / 32768;
      x[0].push_back(v);
    end
    build_reference();
    repeat (300) @(negedge clk);          // RAM clear after reset
    for (int n = 0; n < NS; n++) begin
      send_word(16'(x[0][n]));
      repeat (SPACING - 16) @(negedge clk);
    end
    repeat (600) @(negedge clk);
    // compare
    wi = 0;
    for (int p = 0; p < NS; p++) begin
      for (int s = 0; s < 2; s++) begin
        automatic int kk = (s == 0) ? 1 : rule_oct((2 * p + 1) % 64);
        if (kk > 6) continue;
        for (int f = 0; f < 3; f++) begin
          automatic int e = y[kk-1][f][run[kk]];
          if (wi < words.size())
            check(words[wi] == 16'(e), $sformatf("period %0d octave %0d run %0d filter %0d: %h expected %h",
                                                 p, kk, run[kk], f, words[wi], 16'(e)));
          else check(0, "output word missing");
          wi++;
        end
        run[kk]++;
      end
    end
    check(wi == words.size(), $sformatf("%0d output words, %0d expected", words.size(), wi));
    check(busy_cyc == NS * PERIOD_CYC, $sformatf("%0d busy cycles, expected %0d x 253", busy_cyc, NS));
    check(n_in_words == NS && n_overrun == 0 && n_ovf == 0, "lost sample or output overflow");
    for (int k = 0; k < 6; k++) check(n_oct_runs[k] > 0, $sformatf("octave %0d never computed", k + 1));
    check(n_keep > 0,    "no decimated sample kept");
    check(n_wrd == n_keep, "kept samples and delay-line writes differ");
    check(n_discard > 0, "no decimated sample discarded");
    check(n_idle > 0,    "no idle slot");
    check(n_pair > 0,    "no symmetric pair addition");
    check(n_centre > 0,  "no centre tap");
    check(n_neg > 0,     "no negated coefficient");
    check(n_gated > 0,   "no gated accumulator cycle");
    check(n_rom_iso > 0 && n_ram_iso > 0, "no isolated memory access");
    $display("octave runs %0d %0d %0d %0d %0d %0d; D kept %0d, discarded %0d; idle slots %0d",
             n_oct_runs[0], n_oct_runs[1], n_oct_runs[2], n_oct_runs[3], n_oct_runs[4], n_oct_runs[5],
             n_keep, n_discard, n_idle);
    $display("pair adds %0d, centre taps %0d, negated coefficients %0d, gated MAC cycles %0d, ROM/RAM isolated accesses %0d/%0d",
             n_pair, n_centre, n_neg, n_gated, n_rom_iso, n_ram_iso);
    $display("input words %0d, output words %0d, busy cycles per sample %0d", n_in_words, words.size(), busy_cyc / NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
