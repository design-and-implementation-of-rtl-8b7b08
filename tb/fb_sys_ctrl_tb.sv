// fb_sys_ctrl_tb: self-checking test of the system controller (RPA schedule).
//
// After the 256-cycle RAM clear, the test starts 70 sample periods, each as
// soon as the previous one is over, and records every memory command. For
// each period it checks:
//   - the period is 253 command cycles: one MEM_WR_IN, then two slots of 21
//     taps x 6 cycles (the command of every cycle is checked: element reads
//     i / 40-i, or the centre element, then four coefficient reads with ROM
//     word tap*4+k), and the MAC command one cycle later matches;
//   - the octave of each slot follows Table II of the recursive pyramid
//     schedule (first 14 slots typed in from the table; later ones from the
//     rule "slot T computes octave 1 + number of trailing ones of T");
//   - the decimated outputs are kept where Table II produces x2..x5 (and for
//     all slots by the rule: octave k's runs alternate, first kept, none for
//     octave 6), each kept output advances octave k+1's pointer at the
//     slot's last command and is written to octave k+1 in the next slot;
//   - res_valid arrives once per non-idle slot, two cycles after its last
//     command, with the slot's octave.
// It also checks that a start during a period is remembered and starts the
// next period right after the current one.
module fb_sys_ctrl_tb;
  import fb_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  mem_cmd_t mem_cmd;
  mac_cmd_t mac_cmd;
  logic res_valid, res_keep_d, busy, overrun;
  logic [2:0] res_oct;
  int checks = 0, failures = 0;

  fb_sys_ctrl dut (.clk, .rst, .start, .mem_cmd, .mac_cmd, .res_valid, .res_oct, .res_keep_d, .busy, .overrun);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Table II, slots T = 0..13: octave (1-based) and whether x_{k+1} is produced.
  localparam int TAB_OCT  [14] = '{1, 2, 1, 3, 1, 2, 1, 4, 1, 2, 1, 3, 1, 2};
  localparam bit TAB_KEEP [14] = '{1, 1, 0, 1, 1, 0, 0, 1, 1, 1, 0, 0, 1, 0};

  function automatic int rule_oct(int t);
    int k = 1;
    while (t % 2 == 1) begin k++; t = t / 2; end
    return k;
  endfunction

  // Monitor: every command and every result, stamped with the cycle.
  mem_cmd_t cmds [$];
  int res_cyc [$], res_k [$];
  bit res_kp [$];
  int cyc = 0;
  mem_cmd_t prev_cmd = '{op: MEM_NOP, default: '0};
  bit prev_first = 0;

  always @(posedge clk) begin
    if (!rst) begin
      mac_cmd_t e;
      // the MAC command of this cycle belongs to the previous memory command
      e = '{op: MAC_NOP, sel: FIL_F37, clr: 1'b0};
      if (prev_cmd.op == MEM_RD_DATA) e.op = prev_first ? MAC_LOAD : MAC_ADD;
      if (prev_cmd.op == MEM_RD_COEF) begin
        e.op  = MAC_ACC;
        e.sel = FILT_ORDER[prev_cmd.idx % 4];
        e.clr = (prev_cmd.idx < 4);
      end
      check(mac_cmd == e, $sformatf("MAC command %p, expected %p", mac_cmd, e));
      cmds.push_back(mem_cmd);
      if (res_valid) begin res_cyc.push_back(cyc); res_k.push_back(int'(res_oct)); res_kp.push_back(res_keep_d); end
      // a data read is the first of a tap when it follows a coefficient read,
      // the input write, or nothing
      prev_first = (mem_cmd.op == MEM_RD_DATA) && !(prev_cmd.op == MEM_RD_DATA);
      prev_cmd = mem_cmd;
      cyc++;
    end
  end

  initial begin
    int runs [8];
    int pend_oct, ri, p, slot_t, n_idle, n_wrd;
    bit pend;
    repeat (2) @(posedge clk);
    #2 rst = 0;
    // stimulus: 70 periods, each started when the previous one is over; in
    // period 5 a second start arrives during the period
    repeat (300) @(negedge clk);
    for (int q = 0; q < 70; q++) begin
      start = 1; @(negedge clk); start = 0;
      if (q == 5) begin repeat (40) @(negedge clk); start = 1; @(negedge clk); start = 0; q++; end
      while (busy) @(negedge clk);
      check(!overrun, "overrun");
      repeat (3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    // analysis
    for (int a = 0; a < 256; a++) check(cmds[a].op == MEM_CLR && cmds[a].idx == 8'(a), "RAM clear sequence");
    pend = 0; ri = 0; p = 0; n_idle = 0; n_wrd = 0;
    for (int c = 256; c < cmds.size(); c++) begin
      if (cmds[c].op != MEM_WR_IN) begin
        check(cmds[c].op == MEM_NOP, $sformatf("command %p outside a period", cmds[c]));
        continue;
      end
      // period p starts at cycle c: 253 command cycles
      for (int s = 0; s < 2; s++) begin
        int kk, k, last;
        bit idle, keep;
        slot_t = 2 * p + s;
        kk = rule_oct(slot_t % 64);
        if (slot_t < 14) check(kk == TAB_OCT[slot_t], "rule disagrees with Table II");
        idle = (kk > 6);
        k = kk - 1;
        keep = !idle && kk < 6 && (runs[kk] % 2 == 0);
        if (slot_t < 14) check(keep == TAB_KEEP[slot_t], $sformatf("slot %0d kept %0d", slot_t, keep));
        if (!idle) runs[kk]++; else n_idle++;
        for (int t = 0; t < 21; t++) begin
          for (int q = 0; q < 6; q++) begin
            automatic mem_cmd_t m = cmds[c + 1 + 126 * s + 6 * t + q];
            if (t == 0 && q == 1) begin
              if (pend) begin
                check(m.op == MEM_WR_D && m.oct == 3'(pend_oct), "pending decimated sample written");
                n_wrd++;
              end else check(m.op == MEM_NOP, "free cycle unused");
              pend = 0;
            end else if (idle) check(m.op == MEM_NOP, "idle slot issues commands");
            else if (q == 0)
              check(m.op == MEM_RD_DATA && m.oct == 3'(k) && m.j == 6'((t == 0) ? 20 : t - 1),
                    $sformatf("slot %0d tap %0d phase 0: %p", slot_t, t, m));
            else if (q == 1)
              check(m.op == MEM_RD_DATA && m.oct == 3'(k) && m.j == 6'(40 - (t - 1)), "pair read");
            else
              check(m.op == MEM_RD_COEF && m.idx == 8'(4 * t + q - 2), "coefficient read");
            if (t == 20 && q == 5) check(m.adv == keep && (!keep || m.adv_oct == 3'(k + 1)), "pointer advance at slot end");
            else                   check(!m.adv, "stray pointer advance");
          end
        end
        if (keep) begin pend = 1; pend_oct = k + 1; end
        last = c + 126 * (s + 1);
        if (!idle) begin
          check(ri < res_cyc.size() && res_cyc[ri] == last + 2 && res_k[ri] == k && res_kp[ri] == keep,
                $sformatf("result of slot %0d", slot_t));
          ri++;
        end
      end
      c += 252;
      p++;
    end
    check(p == 70, $sformatf("%0d periods seen", p));
    check(ri == res_cyc.size(), "extra results");
    check(n_idle > 0 && n_wrd > 0, "idle slot or decimated write never seen");
    $display("periods %0d, idle slots %0d, decimated writes %0d", p, n_idle, n_wrd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
