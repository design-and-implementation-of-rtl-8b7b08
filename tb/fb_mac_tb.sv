// fb_mac_tb: self-checking test of the MAC unit.
//
// Each round drives one octave computation as the controller would: 21 taps
// (centre tap first, then the symmetric pairs), each tap a LOAD, an ADD
// (not for the centre tap) and four ACC commands, with random samples,
// random coefficients and a random negate flag per coefficient (the word
// presented is then -c). The expected filter outputs are computed
// independently as sum((x[i] + x[40-i]) * c[i]) over the taps, scaled by
// 2^-15 and saturated to 16 bits, and compared with f37/f38/f39/d. Some
// rounds use full-scale data so that saturation is exercised.
module fb_mac_tb;
  import fb_pkg::*;

  logic clk = 0, rst = 1;
  mac_cmd_t cmd;
  logic [DW-1:0] data;
  logic neg;
  logic [DW-1:0] f37, f38, f39, d;
  logic acc_en_any;
  int checks = 0, failures = 0, sat_seen = 0, gated_cycles = 0;

  fb_mac dut (.clk, .rst, .cmd, .data, .neg, .f37, .f38, .f39, .d, .acc_en_any);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && cmd.op != MAC_NOP && !acc_en_any) gated_cycles++;

  function automatic logic [15:0] sat(longint a);
    longint s = a >>> 15;
    if (s > 32767) return 16'h7fff;
    if (s < -32768) return 16'h8000;
    return 16'(s);
  endfunction

  task automatic step(mac_op_e op, filt_e sel, logic clr, logic [15:0] w, logic ng);
    cmd  = '{op: op, sel: sel, clr: clr};
    data = w;
    neg  = ng;
    @(posedge clk);
    #1;
  endtask

  initial begin
    int x [41];
    int c [4][21];
    longint exp_acc [4];
    logic [15:0] got [4];
    cmd = '{op: MAC_NOP, sel: FIL_F37, clr: 1'b0};
    data = '0; neg = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 60; round++) begin
      automatic bit big = (round % 4 == 3);
      for (int i = 0; i < 41; i++)
        x[i] = big ? ((($urandom % 2) != 0) ? 32767 : -32768) : int'($signed(16'($urandom)));
      for (int f = 0; f < 4; f++)
        for (int i = 0; i < 21; i++)
          c[f][i] = big ? ((($urandom % 2) != 0) ? 20000 : -20000) : int'($signed(16'($urandom))) / 4;
      for (int f = 0; f < 4; f++) begin
        exp_acc[f] = 0;
        for (int i = 0; i < 20; i++) exp_acc[f] += longint'(x[i] + x[40-i]) * c[f][i];
        exp_acc[f] += longint'(x[20]) * c[f][20];
      end
      for (int t = 0; t < 21; t++) begin
        automatic int i = (t == 0) ? 20 : t - 1;
        step(MAC_LOAD, FIL_F37, 0, 16'(x[i]), $urandom % 2);
        if (t == 0) step(MAC_NOP, FIL_F37, 0, 16'($urandom), $urandom % 2);
        else        step(MAC_ADD, FIL_F37, 0, 16'(x[40 - i]), $urandom % 2);
        for (int k = 0; k < 4; k++) begin
          automatic filt_e fs = FILT_ORDER[k];
          automatic bit ng = $urandom % 2;
          step(MAC_ACC, fs, t == 0, ng ? 16'(-c[int'(fs)][i]) : 16'(c[int'(fs)][i]), ng);
        end
      end
      step(MAC_NOP, FIL_F37, 0, 16'($urandom), 0);
      got[0] = f37; got[1] = f38; got[2] = f39; got[3] = d;
      for (int f = 0; f < 4; f++) begin
        checks++;
        if (got[f] !== sat(exp_acc[f])) begin
          failures++;
          if (failures < 10) $display("round %0d filter %0d: got %h expected %h", round, f, got[f], sat(exp_acc[f]));
        end
        if ((exp_acc[f] >>> 15) > 32767 || (exp_acc[f] >>> 15) < -32768) sat_seen++;
      end
      // results must hold while idle
      repeat (5) step(MAC_NOP, FIL_F37, 0, 16'($urandom), $urandom % 2);
      checks++;
      if (f37 !== got[0] || d !== got[3]) failures++;
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    checks++;
    if (gated_cycles == 0) begin failures++; $display("no cycle with accumulators gated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
