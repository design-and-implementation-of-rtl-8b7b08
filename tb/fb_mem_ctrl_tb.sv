// fb_mem_ctrl_tb: self-checking test of the memory controller.
//
// The controller drives a plain array standing in for the data RAM. The
// test keeps, per octave, the list of samples written to that octave's delay
// line, newest first, and issues random commands:
//   MEM_WR_IN  (new input sample into octave 1),
//   adv flag on a command, then MEM_WR_D (D output into octave k),
//   MEM_RD_DATA (element j of octave k): the word read must be the j-th
//              newest sample of that octave, and the address must lie in
//              the octave's 41-word region,
//   MEM_RD_COEF (address 256 + idx, no write), MEM_CLR (zero at idx).
// It also checks that reads issued between a pointer advance and the
// matching MEM_WR_D already see the old samples at their new positions.
module fb_mem_ctrl_tb;
  import fb_pkg::*;

  logic clk = 0, rst = 1;
  mem_cmd_t cmd;
  logic [DW-1:0] in_sample, d;
  logic mem_cen, mem_wen;
  logic [ADDR_W-1:0] mem_addr;
  logic [DW-1:0] mem_wdata;
  logic [DW-1:0] ram [256];
  int checks = 0, failures = 0, n_adv_reads = 0;
  logic [15:0] hist [6][$];

  fb_mem_ctrl dut (.clk, .rst, .cmd, .in_sample, .d, .mem_cen, .mem_wen, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (mem_cen && mem_wen && mem_addr < 256) ram[mem_addr[7:0]] <= mem_wdata;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic issue(mem_cmd_t c);
    cmd = c;
    #1;
    @(posedge clk);
    #1;
    cmd = '{op: MEM_NOP, default: '0};
  endtask

  // Read element j of octave k and compare with the history. `shift` = 1 when
  // the octave's pointer was advanced but its new sample not yet written.
  task automatic rd(int k, int j, int shift);
    cmd = '{op: MEM_RD_DATA, oct: 3'(k), j: 6'(j), default: '0};
    #1;
    check(mem_cen && !mem_wen && mem_addr >= 16'(41 * k) && mem_addr < 16'(41 * k + 41),
          $sformatf("read address %0d outside octave %0d", mem_addr, k));
    if (j - shift >= 0 && j - shift < hist[k].size())
      check(ram[mem_addr[7:0]] == hist[k][j - shift],
            $sformatf("octave %0d element %0d: %h expected %h", k, j, ram[mem_addr[7:0]], hist[k][j - shift]));
    @(posedge clk);
    #1;
  endtask

  initial begin
    cmd = '{op: MEM_NOP, default: '0};
    in_sample = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < 256; a++) issue('{op: MEM_CLR, idx: 8'(a), default: '0});
    for (int a = 0; a < 256; a++) check(ram[a] == '0, "MEM_CLR");
    for (int k = 0; k < 6; k++) for (int j = 0; j < 41; j++) hist[k].push_back(16'h0);
    for (int it = 0; it < 3000; it++) begin
      automatic int r = $urandom % 10;
      automatic int k = $urandom % 6;
      if (r < 3) begin
        in_sample = 16'($urandom);
        issue('{op: MEM_WR_IN, default: '0});
        hist[0].push_front(in_sample);
        check(1, "");
      end else if (r < 5 && k > 0) begin
        // advance with a coefficient read, read the octave, then write
        issue('{op: MEM_RD_COEF, idx: 8'(k), adv: 1'b1, adv_oct: 3'(k), default: '0});
        for (int q = 0; q < 3; q++) begin
          rd(k, 1 + $urandom % 40, 1);
          n_adv_reads++;
        end
        d = 16'($urandom);
        cmd = '{op: MEM_WR_D, oct: 3'(k), default: '0};
        #1;
        check(mem_cen && mem_wen && mem_wdata == d, "MEM_WR_D selects d");
        @(posedge clk); #1;
        hist[k].push_front(d);
      end else if (r < 6) begin
        cmd = '{op: MEM_RD_COEF, idx: 8'($urandom % 84), default: '0};
        #1;
        check(mem_cen && !mem_wen && mem_addr == 16'(256) + 16'(cmd.idx), "coefficient address");
        @(posedge clk); #1;
      end else begin
        rd(k, $urandom % 41, 0);
      end
    end
    check(n_adv_reads > 0, "no reads between advance and write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
