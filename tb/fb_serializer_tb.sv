// fb_serializer_tb: self-checking test of the serial output.
//
// Loads 200 random triples (f37, f38, f39) at random intervals of at least
// 48 cycles and decodes the line: each triple must come out as three words,
// f37 first, MSB first, sdosel high on all 48 bit cycles in a row and sdoclk
// high exactly on the first bit of each word; the first bit is driven
// from the clock edge after the one that takes the load. A load while busy must raise overflow and be dropped.
module fb_serializer_tb;
  logic clk = 0, rst = 1, load = 0;
  logic [15:0] f37, f38, f39;
  logic sdo, sdosel, sdoclk, busy, overflow;
  int checks = 0, failures = 0, nover = 0;

  fb_serializer dut (.clk, .rst, .load, .f37, .f38, .f39, .sdo, .sdosel, .sdoclk, .busy, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      automatic logic [47:0] v = {16'($urandom), 16'($urandom), 16'($urandom)};
      automatic logic [47:0] got = '0;
      {f37, f38, f39} = v;
      load = 1;
      @(negedge clk);
      load = 0;
      check(!sdosel, "line active in the load cycle");
      @(negedge clk);
      for (int b = 47; b >= 0; b--) begin
        check(sdosel, "sdosel low during a word");
        check(sdoclk == (b % 16 == 15), "sdoclk not on the first bit of a word");
        got[b] = sdo;
        if (b == 30 && n % 10 == 3) begin
          {f37, f38, f39} = ~v;
          load = 1;
        end
        @(negedge clk);
        if (load) begin
          load = 0;
          check(overflow, "overflow not flagged");
          nover++;
        end
      end
      check(got == v, $sformatf("word triple %h, expected %h", got, v));
      check(!sdosel && !busy, "line not idle after 48 bits");
      repeat ($urandom % 20) begin
        check(!sdosel, "sdosel high while idle");
        @(negedge clk);
      end
    end
    check(nover > 0, "overflow never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
