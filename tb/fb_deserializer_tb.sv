// fb_deserializer_tb: self-checking test of the serial input.
//
// Sends 300 random 16-bit words MSB first, one bit per clock with sdisel
// high and sdiclk high on the first bit, with random idle gaps (sdisel low)
// between and inside words, and some words aborted after a few bits by a new
// sdiclk. Each complete word must appear on sample with a one-cycle
// sample_valid pulse the cycle after its last bit; aborted words must not.
module fb_deserializer_tb;
  logic clk = 0, rst = 1;
  logic sdi = 0, sdisel = 0, sdiclk = 0;
  logic [15:0] sample;
  logic sample_valid;
  int checks = 0, failures = 0, nvalid = 0, nexp = 0, aborted = 0;
  logic [15:0] expq [$];

  fb_deserializer dut (.clk, .rst, .sdi, .sdisel, .sdiclk, .sample, .sample_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && sample_valid) begin
    nvalid++;
    checks++;
    if (expq.size() == 0 || sample != expq[0]) begin
      failures++;
      $display("FAIL: got %h expected %h (queue %0d)", sample, expq.size() ? expq[0] : 16'h0, expq.size());
    end
    if (expq.size() > 0) void'(expq.pop_front());
  end

  task automatic send_bit(logic b, logic first);
    sdi = b; sdisel = 1; sdiclk = first;
    @(negedge clk);
    sdisel = 0; sdiclk = 0; sdi = $urandom % 2;
    if ($urandom % 8 == 0) repeat (1 + $urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 300; w++) begin
      automatic logic [15:0] v = 16'($urandom);
      if (w % 17 == 5) begin
        for (int b = 15; b > 12; b--) send_bit(v[b], b == 15);
        aborted++;
        v = 16'($urandom);
      end
      for (int b = 15; b >= 0; b--) begin
        if (b == 0) expq.push_back(v);
        send_bit(v[b], b == 15);
        if (b == 0) begin
          @(posedge clk); #1;
          checks++;
          if (expq.size() != 0) begin failures++; $display("FAIL: word %0d not delivered one cycle after its last bit", w); end
          @(negedge clk);
        end
      end
      nexp++;
      repeat ($urandom % 4) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (nvalid != nexp || aborted == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
