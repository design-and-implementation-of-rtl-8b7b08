// fb_response_tb: band selectivity of the whole filter bank, measured
// through the serial pins at the default size.
//
// Plays half-scale sines through the serial input, one tone after the other,
// and measures the mean-square value of every band output over the last 1024
// input samples of each tone (the first 3000 samples let all six octaves
// settle). Two sets of tones:
//   - the mid-band frequency of each of the 18 bands 22..39,
//     fm(n) = 1000 * 2^((n-30)/3) Hz at fs = 24 kHz: the band with the
//     largest output must be the tone's own band, and its gain must be within
//     1 dB of the input level (the class-2 pass-band ripple limit), and every
//     other band must be at least 13.6 dB lower: a neighbouring band's
//     mid-band is at r = 2^(1/3) = 1.26 of its own, where the class-2 mask
//     (linear in log r between 1.6 dB at r = 1.1225 and 16.5 dB at
//     r = 1.2957) asks for that much attenuation;
//   - probe tones at 100, 300, 1000, 3000, 6000, 9000 and 11000 Hz: every
//     band n for which the tone lies below 0.184 * fm(n) or above
//     5.434 * fm(n) must attenuate it by at least 60 dB (the class-2
//     stop-band limit). This checks the decimation chain too: a low band sees
//     a high tone only through aliasing left by the decimation filters.
// The class-2 mask between those points is not checked.
//
// Output words are assigned to bands by the schedule: in sample period p
// the first octave, then octave 1 + (trailing ones of 2p+1 mod 64) if it is
// at most 6; three words per octave k, bands 40-3k, 41-3k, 42-3k.
module fb_response_tb;
  import fb_pkg::*;

  localparam int SETTLE  = 3000;
  localparam int MEASURE = 1024;
  localparam int SPACING = 255;
  localparam real AMP    = 16384.0;
  localparam int N_PROBE = 7;
  localparam real PROBE_HZ [N_PROBE] = '{100.0, 300.0, 1000.0, 3000.0, 6000.0, 9000.0, 11000.0};
  localparam int N_TONES = 18 + N_PROBE;

  logic clk = 0, rst = 1;
  logic sdi = 0, sdisel = 0, sdiclk = 0;
  logic sdo, sdosel, sdoclk;
  int checks = 0, failures = 0;

  fb_top dut (.clk, .rst, .sdi, .sdisel, .sdiclk, .sdo, .sdosel, .sdoclk);

  always #5 clk = ~clk;

  initial begin
    repeat (N_TONES * (SETTLE + MEASURE) * SPACING + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rule_oct(int t);
    int k = 1;
    while (t % 2 == 1) begin k++; t = t / 2; end
    return k;
  endfunction

  // Band of the w-th output word of all time, following the schedule.
  int word_band [$];
  int word_period [$];
  task automatic schedule_period(int p);
    for (int s = 0; s < 2; s++) begin
      automatic int kk = (s == 0) ? 1 : rule_oct((2 * p + 1) % 64);
      if (kk <= 6)
        for (int f = 0; f < 3; f++) begin
          word_band.push_back(40 - 3 * kk + f);
          word_period.push_back(p);
        end
    end
  endtask

  // Serial output decoder: accumulates the power of each band.
  real pw [22:39];
  int  cnt [22:39];
  int  meas_from = 0, meas_to = -1;
  int  wi = 0;
  logic [15:0] sh;
  int nb = -1;
  always @(posedge clk) begin
    if (!rst && sdosel) begin
      if (sdoclk) begin sh = {15'b0, sdo}; nb = 1; end
      else if (nb > 0) begin sh = {sh[14:0], sdo}; nb++; end
      if (nb == 16) begin
        if (wi < word_band.size() && word_period[wi] >= meas_from && word_period[wi] <= meas_to) begin
          automatic real v = real'($signed(sh));
          pw[word_band[wi]] += v * v;
          cnt[word_band[wi]]++;
        end
        wi++;
        nb = -1;
      end
    end
  end

  task automatic send_word(logic [15:0] v);
    for (int b = 15; b >= 0; b--) begin
      sdi = v[b]; sdisel = 1; sdiclk = (b == 15);
      @(negedge clk);
    end
    sdi = 0; sdisel = 0; sdiclk = 0;
  endtask

  function automatic real mid_hz(int band);
    return 1000.0 * (2.0 ** ((real'(band) - 30.0) / 3.0));
  endfunction

  initial begin
    int p;
    real ph;
    p = 0;
    ph = 0.0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (300) @(negedge clk);
    for (int t = 0; t < N_TONES; t++) begin
      automatic int band = (t < 18) ? 22 + t : 0;
      automatic real fm = (t < 18) ? mid_hz(band) : PROBE_HZ[t - 18];
      automatic real inc = 2.0 * 3.141592653589793 * fm / 24000.0;
      automatic real lvl = AMP * AMP / 2.0;
      automatic int best = 22;
      automatic real db [22:39];
      for (int b = 22; b <= 39; b++) begin pw[b] = 0.0; cnt[b] = 0; end
      meas_from = p + SETTLE;
      meas_to   = p + SETTLE + MEASURE - 1;
      for (int n = 0; n < SETTLE + MEASURE; n++) begin
        schedule_period(p);
        send_word(16'($rtoi(AMP * $sin(ph))));
        ph += inc;
        p++;
        repeat (SPACING - 16) @(negedge clk);
      end
      repeat (2 * SPACING) @(negedge clk);
      for (int b = 22; b <= 39; b++) begin
        if (cnt[b] > 0) pw[b] = pw[b] / cnt[b];
        if (pw[b] > pw[best]) best = b;
        db[b] = 10.0 * $log10(pw[b] / lvl + 1e-30);
      end
      if (t < 18) begin
        automatic real next_db = -200.0;
        for (int b = 22; b <= 39; b++)
          if (b != band && db[b] > next_db) next_db = db[b];
        $display("tone %7.1f Hz (band %0d): strongest band %0d, gain %6.2f dB, next strongest band %6.2f dB",
                 fm, band, best, db[band], next_db);
        checks++;
        if (best != band) failures++;
        checks++;
        if (db[band] < -1.0 || db[band] > 1.0) failures++;
        checks++;
        if (next_db > db[band] - 13.6) failures++;
      end else begin
        automatic real worst = -200.0;
        automatic int worst_b = 0, nchk = 0;
        for (int b = 22; b <= 39; b++) begin
          if (fm < 0.184 * mid_hz(b) || fm > 5.434 * mid_hz(b)) begin
            checks++;
            nchk++;
            if (db[b] > -60.0) begin
              failures++;
              $display("FAIL: probe %0.0f Hz in band %0d: %6.2f dB", fm, b, db[b]);
            end
            if (db[b] > worst) begin worst = db[b]; worst_b = b; end
          end
        end
        $display("probe %7.1f Hz: %0d stop-band bands, highest %6.2f dB (band %0d)", fm, nchk, worst, worst_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
