// fb_pkg: types, constants and coefficient tables shared by the ANSI S1.11
// 1/3-octave analysis filter bank.
//
// The bank computes 18 bands (ANSI bands 22..39) of a 24 kHz, 16-bit input as
// six octaves. Every octave uses the same three band-pass filters F37, F38,
// F39 (41, 33 and 27 taps) and the same decimation low-pass D (35 taps); the
// output of D, decimated by two, is the input of the next octave. All four
// filters have an odd length and share one 41-word delay line per octave,
// aligned on the centre tap, so a filter shorter than 41 taps simply sees
// zero coefficients on its outer taps.
//
// The tap lengths, the 16-bit word, the 33-bit accumulators and 17-bit tmp
// register, the 6 cycles per tap, the 256x16 data RAM and the 253-cycle
// sample period follow the source design. The coefficient values are this
// design's own: the source gives only the filter lengths and, for D, the
// band edges. They are minimax (linear-programming) designs at fs = 24 kHz,
// quantised as round(h * 2^15):
//   F37, F38, F39: the class-2 1/3-octave attenuation mask of bands 37, 38,
//     39, with the frequency ratio r = f / fm (or fm / f) and limits linear
//     in log r between the breakpoints
//       r     1      1.0268 1.0559 1.0878 1.1225 1.2957 1.8870 3.0696 5.4347
//       min  -0.5   -0.5   -0.5   -0.5    1.6   16.5   39.5   54     60   dB
//       max   0.5    0.6    0.8    1.6    5.5    -      -      -      -   dB
//     (attenuation relative to the mid-band, 60 dB beyond r = 5.4347), met
//     with 1 dB margin in the stop bands and 0.05 dB in the pass band;
//   D: low-pass, 0..4490 Hz (= f2 of band 36) within +-0.01 (0.09 dB),
//     stop band from 0.54*pi (6480 Hz) 64.5 dB down.
// With these, every one of the 18 cascaded bands (octave k: F at 2^(k-1)
// times the frequency, behind k-1 D filters) meets that mask after
// quantisation. Only half of each symmetric response is stored, from the
// outermost tap (index 0 of a 41-tap line) to the centre (index 20).
//
// The coefficient ROM contents are computed from these tables at elaboration
// time (build_rom): the words are stored in the order the MAC reads them, and
// each word is stored either as h or as -h with a negate flag, whichever is
// closer in Hamming distance to the word read just before it (selective
// coefficient negation). The interleave order of the four filters inside a
// tap (FILT_ORDER) is the one of the 24 possible orders that gives the
// smallest average Hamming distance for these coefficients.
package fb_pkg;

  localparam int unsigned DW        = 16;  // sample and coefficient word
  localparam int unsigned TMP_W     = 17;  // tmp register: sum of two samples
  localparam int unsigned ACC_W     = 33;  // accumulators
  localparam int unsigned N_OCT     = 6;   // octaves
  localparam int unsigned N_TAPS    = 41;  // longest filter, delay-line length
  localparam int unsigned N_COEF    = 21;  // distinct coefficients of a 41-tap symmetric filter
  localparam int unsigned N_FILT    = 4;   // F37, F38, F39, D
  localparam int unsigned CYC_TAP   = 6;   // cycles per tap
  localparam int unsigned SLOT_CYC  = N_COEF * CYC_TAP;   // 126 cycles per octave
  localparam int unsigned PERIOD_CYC = 2 * SLOT_CYC + 1;  // 253 cycles per sample
  localparam int unsigned RAM_DEPTH = 256;
  localparam int unsigned RAM_AW    = 8;
  localparam int unsigned ADDR_W    = 16;  // mem_addr width
  localparam int unsigned ROM_BASE  = 256; // coefficient ROM follows the data RAM
  localparam int unsigned ROM_WORDS = N_COEF * N_FILT;    // 84
  localparam int unsigned FRAC      = 15;  // Q1.15 coefficients

  // Filter identifiers, also the accumulator index in the MAC.
  typedef enum logic [1:0] {FIL_F37 = 2'd0, FIL_F38 = 2'd1, FIL_F39 = 2'd2, FIL_D = 2'd3} filt_e;

  // Interleave order of the four filters within one tap.
  localparam filt_e FILT_ORDER [N_FILT] = '{FIL_F39, FIL_D, FIL_F37, FIL_F38};

  // Half impulse responses, outermost tap first, centre tap last (Q1.15).
  localparam int H37 [N_COEF] = '{
    159, -178, -304, 193, 235, -20, 222, 59, -898, -663, 1256,
    1741, -843, -2752, -389, 3086, 2012, -2424, -3365, 917, 3886};
  localparam int H38 [N_COEF] = '{
    0, 0, 0, 0, 252, -434, -99, 383, -60, 423, -442,
    -1309, 1450, 1849, -2668, -1866, 3786, 1375, -4578, -504, 4858};
  localparam int H39 [N_COEF] = '{
    0, 0, 0, 0, 0, 0, 0, 214, -330, -97, 350,
    224, -333, -1332, 3051, -1649, -2657, 5344, -2737, -3086, 6107};
  localparam int HD  [N_COEF] = '{
    0, 0, 0, -10, 64, 170, 97, -191, -256, 189, 520,
    -50, -858, -327, 1222, 1111, -1551, -2825, 1780, 10201, 14522};

  // Coefficient i (0 = outermost, 20 = centre) of filter f.
  function automatic int coef(filt_e f, int i);
    case (f)
      FIL_F37: return H37[i];
      FIL_F38: return H38[i];
      FIL_F39: return H39[i];
      default: return HD[i];
    endcase
  endfunction

  // Taps are processed centre first (tap 0), then the pairs (i, 40-i) for
  // i = 0..19 (taps 1..20). This maps a tap number to its coefficient index.
  function automatic int tap_coef_index(int t);
    return (t == 0) ? (N_COEF - 1) : (t - 1);
  endfunction

  // One coefficient ROM word: the stored value and its negate flag.
  typedef struct packed {
    logic          neg;
    logic [DW-1:0] val;
  } rom_word_t;

  function automatic int popcount16(logic [DW-1:0] v);
    int n = 0;
    for (int b = 0; b < DW; b++) n += int'(v[b]);
    return n;
  endfunction

  // The whole ROM as one packed vector of words (word k = element k).
  typedef logic [ROM_WORDS-1:0][DW:0] rom_t;

  // ROM contents, in read order (word a = tap*4 + position in FILT_ORDER),
  // with the selective negation decided greedily along that order.
  function automatic rom_t build_rom();
    rom_t          r = '0;
    logic [DW-1:0] prev = '0;
    for (int k = 0; k < int'(ROM_WORDS); k++) begin
      logic [DW-1:0] pos, ngt;
      pos = DW'(coef(FILT_ORDER[k % N_FILT], tap_coef_index(k / N_FILT)));
      ngt = -pos;
      if (popcount16(ngt ^ prev) < popcount16(pos ^ prev)) r[k] = {1'b1, ngt};
      else                                                  r[k] = {1'b0, pos};
      prev = r[k][DW-1:0];
    end
    return r;
  endfunction

  // Octave computed in the second slot of sample period n (n counted modulo
  // 32): recursive pyramid schedule, octave = 2 + number of trailing ones of n.
  // The value 7 (n = 31) marks an idle slot.
  function automatic logic [2:0] rpa_octave(logic [4:0] n);
    logic [2:0] k = 3'd2;
    for (int b = 0; b < 5; b++) begin
      if (n[b] && k == 3'(2 + b)) k = k + 3'd1;
    end
    return k;
  endfunction

  // Memory operations issued by the system controller to the memory controller.
  typedef enum logic [2:0] {
    MEM_NOP,      // no access
    MEM_CLR,      // write zero to RAM word idx (delay-line clearing after reset)
    MEM_WR_IN,    // write the input sample into octave 1, advance its pointer
    MEM_WR_D,     // write the decimation-filter output into octave oct
    MEM_RD_DATA,  // read delay-line element j (0 = newest) of octave oct
    MEM_RD_COEF   // read coefficient ROM word idx
  } mem_op_e;

  typedef struct packed {
    mem_op_e      op;
    logic [2:0]   oct;      // octave 0..5 (octave 1 of the text is 0)
    logic [5:0]   j;        // delay-line index 0..40
    logic [7:0]   idx;      // RAM word for MEM_CLR, ROM word for MEM_RD_COEF
    logic         adv;      // advance the write pointer of octave adv_oct
    logic [2:0]   adv_oct;
  } mem_cmd_t;

  // MAC operations; they act on the memory word read one cycle earlier.
  typedef enum logic [1:0] {
    MAC_NOP,
    MAC_LOAD,  // tmp <= data
    MAC_ADD,   // tmp <= tmp + data
    MAC_ACC    // acc[sel] <= (clr ? 0 : acc[sel]) +/- data * tmp
  } mac_op_e;

  typedef struct packed {
    mac_op_e op;
    filt_e   sel;
    logic    clr;
  } mac_cmd_t;

endpackage
