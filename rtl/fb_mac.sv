// fb_mac: multiply-accumulate unit that evaluates the four filters F37, F38,
// F39 and D of one octave in an interleaved way.
//
// Datapath: one 16x17 multiplier, one adder/subtractor, a 17-bit tmp register
// and four 33-bit accumulators (acc_f37, acc_f38, acc_f39, acc_d). One tap
// takes six memory words:
//   1. a delay-line sample           -> tmp <= sample          (MAC_LOAD)
//   2. the symmetric partner sample  -> tmp <= tmp + sample    (MAC_ADD)
//   3..6. the tap's four coefficients -> acc[sel] <= acc[sel] +/- coef * tmp
// so the coefficient symmetry of the linear-phase filters halves the
// multiplications. On the first tap of an octave (clr) the adder's other
// operand is zero instead of the accumulator. The negate flag stored with a
// coefficient turns the addition into a subtraction, which undoes the
// selective coefficient negation of the ROM.
//
// Each register is written only in the cycle the adder result is steered to
// it; these enables are the conditions of the per-register clock gates, so
// an accumulator is clocked once every six cycles.
//
// Outputs are the accumulators scaled back to 16 bits: acc >>> 15 with
// saturation (this design's choice; the source shows 16-bit outputs but not
// the rounding). f37/f38/f39/d are valid from the cycle after the last
// MAC_ACC of an octave until the first MAC_ACC of the next one.
//
// Timing: cmd applies to data/neg of the same cycle (the memory word read in
// the previous cycle); results are registered.
module fb_mac
  import fb_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  mac_cmd_t      cmd,
  input  logic [DW-1:0] data,
  input  logic          neg,
  output logic [DW-1:0] f37,
  output logic [DW-1:0] f38,
  output logic [DW-1:0] f39,
  output logic [DW-1:0] d,
  output logic          acc_en_any   // some accumulator was written this cycle
);

  logic signed [TMP_W-1:0] tmp;
  logic signed [ACC_W-1:0] acc [N_FILT];

  logic signed [ACC_W-1:0] product;
  logic signed [ACC_W-1:0] addend;   // operand from the multiplexer of registers
  logic signed [ACC_W-1:0] operand;  // data or product
  logic signed [ACC_W-1:0] sum;

  always_comb begin
    product = ACC_W'($signed(data)) * ACC_W'(tmp);
    operand = (cmd.op == MAC_ACC) ? product : ACC_W'($signed(data));
    unique case (cmd.op)
      MAC_ADD: addend = ACC_W'(tmp);
      MAC_ACC: addend = cmd.clr ? '0 : acc[cmd.sel];
      default: addend = '0;
    endcase
    sum = (cmd.op == MAC_ACC && neg) ? addend - operand : addend + operand;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tmp <= '0;
      for (int f = 0; f < N_FILT; f++) acc[f] <= '0;
    end else begin
      if (cmd.op == MAC_LOAD || cmd.op == MAC_ADD) tmp <= TMP_W'(sum);
      for (int f = 0; f < N_FILT; f++)
        if (cmd.op == MAC_ACC && cmd.sel == filt_e'(f)) acc[f] <= sum;
    end
  end

  assign acc_en_any = (cmd.op == MAC_ACC);

  function automatic logic [DW-1:0] scale(logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] s;
    s = a >>> FRAC;
    if (s > ACC_W'(32767))       return 16'h7fff;
    else if (s < -ACC_W'(32768)) return 16'h8000;
    else                         return s[DW-1:0];
  endfunction

  assign f37 = scale(acc[FIL_F37]);
  assign f38 = scale(acc[FIL_F38]);
  assign f39 = scale(acc[FIL_F39]);
  assign d   = scale(acc[FIL_D]);

endmodule
