// fb_sys_ctrl: system controller. It schedules the six folded octaves with
// the recursive pyramid algorithm (RPA) and sequences the memory controller
// and the MAC unit tap by tap.
//
// Sample period (started by `start`, one per input sample), 253 cycles:
//   cycle 0        write the new input sample into octave 1's delay line
//   cycles 1..126  slot A: octave 1
//   cycles 127..252 slot B: octave 2 + (number of trailing ones of n), where
//                  n is the period number modulo 32; n = 31 gives an idle slot
// so octave 1 runs every period, octave 2 every second, octave 3 every
// fourth, and so on (the schedule of the source's Table II, whose time slot
// T = 2n is slot A and T = 2n+1 slot B).
//
// A slot is 21 taps of 6 cycles. Tap 0 is the centre tap, taps 1..20 the
// pairs (i, 40-i) of the 41-element line, i = 0..19:
//   phase 0: read element i          (MAC: tmp <= x)
//   phase 1: read element 40-i       (MAC: tmp <= tmp + x); in the centre tap
//            the RAM is free and the pending decimated sample is written
//   phase 2..5: read the tap's 4 coefficients (MAC: accumulate, filter
//            order FILT_ORDER)
// MAC commands are the memory commands delayed by one cycle (one-cycle read
// latency). Octave k's decimation-filter output is kept on every second run
// of that octave (the first run kept), for octaves 1..5; octave 6 has no D.
// A kept output advances octave k+1's write pointer with the slot's last
// command and is written in phase 1 of the next slot's centre tap, which
// comes before any read of the new sample. The centre-first order and this
// use of the free RAM cycle are this design's choices; they keep the period
// at the source's 253 cycles.
//
// res_valid pulses when the three band outputs of a slot are ready in the
// MAC (two cycles after the slot's last command); res_oct is that octave
// (0 = the text's octave 1, bands 37..39). After reset the controller first
// clears the data RAM (256 cycles); start pulses that arrive meanwhile or
// during a period are remembered (one deep); a second one is an overrun.
module fb_sys_ctrl
  import fb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output mem_cmd_t   mem_cmd,
  output mac_cmd_t   mac_cmd,
  output logic       res_valid,
  output logic [2:0] res_oct,
  output logic       res_keep_d,   // the slot's D output was kept
  output logic       busy,
  output logic       overrun
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_IN, S_SLOT} state_e;

  state_e     state;
  logic [7:0] clr_idx;
  logic       start_pend;
  logic       slot;        // 0 = slot A, 1 = slot B
  logic [4:0] tap;
  logic [2:0] ph;
  logic [4:0] n;           // period number mod 32
  logic [N_OCT-1:0] par;   // run parity per octave
  logic       pend;        // a decimated sample waits to be written
  logic [2:0] pend_oct;

  logic [2:0] rpa_k;       // 2..7
  logic [2:0] oct;         // octave of the current slot, 0..5, 6 = idle
  logic       idle_slot;
  logic       last_op;
  logic       keep_d;
  mac_cmd_t   mac_c;
  logic       last_q, idle_q;
  logic [2:0] oct_q;
  logic       keep_q;

  assign rpa_k     = rpa_octave(n);
  assign oct       = slot ? (rpa_k - 3'd1) : 3'd0;
  assign idle_slot = (oct == 3'(N_OCT));
  assign last_op   = (state == S_SLOT) && (tap == 5'(N_COEF - 1)) && (ph == 3'(CYC_TAP - 1));
  assign keep_d    = !idle_slot && (oct < 3'(N_OCT - 1)) && !par[oct];

  // Command generation.
  always_comb begin
    mem_cmd = '{op: MEM_NOP, oct: oct, j: '0, idx: '0, adv: 1'b0, adv_oct: oct + 3'd1};
    mac_c   = '{op: MAC_NOP, sel: FIL_F37, clr: 1'b0};
    unique case (state)
      S_INIT: begin
        mem_cmd.op  = MEM_CLR;
        mem_cmd.idx = clr_idx;
      end
      S_IN: mem_cmd.op = MEM_WR_IN;
      S_SLOT: begin
        if (ph == 3'd0) begin
          if (!idle_slot) begin
            mem_cmd.op = MEM_RD_DATA;
            mem_cmd.j  = (tap == '0) ? 6'(N_COEF - 1) : 6'(tap - 5'd1);
            mac_c.op   = MAC_LOAD;
          end
        end else if (ph == 3'd1) begin
          if (tap == '0) begin
            if (pend) begin
              mem_cmd.op  = MEM_WR_D;
              mem_cmd.oct = pend_oct;
            end
          end else if (!idle_slot) begin
            mem_cmd.op = MEM_RD_DATA;
            mem_cmd.j  = 6'(N_TAPS) - 6'(tap);   // 40 - (tap - 1)
            mac_c.op   = MAC_ADD;
          end
        end else if (!idle_slot) begin
          mem_cmd.op  = MEM_RD_COEF;
          mem_cmd.idx = 8'(tap) * 8'(N_FILT) + 8'(ph - 3'd2);
          mac_c.op    = MAC_ACC;
          mac_c.sel   = FILT_ORDER[2'(ph - 3'd2)];
          mac_c.clr   = (tap == '0);
        end
        if (last_op) mem_cmd.adv = keep_d;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      clr_idx    <= '0;
      start_pend <= 1'b0;
      slot       <= 1'b0;
      tap        <= '0;
      ph         <= '0;
      n          <= '0;
      par        <= '0;
      pend       <= 1'b0;
      pend_oct   <= '0;
      overrun    <= 1'b0;
    end else begin
      overrun <= start && start_pend && !(state == S_IDLE);
      if (start) start_pend <= 1'b1;
      unique case (state)
        S_INIT: begin
          clr_idx <= clr_idx + 8'd1;
          if (clr_idx == 8'(RAM_DEPTH - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (start_pend || start) begin
            state      <= S_IN;
            start_pend <= 1'b0;
          end
        end
        S_IN: begin
          state <= S_SLOT;
          slot  <= 1'b0;
          tap   <= '0;
          ph    <= '0;
        end
        S_SLOT: begin
          if (mem_cmd.op == MEM_WR_D) pend <= 1'b0;
          if (ph == 3'(CYC_TAP - 1)) begin
            ph  <= '0;
            tap <= tap + 5'd1;
          end else begin
            ph <= ph + 3'd1;
          end
          if (last_op) begin
            tap <= '0;
            if (!idle_slot) par[oct] <= ~par[oct];
            if (keep_d) begin
              pend     <= 1'b1;
              pend_oct <= oct + 3'd1;
            end
            if (slot) begin
              n <= n + 5'd1;
              if (start_pend || start) begin
                state      <= S_IN;
                start_pend <= 1'b0;
              end else begin
                state <= S_IDLE;
              end
            end
            slot <= ~slot;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // MAC commands lag the memory commands by one cycle; results are ready one
  // cycle after the last MAC command of a slot.
  always_ff @(posedge clk) begin
    if (rst) begin
      mac_cmd    <= '{op: MAC_NOP, sel: FIL_F37, clr: 1'b0};
      last_q     <= 1'b0;
      idle_q     <= 1'b0;
      oct_q      <= '0;
      keep_q     <= 1'b0;
      res_valid  <= 1'b0;
      res_oct    <= '0;
      res_keep_d <= 1'b0;
    end else begin
      mac_cmd    <= mac_c;
      last_q     <= last_op;
      idle_q     <= idle_slot;
      oct_q      <= oct;
      keep_q     <= keep_d;
      res_valid  <= last_q && !idle_q;
      res_oct    <= oct_q;
      res_keep_d <= last_q && keep_q;
    end
  end

  assign busy = (state != S_IDLE);

endmodule
