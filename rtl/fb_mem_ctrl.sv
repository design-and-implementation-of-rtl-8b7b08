// fb_mem_ctrl: memory controller. It turns the commands of the system
// controller into memory addresses, write enables and write data, and keeps
// the write pointer of each octave's circular delay line.
//
// Octave k (0..5) owns RAM words 41*k .. 41*k+40. wp[k] is the slot the next
// new sample of that octave goes to (the oldest one). Element j of the
// line (j = 0 the newest sample, j = 40 the oldest) is at
// 41*k + ((wp[k] - 1 - j) mod 41).
//   MEM_WR_IN  : writes the input sample at wp[0] and advances wp[0]
//   MEM_WR_D   : writes the D output at (wp[oct] - 1); the pointer was
//                already advanced by an earlier command's adv flag, so reads
//                issued between the advance and the write already index the
//                new sample correctly
//   MEM_RD_DATA: reads element j of octave oct
//   MEM_RD_COEF: reads ROM word idx (address 256 + idx)
//   MEM_CLR    : writes zero to RAM word idx
// Write data is selected between the input sample (from the deserializer)
// and the decimation-filter output d of the MAC. The outputs are
// combinational from cmd; pointer updates take effect at the clock edge.
// Assertions state the ranges the system controller keeps to.
module fb_mem_ctrl
  import fb_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  mem_cmd_t          cmd,
  input  logic [DW-1:0]     in_sample,
  input  logic [DW-1:0]     d,
  output logic              mem_cen,
  output logic              mem_wen,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DW-1:0]     mem_wdata
);

  localparam int unsigned PW = 6;
  logic [PW-1:0] wp [N_OCT];

  function automatic logic [PW-1:0] inc41(logic [PW-1:0] p);
    return (p == PW'(N_TAPS - 1)) ? '0 : p + 1'b1;
  endfunction

  // (p - 1 - j) mod 41 for p, j in 0..40
  function automatic logic [PW-1:0] back41(logic [PW-1:0] p, logic [PW-1:0] j);
    logic signed [PW+1:0] v;
    v = $signed({2'b00, p}) - $signed({2'b00, j}) - 1;
    if (v < 0) v = v + (PW+2)'(N_TAPS);
    return v[PW-1:0];
  endfunction

  function automatic logic [ADDR_W-1:0] base(logic [2:0] k);
    return ADDR_W'(k) * ADDR_W'(N_TAPS);
  endfunction

  logic [2:0] oct_c;
  assign oct_c = (32'(cmd.oct) < N_OCT) ? cmd.oct : 3'd0;

  always_comb begin
    mem_cen   = 1'b0;
    mem_wen   = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    unique case (cmd.op)
      MEM_CLR: begin
        mem_cen = 1'b1; mem_wen = 1'b1;
        mem_addr = ADDR_W'(cmd.idx);
      end
      MEM_WR_IN: begin
        mem_cen = 1'b1; mem_wen = 1'b1;
        mem_addr  = base(3'd0) + ADDR_W'(wp[0]);
        mem_wdata = in_sample;
      end
      MEM_WR_D: begin
        mem_cen = 1'b1; mem_wen = 1'b1;
        mem_addr  = base(oct_c) + ADDR_W'(back41(wp[oct_c], '0));
        mem_wdata = d;
      end
      MEM_RD_DATA: begin
        mem_cen  = 1'b1;
        mem_addr = base(oct_c) + ADDR_W'(back41(wp[oct_c], cmd.j));
      end
      MEM_RD_COEF: begin
        mem_cen  = 1'b1;
        mem_addr = ADDR_W'(ROM_BASE) + ADDR_W'(cmd.idx);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_OCT; k++) wp[k] <= '0;
    end else begin
      for (int k = 0; k < N_OCT; k++) begin
        if ((cmd.op == MEM_WR_IN && k == 0) || (cmd.adv && cmd.adv_oct == 3'(k)))
          wp[k] <= inc41(wp[k]);
      end
    end
  end

  // Command rules the system controller keeps: octave, element and ROM word
  // in range.
  a_oct: assert property (@(posedge clk) disable iff (rst)
    (cmd.op inside {MEM_WR_D, MEM_RD_DATA}) |-> (32'(cmd.oct) < N_OCT))
    else $error("memory command for octave %0d", cmd.oct);
  a_elem: assert property (@(posedge clk) disable iff (rst)
    (cmd.op == MEM_RD_DATA) |-> (32'(cmd.j) < N_TAPS))
    else $error("delay-line element %0d read", cmd.j);
  a_coef: assert property (@(posedge clk) disable iff (rst)
    (cmd.op == MEM_RD_COEF) |-> (32'(cmd.idx) < ROM_WORDS))
    else $error("ROM word %0d read", cmd.idx);
  a_adv: assert property (@(posedge clk) disable iff (rst)
    cmd.adv |-> (32'(cmd.adv_oct) < N_OCT))
    else $error("pointer of octave %0d advanced", cmd.adv_oct);

endmodule
