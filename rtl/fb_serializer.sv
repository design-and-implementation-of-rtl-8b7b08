// fb_serializer: parallel-to-serial converter for the band outputs.
//
// On load it takes the three band outputs of one octave (f37, f38, f39 of
// the MAC, i.e. the lowest, middle and highest band of that octave) and
// sends them as three 16-bit words, in that order, most significant bit
// first, one bit per clock: sdo is the bit, sdosel is high for every bit
// cycle and sdoclk (word synchronisation) is high with the first bit of each
// word. The first bit is driven from the clock edge after the one that takes
// the load. The framing mirrors fb_deserializer, so the output can be read back
// with it. Sending takes 48 cycles; the controller issues a load at most
// every 126 cycles. A load while busy is dropped and flagged by overflow.
// The pins follow the source; the framing is this design's choice.
module fb_serializer
  import fb_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [DW-1:0] f37,
  input  logic [DW-1:0] f38,
  input  logic [DW-1:0] f39,
  output logic          sdo,
  output logic          sdosel,
  output logic          sdoclk,
  output logic          busy,
  output logic          overflow
);

  localparam int unsigned NB = 3 * DW;

  logic [NB-1:0] shreg;
  logic [5:0]    left;    // bits still to send

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg    <= '0;
      left     <= '0;
      sdo      <= 1'b0;
      sdosel   <= 1'b0;
      sdoclk   <= 1'b0;
      overflow <= 1'b0;
    end else begin
      overflow <= load && (left != '0);
      if (left != '0) begin
        sdo    <= shreg[NB-1];
        sdosel <= 1'b1;
        sdoclk <= (left == 6'(NB)) || (left == 6'(2*DW)) || (left == 6'(DW));
        shreg  <= {shreg[NB-2:0], 1'b0};
        left   <= left - 6'd1;
      end else begin
        sdo    <= 1'b0;
        sdosel <= 1'b0;
        sdoclk <= 1'b0;
        if (load) begin
          shreg <= {f37, f38, f39};
          left  <= 6'(NB);
        end
      end
    end
  end

  assign busy = (left != '0);

endmodule
