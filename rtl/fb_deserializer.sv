// fb_deserializer: serial-to-parallel converter for the input samples.
//
// Three-wire input, sampled on the rising edge of the chip clock: sdi is the
// data bit, sdisel selects the cycles that carry a bit, and sdiclk is the
// word synchronisation, high together with the first (most significant) bit
// of each 16-bit word. After the 16th bit, sample holds the word and
// sample_valid pulses for one cycle; sample keeps its value until the next
// word is complete. A word that restarts (sdiclk) before 16 bits were seen is
// discarded. The source names the three pins and their roles; the framing
// (bit order, sync on the first bit, one bit per clock) is this design's
// choice.
module fb_deserializer
  import fb_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          sdi,
  input  logic          sdisel,
  input  logic          sdiclk,
  output logic [DW-1:0] sample,
  output logic          sample_valid
);

  logic [DW-1:0] shreg;
  logic [4:0]    nbits;   // bits received of the current word
  logic          active;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg        <= '0;
      nbits        <= '0;
      active       <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      if (sdisel) begin
        if (sdiclk) begin
          shreg  <= {{(DW-1){1'b0}}, sdi};
          nbits  <= 5'd1;
          active <= 1'b1;
        end else if (active) begin
          shreg <= {shreg[DW-2:0], sdi};
          nbits <= nbits + 5'd1;
          if (nbits == 5'(DW - 1)) begin
            sample       <= {shreg[DW-2:0], sdi};
            sample_valid <= 1'b1;
            active       <= 1'b0;
          end
        end
      end
    end
  end

endmodule
