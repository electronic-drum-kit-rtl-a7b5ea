// spi_rcv: receive-only SPI slave for the 16-bit words sent by the microcontroller.
//
// The microcontroller is the SPI master and the only sender, so there is no MISO
// and no slave select. SPI_CLK idles low and the master changes SPI_IN on the
// falling edge; this block samples SPI_IN on the rising edge. Both SPI lines are
// brought into the clk domain through two-flop synchronisers and the rising
// edge of SPI_CLK is found there, so the whole block runs on the fast board
// clock (40 MHz against a 1.25 MHz SPI clock in the original kit). A 4-bit
// counter counts received bits; words are framed only by that count, which
// starts at 0 after reset.
//
// Interface: when the 16th bit of a word has been shifted in, signal_1 (the
// upper byte: universal volume and drum ID) and signal_2 (the lower byte: hit
// strength) carry the word for exactly one clk cycle; at all other times both are
// 0. A word of all zeros therefore looks like no word at all, which is how the
// rest of the design treats it.
//
// Timing: the outputs are valid after the third rising clk edge at which the
// last bit's SPI_CLK is high (two synchroniser flops, then the output flop), and
// for that one cycle only.
//
// Following the original design: 16-bit frames, MSB first, data on the rising
// edge, output for one short window after the 16th edge and zero otherwise.
// This design's own choices: the synchronisers, the clk-domain edge detector,
// the one-cycle output window and the synchronous active-low reset.
module spi_rcv (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       SPI_CLK,
  input  logic       SPI_IN,
  output logic [7:0] signal_1,
  output logic [7:0] signal_2
);
  localparam int unsigned WORD_W = 16;
  localparam int unsigned CW     = $clog2(WORD_W);

  logic [1:0]        sck_sync, sdi_sync;
  logic              sck_prev;
  logic [WORD_W-2:0] shreg;  // the first 15 bits of the word in progress
  logic [CW-1:0]     count;
  logic              sck_rise;
  logic [WORD_W-1:0] word;

  // the complete word as it stands once the current bit is shifted in
  assign word = {shreg[WORD_W-2:0], sdi_sync[1]};

  assign sck_rise = sck_sync[1] & ~sck_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sck_sync <= '0;
      sdi_sync <= '0;
      sck_prev <= 1'b0;
      shreg    <= '0;
      count    <= '0;
      signal_1 <= '0;
      signal_2 <= '0;
    end else begin
      sck_sync <= {sck_sync[0], SPI_CLK};
      sdi_sync <= {sdi_sync[0], SPI_IN};
      sck_prev <= sck_sync[1];
      signal_1 <= '0;
      signal_2 <= '0;
      if (sck_rise) begin
        shreg <= word[WORD_W-2:0];
        count <= count + 1'b1;
        if (count == CW'(WORD_W - 1)) begin
          signal_1 <= word[15:8];
          signal_2 <= word[7:0];
        end
      end
    end
  end

  // A word is shown for one cycle only: at least 16 SPI_CLK edges separate two words.
  a_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    (signal_1 != 8'd0 || signal_2 != 8'd0) |=> (signal_1 == 8'd0 && signal_2 == 8'd0));

endmodule
