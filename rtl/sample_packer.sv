// sample_packer: ADC samples to 48-bit acquisition words.
//
// The ADC runs at up to 250 MHz, too fast for the static memories, so the
// storage rate is divided by six: six consecutive 8-bit samples are
// gathered into one 48-bit word that is written into the AC FIFO. A mode
// input selects five samples per word instead (the 50 MHz storage option),
// leaving the top byte zero. The first sample of a word lands in the
// least significant byte.
//
// The acquisition gate comes from the trigger logic in the 50 MHz domain
// and is re-timed here by two flip-flops. While the re-timed gate is high
// one sample is taken per ADC clock. When it falls, a partly filled word is
// written out padded with zeros. idle is high when the gate is low and
// nothing is pending; the trigger logic re-times it to know the channel has
// finished. Words offered while the FIFO is full are lost (the error
// detector stops the acquisition before that).
//
// Everything runs on adc_clk. The factor of six and the five-sample
// option follow the design; byte order, padding and the re-timing are
// this design's own.
module sample_packer
  import dab_pkg::*;
(
  input  logic                  adc_clk,
  input  logic                  rst_n,
  input  logic                  gate,        // asynchronous, from the trigger logic
  input  logic                  five_mode,
  input  logic [SAMPLE_W-1:0]   sample,
  input  logic                  fifo_full,
  output logic                  wr_en,
  output logic [AC_WORD_W-1:0]  wr_data,
  output logic                  idle
);
  localparam int unsigned NB = AC_WORD_W / SAMPLE_W;

  logic [1:0] gate_sync;
  logic [AC_WORD_W-1:0] acc;
  logic [2:0] cnt;
  logic [2:0] last;

  assign last = five_mode ? 3'd4 : 3'(NB - 1);

  always_ff @(posedge adc_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_sync <= '0;
      acc       <= '0;
      cnt       <= '0;
      wr_en     <= 1'b0;
      wr_data   <= '0;
    end else begin
      gate_sync <= {gate_sync[0], gate};
      wr_en     <= 1'b0;
      if (gate_sync[1]) begin
        if (cnt == last) begin
          wr_data <= acc | (AC_WORD_W'(sample) << (SAMPLE_W * cnt));
          wr_en   <= ~fifo_full;
          acc     <= '0;
          cnt     <= '0;
        end else begin
          acc <= acc | (AC_WORD_W'(sample) << (SAMPLE_W * cnt));
          cnt <= cnt + 3'd1;
        end
      end else if (cnt != 3'd0) begin
        wr_data <= acc;
        wr_en   <= ~fifo_full;
        acc     <= '0;
        cnt     <= '0;
      end
    end
  end

  assign idle = ~gate_sync[1] & (cnt == 3'd0) & ~wr_en;
endmodule
