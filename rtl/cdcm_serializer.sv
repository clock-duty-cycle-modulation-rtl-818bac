// cdcm_serializer: 10:1 parallel-to-serial converter for the CDCM link,
// the role an OSERDES plays in an FPGA.
//
// It runs on the bit clock, which is SER_RATIO (10) times the link clock and
// phase aligned with it (both come from the same clock synthesizer). A
// counter loads the link-clock word once every ten bit clocks and shifts it
// out MSB first, so the high part of each CDCM period goes out first.
// Any fixed phase of the load against the link clock works, because the
// word is held for a whole link-clock period.
//
// Timing: serial_o is registered on the bit clock; the word loaded at the
// counter's wrap appears on the line over the next ten bit clocks.
module cdcm_serializer
  import cdcm_pkg::*;
(
  input  logic       clk_bit,
  input  logic       rst,
  input  cdcm_word_t word_i,
  output logic       serial_o
);

  localparam int unsigned CW = $clog2(SER_RATIO);

  logic [CW-1:0] cnt;
  cdcm_word_t    shreg;

  always_ff @(posedge clk_bit) begin
    if (rst) begin
      cnt      <= '0;
      shreg    <= IDLE_WORD;
      serial_o <= 1'b0;
    end else begin
      if (cnt == CW'(SER_RATIO - 1)) begin
        cnt   <= '0;
        shreg <= word_i;
      end else begin
        cnt   <= cnt + 1'b1;
        shreg <= {shreg[SER_RATIO-2:0], 1'b0};
      end
      serial_o <= shreg[SER_RATIO-1];
    end
  end

endmodule
