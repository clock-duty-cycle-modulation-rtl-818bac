// cdcm_deserializer: 1:10 serial-to-parallel converter with bit slip, the
// role an ISERDES plays in an FPGA.
//
// Bits are shifted in on the bit clock (ten times the link clock, phase
// aligned with it). Once every ten bit clocks the last ten bits are captured
// as a word; word_o hands it to the link-clock domain. A bit slip request
// (bitslip_i, a one-link-cycle pulse from the link-clock domain) stretches
// one capture period to eleven bit clocks, which moves the word boundary by
// one bit. The link-up controller issues slips until the CDCM rising edge
// sits at the word's MSB. The bit-slip function follows the published design; the
// way it is made here is this design's own.
//
// Timing: word_o is registered on the link clock and holds the word captured
// during the previous link-clock period.
module cdcm_deserializer
  import cdcm_pkg::*;
(
  input  logic       clk,
  input  logic       clk_bit,
  input  logic       rst,
  input  logic       serial_i,
  input  logic       bitslip_i,
  output cdcm_word_t word_o
);

  localparam int unsigned CW = $clog2(SER_RATIO + 1);

  logic [CW-1:0] cnt;
  logic [SER_RATIO-2:0] shreg;  // the last nine bits; the tenth is serial_i
  cdcm_word_t    cap;
  logic          slip_d;
  logic          slip_pend;

  always_ff @(posedge clk_bit) begin
    if (rst) begin
      cnt       <= '0;
      shreg     <= '0;
      cap       <= '0;
      slip_d    <= 1'b0;
      slip_pend <= 1'b0;
    end else begin
      shreg  <= {shreg[SER_RATIO-3:0], serial_i};
      slip_d <= bitslip_i;
      if (bitslip_i && !slip_d) slip_pend <= 1'b1;
      if (cnt == CW'(SER_RATIO - 1)) begin
        cap <= {shreg[SER_RATIO-2:0], serial_i};
        if (slip_pend) begin
          // hold the counter for one extra bit clock
          cnt       <= CW'(SER_RATIO);
          slip_pend <= 1'b0;
        end else begin
          cnt <= '0;
        end
      end else if (cnt == CW'(SER_RATIO)) begin
        cnt <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) word_o <= '0;
    else     word_o <= cap;
  end

endmodule
