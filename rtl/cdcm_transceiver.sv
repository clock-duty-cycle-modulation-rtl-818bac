// cdcm_transceiver: SerDes-based CDCM transceiver, one end of a full-duplex
// link that carries a clock and data on one line per direction.
//
// Transmit side: cdcm_encoder turns bytes into duty-modulated clock periods
// (10-bit words) and cdcm_serializer sends them at ten bits per link-clock
// period. Receive side: the serial input, after the external input delay
// element, is cut into words by cdcm_deserializer, decoded back into bytes
// by cdcm_decoder, and brought up by cdcm_linkup (delay-tap scan, then bit
// slip). The link is usable when link_up_o is high. The receive clock is
// expected to be recovered from the modulated clock by a PLL outside this
// module (the modulated clock can feed a PLL directly because only its
// rising edge, which never moves, drives the phase detector); here clk and
// clk_bit are simply inputs, phase aligned, with clk_bit = 10 x clk.
// The structure (SerDes, encoder/decoder, IDELAY adjustment and bit slip)
// follows the published design.
//
// Interface: byte streams in the clk domain; serial_o/serial_i on clk_bit;
// idelay_tap_o/idelay_load_o go to the delay element on the receive pin.
// Received bytes are only reported while link_up_o is high.
// pattern_err_o/frame_err_o report broken CDCM patterns and broken byte
// framing while the link is up.
module cdcm_transceiver
  import cdcm_pkg::*;
#(
  parameter int unsigned NTAPS  = 32,
  parameter int unsigned SETTLE = 8,
  parameter int unsigned CHECK  = 64
) (
  input  logic                     clk,
  input  logic                     clk_bit,
  input  logic                     rst,
  // transmit bytes
  input  logic                     tx_valid_i,
  input  link_byte_t               tx_byte_i,
  output logic                     tx_ready_o,
  // received bytes
  output logic                     rx_valid_o,
  output logic                     rx_sop_o,
  output logic [7:0]               rx_byte_o,
  output logic                     rx_idle_o,
  // serial line
  output logic                     serial_o,
  input  logic                     serial_i,
  // input delay control
  output logic [$clog2(NTAPS)-1:0] idelay_tap_o,
  output logic                     idelay_load_o,
  // status
  output logic                     link_up_o,
  output logic [4:0]               slip_count_o,
  output logic                     pattern_err_o,
  output logic                     frame_err_o
);

  cdcm_word_t tx_word, rx_word;
  logic       bitslip;
  logic       dec_valid;
  logic       dec_pat_err, dec_frm_err;

  cdcm_encoder u_enc (
    .clk, .rst,
    .in_valid (tx_valid_i),
    .in_byte  (tx_byte_i),
    .in_ready (tx_ready_o),
    .word_o   (tx_word)
  );

  cdcm_serializer u_ser (
    .clk_bit, .rst,
    .word_i   (tx_word),
    .serial_o (serial_o)
  );

  cdcm_deserializer u_des (
    .clk, .clk_bit, .rst,
    .serial_i  (serial_i),
    .bitslip_i (bitslip),
    .word_o    (rx_word)
  );

  cdcm_decoder u_dec (
    .clk, .rst,
    .word_i        (rx_word),
    .idle_o        (rx_idle_o),
    .byte_valid_o  (dec_valid),
    .byte_sop_o    (rx_sop_o),
    .byte_o        (rx_byte_o),
    .pattern_err_o (dec_pat_err),
    .frame_err_o   (dec_frm_err)
  );

  cdcm_linkup #(.NTAPS(NTAPS), .SETTLE(SETTLE), .CHECK(CHECK)) u_lu (
    .clk, .rst,
    .word_i       (rx_word),
    .tap_o        (idelay_tap_o),
    .tap_load_o   (idelay_load_o),
    .bitslip_o    (bitslip),
    .link_up_o    (link_up_o),
    .slip_count_o (slip_count_o)
  );

  // nothing is passed on before the link is up
  assign rx_valid_o    = dec_valid && link_up_o;
  assign pattern_err_o = dec_pat_err && link_up_o;
  assign frame_err_o   = dec_frm_err && link_up_o;

endmodule
