// mikumari_link: one end of a clock/data distribution link: the SerDes-based
// CDCM transceiver with the SPDT (synchronous pulse and data transmission)
// protocol on top.
//
// A master sends its link clock as a CDCM-modulated clock; a slave recovers
// it with a PLL (outside this module) and sends its own modulated clock
// back, so one full-duplex pair of lines carries clock, data and
// fixed-latency pulses (triggers) both ways. This module is the same at
// both ends. On the transmit side spdt_tx turns user frames (0..16 bytes)
// and pulse requests into packets for the transceiver; on the receive side
// spdt_rx checks and unpacks the packets and re-creates each pulse a fixed
// time after it was requested at the far end (link latency + PULSE_DELAY
// link-clock cycles). Packets are sent only while the local receiver is
// linked up; between packets the line carries IDLE (50 % duty) periods.
//
// Interface: everything is in the clk domain except serial_o/serial_i
// (clk_bit = 10 x clk, phase aligned). idelay_tap_o/idelay_load_o control the
// input delay element in front of serial_i.
module mikumari_link
  import cdcm_pkg::*;
#(
  parameter int unsigned NTAPS       = 32,
  parameter int unsigned SETTLE      = 8,
  parameter int unsigned CHECK       = 64,
  parameter int unsigned PULSE_DELAY = 128
) (
  input  logic                           clk,
  input  logic                           clk_bit,
  input  logic                           rst,
  // serial line
  output logic                           serial_o,
  input  logic                           serial_i,
  output logic [$clog2(NTAPS)-1:0]       idelay_tap_o,
  output logic                           idelay_load_o,
  // link status
  output logic                           link_up_o,
  output logic [4:0]                     slip_count_o,
  output logic                           pattern_err_o,
  // pulse
  input  logic                           pulse_i,
  output logic                           pulse_drop_o,
  output logic                           pulse_o,
  output logic                           pulse_late_o,
  // user frame, transmit
  input  logic                           tx_req_i,
  input  logic [1:0]                     tx_instr_i,
  input  logic [4:0]                     tx_len_i,
  input  logic [MAX_USER_BYTES-1:0][7:0] tx_data_i,
  output logic                           tx_ack_o,
  output logic                           tx_busy_o,
  // user frame, receive
  output logic                           rx_valid_o,
  output logic [1:0]                     rx_instr_o,
  output logic [4:0]                     rx_len_o,
  output logic [MAX_USER_BYTES-1:0][7:0] rx_data_o,
  output logic                           rx_csum_err_o,
  output logic                           rx_frame_err_o
);

  logic       enc_valid, enc_ready;
  link_byte_t enc_byte;
  logic       dec_valid, dec_sop, dec_idle, dec_frame_err;
  logic [7:0] dec_byte;

  spdt_tx u_tx (
    .clk, .rst,
    .link_up_i     (link_up_o),
    .pulse_i       (pulse_i),
    .pulse_drop_o  (pulse_drop_o),
    .frame_req_i   (tx_req_i),
    .frame_instr_i (tx_instr_i),
    .frame_len_i   (tx_len_i),
    .frame_data_i  (tx_data_i),
    .frame_ack_o   (tx_ack_o),
    .out_valid_o   (enc_valid),
    .out_byte_o    (enc_byte),
    .out_ready_i   (enc_ready),
    .busy_o        (tx_busy_o)
  );

  cdcm_transceiver #(.NTAPS(NTAPS), .SETTLE(SETTLE), .CHECK(CHECK)) u_trx (
    .clk, .clk_bit, .rst,
    .tx_valid_i    (enc_valid),
    .tx_byte_i     (enc_byte),
    .tx_ready_o    (enc_ready),
    .rx_valid_o    (dec_valid),
    .rx_sop_o      (dec_sop),
    .rx_byte_o     (dec_byte),
    .rx_idle_o     (dec_idle),
    .serial_o      (serial_o),
    .serial_i      (serial_i),
    .idelay_tap_o  (idelay_tap_o),
    .idelay_load_o (idelay_load_o),
    .link_up_o     (link_up_o),
    .slip_count_o  (slip_count_o),
    .pattern_err_o (pattern_err_o),
    .frame_err_o   (dec_frame_err)
  );

  spdt_rx #(.PULSE_DELAY(PULSE_DELAY)) u_rx (
    .clk, .rst,
    .link_up_i     (link_up_o),
    .byte_valid_i  (dec_valid),
    .byte_sop_i    (dec_sop),
    .byte_i        (dec_byte),
    .idle_i        (dec_idle),
    .link_err_i    (pattern_err_o || dec_frame_err),
    .frame_valid_o (rx_valid_o),
    .frame_instr_o (rx_instr_o),
    .frame_len_o   (rx_len_o),
    .frame_data_o  (rx_data_o),
    .csum_err_o    (rx_csum_err_o),
    .frame_err_o   (rx_frame_err_o),
    .pulse_o       (pulse_o),
    .pulse_late_o  (pulse_late_o)
  );

endmodule
