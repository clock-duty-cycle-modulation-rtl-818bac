// cdcm_pkg: constants and types shared by the CDCM transceiver and the
// SPDT packet layer.
//
// CDCM (clock-duty-cycle modulation) keeps the rising edge of the link
// clock fixed and moves its falling edge to carry data. Each clock period is
// drawn by the serializer as SER_RATIO = 10 serial bits ("CDCM-10"), the high
// bits first. Five positions of the falling edge are used: 5 high bits out of
// 10 (50 % duty) is the IDLE symbol, and 3, 4, 6 and 7 high bits carry the
// two data bits of one clock cycle. The 2-bit-per-cycle rate and the 50 %
// idle follow the published design; the choice of which high-bit counts stand for
// which bit pair is this design's own.
//
// One byte is sent as four 2-bit symbols, most significant pair first, so a
// byte takes four link-clock cycles. An SPDT packet is
//   magic 0xFD | length+instruction | pulse timing (2) | reserve |
//   user data (0..16) | checksum (2) | one IDLE byte
// as the published design lists; the bit layout of the fields is this design's own
// and is spelled out next to each constant below.
package cdcm_pkg;

  // Serial bits per link-clock period.
  localparam int unsigned SER_RATIO = 10;

  // High-bit counts of the five CDCM symbols (see header).
  localparam int unsigned IDLE_HIGH = 5;

  typedef logic [SER_RATIO-1:0] cdcm_word_t;

  // One decoded symbol: IDLE, or two data bits.
  typedef struct packed {
    logic       idle;
    logic [1:0] data;
  } cdcm_sym_t;

  // One byte slot on the link: an IDLE byte (four IDLE symbols) or data.
  typedef struct packed {
    logic       idle;
    logic [7:0] data;
  } link_byte_t;

  // Number of high bits that encodes each data bit pair.
  function automatic int unsigned sym_high(input cdcm_sym_t s);
    if (s.idle) return IDLE_HIGH;
    case (s.data)
      2'b00:   return 3;
      2'b01:   return 4;
      2'b10:   return 6;
      default: return 7;
    endcase
  endfunction

  // Serial word (MSB is sent first) with the first n bits high.
  function automatic cdcm_word_t high_word(input int unsigned n);
    cdcm_word_t w;
    for (int unsigned i = 0; i < SER_RATIO; i++)
      w[SER_RATIO-1-i] = (i < n);
    return w;
  endfunction

  function automatic cdcm_word_t encode_sym(input cdcm_sym_t s);
    return high_word(sym_high(s));
  endfunction

  localparam cdcm_word_t IDLE_WORD = high_word(IDLE_HIGH);

  // ---------------- SPDT packet layer ----------------
  localparam logic [7:0] SPDT_MAGIC    = 8'hFD;
  localparam int unsigned MAX_USER_BYTES = 16;
  localparam logic [7:0] SPDT_RESERVE  = 8'h00;
  // Width of the pulse-timing wait count (bit 15 of the field is the pulse
  // flag, bits 14:0 the wait count).
  localparam int unsigned WAIT_W = 15;

  // Length+instruction byte: {frame, instruction[1:0], length[4:0]}. The
  // frame bit tells a packet that carries a user frame (of 0..16 bytes)
  // from one sent only for a pulse.
  typedef struct packed {
    logic       frame;
    logic [1:0] instr;
    logic [4:0] len;
  } len_instr_t;

  // Pulse-timing field: pulse present, and the number of link-clock cycles
  // the pulse waited between its request and the acceptance of the packet's
  // magic byte by the encoder.
  typedef struct packed {
    logic              pulse;
    logic [WAIT_W-1:0] wait_cnt;
  } pulse_timing_t;

endpackage
