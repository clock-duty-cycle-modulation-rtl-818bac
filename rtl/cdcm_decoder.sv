// cdcm_decoder: turns received CDCM words back into symbols and bytes.
//
// Each 10-bit word (one link-clock period, aligned so that the rising edge
// is at the MSB) must be one of the five legal patterns: a run of 3..7 high
// bits followed by low bits. Five high bits is IDLE, the others are bit
// pairs. Any other word is a broken modulation pattern and pulses
// pattern_err_o. Four consecutive data symbols make a byte, most significant
// pair first; the byte phase is set by IDLE symbols, so the first byte after
// an IDLE carries byte_sop_o (start of packet). An IDLE or a broken pattern
// in the middle of a byte drops the partial byte and pulses frame_err_o.
// Detecting broken patterns follows the published design; the byte framing by IDLE
// is this design's own reading of the IDLE byte that closes every packet.
//
// Timing: one register stage from word_i to sym_o/idle_o; a byte is valid
// one cycle after its fourth word is presented.
module cdcm_decoder
  import cdcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  cdcm_word_t word_i,
  output logic       idle_o,         // word_i of last cycle was IDLE
  output logic       byte_valid_o,
  output logic       byte_sop_o,     // first byte after an IDLE
  output logic [7:0] byte_o,
  output logic       pattern_err_o,
  output logic       frame_err_o
);

  cdcm_sym_t  sym;
  logic       legal;
  logic [1:0] phase;
  logic [5:0] acc;
  logic       after_idle;

  always_comb begin
    legal    = 1'b0;
    sym.idle = 1'b0;
    sym.data = 2'b00;
    for (int unsigned n = 3; n <= 7; n++) begin
      if (word_i == high_word(n)) begin
        legal = 1'b1;
        case (n)
          3:       sym.data = 2'b00;
          4:       sym.data = 2'b01;
          6:       sym.data = 2'b10;
          7:       sym.data = 2'b11;
          default: sym.idle = 1'b1;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase         <= 2'd0;
      acc           <= '0;
      after_idle    <= 1'b0;
      idle_o        <= 1'b0;
      byte_valid_o  <= 1'b0;
      byte_sop_o    <= 1'b0;
      byte_o        <= '0;
      pattern_err_o <= 1'b0;
      frame_err_o   <= 1'b0;
    end else begin
      byte_valid_o  <= 1'b0;
      pattern_err_o <= !legal;
      frame_err_o   <= 1'b0;
      idle_o        <= legal && sym.idle;
      if (!legal || sym.idle) begin
        if (phase != 2'd0) frame_err_o <= 1'b1;
        phase      <= 2'd0;
        after_idle <= legal;
      end else begin
        phase <= phase + 2'd1;
        case (phase)
          2'd0: acc[5:4] <= sym.data;
          2'd1: acc[3:2] <= sym.data;
          2'd2: acc[1:0] <= sym.data;
          default: begin
            byte_o       <= {acc, sym.data};
            byte_valid_o <= 1'b1;
            byte_sop_o   <= after_idle;
            after_idle   <= 1'b0;
          end
        endcase
      end
    end
  end

endmodule
