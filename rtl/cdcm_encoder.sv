// cdcm_encoder: turns a stream of bytes into CDCM serial words, one 10-bit
// word per link-clock cycle.
//
// A byte is cut into four bit pairs, most significant first, and each pair
// becomes one duty-cycle-modulated clock period (see cdcm_pkg). The encoder
// offers to take a byte once every four cycles (in_ready high for one cycle,
// free running); if no byte is offered then, or the byte is marked idle, it
// sends four IDLE (50 % duty) periods instead. So the link always carries a
// clock, and byte boundaries on the link follow the last IDLE symbol.
// Four cycles per byte follows the published design; the free-running slot is this
// design's own choice.
//
// Timing: the word for the first bit pair of a byte accepted in cycle t
// appears on word_o after the clock edge that ends cycle t; the other three
// follow in the next three cycles. Reset drives IDLE words.
module cdcm_encoder
  import cdcm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  link_byte_t in_byte,
  output logic       in_ready,
  output cdcm_word_t word_o
);

  logic [1:0] slot;      // bit pair being sent in this cycle
  link_byte_t cur;       // byte being sent in slots 1..3
  link_byte_t now_byte;  // byte the current slot is taken from
  cdcm_sym_t  sym;

  assign in_ready = (slot == 2'd0);

  always_comb begin
    if (slot == 2'd0)
      now_byte = in_valid ? in_byte : '{idle: 1'b1, data: 8'h00};
    else
      now_byte = cur;
    sym.idle = now_byte.idle;
    case (slot)
      2'd0:    sym.data = now_byte.data[7:6];
      2'd1:    sym.data = now_byte.data[5:4];
      2'd2:    sym.data = now_byte.data[3:2];
      default: sym.data = now_byte.data[1:0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot   <= 2'd0;
      cur    <= '{idle: 1'b1, data: 8'h00};
      word_o <= IDLE_WORD;
    end else begin
      slot   <= slot + 2'd1;
      if (slot == 2'd0) cur <= now_byte;
      word_o <= encode_sym(sym);
    end
  end

endmodule
