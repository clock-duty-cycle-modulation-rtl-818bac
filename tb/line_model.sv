// line_model: behavioural model (testbench only) of a serial line followed
// by an FPGA input delay element (IDELAY) sampled on the bit clock.
//
// The delay seen by the receiver is BASE_BITS whole bits plus
// (tap + PHASE) / TAPS_PER_BIT more; the sub-bit phase (tap + PHASE) %
// TAPS_PER_BIT tells where the sampling point falls in the bit. When it
// falls on the first or last tap of a bit, the sample sits on a data
// transition and any bit that differs from its neighbour comes out random:
// that is the closed part of the eye the link-up scan has to avoid.
//
// Fault injection: when inj_width_i is non-zero, the first run of exactly
// inj_width_i ones that is followed by a zero gets that zero turned into a
// one (the CDCM falling edge moves one bit later); inj_done_o pulses then.
module line_model #(
  parameter int BASE_BITS    = 3,
  parameter int PHASE        = 3,
  parameter int TAPS_PER_BIT = 10
) (
  input  logic       clk_bit,
  input  logic       serial_i,
  input  logic [4:0] tap_i,
  input  int         inj_width_i,
  output logic       inj_done_o,
  output logic       serial_o
);

  logic [63:0] hist = '0;
  int          run = 0;
  int          d, p;
  logic        b;

  always_ff @(posedge clk_bit) begin
    hist <= {hist[62:0], serial_i};
  end

  always @(posedge clk_bit) begin
    d = BASE_BITS + (int'(tap_i) + PHASE) / TAPS_PER_BIT;
    p = (int'(tap_i) + PHASE) % TAPS_PER_BIT;
    b = hist[d];
    if ((p == 0 || p == TAPS_PER_BIT - 1) && hist[d] != hist[d+1])
      b = 1'($urandom);
    inj_done_o <= 1'b0;
    if (inj_width_i != 0 && !b && run == inj_width_i) begin
      b = 1'b1;
      inj_done_o <= 1'b1;
    end
    run = b ? run + 1 : 0;
    serial_o <= b;
  end

endmodule
