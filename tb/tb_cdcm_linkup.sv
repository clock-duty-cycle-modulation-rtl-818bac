// tb_cdcm_linkup: link-up controller on a receive path with a modelled
// input delay line.
//
// A serializer sends IDLE through line_model, whose taps 4, 5, 14, 15, 24
// and 25 sample on a data transition (random bits). The controller must
// pick the middle of the longest clean tap run (computed here from the same
// rule), align the word by bit slips, raise link_up within the time the scan
// needs, and the aligned word must then stay equal to the IDLE word.
module tb_cdcm_linkup;
  import cdcm_pkg::*;

  localparam int PHASE = 5;
  localparam int NTAPS = 32, SETTLE = 8, CHECK = 64;

  logic clk = 0, clk_bit = 0, rst = 1;
  always #4  clk_bit = ~clk_bit;
  always #40 clk     = ~clk;
  int checks = 0, failures = 0;

  logic ser, ser_d;
  cdcm_word_t word;
  logic [4:0] tap, slips;
  logic tap_ld, slip, up, inj_done;

  cdcm_serializer u_ser (.clk_bit, .rst, .word_i(10'b1111100000), .serial_o(ser));
  line_model #(.BASE_BITS(2), .PHASE(PHASE)) u_line (
    .clk_bit, .serial_i(ser), .tap_i(tap), .inj_width_i(0), .inj_done_o(inj_done),
    .serial_o(ser_d));
  cdcm_deserializer u_des (.clk, .clk_bit, .rst, .serial_i(ser_d), .bitslip_i(slip),
                           .word_o(word));
  cdcm_linkup #(.NTAPS(NTAPS), .SETTLE(SETTLE), .CHECK(CHECK)) dut (
    .clk, .rst, .word_i(word), .tap_o(tap), .tap_load_o(tap_ld), .bitslip_o(slip),
    .link_up_o(up), .slip_count_o(slips));

  function automatic int centre_tap();
    int best_s = 0, best_l = 0, rs = 0, rl = 0, p;
    for (int t = 0; t < NTAPS; t++) begin
      p = (t + PHASE) % 10;
      if (p != 0 && p != 9) begin
        if (rl == 0) rs = t;
        rl++;
        if (rl > best_l) begin best_l = rl; best_s = rs; end
      end else rl = 0;
    end
    return best_s + (best_l - 1) / 2;
  endfunction

  int cyc = 0, n_slip_pulses = 0, n_loads = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && slip) n_slip_pulses <= n_slip_pulses + 1;
    if (!rst && tap_ld) n_loads <= n_loads + 1;
  end

  initial begin
    int limit;
    // scan, centre settle, up to 2*10 slips, final check
    limit = NTAPS * (SETTLE + CHECK + 1) + NTAPS + 2 + SETTLE + 20 * (SETTLE + 2) + CHECK + 20;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (!up && cyc < limit) @(posedge clk);
    #1;
    checks++;
    if (!up) begin
      failures++;
      $display("ERROR: no link-up within %0d cycles", limit);
    end
    checks++;
    if (int'(tap) != centre_tap()) begin
      failures++;
      $display("ERROR: tap %0d expected %0d", tap, centre_tap());
    end
    checks++;
    if (int'(slips) != n_slip_pulses || n_slip_pulses == 0) begin
      failures++;
      $display("ERROR: slip count %0d, pulses %0d", slips, n_slip_pulses);
    end
    checks++;
    if (n_loads != NTAPS + 1) begin
      failures++;
      $display("ERROR: %0d tap loads", n_loads);
    end
    $display("link up at cycle %0d, tap %0d, %0d slips", cyc, tap, slips);
    repeat (200) begin
      @(posedge clk);
      #1;
      checks++;
      if (word != 10'b1111100000 || !up) begin
        failures++;
        $display("ERROR: word %b up %b after link-up", word, up);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
