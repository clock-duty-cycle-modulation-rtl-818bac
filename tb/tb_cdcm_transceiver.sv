// tb_cdcm_transceiver: one transceiver looped back on itself through a
// modelled line and input delay.
//
// After link-up, bursts of random bytes separated by IDLE bytes are sent;
// the received bytes must match in order, the first byte of each burst must
// carry the start-of-packet mark and no other byte may. A falling edge moved
// on the line by the line model (a 7-high period made 8 high) must be
// reported as a pattern error. The byte rate must be one per four cycles.
module tb_cdcm_transceiver;
  import cdcm_pkg::*;

  logic clk = 0, clk_bit = 0, rst = 1;
  always #4  clk_bit = ~clk_bit;
  always #40 clk     = ~clk;
  int checks = 0, failures = 0;

  logic       tx_valid = 0, tx_ready;
  link_byte_t tx_byte = '0;
  logic       rx_valid, rx_sop, rx_idle, ser, ser_d, tap_ld, up, perr, ferr, inj_done;
  logic [7:0] rx_byte;
  logic [4:0] tap, slips;
  int         inj = 0;

  cdcm_transceiver dut (
    .clk, .clk_bit, .rst, .tx_valid_i(tx_valid), .tx_byte_i(tx_byte), .tx_ready_o(tx_ready),
    .rx_valid_o(rx_valid), .rx_sop_o(rx_sop), .rx_byte_o(rx_byte), .rx_idle_o(rx_idle),
    .serial_o(ser), .serial_i(ser_d), .idelay_tap_o(tap), .idelay_load_o(tap_ld),
    .link_up_o(up), .slip_count_o(slips), .pattern_err_o(perr), .frame_err_o(ferr));

  line_model #(.BASE_BITS(5), .PHASE(1)) u_line (
    .clk_bit, .serial_i(ser), .tap_i(tap), .inj_width_i(inj), .inj_done_o(inj_done),
    .serial_o(ser_d));

  typedef struct { logic [7:0] b; bit sop; } rb_t;
  rb_t exp_q[$];
  int n_rx = 0, n_perr = 0;
  longint cyc = 0, first_rx = -1, last_rx = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (perr) n_perr++;
    if (rx_valid && inj == 0) begin
      rb_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected byte %h", rx_byte);
      end else begin
        e = exp_q.pop_front();
        if (rx_byte != e.b || rx_sop != e.sop) begin
          failures++;
          $display("ERROR: byte %h sop %b expected %h sop %b", rx_byte, rx_sop, e.b, e.sop);
        end
      end
      if (first_rx < 0) first_rx = cyc;
      last_rx = cyc;
      n_rx++;
    end
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // offer one byte (or an IDLE byte) and wait until it is taken
  task automatic send(input bit idle, input logic [7:0] b, input bit sop);
    tx_valid = 1;
    tx_byte.idle = idle;
    tx_byte.data = b;
    while (!tx_ready) tick();
    if (!idle) exp_q.push_back('{b: b, sop: sop});
    tick();
    tx_valid = 0;
  endtask

  initial begin
    repeat (3) tick();
    rst = 0;
    while (!up && cyc < 5000) tick();
    checks++;
    if (!up) begin
      failures++;
      $display("ERROR: no link-up");
    end
    repeat (20) tick();
    // one long burst first, to measure the byte rate
    for (int j = 0; j < 40; j++) send(0, 8'($urandom), j == 0);
    send(1, 0, 0);
    repeat (40) tick();
    checks++;
    if (n_rx != 40 || last_rx - first_rx != 39 * 4) begin
      failures++;
      $display("ERROR: %0d bytes in %0d cycles", n_rx, last_rx - first_rx);
    end
    for (int k = 0; k < 60; k++) begin
      int n;
      n = $urandom_range(1, 24);
      for (int j = 0; j < n; j++) send(0, 8'($urandom), j == 0);
      repeat ($urandom_range(1, 3)) send(1, 0, 0);
    end
    repeat (40) tick();
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("ERROR: %0d bytes lost", exp_q.size());
    end
    // broken pattern
    inj = 7;
    for (int j = 0; j < 8; j++) send(0, 8'hFF, j == 0);
    send(1, 0, 0);
    repeat (40) tick();
    checks++;
    if (n_perr == 0) begin
      failures++;
      $display("ERROR: no pattern error seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
