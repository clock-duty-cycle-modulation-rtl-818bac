// tb_cdcm_serdes: serializer and deserializer back to back through a
// line of a few bits' delay.
//
// While the IDLE word is sent, bit slips are issued one at a time; each must
// rotate the received word left by exactly one bit, and alignment (received
// word equal to the IDLE word) must be reached within ten slips. Then random
// words are sent and must come out unchanged, in order, at a constant
// latency.
module tb_cdcm_serdes;
  import cdcm_pkg::*;

  logic clk = 0, clk_bit = 0, rst = 1;
  always #4  clk_bit = ~clk_bit;
  always #40 clk     = ~clk;
  int checks = 0, failures = 0;

  localparam logic [9:0] IDLE_REF = 10'b1111100000;

  cdcm_word_t tx_word = IDLE_REF, rx_word;
  logic ser, slip = 0;
  logic [15:0] line = '0;
  int delay_bits;

  always @(posedge clk_bit) line <= {line[14:0], ser};

  cdcm_serializer   u_ser (.clk_bit, .rst, .word_i(tx_word), .serial_o(ser));
  cdcm_deserializer u_des (.clk, .clk_bit, .rst, .serial_i(line[delay_bits]),
                           .bitslip_i(slip), .word_o(rx_word));

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  initial begin
    logic [9:0] prev, sent[$];
    int slips, lat, lat0;
    delay_bits = $urandom_range(0, 12);
    repeat (3) tick();
    rst = 0;
    repeat (6) tick();
    slips = 0;
    while (rx_word != IDLE_REF && slips < 12) begin
      prev = rx_word;
      slip = 1;
      tick();
      slip = 0;
      repeat (4) tick();
      slips++;
      checks++;
      if (rx_word != {prev[8:0], prev[9]}) begin
        failures++;
        $display("ERROR: slip gave %b from %b", rx_word, prev);
      end
    end
    checks++;
    if (rx_word != IDLE_REF) begin
      failures++;
      $display("ERROR: not aligned after %0d slips", slips);
    end
    $display("delay %0d bits, aligned after %0d slips", delay_bits, slips);
    // data words; find the latency from a marker, then check a stream
    lat0 = -1;
    for (int k = 0; k < 300; k++) begin
      tx_word = (k == 0) ? 10'b1110000000 : 10'($urandom);
      sent.push_back(tx_word);
      tick();
      if (lat0 < 0) begin
        for (int j = 0; j < sent.size(); j++)
          if (rx_word == 10'b1110000000 && j == 0) lat0 = k;
        if (lat0 >= 0) void'(sent.pop_front());
      end else begin
        logic [9:0] e;
        e = sent.pop_front();
        checks++;
        if (rx_word != e) begin
          failures++;
          $display("ERROR: word %0d: %b expected %b", k, rx_word, e);
        end
      end
    end
    checks++;
    if (lat0 < 0 || lat0 > 4) begin
      failures++;
      $display("ERROR: latency %0d", lat0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
