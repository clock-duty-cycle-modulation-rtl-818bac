// tb_cdcm_encoder: checks the CDCM encoder word by word.
//
// Random bytes, IDLE bytes and empty slots are offered; every output word
// is compared with a reference built here from a table of high-bit counts
// (00->3, 01->4, 10->6, 11->7, IDLE->5, out of 10 bits, high bits first).
// in_ready must come exactly once every four cycles.
module tb_cdcm_encoder;
  import cdcm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid = 0;
  link_byte_t in_byte = '0;
  logic       in_ready;
  cdcm_word_t word;

  cdcm_encoder dut (.clk, .rst, .in_valid, .in_byte, .in_ready, .word_o(word));

  function automatic logic [9:0] ref_word(input bit idle, input logic [1:0] d);
    int n;
    n = idle ? 5 : (d == 0) ? 3 : (d == 1) ? 4 : (d == 2) ? 6 : 7;
    return 10'((1 << n) - 1) << (10 - n);
  endfunction

  logic [9:0] expq[$];
  int ready_gap = 0, n_ready = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 400; k++) begin
      // offer something in every cycle; only the ready cycle takes it
      in_valid = ($urandom_range(0, 3) != 0);
      in_byte.idle = ($urandom_range(0, 4) == 0);
      in_byte.data = 8'($urandom);
      if (in_ready) begin
        n_ready++;
        for (int j = 3; j >= 0; j--)
          expq.push_back(ref_word(!in_valid || in_byte.idle, in_byte.data[2*j +: 2]));
      end
      @(posedge clk);
      #1;
      // the word for the first pair of a byte shows one cycle after it is taken
      if (expq.size() > 0) begin
        logic [9:0] e;
        e = expq.pop_front();
        checks++;
        if (word != e) begin
          failures++;
          $display("ERROR: cycle %0d word %b expected %b", k, word, e);
        end
      end
      checks++;
      if (in_ready) begin
        if (ready_gap != 3 && n_ready > 0) begin
          failures++;
          $display("ERROR: ready gap %0d", ready_gap);
        end
        ready_gap = 0;
      end else ready_gap++;
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
