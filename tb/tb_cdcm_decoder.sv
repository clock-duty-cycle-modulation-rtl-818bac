// tb_cdcm_decoder: checks word-to-byte decoding, start-of-packet marking
// and error reporting of the CDCM decoder.
//
// The stimulus is a stream of IDLE words and groups of four data words
// (one byte), with occasional broken words (no legal high-bit count) and
// IDLE words cut into the middle of a byte. A reference model kept here
// tracks the byte phase and predicts, one cycle later, every output:
// byte, byte_valid, sop, idle, pattern and frame error.
module tb_cdcm_decoder;
  import cdcm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cdcm_word_t word = '0;
  logic idle, bv, sop, perr, ferr;
  logic [7:0] b;

  cdcm_decoder dut (.clk, .rst, .word_i(word), .idle_o(idle), .byte_valid_o(bv),
                    .byte_sop_o(sop), .byte_o(b), .pattern_err_o(perr), .frame_err_o(ferr));

  function automatic logic [9:0] w_of(int n);
    return 10'((1 << n) - 1) << (10 - n);
  endfunction

  // reference state
  int ph = 0;
  logic [7:0] acc = 0;
  bit aft = 0;
  // expected outputs for the word just presented
  bit e_bv, e_sop, e_idle, e_perr, e_ferr;
  logic [7:0] e_b;
  int n_bytes = 0, n_sop = 0, n_perr = 0, n_ferr = 0;

  task automatic present(input int kind, input logic [1:0] d);
    // kind: 0 data, 1 idle, 2 broken
    int n;
    n = (kind == 1) ? 5 : (kind == 2) ? 0 : (d == 0) ? 3 : (d == 1) ? 4 : (d == 2) ? 6 : 7;
    if (kind == 2) word = 10'($urandom_range(1, 1022)) | 10'b1;  // never legal: ends high
    else word = w_of(n);
    e_bv = 0; e_sop = 0; e_idle = (kind == 1); e_perr = (kind == 2); e_ferr = 0;
    if (kind != 0) begin
      e_ferr = (ph != 0);
      ph = 0;
      aft = (kind == 1);
    end else begin
      acc = {acc[5:0], d};
      if (ph == 3) begin
        e_bv = 1; e_b = acc; e_sop = aft; aft = 0; ph = 0;
      end else ph++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (bv != e_bv || idle != e_idle || perr != e_perr || ferr != e_ferr ||
        (e_bv && (b != e_b || sop != e_sop))) begin
      failures++;
      $display("ERROR: word %b: bv %b/%b b %h/%h sop %b/%b idle %b/%b perr %b/%b ferr %b/%b",
               word, bv, e_bv, b, e_b, sop, e_sop, idle, e_idle, perr, e_perr, ferr, e_ferr);
    end
    n_bytes += e_bv; n_sop += e_sop; n_perr += e_perr; n_ferr += e_ferr;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 300; k++) begin
      int r;
      r = $urandom_range(0, 9);
      if (r < 2) begin
        repeat ($urandom_range(1, 6)) present(1, 0);
      end else if (r == 2) begin
        present(2, 0);
      end else if (r == 3) begin
        present(0, 2'($urandom)); present(1, 0);   // byte cut by IDLE
      end else begin
        logic [7:0] v;
        v = 8'($urandom);
        for (int j = 3; j >= 0; j--) present(0, v[2*j +: 2]);
      end
    end
    checks++;
    if (n_bytes < 50 || n_sop < 10 || n_perr < 5 || n_ferr < 5) begin
      failures++;
      $display("ERROR: thin coverage %0d %0d %0d %0d", n_bytes, n_sop, n_perr, n_ferr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
