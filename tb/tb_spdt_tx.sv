// tb_spdt_tx: checks the SPDT packet transmitter byte by byte.
//
// An encoder stand-in takes a byte every fourth cycle. Frames of random
// length (0..16) and pulses at random times are requested; every packet on
// the output is compared with one built here: magic 0xFD, {frame, instr,
// len}, pulse timing {flag, wait}, reserve 0x00, the user bytes, the 16-bit
// sum of the bytes before it, and one IDLE byte. The wait must equal the
// number of cycles between the pulse request and the acceptance of the
// magic byte, a packet must take (8 + len) * 4 cycles, and a second pulse
// while one waits must be dropped.
module tb_spdt_tx;
  import cdcm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic link_up = 0, pulse = 0, drop, req = 0, ack, ovalid, oready, busy;
  logic [1:0] instr = 0;
  logic [4:0] len = 0;
  logic [15:0][7:0] data = '0;
  link_byte_t obyte;
  // cycle each pulse that made it into a packet was requested
  longint pulse_t[$];

  spdt_tx dut (.clk, .rst, .link_up_i(link_up), .pulse_i(pulse), .pulse_drop_o(drop),
               .frame_req_i(req), .frame_instr_i(instr), .frame_len_i(len),
               .frame_data_i(data), .frame_ack_o(ack), .out_valid_o(ovalid),
               .out_byte_o(obyte), .out_ready_i(oready), .busy_o(busy));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign oready = (cyc % 4 == 0);

  // capture the byte stream
  typedef struct { link_byte_t b; longint t; } cap_t;
  cap_t cap[$];
  // a pulse is pending from its request until the next magic byte is taken
  bit tb_pend = 0, in_pkt = 0;
  longint pend_t;
  always @(posedge clk) if (!rst && ovalid && oready) begin
    cap.push_back('{b: obyte, t: cyc});
    if (obyte.idle) in_pkt = 0;
    else if (!in_pkt) begin
      in_pkt = 1;
      if (tb_pend) pulse_t.push_back(pend_t);
      tb_pend = 0;
    end
  end


  int n_drop = 0, n_pulse_pk = 0, n_frame_pk = 0, n_both = 0;
  always @(posedge clk) if (drop) n_drop++;

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // check one packet from the capture against the reference
  task automatic check_packet(input bit has_frame, input logic [1:0] ins, input logic [4:0] n,
                              input logic [15:0][7:0] d);
    logic [7:0] expb[$];
    logic [15:0] sum;
    longint t0, w;
    bit has_pulse;
    logic [7:0] b1, b2;
    while (cap.size() < 1) tick();
    // the pulse flag and wait are read from the packet, then checked
    while (cap.size() < 4) tick();
    t0 = cap[0].t;
    has_pulse = cap[2].b.data[7];
    w = has_pulse ? (t0 - pulse_t.pop_front()) : 0;
    b1 = {has_frame, ins, n};
    b2 = {has_pulse, 7'(w >> 8)};
    expb = {};
    expb.push_back(8'hFD);
    expb.push_back(b1);
    expb.push_back(b2);
    expb.push_back(8'(w));
    expb.push_back(8'h00);
    for (int k = 0; k < n; k++) expb.push_back(d[k]);
    sum = 0;
    foreach (expb[k]) sum += 16'(expb[k]);
    expb.push_back(sum[15:8]);
    expb.push_back(sum[7:0]);
    while (cap.size() < expb.size() + 1) tick();
    foreach (expb[k]) begin
      checks++;
      if (cap[k].b.idle || cap[k].b.data != expb[k]) begin
        failures++;
        $display("ERROR: packet byte %0d = %h expected %h", k, cap[k].b.data, expb[k]);
      end
    end
    checks++;
    if (!cap[expb.size()].b.idle) begin
      failures++;
      $display("ERROR: no IDLE byte after packet");
    end
    checks++;
    if (cap[expb.size()].t - t0 != (8 + n - 1) * 4) begin
      failures++;
      $display("ERROR: packet took %0d cycles", cap[expb.size()].t - t0);
    end
    n_pulse_pk += has_pulse;
    n_frame_pk += has_frame;
    n_both += has_pulse && has_frame;
    repeat (expb.size() + 1) void'(cap.pop_front());
  endtask

  task automatic do_pulse();
    // never request in a cycle where the encoder takes a byte, so the
    // reference needs no tie rule
    if (oready) tick();
    pulse = 1;
    @(posedge clk);
    if (!tb_pend) begin
      tb_pend = 1;
      pend_t = cyc;
    end
    #1;
    pulse = 0;
  endtask

  initial begin
    logic [15:0][7:0] d;
    logic [4:0] n;
    logic [1:0] ins;
    repeat (3) tick();
    rst = 0;
    // nothing goes out while the link is down
    req = 1;
    repeat (20) tick();
    checks++;
    if (busy || cap.size() != 0) begin failures++; $display("ERROR: sent while link down"); end
    req = 0;
    link_up = 1;
    for (int k = 0; k < 60; k++) begin
      int mode;
      mode = k % 4;
      n = 5'($urandom_range(0, 16));
      ins = 2'($urandom);
      for (int j = 0; j < 16; j++) d[j] = 8'($urandom);
      if (mode == 0 || mode == 2) begin
        // frame, maybe with a pulse during it (goes into the next packet)
        req = 1; instr = ins; len = n; data = d;
        if (mode == 2) do_pulse();
        while (!ack) tick();
        req = 0;
        data = '0;
        fork
          check_packet(1, ins, n, d);
          if (mode == 2) begin
            repeat ($urandom_range(1, 20)) tick();
            do_pulse();
            repeat (3) tick();
            do_pulse();            // dropped: the first is still waiting
          end
        join
        if (mode == 2) check_packet(0, 0, 0, '0);
      end else begin
        repeat ($urandom_range(0, 5)) tick();
        do_pulse();
        check_packet(0, 0, 0, '0);
      end
      repeat ($urandom_range(0, 8)) tick();
    end
    checks++;
    if (n_drop == 0 || n_pulse_pk < 20 || n_frame_pk < 20 || n_both == 0 || pulse_t.size() != 0) begin
      failures++;
      $display("ERROR: coverage drop %0d pulse %0d frame %0d both %0d left %0d",
               n_drop, n_pulse_pk, n_frame_pk, n_both, pulse_t.size());
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
