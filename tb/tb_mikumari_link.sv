// tb_mikumari_link: end-to-end test of two link ends (master and slave)
// joined by two line models, at the design's default parameters.
//
// Both ends must link up (delay-tap scan and bit slip), then frames of
// random length and content go both ways and are compared with what was
// sent, pulses are sent alone, with frames and while the link is busy and
// must come out after the same fixed latency, a second pulse while one is
// waiting must be dropped, and two line faults are injected: a moved
// falling edge that changes a data value (checksum error) and one that
// breaks the CDCM pattern (pattern and frame error). Each mechanism is
// counted and a failure is counted for any that never happened.
module tb_mikumari_link;
  import cdcm_pkg::*;

  localparam int PULSE_DELAY = 128;

  logic clk = 1'b0, clk_bit = 1'b0, rst = 1'b1;
  always #4  clk_bit = ~clk_bit;
  always #40 clk     = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ports of the two ends
  logic       m_ser_o, s_ser_o, m_ser_i, s_ser_i;
  logic [4:0] m_tap, s_tap;
  logic       m_tap_ld, s_tap_ld;
  logic       m_up, s_up;
  logic [4:0] m_slips, s_slips;
  logic       m_perr, s_perr;
  logic       m_pulse_i = 0, s_pulse_i = 0, m_drop, s_drop, m_pulse, s_pulse, m_late, s_late;
  logic       m_req = 0, s_req = 0;
  logic [1:0] m_instr = 0, s_instr = 0;
  logic [4:0] m_len = 0, s_len = 0;
  logic [MAX_USER_BYTES-1:0][7:0] m_data = '0, s_data = '0;
  logic       m_ack, s_ack, m_busy, s_busy;
  logic       m_rv, s_rv;
  logic [1:0] m_ri, s_ri;
  logic [4:0] m_rl, s_rl;
  logic [MAX_USER_BYTES-1:0][7:0] m_rd, s_rd;
  logic       m_cse, s_cse, m_fe, s_fe;
  int         inj_ms = 0, inj_sm = 0;
  logic       inj_ms_done, inj_sm_done;

  mikumari_link u_m (
    .clk, .clk_bit, .rst, .serial_o(m_ser_o), .serial_i(m_ser_i),
    .idelay_tap_o(m_tap), .idelay_load_o(m_tap_ld), .link_up_o(m_up),
    .slip_count_o(m_slips), .pattern_err_o(m_perr),
    .pulse_i(m_pulse_i), .pulse_drop_o(m_drop), .pulse_o(m_pulse), .pulse_late_o(m_late),
    .tx_req_i(m_req), .tx_instr_i(m_instr), .tx_len_i(m_len), .tx_data_i(m_data),
    .tx_ack_o(m_ack), .tx_busy_o(m_busy),
    .rx_valid_o(m_rv), .rx_instr_o(m_ri), .rx_len_o(m_rl), .rx_data_o(m_rd),
    .rx_csum_err_o(m_cse), .rx_frame_err_o(m_fe));

  mikumari_link u_s (
    .clk, .clk_bit, .rst, .serial_o(s_ser_o), .serial_i(s_ser_i),
    .idelay_tap_o(s_tap), .idelay_load_o(s_tap_ld), .link_up_o(s_up),
    .slip_count_o(s_slips), .pattern_err_o(s_perr),
    .pulse_i(s_pulse_i), .pulse_drop_o(s_drop), .pulse_o(s_pulse), .pulse_late_o(s_late),
    .tx_req_i(s_req), .tx_instr_i(s_instr), .tx_len_i(s_len), .tx_data_i(s_data),
    .tx_ack_o(s_ack), .tx_busy_o(s_busy),
    .rx_valid_o(s_rv), .rx_instr_o(s_ri), .rx_len_o(s_rl), .rx_data_o(s_rd),
    .rx_csum_err_o(s_cse), .rx_frame_err_o(s_fe));

  // master -> slave line: bad taps at phase 0/9 with PHASE 3: 6,7,16,17,26,27
  line_model #(.BASE_BITS(3), .PHASE(3)) u_ms (
    .clk_bit, .serial_i(m_ser_o), .tap_i(s_tap), .inj_width_i(inj_ms),
    .inj_done_o(inj_ms_done), .serial_o(s_ser_i));
  // slave -> master line: bad taps 1,2,11,12,21,22,31
  line_model #(.BASE_BITS(7), .PHASE(8)) u_sm (
    .clk_bit, .serial_i(s_ser_o), .tap_i(m_tap), .inj_width_i(inj_sm),
    .inj_done_o(inj_sm_done), .serial_o(m_ser_i));

  // ---------------- reference: longest good tap run, its centre -------
  function automatic int centre_tap(int phase);
    int best_s = 0, best_l = 0, rs = 0, rl = 0, p;
    for (int t = 0; t < 32; t++) begin
      p = (t + phase) % 10;
      if (p != 0 && p != 9) begin
        if (rl == 0) rs = t;
        rl++;
        if (rl > best_l) begin best_l = rl; best_s = rs; end
      end else rl = 0;
    end
    return best_s + (best_l - 1) / 2;
  endfunction

  // ---------------- expected frames -----------------------------------
  typedef struct {
    logic [1:0] instr;
    logic [4:0] len;
    logic [MAX_USER_BYTES-1:0][7:0] data;
    bit corrupt;
  } frame_t;
  frame_t q_ms[$], q_sm[$];

  // mechanism counters
  int n_frames_ms = 0, n_frames_sm = 0, n_pulse_only = 0, n_pulse_frame = 0,
      n_pulse_waited = 0, n_drop = 0, n_csum_err = 0, n_pat_err = 0,
      n_frame_err = 0, n_pulses_rx = 0, n_len0 = 0, n_len16 = 0;

  // check a received frame against the oldest one sent
  task automatic check_frame(ref frame_t q[$], input logic [1:0] i, input logic [4:0] l,
                             input logic [MAX_USER_BYTES-1:0][7:0] d, ref int n);
    frame_t f;
    checks++;
    while (q.size() > 0 && q[0].corrupt) void'(q.pop_front());
    if (q.size() == 0) begin
      failures++;
      $display("ERROR: unexpected frame");
      return;
    end
    f = q.pop_front();
    if (f.instr != i || f.len != l) begin
      failures++;
      $display("ERROR: frame header %0d/%0d expected %0d/%0d", i, l, f.instr, f.len);
    end
    for (int k = 0; k < int'(f.len); k++)
      if (d[k] != f.data[k]) begin
        failures++;
        $display("ERROR: frame byte %0d = %h expected %h", k, d[k], f.data[k]);
      end
    n++;
    if (l == 0) n_len0++;
    if (l == 16) n_len16++;
  endtask

  always @(posedge clk) if (!rst) begin
    if (s_rv) check_frame(q_ms, s_ri, s_rl, s_rd, n_frames_ms);
    if (m_rv) check_frame(q_sm, m_ri, m_rl, m_rd, n_frames_sm);
    if (s_cse || m_cse) n_csum_err++;
    if (s_perr || m_perr) n_pat_err++;
    if (s_fe || m_fe) n_frame_err++;
    if (m_drop || s_drop) n_drop++;
    if (m_late || s_late) begin
      failures++;
      $display("ERROR: late pulse");
    end
  end

  // ---------------- pulse latency -------------------------------------
  longint preq[$];
  longint lat_ref = -1;
  always @(posedge clk) if (!rst && s_pulse) begin
    longint lat;
    checks++;
    n_pulses_rx++;
    if (preq.size() == 0) begin
      failures++;
      $display("ERROR: unexpected pulse");
    end else begin
      lat = cyc - preq.pop_front();
      if (lat_ref < 0) lat_ref = lat;
      if (lat != lat_ref || lat < PULSE_DELAY || lat > PULSE_DELAY + 40) begin
        failures++;
        $display("ERROR: pulse latency %0d, first was %0d", lat, lat_ref);
      end
    end
  end

  // stimulus moves one time unit after the clock edge, when every
  // register has taken its new value
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic pulse_m(input bit expect_it);
    m_pulse_i = 1'b1;
    if (expect_it) preq.push_back(cyc + 1);
    tick();
    m_pulse_i = 1'b0;
  endtask

  task automatic send_m(input frame_t f);
    m_req = 1'b1; m_instr = f.instr; m_len = f.len; m_data = f.data;
    q_ms.push_back(f);
    do tick(); while (!m_ack);
    m_req = 1'b0;
  endtask

  task automatic send_s(input frame_t f);
    s_req = 1'b1; s_instr = f.instr; s_len = f.len; s_data = f.data;
    q_sm.push_back(f);
    do tick(); while (!s_ack);
    s_req = 1'b0;
  endtask

  function automatic frame_t rand_frame(int len);
    frame_t f;
    f.instr = 2'($urandom);
    f.len   = 5'(len);
    for (int k = 0; k < MAX_USER_BYTES; k++) f.data[k] = 8'($urandom);
    f.corrupt = 0;
    return f;
  endfunction

  task automatic wait_idle();
    do tick(); while (m_busy || s_busy);
    repeat (300) tick();
  endtask

  initial begin
    frame_t f;
    repeat (20) tick();
    #1 rst = 1'b0;
    // link-up: about 32 taps * 72 cycles each, plus slips
    fork
      begin wait (m_up && s_up); end
      begin repeat (20000) @(posedge clk); end
    join_any
    disable fork;
    checks++;
    if (!(m_up && s_up)) begin
      failures++;
      $display("ERROR: link did not come up");
    end
    checks += 2;
    if (s_tap != 5'(centre_tap(3))) begin failures++; $display("ERROR: slave tap %0d", s_tap); end
    if (m_tap != 5'(centre_tap(8))) begin failures++; $display("ERROR: master tap %0d", m_tap); end
    $display("link up at cycle %0d: master tap %0d slips %0d, slave tap %0d slips %0d",
             cyc, m_tap, m_slips, s_tap, s_slips);
    repeat (50) tick();

    // 1. frames both ways, every length
    for (int r = 0; r < 3; r++)
      for (int len = 0; len <= 16; len++) begin
        fork
          send_m(rand_frame((len + r) % 17));
          send_s(rand_frame(16 - len));
        join
      end
    wait_idle();

    // 2. pulses alone, at random distances
    for (int k = 0; k < 10; k++) begin
      pulse_m(1);
      n_pulse_only++;
      repeat (60 + $urandom_range(0, 150)) tick();
    end
    wait_idle();

    // 3. pulses that must wait for a frame on the wire, and pulses that
    //    share a packet with a frame
    for (int k = 0; k < 10; k++) begin
      fork
        send_m(rand_frame($urandom_range(0, 16)));
        begin
          repeat ($urandom_range(2, 60)) tick();
          if (m_busy) n_pulse_waited++;
          pulse_m(1);
        end
      join
      wait_idle();
      // pulse and frame requested together
      m_pulse_i = 1'b1; preq.push_back(cyc + 1);
      f = rand_frame($urandom_range(1, 16));
      m_req = 1'b1; m_instr = f.instr; m_len = f.len; m_data = f.data;
      q_ms.push_back(f);
      tick();
      m_pulse_i = 1'b0;
      while (!m_ack) tick();
      m_req = 1'b0;
      n_pulse_frame++;
      wait_idle();
    end

    // 4. a second pulse while the first waits is dropped
    f = rand_frame(16);
    fork
      send_m(f);
      begin
        repeat (10) tick();
        pulse_m(1);
        repeat (5) tick();
        pulse_m(0);
      end
    join
    wait_idle();

    // 5. checksum error: all-zero data, one 00 pair turned into 01 on the line
    f = rand_frame(16);
    f.data = '0;
    f.corrupt = 1;
    send_m(f);
    repeat (30) tick();
    inj_ms = 3;
    @(posedge inj_ms_done);
    inj_ms = 0;
    wait_idle();
    send_m(rand_frame(5));   // the link still works
    wait_idle();

    // 6. pattern error: all-ones data, a 7-high period stretched to 8
    f = rand_frame(16);
    f.data = '1;
    f.corrupt = 1;
    send_s(f);
    repeat (30) tick();
    inj_sm = 7;
    @(posedge inj_sm_done);
    inj_sm = 0;
    wait_idle();
    send_s(rand_frame(7));
    wait_idle();

    // all expected frames and pulses arrived
    checks += 3;
    while (q_ms.size() > 0 && q_ms[0].corrupt) void'(q_ms.pop_front());
    while (q_sm.size() > 0 && q_sm[0].corrupt) void'(q_sm.pop_front());
    if (q_ms.size() != 0) begin failures++; $display("ERROR: %0d frames lost m->s", q_ms.size()); end
    if (q_sm.size() != 0) begin failures++; $display("ERROR: %0d frames lost s->m", q_sm.size()); end
    if (preq.size() != 0) begin failures++; $display("ERROR: %0d pulses lost", preq.size()); end

    $display("frames m->s %0d, s->m %0d (len0 %0d, len16 %0d); pulses alone %0d, waited %0d, with frame %0d, received %0d, latency %0d",
             n_frames_ms, n_frames_sm, n_len0, n_len16, n_pulse_only, n_pulse_waited, n_pulse_frame, n_pulses_rx, lat_ref);
    $display("dropped pulses %0d, checksum errors %0d, pattern errors %0d, frame errors %0d, slips %0d/%0d",
             n_drop, n_csum_err, n_pat_err, n_frame_err, m_slips, s_slips);
    // every mechanism must have happened
    checks += 10;
    if (m_slips == 0 && s_slips == 0) begin failures++; $display("ERROR: no bit slip"); end
    if (n_frames_ms == 0 || n_frames_sm == 0) begin failures++; $display("ERROR: no frames"); end
    if (n_len0 == 0 || n_len16 == 0) begin failures++; $display("ERROR: length extremes missing"); end
    if (n_pulse_only == 0) begin failures++; $display("ERROR: no pulse-only packet"); end
    if (n_pulse_waited == 0) begin failures++; $display("ERROR: no waiting pulse"); end
    if (n_pulse_frame == 0) begin failures++; $display("ERROR: no pulse with frame"); end
    if (n_drop != 1) begin failures++; $display("ERROR: dropped pulses %0d", n_drop); end
    if (n_csum_err != 1) begin failures++; $display("ERROR: checksum errors %0d", n_csum_err); end
    if (n_pat_err == 0) begin failures++; $display("ERROR: no pattern error"); end
    if (n_frame_err == 0) begin failures++; $display("ERROR: no frame error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
