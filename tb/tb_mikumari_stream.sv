// tb_mikumari_stream: continuous transfer between two link ends at the
// design's default parameters, the way the link is run in practice.
//
// After link-up both ends send NPKT maximum-size packets (16 user bytes)
// back to back while the master also sends a pulse every few hundred
// cycles. Every frame must arrive in order and intact with no checksum or
// frame error, every pulse must arrive at one fixed latency, and
// consecutive packets must start exactly (8 + 16) * 4 = 96 link cycles
// apart, the packet time the protocol allows for 16 user bytes.
module tb_mikumari_stream;
  import cdcm_pkg::*;

  localparam int NPKT = 400;

  logic clk = 1'b0, clk_bit = 1'b0, rst = 1'b1;
  always #4  clk_bit = ~clk_bit;
  always #40 clk     = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic       m_ser_o, s_ser_o, m_ser_i, s_ser_i, m_tap_ld, s_tap_ld, m_up, s_up;
  logic [4:0] m_tap, s_tap, m_slips, s_slips;
  logic       m_perr, s_perr, m_drop, s_drop, m_pulse, s_pulse, m_late, s_late;
  logic       m_pulse_i = 0;
  logic       m_req = 0, s_req = 0, m_ack, s_ack, m_busy, s_busy;
  logic [1:0] m_instr = 0, s_instr = 0, m_ri, s_ri;
  logic [4:0] m_rl, s_rl;
  logic [MAX_USER_BYTES-1:0][7:0] m_data = '0, s_data = '0, m_rd, s_rd;
  logic       m_rv, s_rv, m_cse, s_cse, m_fe, s_fe, d0, d1;

  mikumari_link u_m (
    .clk, .clk_bit, .rst, .serial_o(m_ser_o), .serial_i(m_ser_i),
    .idelay_tap_o(m_tap), .idelay_load_o(m_tap_ld), .link_up_o(m_up),
    .slip_count_o(m_slips), .pattern_err_o(m_perr),
    .pulse_i(m_pulse_i), .pulse_drop_o(m_drop), .pulse_o(m_pulse), .pulse_late_o(m_late),
    .tx_req_i(m_req), .tx_instr_i(m_instr), .tx_len_i(5'd16), .tx_data_i(m_data),
    .tx_ack_o(m_ack), .tx_busy_o(m_busy),
    .rx_valid_o(m_rv), .rx_instr_o(m_ri), .rx_len_o(m_rl), .rx_data_o(m_rd),
    .rx_csum_err_o(m_cse), .rx_frame_err_o(m_fe));

  mikumari_link u_s (
    .clk, .clk_bit, .rst, .serial_o(s_ser_o), .serial_i(s_ser_i),
    .idelay_tap_o(s_tap), .idelay_load_o(s_tap_ld), .link_up_o(s_up),
    .slip_count_o(s_slips), .pattern_err_o(s_perr),
    .pulse_i(1'b0), .pulse_drop_o(s_drop), .pulse_o(s_pulse), .pulse_late_o(s_late),
    .tx_req_i(s_req), .tx_instr_i(s_instr), .tx_len_i(5'd16), .tx_data_i(s_data),
    .tx_ack_o(s_ack), .tx_busy_o(s_busy),
    .rx_valid_o(s_rv), .rx_instr_o(s_ri), .rx_len_o(s_rl), .rx_data_o(s_rd),
    .rx_csum_err_o(s_cse), .rx_frame_err_o(s_fe));

  line_model #(.BASE_BITS(4), .PHASE(6)) u_ms (
    .clk_bit, .serial_i(m_ser_o), .tap_i(s_tap), .inj_width_i(0), .inj_done_o(d0),
    .serial_o(s_ser_i));
  line_model #(.BASE_BITS(9), .PHASE(2)) u_sm (
    .clk_bit, .serial_i(s_ser_o), .tap_i(m_tap), .inj_width_i(0), .inj_done_o(d1),
    .serial_o(m_ser_i));

  typedef logic [MAX_USER_BYTES-1:0][7:0] blk_t;
  blk_t q_ms[$], q_sm[$];
  longint preq[$];
  longint lat_ref = -1;
  int n_ms = 0, n_sm = 0, n_pulse = 0;

  function automatic blk_t rnd();
    blk_t b;
    for (int k = 0; k < MAX_USER_BYTES; k++) b[k] = 8'($urandom);
    return b;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (s_rv) begin
      checks++;
      n_ms++;
      if (q_ms.size() == 0 || s_rl != 16 || s_rd != q_ms[0]) begin
        failures++;
        $display("ERROR: m->s frame %0d wrong", n_ms);
      end
      if (q_ms.size() != 0) void'(q_ms.pop_front());
    end
    if (m_rv) begin
      checks++;
      n_sm++;
      if (q_sm.size() == 0 || m_rl != 16 || m_rd != q_sm[0]) begin
        failures++;
        $display("ERROR: s->m frame %0d wrong", n_sm);
      end
      if (q_sm.size() != 0) void'(q_sm.pop_front());
    end
    if (m_cse || s_cse || m_fe || s_fe || m_perr || s_perr || m_drop || m_late) begin
      failures++;
      $display("ERROR: error flag at cycle %0d", cyc);
    end
    if (s_pulse) begin
      longint lat;
      checks++;
      n_pulse++;
      lat = (preq.size() != 0) ? cyc - preq.pop_front() : -1;
      if (lat_ref < 0) lat_ref = lat;
      if (lat != lat_ref) begin
        failures++;
        $display("ERROR: pulse latency %0d, first %0d", lat, lat_ref);
      end
    end
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // one end's sender: NPKT frames back to back, each ack at 96-cycle spacing
  task automatic stream_m();
    longint last = -1;
    m_data = rnd();
    q_ms.push_back(m_data);
    m_req = 1;
    for (int k = 0; k < NPKT; k++) begin
      do tick(); while (!m_ack);
      if (last >= 0) begin
        checks++;
        if (cyc - last != 96) begin
          failures++;
          $display("ERROR: m packets %0d cycles apart", cyc - last);
        end
      end
      last = cyc;
      if (k < NPKT - 1) begin
        m_data = rnd();
        q_ms.push_back(m_data);
      end else m_req = 0;
    end
  endtask

  task automatic stream_s();
    longint last = -1;
    s_data = rnd();
    q_sm.push_back(s_data);
    s_req = 1;
    for (int k = 0; k < NPKT; k++) begin
      do tick(); while (!s_ack);
      if (last >= 0) begin
        checks++;
        if (cyc - last != 96) begin
          failures++;
          $display("ERROR: s packets %0d cycles apart", cyc - last);
        end
      end
      last = cyc;
      if (k < NPKT - 1) begin
        s_data = rnd();
        q_sm.push_back(s_data);
      end else s_req = 0;
    end
  endtask

  initial begin
    repeat (20) tick();
    rst = 0;
    while (!(m_up && s_up) && cyc < 20000) tick();
    checks++;
    if (!(m_up && s_up)) begin
      failures++;
      $display("ERROR: no link-up");
    end
    repeat (20) tick();
    fork
      stream_m();
      stream_s();
      // pulses ride along with the frames; one pulse at a time
      repeat (NPKT / 4) begin
        repeat ($urandom_range(250, 400)) tick();
        m_pulse_i = 1;
        preq.push_back(cyc + 1);
        tick();
        m_pulse_i = 0;
      end
    join
    repeat (400) tick();
    checks++;
    if (n_ms != NPKT || n_sm != NPKT || q_ms.size() != 0 || q_sm.size() != 0 ||
        preq.size() != 0 || n_pulse == 0) begin
      failures++;
      $display("ERROR: received %0d/%0d frames, %0d pulses, %0d pulses missing",
               n_ms, n_sm, n_pulse, preq.size());
    end
    $display("%0d frames each way, %0d pulses at latency %0d", n_ms, n_pulse, lat_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPKT * 100 + 30000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
