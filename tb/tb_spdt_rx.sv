// tb_spdt_rx: checks the SPDT packet receiver.
//
// Packets are built here and fed as decoded bytes, one every four cycles,
// IDLE between packets. Good packets with and without frames and pulses,
// packets with a wrong checksum, a wrong magic byte, a length above 16,
// packets cut short by IDLE and by a link error are mixed at random. Every
// delivered frame must match, every error must be flagged, and every pulse
// must come out exactly PULSE_DELAY - wait cycles after the cycle the magic
// byte was presented (or at once, flagged late, if the wait is too long).
// Back-to-back short packets keep several pulses in flight at once.
module tb_spdt_rx;
  import cdcm_pkg::*;

  localparam int PULSE_DELAY = 128;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic link_up = 0, bv = 0, sop = 0, idle = 0, lerr = 0;
  logic [7:0] b = 0;
  logic fv, cse, fe, pulse, late;
  logic [1:0] finstr;
  logic [4:0] flen;
  logic [15:0][7:0] fdata;

  spdt_rx #(.PULSE_DELAY(PULSE_DELAY)) dut (
    .clk, .rst, .link_up_i(link_up), .byte_valid_i(bv), .byte_sop_i(sop), .byte_i(b),
    .idle_i(idle), .link_err_i(lerr), .frame_valid_o(fv), .frame_instr_o(finstr),
    .frame_len_o(flen), .frame_data_o(fdata), .csum_err_o(cse), .frame_err_o(fe),
    .pulse_o(pulse), .pulse_late_o(late));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // expected events
  typedef struct { logic [1:0] i; logic [4:0] n; logic [15:0][7:0] d; } fr_t;
  fr_t fq[$];
  longint pq[$];
  int e_cse = 0, e_fe = 0, e_late = 0, n_cse = 0, n_fe = 0, n_late = 0, n_fr = 0, n_pu = 0;
  int max_inflight = 0;

  always @(posedge clk) if (!rst) begin
    foreach (pq[j])
      if (pq[j] < cyc) begin
        failures++;
        $display("ERROR: pulse due at %0d missing", pq[j]);
        pq.delete(j);
        break;
      end
    if (fv) begin
      fr_t f;
      checks++;
      n_fr++;
      if (fq.size() == 0) begin failures++; $display("ERROR: unexpected frame"); end
      else begin
        f = fq.pop_front();
        if (f.i != finstr || f.n != flen) begin failures++; $display("ERROR: frame header"); end
        for (int k = 0; k < f.n; k++)
          if (fdata[k] != f.d[k]) begin failures++; $display("ERROR: frame data %0d", k); end
      end
    end
    if (cse) n_cse++;
    if (fe) n_fe++;
    if (late) n_late++;
    if (pq.size() > max_inflight) max_inflight = pq.size();
    if (pulse) begin
      checks++;
      n_pu++;
      // pulses of different packets may come out in any order
      begin
        int idx;
        idx = -1;
        foreach (pq[j]) if (pq[j] == cyc && idx < 0) idx = j;
        if (idx < 0) begin
          failures++;
          $display("ERROR: pulse at %0d not expected", cyc);
        end else pq.delete(idx);
      end
    end
  end

  // present one decoded byte; returns the cycle at which it is sampled
  task automatic put(input logic [7:0] v, input bit s, output longint t);
    bv = 1; sop = s; b = v;
    tick();
    t = cyc - 1;
    bv = 0; sop = 0;
  endtask

  task automatic put_idle();
    idle = 1;
    tick();
    idle = 0;
    repeat (3) tick();
  endtask

  // kind: 0 good, 1 bad checksum, 2 bad magic, 3 length above 16,
  //       4 cut by IDLE, 5 cut by a link error
  task automatic packet(input int kind, input bit has_frame, input bit has_pulse, input int w);
    logic [7:0] bytes[$];
    logic [15:0] sum;
    logic [4:0] n;
    logic [1:0] ins;
    logic [15:0][7:0] d;
    longint tm, t;
    n = has_frame ? 5'($urandom_range(0, 16)) : 5'd0;
    if (kind == 3) n = 5'($urandom_range(17, 31));
    ins = has_frame ? 2'($urandom) : 2'd0;
    for (int k = 0; k < 16; k++) d[k] = 8'($urandom);
    bytes.push_back(kind == 2 ? 8'hFC : 8'hFD);
    bytes.push_back({has_frame, ins, n});
    bytes.push_back({has_pulse, 7'(w >> 8)});
    bytes.push_back(8'(w));
    bytes.push_back(8'h00);
    for (int k = 0; k < n && k < 16; k++) bytes.push_back(d[k]);
    sum = 0;
    foreach (bytes[k]) sum += 16'(bytes[k]);
    if (kind == 1) sum ^= 16'(1 << $urandom_range(0, 15));
    bytes.push_back(sum[15:8]);
    bytes.push_back(sum[7:0]);
    if (kind == 0 && has_frame) fq.push_back('{i: ins, n: n, d: d});
    if (kind == 1) e_cse++;
    if (kind >= 2) e_fe++;
    foreach (bytes[k]) begin
      if ((kind == 4 || kind == 5) && k == bytes.size() - 2) begin
        if (kind == 4) put_idle();
        else begin lerr = 1; tick(); lerr = 0; repeat (3) tick(); end
        break;
      end
      if (kind == 3 && k == 2) break;   // rejected at the length byte
      put(bytes[k], k == 0, t);
      if (k == 0) tm = t;
      // the pulse is scheduled once the pulse-timing field is in
      if (k == 3 && has_pulse && kind != 2) begin
        if (PULSE_DELAY - w - 12 >= 2) pq.push_back(tm + PULSE_DELAY - w);
        else begin
          pq.push_back(t + 1);
          e_late++;
        end
      end
      repeat (3) tick();
    end
    if (kind == 4) ; else put_idle();
  endtask

  initial begin
    repeat (3) tick();
    rst = 0;
    // nothing is taken while the link is down
    put(8'hFD, 1, cyc_dummy);
    repeat (3) tick();
    link_up = 1;
    put_idle();
    for (int k = 0; k < 150; k++) begin
      int r;
      r = $urandom_range(0, 11);
      if (r < 6) packet(0, $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 100));
      else if (r == 6) packet(0, 0, 1, 0);                 // short pulse packets, pulses overlap
      else if (r == 7) packet(0, 0, 1, $urandom_range(120, 2000));   // too late
      else packet(r - 7, $urandom_range(0, 1), 0, 0);
    end
    repeat (PULSE_DELAY + 10) tick();
    checks++;
    if (fq.size() != 0 || pq.size() != 0) begin
      failures++;
      $display("ERROR: %0d frames, %0d pulses missing", fq.size(), pq.size());
    end
    checks++;
    if (n_cse != e_cse || n_fe != e_fe || n_late != e_late) begin
      failures++;
      $display("ERROR: csum %0d/%0d frame %0d/%0d late %0d/%0d", n_cse, e_cse, n_fe, e_fe, n_late, e_late);
    end
    checks++;
    if (n_fr < 20 || n_pu < 20 || e_late == 0 || max_inflight < 2) begin
      failures++;
      $display("ERROR: coverage frames %0d pulses %0d late %0d inflight %0d", n_fr, n_pu, e_late, max_inflight);
    end
    $display("frames %0d pulses %0d late %0d csum %0d frame errors %0d, max pulses in flight %0d",
             n_fr, n_pu, n_late, n_cse, n_fe, max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc_dummy;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
