// spdt_tx: Synchronous Pulse and Data Transmission (SPDT) packet
// transmitter.
//
// It builds packets of the form
//   0xFD | {frame, instr[1:0], len[4:0]} | pulse timing (MSB, LSB) | 0x00 |
//   len user bytes | 16-bit checksum (MSB, LSB) | IDLE byte
// and hands them byte by byte to the CDCM encoder, which takes a byte every
// four link cycles (out_ready). A packet goes out when the link is up and
// either a user frame is requested (frame_req_i) or a synchronous pulse is
// pending. A pulse requested while a packet is on the wire waits; the
// number of cycles it waited, counted up to the cycle the next packet's
// magic byte is taken by the encoder, is written into the pulse-timing
// field, so the receiver can re-create the pulse at a fixed latency from the
// request. A pulse and a user frame share one packet when both are pending.
// Only one pulse can wait: a pulse that arrives while another is still
// waiting is dropped and reported on pulse_drop_o.
// The packet fields, their order and sizes, and 4 cycles per byte are the
// published design's; the bit layout of length+instruction and pulse timing, the
// checksum (16-bit sum of the bytes from magic to the last user byte) and
// the pulse-wait mechanism are this design's own.
//
// Timing: frame_ack_o pulses in the cycle the magic byte is accepted; the
// user bytes are latched then, so the caller may change them afterwards.
// A packet with n user bytes occupies (8 + n) * 4 link cycles on the wire,
// its IDLE byte included; a queued packet follows in the next byte slot.
module spdt_tx
  import cdcm_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               link_up_i,
  // synchronous pulse request (one cycle)
  input  logic                               pulse_i,
  output logic                               pulse_drop_o,
  // user frame
  input  logic                               frame_req_i,
  input  logic [1:0]                         frame_instr_i,
  input  logic [4:0]                         frame_len_i,    // 0..16
  input  logic [MAX_USER_BYTES-1:0][7:0]     frame_data_i,   // byte 0 first
  output logic                               frame_ack_o,
  // to the CDCM encoder
  output logic                               out_valid_o,
  output link_byte_t                         out_byte_o,
  input  logic                               out_ready_i,
  output logic                               busy_o
);

  typedef enum logic [3:0] {
    T_IDLE, T_MAGIC, T_LENINS, T_PT_HI, T_PT_LO, T_RSV, T_DATA, T_CS_HI, T_CS_LO,
    T_GAP
  } tstate_t;

  tstate_t                           state;
  logic                              pulse_pend;
  logic [WAIT_W-1:0]                 wait_cnt;
  pulse_timing_t                     pt;
  len_instr_t                        li;
  logic [MAX_USER_BYTES-1:0][7:0]    data_q;
  logic [4:0]                        didx;
  logic [15:0]                       csum;
  logic                              with_frame;
  logic                              take;

  assign take   = out_valid_o && out_ready_i;
  assign busy_o = (state != T_IDLE);

  // byte on offer
  always_comb begin
    out_valid_o = (state != T_IDLE);
    out_byte_o  = '{idle: 1'b0, data: 8'h00};
    case (state)
      T_MAGIC:  out_byte_o.data = SPDT_MAGIC;
      T_LENINS: out_byte_o.data = li;
      T_PT_HI:  out_byte_o.data = pt[15:8];
      T_PT_LO:  out_byte_o.data = pt[7:0];
      T_RSV:    out_byte_o.data = SPDT_RESERVE;
      T_DATA:   out_byte_o.data = data_q[didx[3:0]];
      T_CS_HI:  out_byte_o.data = csum[15:8];
      T_CS_LO:  out_byte_o.data = csum[7:0];
      T_GAP:    out_byte_o.idle = 1'b1;
      default:  ;
    endcase
  end

  wire magic_take = take && (state == T_MAGIC);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= T_IDLE;
      pulse_pend   <= 1'b0;
      wait_cnt     <= '0;
      pt           <= '0;
      li           <= '0;
      data_q       <= '0;
      didx         <= '0;
      csum         <= '0;
      with_frame   <= 1'b0;
      frame_ack_o  <= 1'b0;
      pulse_drop_o <= 1'b0;
    end else begin
      frame_ack_o  <= 1'b0;
      pulse_drop_o <= 1'b0;

      // pulse bookkeeping
      if (pulse_pend && !magic_take && wait_cnt != '1) wait_cnt <= wait_cnt + 1'b1;
      if (magic_take && pulse_pend) begin
        pulse_pend <= 1'b0;
      end
      if (pulse_i) begin
        if (pulse_pend && !magic_take) begin
          pulse_drop_o <= 1'b1;
        end else begin
          pulse_pend <= 1'b1;
          wait_cnt   <= WAIT_W'(1);
        end
      end

      if (take && state inside {T_MAGIC, T_LENINS, T_PT_HI, T_PT_LO, T_RSV, T_DATA})
        csum <= csum + 16'(out_byte_o.data);

      case (state)
        T_IDLE: begin
          csum <= '0;
          if (link_up_i && (pulse_pend || frame_req_i)) begin
            with_frame <= frame_req_i;
            state      <= T_MAGIC;
          end
        end
        T_MAGIC: if (take) begin
          pt.pulse    <= pulse_pend;
          pt.wait_cnt <= pulse_pend ? wait_cnt : '0;
          li.frame    <= with_frame;
          li.instr    <= with_frame ? frame_instr_i : 2'd0;
          li.len      <= with_frame ? ((frame_len_i > 5'(MAX_USER_BYTES))
                                       ? 5'(MAX_USER_BYTES) : frame_len_i) : 5'd0;
          data_q      <= frame_data_i;
          frame_ack_o <= with_frame;
          state       <= T_LENINS;
        end
        T_LENINS: if (take) state <= T_PT_HI;
        T_PT_HI:  if (take) state <= T_PT_LO;
        T_PT_LO:  if (take) state <= T_RSV;
        T_RSV: if (take) begin
          didx  <= '0;
          state <= (li.len == '0) ? T_CS_HI : T_DATA;
        end
        T_DATA: if (take) begin
          didx <= didx + 1'b1;
          if (didx + 1'b1 == li.len) state <= T_CS_HI;
        end
        T_CS_HI: if (take) state <= T_CS_LO;
        T_CS_LO: if (take) state <= T_GAP;
        T_GAP: if (take) begin
          // start the next packet in the very next byte slot if there is
          // work, so back-to-back packets leave no empty slot
          csum <= '0;
          if (link_up_i && (pulse_pend || frame_req_i)) begin
            with_frame <= frame_req_i;
            state      <= T_MAGIC;
          end else begin
            state <= T_IDLE;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // a packet's length field never exceeds the protocol's 16 user bytes
  a_len: assert property (@(posedge clk) disable iff (rst)
                          li.len <= 5'(MAX_USER_BYTES));

endmodule
