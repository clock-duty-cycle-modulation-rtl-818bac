// spdt_rx: SPDT packet receiver.
//
// It takes the bytes decoded from the CDCM link (with the start-of-packet
// mark the decoder sets on the first byte after an IDLE), checks the magic
// byte 0xFD, collects the length+instruction byte, the pulse-timing field,
// the reserve byte and the user bytes, and compares the 16-bit checksum
// (sum of all bytes from magic to the last user byte). A good packet that
// carries a user frame is delivered on frame_valid_o; a bad sum raises csum_err_o instead. A wrong
// magic byte, a length above 16, a packet cut short by IDLE or a start of packet, or a broken
// CDCM pattern inside a packet raises frame_err_o.
//
// Synchronous pulse: if the pulse flag is set, the pulse is re-created
// PULSE_DELAY - wait cycles after the magic byte arrived, where wait is the
// count the transmitter put in the pulse-timing field. The end-to-end pulse
// latency is therefore a constant (link latency + PULSE_DELAY) no matter how
// long the pulse had to wait for the link. Pulses are scheduled in a
// PULSE_DELAY-bit shift register, so several can be in flight. The pulse is
// issued as soon as the header is in, without waiting for the checksum at
// the end of the packet. If the wait is too long to meet the fixed latency
// the pulse is issued at once and pulse_late_o is raised.
// The packet layout is the published design's; the field coding, the checksum and
// the fixed-latency pulse scheme are this design's own.
//
// Timing: frame_valid_o is a one-cycle pulse in the cycle after the last
// checksum byte; the frame outputs hold until the next good frame.
module spdt_rx
  import cdcm_pkg::*;
#(
  parameter int unsigned PULSE_DELAY = 128
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           link_up_i,
  // from the CDCM decoder
  input  logic                           byte_valid_i,
  input  logic                           byte_sop_i,
  input  logic [7:0]                     byte_i,
  input  logic                           idle_i,
  input  logic                           link_err_i,   // pattern or framing error
  // user side
  output logic                           frame_valid_o,
  output logic [1:0]                     frame_instr_o,
  output logic [4:0]                     frame_len_o,
  output logic [MAX_USER_BYTES-1:0][7:0] frame_data_o,
  output logic                           csum_err_o,
  output logic                           frame_err_o,
  output logic                           pulse_o,
  output logic                           pulse_late_o
);

  localparam int unsigned SW = $clog2(PULSE_DELAY + 1) + 1;

  typedef enum logic [3:0] {
    R_WAIT, R_LENINS, R_PT_HI, R_PT_LO, R_RSV, R_DATA, R_CS_HI, R_CS_LO
  } rstate_t;

  rstate_t                        state;
  len_instr_t                     li;
  logic [7:0]                     pt_hi;
  logic [MAX_USER_BYTES-1:0][7:0] data_q;
  logic [4:0]                     didx;
  logic [15:0]                    csum;
  logic [7:0]                     cs_hi;
  logic [7:0]                     age;
  logic [PULSE_DELAY-1:0]         sched;
  pulse_timing_t                  pt_now;
  logic signed [SW+WAIT_W:0]      slot;

  assign pt_now = {pt_hi, byte_i};
  // position in the schedule that makes pulse_o rise PULSE_DELAY - wait
  // cycles after the magic byte
  assign slot = (SW+WAIT_W+1)'(PULSE_DELAY) - (SW+WAIT_W+1)'(pt_now.wait_cnt)
              - (SW+WAIT_W+1)'(age) - (SW+WAIT_W+1)'(2);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= R_WAIT;
      li            <= '0;
      pt_hi         <= '0;
      data_q        <= '0;
      didx          <= '0;
      csum          <= '0;
      cs_hi         <= '0;
      age           <= '0;
      sched         <= '0;
      frame_valid_o <= 1'b0;
      frame_instr_o <= '0;
      frame_len_o   <= '0;
      frame_data_o  <= '0;
      csum_err_o    <= 1'b0;
      frame_err_o   <= 1'b0;
      pulse_o       <= 1'b0;
      pulse_late_o  <= 1'b0;
    end else begin
      frame_valid_o <= 1'b0;
      csum_err_o    <= 1'b0;
      frame_err_o   <= 1'b0;
      pulse_late_o  <= 1'b0;
      pulse_o       <= sched[0];
      sched         <= sched >> 1;
      if (age != 8'hFF) age <= age + 1'b1;

      if (!link_up_i) begin
        state <= R_WAIT;
      end else if (byte_valid_i && byte_sop_i) begin
        // a new packet; anything still open was cut short
        if (state != R_WAIT) frame_err_o <= 1'b1;
        if (byte_i == SPDT_MAGIC) begin
          state <= R_LENINS;
          csum  <= 16'(byte_i);
          age   <= 8'd1;
        end else begin
          frame_err_o <= 1'b1;
          state       <= R_WAIT;
        end
      end else if (state != R_WAIT && (link_err_i || idle_i)) begin
        frame_err_o <= 1'b1;
        state       <= R_WAIT;
      end else if (byte_valid_i) begin
        if (state inside {R_LENINS, R_PT_HI, R_PT_LO, R_RSV, R_DATA})
          csum <= csum + 16'(byte_i);
        case (state)
          R_LENINS: begin
            li    <= byte_i;
            state <= R_PT_HI;
            if (byte_i[4:0] > 5'(MAX_USER_BYTES)) begin
              frame_err_o <= 1'b1;
              state       <= R_WAIT;
            end
          end
          R_PT_HI: begin
            pt_hi <= byte_i;
            state <= R_PT_LO;
          end
          R_PT_LO: begin
            if (pt_now.pulse) begin
              if (slot < 0) begin
                pulse_o      <= 1'b1;
                pulse_late_o <= 1'b1;
              end else begin
                sched <= (sched >> 1) | (PULSE_DELAY'(1) << slot);
              end
            end
            state <= R_RSV;
          end
          R_RSV: begin
            didx  <= '0;
            state <= (li.len == '0) ? R_CS_HI : R_DATA;
          end
          R_DATA: begin
            data_q[didx[3:0]] <= byte_i;
            didx <= didx + 1'b1;
            if (didx + 1'b1 == li.len) state <= R_CS_HI;
          end
          R_CS_HI: begin
            cs_hi <= byte_i;
            state <= R_CS_LO;
          end
          R_CS_LO: begin
            if ({cs_hi, byte_i} == csum) begin
              frame_valid_o <= li.frame;
              frame_instr_o <= li.instr;
              frame_len_o   <= li.len;
              frame_data_o  <= data_q;
            end else begin
              csum_err_o <= 1'b1;
            end
            state <= R_WAIT;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
