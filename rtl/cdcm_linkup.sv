// cdcm_linkup: brings a CDCM receiver up: input-delay (IDELAY) adjustment,
// then bit slip, then link up.
//
// While the far end sends IDLE (50 % duty), the controller steps the input
// delay through all NTAPS taps. At each tap it waits SETTLE cycles and then
// watches CHECK words: the tap is good if every word is the same and is a
// rotation of the IDLE word (five high bits in one cyclic run). Taps near a
// data transition give unstable words and fail. It then picks the middle of
// the longest run of good taps (the first one on a tie), loads that tap, and
// issues bit slips to the deserializer until the word equals IDLE_WORD,
// i.e. the rising edge sits at the MSB. After CHECK clean IDLE words it
// raises link_up_o and stays there until reset. If no tap is good or the
// word cannot be aligned within 2*SER_RATIO slips, it starts over.
// "Link-up = IDELAY adjustment and bit slip" is from the published design; the
// scan, the good-tap test and the centre choice are this design's own.
//
// Interface: tap_o/tap_load_o drive the delay element (tap_load_o pulses
// for one cycle when tap_o changes), bitslip_o pulses for one cycle per
// slip. All in the link-clock domain.
module cdcm_linkup
  import cdcm_pkg::*;
#(
  parameter int unsigned NTAPS  = 32,
  parameter int unsigned SETTLE = 8,
  parameter int unsigned CHECK  = 64
) (
  input  logic                     clk,
  input  logic                     rst,
  input  cdcm_word_t               word_i,
  output logic [$clog2(NTAPS)-1:0] tap_o,
  output logic                     tap_load_o,
  output logic                     bitslip_o,
  output logic                     link_up_o,
  output logic [4:0]               slip_count_o
);

  localparam int unsigned TW = $clog2(NTAPS);
  localparam int unsigned CNTW = $clog2(SETTLE + CHECK + 1) + 1;

  typedef enum logic [2:0] {
    S_SCAN_SETTLE, S_SCAN_CHECK, S_FIND, S_CENTER_SETTLE, S_ALIGN, S_SLIP_WAIT,
    S_UP
  } state_t;

  state_t          state;
  logic [CNTW-1:0] cnt;
  logic [NTAPS-1:0] good;
  logic            tap_ok;
  cdcm_word_t      prev;
  logic [TW:0]     idx;
  logic [TW:0]     run_start, run_len, best_start, best_len;
  logic [4:0]      slips;

  // word is a rotation of the IDLE word: five ones and two level changes
  // around the cycle
  function automatic logic is_idle_rotation(input cdcm_word_t w);
    int unsigned ones, edges;
    ones  = 0;
    edges = 0;
    for (int unsigned i = 0; i < SER_RATIO; i++) begin
      ones += w[i];
      if (w[i] != w[(i + 1) % SER_RATIO]) edges++;
    end
    return (ones == IDLE_HIGH) && (edges == 2);
  endfunction

  assign link_up_o    = (state == S_UP);
  assign slip_count_o = slips;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_SCAN_SETTLE;
      cnt        <= '0;
      good       <= '0;
      tap_ok     <= 1'b1;
      prev       <= '0;
      idx        <= '0;
      run_start  <= '0;
      run_len    <= '0;
      best_start <= '0;
      best_len   <= '0;
      slips      <= '0;
      tap_o      <= '0;
      tap_load_o <= 1'b1;
      bitslip_o  <= 1'b0;
    end else begin
      tap_load_o <= 1'b0;
      bitslip_o  <= 1'b0;
      prev       <= word_i;
      case (state)
        S_SCAN_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(SETTLE - 1)) begin
            cnt    <= '0;
            tap_ok <= 1'b1;
            state  <= S_SCAN_CHECK;
          end
        end
        S_SCAN_CHECK: begin
          cnt <= cnt + 1'b1;
          if (!is_idle_rotation(word_i) || (cnt != '0 && word_i != prev))
            tap_ok <= 1'b0;
          if (cnt == CNTW'(CHECK - 1)) begin
            cnt <= '0;
            good[tap_o] <= tap_ok && is_idle_rotation(word_i) && word_i == prev;
            if (tap_o == TW'(NTAPS - 1)) begin
              idx        <= '0;
              run_len    <= '0;
              best_len   <= '0;
              best_start <= '0;
              state      <= S_FIND;
            end else begin
              tap_o      <= tap_o + 1'b1;
              tap_load_o <= 1'b1;
              state      <= S_SCAN_SETTLE;
            end
          end
        end
        S_FIND: begin
          // one tap per cycle: track the longest run of good taps
          if (idx == (TW+1)'(NTAPS)) begin
            if (best_len == '0) begin
              tap_o      <= '0;
              tap_load_o <= 1'b1;
              state      <= S_SCAN_SETTLE;
            end else begin
              tap_o      <= TW'(best_start + ((best_len - 1'b1) >> 1));
              tap_load_o <= 1'b1;
              slips      <= '0;
              state      <= S_CENTER_SETTLE;
            end
          end else begin
            idx <= idx + 1'b1;
            if (good[idx[TW-1:0]]) begin
              if (run_len == '0) run_start <= idx;
              run_len <= run_len + 1'b1;
              if (run_len + 1'b1 > best_len) begin
                best_len   <= run_len + 1'b1;
                best_start <= (run_len == '0) ? idx : run_start;
              end
            end else begin
              run_len <= '0;
            end
          end
        end
        S_CENTER_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(SETTLE - 1)) begin
            cnt   <= '0;
            state <= S_ALIGN;
          end
        end
        S_ALIGN: begin
          if (word_i == IDLE_WORD) begin
            cnt <= cnt + 1'b1;
            if (cnt == CNTW'(CHECK - 1)) state <= S_UP;
          end else if (slips == 5'(2 * SER_RATIO)) begin
            cnt        <= '0;
            tap_o      <= '0;
            tap_load_o <= 1'b1;
            state      <= S_SCAN_SETTLE;
          end else begin
            cnt       <= '0;
            bitslip_o <= 1'b1;
            slips     <= slips + 1'b1;
            state     <= S_SLIP_WAIT;
          end
        end
        S_SLIP_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNTW'(SETTLE - 1)) begin
            cnt   <= '0;
            state <= S_ALIGN;
          end
        end
        default: ;  // S_UP: stay until reset
      endcase
    end
  end

endmodule
