// gplm_backoff: carrier-sense and backoff accelerator.
//
// Channel access timing is one of the Low-MAC functions that needs hardware for its
// latency; the processor only starts an access attempt and waits for the grant. After a
// start pulse the block draws a backoff count of (LFSR & cw) slots, then:
//   * waits until the medium has been idle (cca_busy low) for the arbitration inter-frame
//     space AIFS = SIFS + aifsn * slot; any busy cycle restarts this wait;
//   * counts the backoff down by one per idle slot; a busy cycle freezes the count and
//     sends the block back to the AIFS wait, keeping the remaining slots;
//   * raises grant when the count reaches zero and holds it until grant_ack.
// A start pulse while an attempt is running restarts it with a new draw.
// cw is the contention-window mask (2^k - 1, e.g. 15 to 1023); aifsn is the AIFS number
// of the access category. The architecture only names carrier sensing and backoff as
// hardware functions; this countdown is the usual 802.11 EDCA procedure, and the timing
// defaults (100 MHz clock, 9 us slot, 16 us SIFS) and the 16-bit LFSR are this design's
// choices. Timing: grant rises SIFS + aifsn*SLOT + n*SLOT cycles after start on an idle
// medium (n the drawn count), plus the restarts caused by busy periods.
module gplm_backoff #(
  parameter int unsigned SLOT_CYCLES = 900,   // 9 us at 100 MHz
  parameter int unsigned SIFS_CYCLES = 1600   // 16 us at 100 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cca_busy,     // carrier sense from the PHY
  input  logic       start,        // begin an access attempt
  input  logic [9:0] cw,           // contention window mask
  input  logic [3:0] aifsn,        // AIFS number
  input  logic       grant_ack,    // processor has taken the grant
  output logic       grant,        // medium may be used
  output logic       active,       // an attempt is in progress
  output logic [9:0] slots_left,   // remaining backoff slots
  output logic [15:0] freeze_cnt   // number of times a busy medium interrupted the attempt
);
  localparam int unsigned CW = $clog2(SIFS_CYCLES + 15 * SLOT_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_AIFS, S_BACKOFF, S_GRANT} state_e;

  state_e        state;
  logic [15:0]   lfsr;
  logic [CW-1:0] timer;
  logic [CW-1:0] aifs_len;

  assign aifs_len = CW'(SIFS_CYCLES) + CW'(aifsn) * CW'(SLOT_CYCLES);
  assign grant    = (state == S_GRANT);
  assign active   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      lfsr       <= 16'hACE1;
      timer      <= '0;
      slots_left <= '0;
      freeze_cnt <= '0;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1, advanced every cycle
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (start) begin
        state      <= S_AIFS;
        timer      <= '0;
        slots_left <= lfsr[9:0] & cw;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_AIFS: begin
            if (cca_busy) timer <= '0;
            else if (timer + 1'b1 >= aifs_len) begin
              timer <= '0;
              state <= (slots_left == '0) ? S_GRANT : S_BACKOFF;
            end else timer <= timer + 1'b1;
          end
          S_BACKOFF: begin
            if (cca_busy) begin
              timer      <= '0;
              state      <= S_AIFS;
              freeze_cnt <= freeze_cnt + 1'b1;
            end else if (timer + 1'b1 >= CW'(SLOT_CYCLES)) begin
              timer      <= '0;
              slots_left <= slots_left - 1'b1;
              if (slots_left == 10'd1) state <= S_GRANT;
            end else timer <= timer + 1'b1;
          end
          S_GRANT: if (grant_ack) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
