// Synchronization state machine of the self-synchronizing PRBS checker.
//
// Looks only at whether each compared error word is zero and drives `sync`,
// the select of the checker's state-register multiplexer:
//   HUNT   sync = 0: state registers are reloaded from received bits every
//          word. After LOCK_WORDS consecutive all-zero error words -> VERIFY.
//   VERIFY sync = 1: the state registers run on their own. The first
//          VERIFY_WORDS words checked are those of states loaded just before
//          the switch, which had not been checked yet; any error among them
//          returns to HUNT.
//   SYNC   sync = 1: errors are counted as link errors. UNLOCK_WORDS
//          consecutive non-zero error words mean the sequence was lost:
//          `lost` pulses for one cycle and the machine returns to HUNT.
// An invalid word or `enable` low (checker not configured) forces HUNT.
// `locked` is high in SYNC only. All outputs are registered.
//
// The machine's existence and its zero-test input follow the architecture;
// its states and thresholds are this design's own.
module prbs_sync_fsm #(
  parameter int LOCK_WORDS   = 4,
  parameter int VERIFY_WORDS = 4,
  parameter int UNLOCK_WORDS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic err_valid,
  input  logic err_zero,
  output logic sync,
  output logic locked,
  output logic lost
);

  typedef enum logic [1:0] {S_HUNT, S_VERIFY, S_SYNC} sync_state_e;

  localparam int CNT_MAX = (LOCK_WORDS > VERIFY_WORDS) ?
                           ((LOCK_WORDS > UNLOCK_WORDS) ? LOCK_WORDS : UNLOCK_WORDS) :
                           ((VERIFY_WORDS > UNLOCK_WORDS) ? VERIFY_WORDS : UNLOCK_WORDS);
  localparam int CW = $clog2(CNT_MAX + 1);

  sync_state_e   st;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    lost <= 1'b0;
    if (!rst_n || !enable || !err_valid) begin
      st  <= S_HUNT;
      cnt <= '0;
    end else begin
      unique case (st)
        S_HUNT: begin
          if (!err_zero) begin
            cnt <= '0;
          end else if (int'(cnt) == LOCK_WORDS - 1) begin
            st  <= S_VERIFY;
            cnt <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_VERIFY: begin
          if (!err_zero) begin
            st  <= S_HUNT;
            cnt <= '0;
          end else if (int'(cnt) == VERIFY_WORDS - 1) begin
            st  <= S_SYNC;
            cnt <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_SYNC: begin
          if (err_zero) begin
            cnt <= '0;
          end else if (int'(cnt) == UNLOCK_WORDS - 1) begin
            st   <= S_HUNT;
            cnt  <= '0;
            lost <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= S_HUNT;
      endcase
    end
  end

  assign sync   = (st != S_HUNT);
  assign locked = (st == S_SYNC);

endmodule
