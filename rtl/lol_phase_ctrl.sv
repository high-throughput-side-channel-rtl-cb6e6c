// lol_phase_ctrl: phase sequencer of a LOL2.0 operation.
//
// After start it walks through the phases of one operation and tells the
// round engine, phase by phase, which schedule list to run, whether the
// keystream is fed back, which state (S, E or both) takes the round result
// and whether a round needs an input block:
//   LOAD  (1 cycle)  key and IV into S
//   INIT  N_INIT rounds, list INIT, keystream fed back into S
//   COPY  (1 cycle, AEAD)  E takes a copy of S
//   AD    one E-only round per associated-data block        (AEAD)
//   MSG   one round per message block: S makes the keystream, and in AEAD
//         mode E absorbs the message block in the same round
//   LEN   one E-only round absorbing the length block        (AEAD)
//   FINX  (1 cycle, AEAD)  E is XORed into S
//   FIN   N_FIN rounds, list INIT, keystream fed back; the keystream of the
//         last round is the tag                              (AEAD)
// A round ends when the engine pulses round_done; the phase and round counter
// change on the following clock edge. done pulses together with the
// round_done of the operation's last round. Counts and mode are sampled at
// start; start is ignored while busy.
//
// The phase order (initialization, AD into E, keystream with E absorbing M,
// length block Theta, E fed back into S, tag generation) follows the
// published SCMAC data flow; the single-cycle LOAD/COPY/FINX steps, the
// whole-block counts and the default N_INIT = N_FIN = 12 are this design's
// choices (the number of rounds is not published with the hardware).
module lol_phase_ctrl
  import lol_pkg::*;
#(
  parameter int unsigned N_INIT = 12,
  parameter int unsigned N_FIN  = 12,
  parameter int unsigned CNT_W  = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mode_e            mode_i,
  input  logic [CNT_W-1:0] ad_blocks_i,
  input  logic [CNT_W-1:0] msg_blocks_i,
  input  logic             round_done,
  output phase_e           phase,
  output mode_e            mode,
  output logic [CNT_W-1:0] ad_blocks,
  output logic [CNT_W-1:0] msg_blocks,
  output logic             round_en,
  output list_e            list,
  output logic             fb,
  output logic             upd_s,
  output logic             upd_e,
  output logic             need_data,
  output logic             x_len,
  output logic             load,
  output logic             copy,
  output logic             finx,
  output logic             last_round,
  output logic             more,
  output logic             busy,
  output logic             done
);

  logic [CNT_W-1:0] cnt;
  logic             cnt_last;
  phase_e           next_after_msg;

  always_comb begin
    unique case (phase)
      PH_INIT: cnt_last = (cnt == CNT_W'(N_INIT - 1));
      PH_AD:   cnt_last = (cnt == ad_blocks - 1'b1);
      PH_MSG:  cnt_last = (cnt == msg_blocks - 1'b1);
      PH_FIN:  cnt_last = (cnt == CNT_W'(N_FIN - 1));
      default: cnt_last = 1'b1;
    endcase
    next_after_msg = (mode == MODE_AEAD) ? PH_LEN : PH_IDLE;
    // Another round of the same phase follows the one in progress.
    more = round_en && !cnt_last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      mode       <= MODE_SC;
      ad_blocks  <= '0;
      msg_blocks <= '0;
      cnt        <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: if (start) begin
          phase      <= PH_LOAD;
          mode       <= mode_i;
          ad_blocks  <= ad_blocks_i;
          msg_blocks <= msg_blocks_i;
        end
        PH_LOAD: begin
          phase <= PH_INIT;
          cnt   <= '0;
        end
        PH_COPY: begin
          cnt   <= '0;
          phase <= (ad_blocks != 0) ? PH_AD : (msg_blocks != 0) ? PH_MSG : PH_LEN;
        end
        PH_FINX: begin
          cnt   <= '0;
          phase <= PH_FIN;
        end
        default: if (round_done) begin
          cnt <= cnt + 1'b1;
          if (cnt_last) begin
            cnt <= '0;
            unique case (phase)
              PH_INIT: phase <= (mode == MODE_AEAD) ? PH_COPY
                              : (msg_blocks != 0) ? PH_MSG : PH_IDLE;
              PH_AD:   phase <= (msg_blocks != 0) ? PH_MSG : PH_LEN;
              PH_MSG:  phase <= next_after_msg;
              PH_LEN:  phase <= PH_FINX;
              default: phase <= PH_IDLE;  // PH_FIN
            endcase
          end
        end
      endcase
    end
  end

  always_comb begin
    round_en  = 1'b0;
    list      = LIST_INIT;
    fb        = 1'b0;
    upd_s     = 1'b0;
    upd_e     = 1'b0;
    need_data = 1'b0;
    x_len     = 1'b0;
    unique case (phase)
      PH_INIT, PH_FIN: begin
        round_en = 1'b1;
        fb       = 1'b1;
        upd_s    = 1'b1;
      end
      PH_AD: begin
        round_en  = 1'b1;
        list      = LIST_EABS;
        upd_e     = 1'b1;
        need_data = 1'b1;
      end
      PH_MSG: begin
        round_en  = 1'b1;
        list      = (mode == MODE_AEAD) ? LIST_AEAD : LIST_SC;
        upd_s     = 1'b1;
        upd_e     = (mode == MODE_AEAD);
        need_data = 1'b1;
      end
      PH_LEN: begin
        round_en = 1'b1;
        list     = LIST_EABS;
        upd_e    = 1'b1;
        x_len    = 1'b1;
      end
      default: ;
    endcase
    load       = (phase == PH_LOAD);
    copy       = (phase == PH_COPY);
    finx       = (phase == PH_FINX);
    last_round = (phase == PH_FIN) && cnt_last;
    busy       = (phase != PH_IDLE);
    done       = round_done && cnt_last &&
                 ((phase == PH_FIN) ||
                  (phase == PH_MSG && mode == MODE_SC) ||
                  (phase == PH_INIT && mode == MODE_SC && msg_blocks == 0));
  end

endmodule
