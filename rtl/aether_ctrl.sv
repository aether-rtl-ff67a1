// aether_ctrl -- phase sequencer of the AETHER engine.
//
// Walks through the four phases of the scheme, one state round per cycle:
//   start  -> load cycle (initial state and key written)
//   INIT   -> INIT_ROUNDS rounds absorbing (Z0,Z1,Z2); the last one also adds
//             the initialisation key pattern
//   AD     -> one round per accepted AD block (skipped if has_ad = 0)
//   MSG    -> one round per accepted message block (skipped if has_msg = 0)
//   FINAL  -> FINAL_ROUNDS rounds absorbing (K0,Z0,K1); the last one also adds
//             the post-finalisation key pattern
//   DONE   -> tag valid until the next start
// The pre-finalisation key pattern is merged into the round that ends the
// data phases (the last AD or message block, or the last init round if there
// is no data), so an operation with d AD blocks and m message blocks takes
// INIT_ROUNDS + d + m + FINAL_ROUNDS round cycles after the load cycle, e.g.
// 20 + 3 + 6 + 20 = 49 for 1024 bits of AD and 2048 bits of message.
//
// Data handshake: in_ready is high in AD and MSG; a block is taken in every
// cycle with in_valid && in_ready, and in_last marks the final block of the
// current string. The phase order and round counts follow the scheme; the
// handshake, the flags given at start and the merging of key additions into
// rounds are this design's choices. The round counts are parameters so that the sequencing can
// be tested short; the scheme fixes both at 20.
module aether_ctrl
  import aether_pkg::*;
#(
  parameter int unsigned INIT_ROUNDS  = INIT_ROUNDS_DEFAULT,
  parameter int unsigned FINAL_ROUNDS = FINAL_ROUNDS_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   has_ad,
  input  logic   has_msg,
  input  logic   in_valid,
  input  logic   in_last,
  output logic   in_ready,
  output logic   load,
  output logic   adv,
  output xsel_e  xsel,
  output logic   kadd_init,
  output logic   kadd_pre,
  output logic   kadd_post,
  output logic   msg_fire,
  output logic   tag_valid,
  output logic   busy,
  output phase_e phase
);

  localparam int unsigned CW = $clog2((INIT_ROUNDS > FINAL_ROUNDS ? INIT_ROUNDS : FINAL_ROUNDS) + 1);

  phase_e           ph_q, ph_d;
  logic [CW-1:0]    cnt_q, cnt_d;
  logic             has_ad_q, has_msg_q;

  assign phase = ph_q;

  always_comb begin
    ph_d      = ph_q;
    cnt_d     = cnt_q;
    in_ready  = 1'b0;
    load      = 1'b0;
    adv       = 1'b0;
    xsel      = XSEL_DATA;
    kadd_init = 1'b0;
    kadd_pre  = 1'b0;
    kadd_post = 1'b0;
    msg_fire  = 1'b0;
    tag_valid = (ph_q == PH_DONE);
    busy      = (ph_q != PH_IDLE) && (ph_q != PH_DONE);

    unique case (ph_q)
      PH_IDLE, PH_DONE: begin
        if (start) begin
          load  = 1'b1;
          cnt_d = '0;
          ph_d  = PH_INIT;
        end
      end
      PH_INIT: begin
        adv   = 1'b1;
        xsel  = XSEL_Z;
        cnt_d = cnt_q + 1'b1;
        if (cnt_q == CW'(INIT_ROUNDS - 1)) begin
          kadd_init = 1'b1;
          cnt_d     = '0;
          if (has_ad_q)       ph_d = PH_AD;
          else if (has_msg_q) ph_d = PH_MSG;
          else begin
            kadd_pre = 1'b1;
            ph_d     = PH_FINAL;
          end
        end
      end
      PH_AD: begin
        in_ready = 1'b1;
        adv      = in_valid;
        if (in_valid && in_last) begin
          if (has_msg_q) ph_d = PH_MSG;
          else begin
            kadd_pre = 1'b1;
            ph_d     = PH_FINAL;
          end
        end
      end
      PH_MSG: begin
        in_ready = 1'b1;
        adv      = in_valid;
        msg_fire = in_valid;
        if (in_valid && in_last) begin
          kadd_pre = 1'b1;
          ph_d     = PH_FINAL;
        end
      end
      PH_FINAL: begin
        adv   = 1'b1;
        xsel  = XSEL_FINAL;
        cnt_d = cnt_q + 1'b1;
        if (cnt_q == CW'(FINAL_ROUNDS - 1)) begin
          kadd_post = 1'b1;
          cnt_d     = '0;
          ph_d      = PH_DONE;
        end
      end
      default: ph_d = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q      <= PH_IDLE;
      cnt_q     <= '0;
      has_ad_q  <= 1'b0;
      has_msg_q <= 1'b0;
    end else begin
      ph_q  <= ph_d;
      cnt_q <= cnt_d;
      if (load) begin
        has_ad_q  <= has_ad;
        has_msg_q <= has_msg;
      end
    end
  end

  // a start is only taken between operations
  a_start_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (ph_q == PH_IDLE || ph_q == PH_DONE));

endmodule
