// exanetizer: output stage of one ExaDMA output - turns a full output buffer
// slot or a pending control packet into an ExaNet packet on the link.
//
// ExaNet link: a 128-bit data bus with separate valid/ready pairs for the
// header, the payload words and the footer. Data stay unchanged while a valid
// is high and its ready is low.
// FSM (8 states): in idle a control packet (cntrl_pckt_ready) wins over a full
// slot (comp_winner_exists). For a slot, the slot number and priority are
// latched together with its header and footer (the slot is freed before the
// footer leaves, so the scheduler may reuse it meanwhile), then:
// send_hdr -> send_pld (one word per accepted beat; pld_wait while the link
// holds ready low) -> send_ftr. With the last payload word accepted,
// prio_cnt_decrement is pulsed with current_slot/current_prio, which frees the
// slot and advances the issue order of the others. The payload word count comes
// from the header. Control packets take send_cntrl_hdr -> send_cntrl_pld (two
// words) -> send_cntrl_ftr and end with a cntrl_pckt_consume pulse. After a
// data footer the FSM goes straight to a waiting control packet, otherwise back
// to idle.
// Buffer reads: Buff_addr is driven combinationally with the address of the word
// needed in the next cycle, so with the registered buffer RAM one payload word
// is sent per cycle when the link is ready; a packet of 16 payload words takes
// 18 cycles.
// The states and their order follow the specification. The idle transition to
// send_hdr is taken only when no control packet waits, as control packets have
// priority.
module exanetizer
  import exadma_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // output buffer
  input  logic                      comp_winner_exists,
  input  logic [SLOT_W-1:0]         comp_winner,
  input  logic [SLOT_W:0]           comp_winner_val,
  output logic [SLOT_W+WIDX_W-1:0]  buff_addr,
  output logic [SLOT_W-1:0]         hdft_addr,
  input  logic [DATA_W-1:0]         buff_dt,
  input  logic [2*DATA_W-1:0]       hdft_dt,
  output logic                      prio_cnt_decrement,
  output logic [SLOT_W:0]           current_prio,
  output logic [SLOT_W-1:0]         current_slot,
  // control packet from the pending list
  input  logic                      cntrl_pckt_ready,
  input  logic [4*DATA_W-1:0]       cntrl_data,
  output logic                      cntrl_pckt_consume,
  // ExaNet link
  output logic [DATA_W-1:0]         exa_data,
  output logic                      exa_header_valid,
  input  logic                      exa_header_ready,
  output logic                      exa_payload_valid,
  input  logic                      exa_payload_ready,
  output logic                      exa_footer_valid,
  input  logic                      exa_footer_ready
);
  typedef enum logic [2:0] {
    IDLE, SEND_HDR, SEND_PLD, PLD_WAIT, SEND_FTR, SEND_CNTRL_HDR, SEND_CNTRL_PLD, SEND_CNTRL_FTR
  } state_e;
  state_e state;

  logic [SLOT_W-1:0]   slot_q;
  logic [SLOT_W:0]     prio_q;
  logic [DATA_W-1:0]   hdr_q, ftr_q;
  logic [4:0]          nwords_q;
  logic [WIDX_W-1:0]   widx;
  logic                cword;    // control payload word index

  logic pld_state, pld_hs, last_word;
  assign pld_state = (state == SEND_PLD) || (state == PLD_WAIT);
  assign pld_hs    = pld_state && exa_payload_ready;
  assign last_word = (5'(widx) == nwords_q - 5'd1);

  assign hdft_addr          = comp_winner;
  assign buff_addr          = {slot_q, pld_hs ? widx + 1'b1 : widx};
  assign prio_cnt_decrement = pld_hs && last_word;
  assign current_prio       = prio_q;
  assign current_slot       = slot_q;
  assign cntrl_pckt_consume = (state == SEND_CNTRL_FTR) && exa_footer_ready;

  assign exa_header_valid  = (state == SEND_HDR) || (state == SEND_CNTRL_HDR);
  assign exa_payload_valid = pld_state || (state == SEND_CNTRL_PLD);
  assign exa_footer_valid  = (state == SEND_FTR) || (state == SEND_CNTRL_FTR);

  always_comb begin
    unique case (state)
      SEND_HDR:             exa_data = hdr_q;
      SEND_PLD, PLD_WAIT:   exa_data = buff_dt;
      SEND_FTR:             exa_data = ftr_q;
      SEND_CNTRL_HDR:       exa_data = cntrl_data[0 +: DATA_W];
      SEND_CNTRL_PLD:       exa_data = cword ? cntrl_data[2*DATA_W +: DATA_W] : cntrl_data[DATA_W +: DATA_W];
      SEND_CNTRL_FTR:       exa_data = cntrl_data[3*DATA_W +: DATA_W];
      default:              exa_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      slot_q   <= '0;
      prio_q   <= '0;
      hdr_q    <= '0;
      ftr_q    <= '0;
      nwords_q <= '0;
      widx     <= '0;
      cword    <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          if (cntrl_pckt_ready) begin
            cword <= 1'b0;
            state <= SEND_CNTRL_HDR;
          end else if (comp_winner_exists) begin
            automatic exa_hdr_t h = exa_hdr_t'(hdft_dt[DATA_W-1:0]);
            slot_q   <= comp_winner;
            prio_q   <= comp_winner_val;
            hdr_q    <= hdft_dt[DATA_W-1:0];
            ftr_q    <= hdft_dt[2*DATA_W-1:DATA_W];
            nwords_q <= h.pld_words;
            widx     <= '0;
            state    <= SEND_HDR;
          end
        end
        SEND_HDR: if (exa_header_ready) state <= SEND_PLD;
        SEND_PLD, PLD_WAIT: begin
          if (exa_payload_ready) begin
            widx <= widx + 1'b1;
            if (last_word) state <= SEND_FTR;
            else state <= SEND_PLD;
          end else begin
            state <= PLD_WAIT;
          end
        end
        SEND_FTR: if (exa_footer_ready) state <= cntrl_pckt_ready ? SEND_CNTRL_HDR : IDLE;
        SEND_CNTRL_HDR: if (exa_header_ready) state <= SEND_CNTRL_PLD;
        SEND_CNTRL_PLD: if (exa_payload_ready) begin
          cword <= 1'b1;
          if (cword) state <= SEND_CNTRL_FTR;
        end
        SEND_CNTRL_FTR: if (exa_footer_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
      if (state == SEND_FTR && exa_footer_ready) cword <= 1'b0;
    end
  end

  // ExaNet rule: data held while valid waits for ready
  a_hdr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    exa_header_valid && !exa_header_ready |=> exa_header_valid && $stable(exa_data));
  a_pld_hold: assert property (@(posedge clk) disable iff (!rst_n)
    exa_payload_valid && !exa_payload_ready |=> exa_payload_valid && $stable(exa_data));
  a_ftr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    exa_footer_valid && !exa_footer_ready |=> exa_footer_valid && $stable(exa_data));

endmodule
