// output_buffer: one output buffer of the ExaDMA send unit (one per link).
//
// The buffer has SLOTS payload slots of 256 bytes (16 words of 128 bits) in a
// RAM, and per slot a header/footer register pair, a fill counter, a fault
// flag and an issue-order priority.
//  * Allocation: slot_available/slot_id advertise the lowest free slot. On
//    slot_set the scheduler takes that slot, giving the number of payload
//    words it will receive (pckt_len); the slot's priority becomes the number
//    of slots in use, so older packets have smaller values. The header and
//    footer arrive through hdft_we/hdft_slot/hdft_data in the same cycle.
//  * Filling: the barrel shifter writes words (bs_we/bs_addr/bs_data). Each
//    write decrements the slot's counter, loaded with pckt_len - 1; when it
//    goes below zero the slot is full.
//  * Ordering: of the full slots, the one with the smallest priority is offered
//    to the output stage (comp_winner_exists, comp_winner = slot,
//    comp_winner_val = its priority), so packets leave in issue order whenever
//    several are complete. When the output stage has sent a slot's last payload
//    word it pulses prio_cnt_decrement with current_slot/current_prio: the slot
//    is freed and every slot with a larger priority moves up by one. The
//    comparison uses the slot's priority as it is now, not current_prio, the
//    value latched when the slot was offered: a page-fault free in between
//    moves the slot up too, and the stale value would leave two slots with
//    the same priority. current_prio is only checked by an assertion.
//  * Page faults: if any word of a slot was flagged faulty (bs_err), the full
//    slot is not offered. Instead pf_valid is raised with the transaction ID
//    from the slot's footer; on pf_ack the slot is freed as above.
// Read side: payload RAM read is registered (Dt_to_out is the word addressed by
// Buffaddr_from_out in the previous cycle); HdFt_to_out is combinational.
// The slot count and size, the fill counter, the priority-ordered selection and
// the fault handling follow the specification; the encoding of priorities and
// the pf_valid/pf_ack handshake are this design's choices.
module output_buffer
  import exadma_pkg::*;
#(
  parameter int unsigned SLOTS = 8
) (
  input  logic clk,
  input  logic rst_n,
  // allocation (scheduler)
  output logic                      slot_available,
  output logic [SLOT_W-1:0]         slot_id,
  input  logic                      slot_set,
  input  logic [4:0]                pckt_len,
  input  logic                      hdft_we,
  input  logic [SLOT_W-1:0]         hdft_slot,
  input  logic [2*DATA_W-1:0]       hdft_data,
  // page faults (scheduler)
  output logic                      pf_valid,
  output logic [9:0]                pf_tid,
  input  logic                      pf_ack,
  // filling (barrel shifter)
  input  logic                      we_from_bs,
  input  logic [SLOT_W+WIDX_W-1:0]  addr_from_bs,
  input  logic [DATA_W-1:0]         dt_from_bs,
  input  logic                      err_from_bs,
  // output stage
  input  logic [SLOT_W+WIDX_W-1:0]  buffaddr_from_out,
  input  logic [SLOT_W-1:0]         hfaddr_from_out,
  output logic [DATA_W-1:0]         dt_to_out,
  output logic [2*DATA_W-1:0]       hdft_to_out,
  output logic [SLOT_W-1:0]         comp_winner,
  output logic [SLOT_W:0]           comp_winner_val,
  output logic                      comp_winner_exists,
  input  logic                      prio_cnt_decrement,
  input  logic [SLOT_W:0]           current_prio,
  input  logic [SLOT_W-1:0]         current_slot
);
  typedef logic [SLOT_W:0] prio_t;

  logic [DATA_W-1:0]   pld  [SLOTS*PKT_WORDS];
  logic [2*DATA_W-1:0] hdft [SLOTS];
  logic [SLOTS-1:0]    used, full, fault;
  logic signed [5:0]   cnt  [SLOTS];
  prio_t               prio [SLOTS];
  logic                pf_hold;
  logic [SLOT_W-1:0]   pf_slot;

  // ------------------------------------------------------------ RAMs
  always_ff @(posedge clk) begin
    if (we_from_bs) pld[addr_from_bs] <= dt_from_bs;
    dt_to_out <= pld[buffaddr_from_out];
    if (hdft_we) hdft[hdft_slot] <= hdft_data;
  end
  assign hdft_to_out = hdft[hfaddr_from_out];

  // ------------------------------------------------------------ free slot search
  always_comb begin
    slot_available = 1'b0;
    slot_id        = '0;
    for (int s = SLOTS - 1; s >= 0; s--)
      if (!used[s]) begin
        slot_available = 1'b1;
        slot_id        = SLOT_W'(s);
      end
  end

  // ------------------------------------------------------------ winner: oldest full slot
  always_comb begin
    comp_winner_exists = 1'b0;
    comp_winner        = '0;
    comp_winner_val    = '1;
    for (int s = 0; s < SLOTS; s++)
      if (used[s] && full[s] && !fault[s] && (!comp_winner_exists || prio[s] < comp_winner_val)) begin
        comp_winner_exists = 1'b1;
        comp_winner        = SLOT_W'(s);
        comp_winner_val    = prio[s];
      end
  end

  // ------------------------------------------------------------ slot state
  logic  pf_free;
  prio_t pf_prio;
  prio_t used_cnt;
  prio_t cur_prio;    // live priority of the slot being sent
  assign cur_prio = prio[current_slot];
  assign pf_free  = pf_hold && pf_ack;
  assign pf_prio  = prio[pf_slot];
  assign pf_valid = pf_hold;
  assign pf_tid   = hdft[pf_slot][DATA_W +: 10];

  always_comb begin
    used_cnt = '0;
    for (int s = 0; s < SLOTS; s++) used_cnt = used_cnt + prio_t'(used[s]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used    <= '0;
      full    <= '0;
      fault   <= '0;
      pf_hold <= 1'b0;
      pf_slot <= '0;
      for (int s = 0; s < SLOTS; s++) begin
        cnt[s]  <= '0;
        prio[s] <= '0;
      end
    end else begin
      for (int s = 0; s < SLOTS; s++) begin
        automatic prio_t dec = '0;
        if (prio_cnt_decrement && prio[s] > cur_prio) dec = dec + 1'b1;
        if (pf_free && prio[s] > pf_prio) dec = dec + 1'b1;
        prio[s] <= prio[s] - dec;
        // word written by the barrel shifter
        if (we_from_bs && addr_from_bs[SLOT_W+WIDX_W-1:WIDX_W] == SLOT_W'(s)) begin
          cnt[s] <= cnt[s] - 6'sd1;
          if (cnt[s] == 6'sd0) full[s] <= 1'b1;
          if (err_from_bs) fault[s] <= 1'b1;
        end
        // freed by the output stage or after a page fault
        if ((prio_cnt_decrement && current_slot == SLOT_W'(s)) ||
            (pf_free && pf_slot == SLOT_W'(s))) begin
          used[s]  <= 1'b0;
          full[s]  <= 1'b0;
          fault[s] <= 1'b0;
        end
        // allocation
        if (slot_set && slot_id == SLOT_W'(s)) begin
          used[s]  <= 1'b1;
          full[s]  <= 1'b0;
          fault[s] <= 1'b0;
          cnt[s]   <= $signed({1'b0, pckt_len}) - 6'sd1;
          prio[s]  <= used_cnt - prio_t'(prio_cnt_decrement) - prio_t'(pf_free);
        end
      end
      // page-fault report, one slot at a time
      if (pf_free) begin
        pf_hold <= 1'b0;
      end else if (!pf_hold) begin
        for (int s = SLOTS - 1; s >= 0; s--)
          if (used[s] && full[s] && fault[s]) begin
            pf_hold <= 1'b1;
            pf_slot <= SLOT_W'(s);
          end
      end
    end
  end

  // the sent slot can only have moved up (page-fault frees) since it was offered
  a_prio_moved_up: assert property (@(posedge clk) disable iff (!rst_n)
    prio_cnt_decrement |-> cur_prio <= current_prio);
  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n) slot_set |-> slot_available);
  a_write_used: assert property (@(posedge clk) disable iff (!rst_n)
    we_from_bs |-> used[addr_from_bs[SLOT_W+WIDX_W-1:WIDX_W]] && !full[addr_from_bs[SLOT_W+WIDX_W-1:WIDX_W]]);

endmodule
