// tb_output_buffer: self-checking testbench of one output buffer.
//
// A single cycle-based process plays the three neighbours of the buffer. Every
// cycle it samples the buffer's outputs at the falling edge and drives new
// inputs for the next rising edge:
//  * scheduler: allocates the advertised slot at random with a random packet
//    length (1..16 words) and a header/footer pair carrying a transaction ID;
//    checks that slot_available is high exactly when fewer than 8 slots are in
//    use and that slot_id names a free slot;
//  * barrel shifter: writes the words of the allocated packets, interleaved
//    across packets in random order but in order within one; one packet in
//    eight has a faulty word;
//  * output stage: when idle, checks that the offered winner is the oldest
//    (first allocated) complete, fault-free packet and that none is offered
//    while there is none, then reads the payload one word per cycle through the
//    registered read port, compares it and frees the slot with
//    prio_cnt_decrement.
// Faulty packets must be reported on pf_valid with their transaction ID once
// complete and must never be offered; the test acknowledges them after a
// random delay. A watchdog stops the run if it hangs.
module tb_output_buffer;
  import exadma_pkg::*;

  localparam int SLOTS = 8;
  localparam int NPKT  = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic                      slot_available, slot_set, hdft_we, pf_valid, pf_ack;
  logic [SLOT_W-1:0]         slot_id, hdft_slot, hfaddr, comp_winner, current_slot;
  logic [4:0]                pckt_len;
  logic [2*DATA_W-1:0]       hdft_data, hdft_to_out;
  logic [9:0]                pf_tid;
  logic                      we_from_bs, err_from_bs, comp_winner_exists, prio_cnt_decrement;
  logic [SLOT_W+WIDX_W-1:0]  addr_from_bs, buffaddr;
  logic [DATA_W-1:0]         dt_from_bs, dt_to_out;
  logic [SLOT_W:0]           comp_winner_val, current_prio;

  output_buffer #(.SLOTS(SLOTS)) dut (
    .clk, .rst_n, .slot_available, .slot_id, .slot_set, .pckt_len,
    .hdft_we, .hdft_slot, .hdft_data, .pf_valid, .pf_tid, .pf_ack,
    .we_from_bs, .addr_from_bs, .dt_from_bs, .err_from_bs,
    .buffaddr_from_out(buffaddr), .hfaddr_from_out(hfaddr),
    .dt_to_out, .hdft_to_out, .comp_winner, .comp_winner_val, .comp_winner_exists,
    .prio_cnt_decrement, .current_prio, .current_slot
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [DATA_W-1:0] word_of(input int id, input int w);
    return {4{32'(id * 1000 + w) ^ 32'hC0DE_0000}};
  endfunction

  // model of a live packet
  typedef struct {
    int id, slot, len, written, tid, fault_word;
    logic [2*DATA_W-1:0] hdft;
  } pkt_s;
  pkt_s live [$];           // in allocation order

  int n_alloc = 0, n_sent = 0, n_pf = 0, n_full_stall = 0, n_reorder = 0;

  initial begin
    // output stage state
    bit     busy = 0;
    int     out_id = -1, widx = 0, out_len = 0;
    int     out_slot = 0;
    int     pf_wait = 0;
    int     n_live;
    slot_set = 0; hdft_we = 0; pckt_len = '0; hdft_slot = '0; hdft_data = '0;
    pf_ack = 0; we_from_bs = 0; err_from_bs = 0; addr_from_bs = '0; dt_from_bs = '0;
    buffaddr = '0; hfaddr = '0; prio_cnt_decrement = 0; current_prio = '0; current_slot = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_sent + n_pf < NPKT) begin
      @(negedge clk);
      slot_set = 0; hdft_we = 0; we_from_bs = 0; err_from_bs = 0;
      prio_cnt_decrement = 0; pf_ack = 0;
      n_live = live.size();   // slots in use as the buffer sees them now

      // ---------------- output stage
      if (busy) begin
        int i;
        for (i = 0; i < live.size(); i++) if (live[i].id == out_id) break;
        if (widx > 0) check(dt_to_out == word_of(out_id, widx - 1), "payload word read back");
        if (widx == out_len) begin
          prio_cnt_decrement = 1;
          current_slot = SLOT_W'(out_slot);
          live.delete(i);
          busy = 0;
          n_sent++;
        end else begin
          buffaddr = {SLOT_W'(out_slot), WIDX_W'(widx)};
          widx++;
        end
      end else begin
        automatic int exp = -1;
        for (int i = 0; i < live.size(); i++)
          if (live[i].written == live[i].len && live[i].fault_word < 0) begin exp = i; break; end
        check(comp_winner_exists == (exp >= 0), "winner exists exactly when a complete packet waits");
        if (exp > 0) n_reorder++;
        if (comp_winner_exists && exp >= 0) begin
          check(int'(comp_winner) == live[exp].slot, "winner is the oldest complete packet");
          hfaddr = comp_winner;
          #1 check(hdft_to_out == live[exp].hdft, "header/footer read");
          busy = 1; out_id = live[exp].id; out_len = live[exp].len; out_slot = live[exp].slot;
          current_prio = comp_winner_val;
          widx = 0;
          buffaddr = {SLOT_W'(out_slot), 4'd0};
          widx = 1;
        end
      end

      // ---------------- page faults
      if (pf_valid) begin
        int i;
        for (i = 0; i < live.size(); i++)
          if (live[i].fault_word >= 0 && live[i].written == live[i].len && live[i].slot == int'(dut.pf_slot)) break;
        check(i < live.size(), "page fault reported for a complete faulty packet");
        if (i < live.size()) check(pf_tid == 10'(live[i].tid), "page fault transaction ID");
        if (pf_wait == 0) pf_wait = $urandom_range(1, 6);
        pf_wait--;
        if (pf_wait == 0 && i < live.size()) begin
          pf_ack = 1;
          live.delete(i);
          n_pf++;
        end
      end

      // ---------------- barrel shifter writes
      if ($urandom_range(0, 3) != 0) begin
        automatic int cand [$];
        for (int i = 0; i < live.size(); i++) if (live[i].written < live[i].len) cand.push_back(i);
        if (cand.size() > 0) begin
          automatic int i = cand[$urandom_range(0, cand.size() - 1)];
          we_from_bs   = 1;
          addr_from_bs = {SLOT_W'(live[i].slot), WIDX_W'(live[i].written)};
          dt_from_bs   = word_of(live[i].id, live[i].written);
          err_from_bs  = (live[i].written == live[i].fault_word);
          live[i].written++;
        end
      end

      // ---------------- scheduler allocation
      check(slot_available == (n_live < SLOTS), "slot_available matches slots in use");
      if (slot_available) begin
        automatic bit clash = 0;
        foreach (live[i]) if (live[i].slot == int'(slot_id)) clash = 1;
        check(!clash, "advertised slot is free");
      end else n_full_stall++;
      if (slot_available && n_alloc < NPKT && $urandom_range(0, 2) != 0) begin
        pkt_s p;
        automatic exa_ftr_t f = '0;
        p.id = n_alloc++;
        p.slot = int'(slot_id);
        p.len = $urandom_range(1, 16);
        if ($urandom_range(0, 2) == 0) p.len = 16;
        p.written = 0;
        p.tid = $urandom_range(0, 1023);
        p.fault_word = ($urandom_range(0, 7) == 0) ? $urandom_range(0, p.len - 1) : -1;
        f.tid = 10'(p.tid);
        f.seq = 14'(p.id);
        p.hdft = {DATA_W'(f), {$urandom, $urandom, $urandom, $urandom}};
        slot_set = 1; hdft_we = 1; hdft_slot = slot_id; pckt_len = 5'(p.len); hdft_data = p.hdft;
        live.push_back(p);
      end
    end
    repeat (3) @(negedge clk);
    check(live.size() == 0, "all packets drained");
    check(n_pf > 0, "page fault exercised");
    check(n_full_stall > 0, "all slots in use exercised");
    check(n_reorder > 0, "out-of-order completion exercised");
    $display("sent=%0d pagefaults=%0d full=%0d reorder=%0d", n_sent, n_pf, n_full_stall, n_reorder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    $display("watchdog: simulation hung");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
