// tb_scheduler: self-checking testbench of the round-robin packet scheduler.
//
// The test models the scheduler's neighbours: the descriptor RAM (port B, one
// cycle read latency) filled with random transactions, the output buffers
// (slot_available drops at random, random slot numbers), the AXI read address
// channel (ARREADY at random) and the pending list's enqueue requests (IDs
// pushed whenever enque_ready allows, at random times). For every packet the
// scheduler allocates, it checks against a reference computation:
//  * header and footer (destination, payload words, ID, sequence number,
//    first/last, notify, payload bytes), the chosen output and slot;
//  * the barrel shifter command (rotation, lead word, read words,
//    destination offset, byte count) on the transaction's channel;
//  * that the following AXI reads cover exactly the packet's source words,
//    use the protection domain channel as ID and never cross 4 KiB;
//  * the descriptor write-back (bytes_sent, done on the last packet).
// A packet never crosses a 256-byte destination boundary, so only the first
// can be short. Transactions must be served interleaved (round robin), a
// chained dependant must start only after its predecessor's last packet, and
// a page fault reported on an output must set the error bit of that
// transaction and stop it. A watchdog stops the run if it hangs.
module tb_scheduler;
  import exadma_pkg::*;

  localparam int NOUT = 3;
  localparam int NTX  = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        enque = 0, enque_ready;
  logic [9:0]  tid = '0, addr_b;
  logic        we_b;
  logic [255:0] din_b, dout_b;
  logic [COORD_W-1:0] src_coord = 22'h15_0A0B;
  logic [NOUT-1:0] slot_available = '1, pf_valid = '0, pf_ack;
  logic [SLOT_W-1:0] slot_id [NOUT];
  logic [4:0]  buffer_select, pckt_len;
  logic        slot_set, hdft_we;
  logic [2*DATA_W-1:0] hdft_data;
  logic [SLOT_W-1:0] hdft_slot;
  logic [9:0]  pf_tid [NOUT];
  logic        bs_enque;
  logic [CH_W-1:0] bs_ch;
  bs_cmd_t     bs_cmd;
  logic        m_arvalid, m_arready = 1;
  logic [ADDR_W-1:0] m_araddr;
  logic [7:0]  m_arlen;
  logic [2:0]  m_arsize;
  logic [1:0]  m_arburst;
  logic [CH_W-1:0] m_arid;

  scheduler #(.NUM_TID(1024), .NUM_OUT(NOUT)) dut (
    .clk, .rst_n, .enque, .tid, .enque_ready,
    .addr_to_pendlist(addr_b), .we_to_pendlist(we_b), .data_to_pendlist(din_b), .data_from_pendlist(dout_b),
    .src_coord, .slot_available, .slot_id, .buffer_select, .slot_set, .pckt_len,
    .hdft_data, .hdft_we, .hdft_slot, .pf_valid, .pf_tid, .pf_ack,
    .bs_cntrl_enque(bs_enque), .bs_cntrl_ch(bs_ch), .bs_cntrl_data(bs_cmd),
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arid
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // descriptor RAM model (port B)
  logic [255:0] ram [1024];
  always @(posedge clk) begin
    if (we_b) ram[addr_b] <= din_b;
    dout_b <= ram[addr_b];
  end

  // transactions
  typedef struct {
    int     tid, len, path, pdid, seq;
    longint src, dst;
    bit     notify, chained, faulted;
    int     dep;          // index of the dependant, -1 if none
    int     sent, npkts;
    longint first_cyc, last_cyc;
  } tx_s;
  tx_s tx [NTX];
  int  tid2idx [1024];

  // outstanding read words of the packet being issued
  longint ar_next;
  int     ar_left = 0;
  int     wb_exp_tid = -1, wb_exp_bytes, wb_exp_done;
  int     n_pkts = 0, n_inter = 0, n_split = 0, n_short = 0, n_noslot = 0, n_lead0 = 0, n_lead1 = 0;
  int     last_tid = -1;
  int     pf_idx = -1;
  longint pf_ack_cyc = -1;

  always @(posedge clk) if (rst_n) begin
    if (!slot_available[buffer_select % NOUT] && dut.state == 3'd2) n_noslot++;
    if (slot_set) begin
      automatic exa_hdr_t h = exa_hdr_t'(hdft_data[DATA_W-1:0]);
      automatic exa_ftr_t f = exa_ftr_t'(hdft_data[2*DATA_W-1:DATA_W]);
      automatic int i = tid2idx[f.tid];
      check(i >= 0, "packet of a known transaction");
      if (i >= 0) begin
        automatic longint dst = tx[i].dst + tx[i].sent;
        automatic longint src = tx[i].src + tx[i].sent;
        automatic int room = 256 - int'(dst & 255);
        automatic int plen = (tx[i].len - tx[i].sent < room) ? tx[i].len - tx[i].sent : room;
        automatic int dst_off = int'(dst & 15), src_off = int'(src & 15);
        automatic int n_out = (dst_off + plen - 1) / 16 + 1;
        automatic int lead = (src_off >= dst_off);
        check(!(pf_idx == i && pf_ack_cyc >= 0 && cyc > pf_ack_cyc + 2), "no packet after a page fault");
        check(ar_left == 0, "previous packet's reads complete");
        check(buffer_select == 5'(tx[i].path) && hdft_we && hdft_slot == slot_id[tx[i].path], "output and slot");
        check(slot_available[tx[i].path], "slot taken only when available");
        check(h.dst == dst && h.pdid == 16'(tx[i].pdid) && h.src_coord == src_coord &&
              h.ptype == PT_RDMA_WRITE && h.pld_words == 5'(n_out) && pckt_len == 5'(n_out), "header");
        check(f.seq == 14'(tx[i].seq) && f.first == (tx[i].sent == 0) &&
              f.last == (tx[i].sent + plen == tx[i].len) && f.notify == tx[i].notify &&
              f.pld_bytes == 9'(plen), "footer");
        check(bs_enque && bs_ch == CH_W'(tx[i].pdid) && bs_cmd.path == 5'(tx[i].path) &&
              bs_cmd.slot == slot_id[tx[i].path] && bs_cmd.rot == 4'(src_off - dst_off) &&
              bs_cmd.lead == lead[0] && bs_cmd.rd_words == 5'(n_out + lead) &&
              bs_cmd.dst_off == 4'(dst_off) && bs_cmd.nbytes == 9'(plen), "barrel shifter command");
        if (tx[i].sent != 0) check((dst & 255) == 0, "later packets start on a 256-byte boundary");
        else if (plen < 256 && tx[i].len - tx[i].sent > plen) n_short++;
        if (lead) n_lead1++; else n_lead0++;
        if (tx[i].sent == 0) tx[i].first_cyc = cyc;
        ar_next = src & ~longint'(15);
        ar_left = n_out + lead;
        tx[i].sent += plen;
        tx[i].npkts++;
        if (tx[i].sent == tx[i].len) tx[i].last_cyc = cyc;
        wb_exp_tid = tx[i].tid; wb_exp_bytes = tx[i].sent; wb_exp_done = (tx[i].sent == tx[i].len);
        if (last_tid >= 0 && last_tid != tx[i].tid) n_inter++;
        last_tid = tx[i].tid;
        n_pkts++;
      end
    end else begin
      check(!bs_enque && !hdft_we, "no command without allocation");
    end
    if (m_arvalid && m_arready) begin
      automatic int beats = int'(m_arlen) + 1;
      check(m_araddr == ar_next, "read address continues the packet's source words");
      check(beats <= ar_left, "read not longer than the packet needs");
      check((m_araddr >> 12) == ((m_araddr + 16 * beats - 1) >> 12), "burst stays inside 4 KiB");
      check(m_arsize == 3'd4 && m_arburst == 2'b01, "16-byte INCR burst");
      check(tid2idx[wb_exp_tid] >= 0 && m_arid == CH_W'(tx[tid2idx[wb_exp_tid]].pdid), "AXI ID is the channel");
      if (beats < ar_left) n_split++;
      ar_next += 16 * beats;
      ar_left -= beats;
    end
    if (we_b && dut.state == 3'd5) begin
      automatic desc_t d = desc_t'(din_b);
      check(ar_left == 0, "write-back after the reads");
      check(addr_b == 10'(wb_exp_tid) && int'(d.bytes_sent) == wb_exp_bytes && d.done == wb_exp_done[0],
            "descriptor write-back");
    end
  end

  // random neighbours
  always @(posedge clk) begin
    m_arready <= ($urandom_range(0, 2) != 0);
    for (int n = 0; n < NOUT; n++) begin
      slot_available[n] <= ($urandom_range(0, 5) != 0);
      slot_id[n] <= SLOT_W'($urandom);
    end
  end

  function automatic bit all_done();
    for (int i = 0; i < NTX; i++)
      if (i != pf_idx && tx[i].sent != tx[i].len) return 0;
    return 1;
  endfunction

  task automatic push(input int t);
    @(negedge clk);
    enque = 1; tid = 10'(t);
    do @(posedge clk); while (!enque_ready);
    #1 enque = 0;
  endtask

  initial begin
    for (int t = 0; t < 1024; t++) begin tid2idx[t] = -1; ram[t] = '0; end
    for (int n = 0; n < NOUT; n++) pf_tid[n] = '0;
    for (int i = 0; i < NTX; i++) begin
      automatic desc_t d = '0;
      automatic int t;
      do t = $urandom_range(0, 1023); while (tid2idx[t] >= 0);
      tid2idx[t] = i;
      tx[i].tid = t;
      tx[i].len = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 300) : $urandom_range(1, 16384);
      tx[i].path = $urandom_range(0, NOUT - 1);
      tx[i].pdid = $urandom_range(0, 65535);
      tx[i].seq = $urandom_range(0, 16383);
      tx[i].src = longint'({$urandom, $urandom}) & 64'h0000_00FF_FFFF_FFFF;
      tx[i].dst = longint'({$urandom, $urandom}) & 64'h0000_03FF_FFFF_FFFF;
      if (i == 1) tx[i].src = (tx[i].src & ~longint'(4095)) | 64'hFF5;   // first read crosses 4 KiB
      tx[i].notify = $urandom_range(0, 1);
      tx[i].chained = 0; tx[i].dep = -1; tx[i].faulted = 0;
      tx[i].sent = 0; tx[i].npkts = 0;
    end
    tx[2].chained = 1; tx[2].dep = 3;     // 2 -> 3
    tx[2].len = 2000;
    pf_idx = 5;
    tx[5].len = 16384;                    // long enough to be hit while active
    for (int i = 0; i < NTX; i++) begin
      automatic desc_t d = '0;
      d.src_va = tx[i].src; d.dst_va = tx[i].dst; d.length = 15'(tx[i].len);
      d.pdid = 16'(tx[i].pdid); d.seq = 14'(tx[i].seq); d.path = 5'(tx[i].path);
      d.send_notify = tx[i].notify; d.chained = tx[i].chained;
      d.dep_id = (tx[i].dep >= 0) ? 10'(tx[tx[i].dep].tid) : 10'd0;
      ram[tx[i].tid] = d;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // enqueue all but the chained dependant, at random times
      for (int i = 0; i < NTX; i++) if (i != 3) begin
        repeat ($urandom_range(0, 200)) @(posedge clk);
        push(tx[i].tid);
      end
      // a page fault on transaction 5's output while it is being served
      begin
        wait (tx[5].sent > 1024);
        @(negedge clk);
        pf_valid[tx[5].path] = 1; pf_tid[tx[5].path] = 10'(tx[5].tid);
        do @(posedge clk); while (!pf_ack[tx[5].path]);
        pf_ack_cyc = cyc;
        #1 pf_valid[tx[5].path] = 0;
      end
    join
    while (!all_done()) @(posedge clk);
    repeat (200) @(posedge clk);
    for (int i = 0; i < NTX; i++) if (i != pf_idx) begin
      automatic desc_t d = desc_t'(ram[tx[i].tid]);
      check(int'(d.bytes_sent) == tx[i].len && d.done, "descriptor finished");
      check(!d.err_rsv[0], "no error bit");
    end
    begin
      automatic desc_t d = desc_t'(ram[tx[pf_idx].tid]);
      check(d.err_rsv[0] && !d.done && tx[pf_idx].sent < tx[pf_idx].len, "page fault stops the transaction");
    end
    check(tx[3].first_cyc > tx[2].last_cyc, "chained dependant starts after its predecessor's last packet");
    check(n_inter > 0, "round-robin interleaving");
    check(n_split > 0, "4 KiB split");
    check(n_short > 0, "short first packet");
    check(n_noslot > 0, "no free slot");
    check(n_lead0 > 0 && n_lead1 > 0, "both shift directions");
    $display("packets=%0d interleave=%0d split4k=%0d short=%0d noslot=%0d", n_pkts, n_inter, n_split, n_short, n_noslot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("watchdog: simulation hung");
    for (int i = 0; i < NTX; i++) $display("tx %0d: %0d of %0d", i, tx[i].sent, tx[i].len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
