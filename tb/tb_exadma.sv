// tb_exadma: end-to-end test of the ExaDMA send unit at its default size
// (1024 descriptors, 3 outputs, 8 slots per buffer).
//
// The bench plays three parts: the controlling processor (AXI-4 writes of
// descriptors and control packets, reads of descriptors back), the memory
// system behind the AXI-4 read port (a byte pattern computed from the address;
// answers come after a random latency of up to 40 cycles, out of order and
// interleaved between IDs, in order within an ID; one 64 KiB region answers
// with SLVERR to model a page fault) and three ExaNet receivers with random
// ready signals. Every received packet is checked against an independent
// model: header fields, 256-byte destination alignment, payload bytes at the
// destination byte lanes, zeroed unused bytes, footer flags and byte count,
// in-order arrival per transaction. At the end every transaction must have
// arrived completely, the faulty one not at all, and the descriptors read back
// over AXI must show done / bytes sent / error. Each mechanism of the design is
// counted and must have happened at least once. Last, one response and one
// read request are passed through the processor mailbox beside the send unit
// and read back over its AXI port, and two packets through the crossbar.
module tb_exadma;
  import exadma_pkg::*;

  localparam int NOUT = 3;
  localparam int NTX  = 24;
  localparam logic [63:0] FAULT_BASE = 64'h0000_00F0_0000_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] src_coord = 22'h12345;

  // AXI slave side
  logic        s_awvalid = 0, s_awready;
  logic [16:0] s_awaddr = '0;
  logic [5:0]  s_awid = '0;
  logic        s_wvalid = 0, s_wready;
  logic [127:0] s_wdata = '0;
  logic [15:0] s_wstrb = '0;
  logic        s_bvalid, s_bready = 0;
  logic [1:0]  s_bresp;
  logic [5:0]  s_bid;
  logic        s_arvalid = 0, s_arready;
  logic [16:0] s_araddr = '0;
  logic [5:0]  s_arid = '0;
  logic        s_rvalid, s_rready = 0;
  logic [127:0] s_rdata;
  logic [1:0]  s_rresp;
  logic [5:0]  s_rid;
  logic        s_rlast;
  // AXI master side
  logic        m_arvalid, m_arready = 0;
  logic [63:0] m_araddr;
  logic [7:0]  m_arlen;
  logic [2:0]  m_arsize;
  logic [1:0]  m_arburst;
  logic [2:0]  m_arid;
  logic        m_rvalid = 0, m_rready;
  logic [127:0] m_rdata = '0;
  logic [2:0]  m_rid = '0;
  logic [1:0]  m_rresp = '0;
  logic        m_rlast = 0;
  // ExaNet
  logic [127:0]    exa_data [NOUT];
  logic [NOUT-1:0] hv, hr, pv, pr, fv, fr;
  // processor mailbox
  logic [127:0] mb_data = '0;
  logic        mb_hv = 0, mb_hr, mb_pv = 0, mb_pr, mb_fv = 0, mb_fr;
  logic        mb_arvalid = 0, mb_arready, mb_rvalid, mb_rready = 0, mb_rlast;
  logic [4:0]  mb_araddr = '0;
  logic [5:0]  mb_arid = '0, mb_rid;
  logic [31:0] mb_rdata;
  logic [1:0]  mb_rresp;
  // crossbar
  logic [127:0] xb_id [16], xb_od [16];
  logic [15:0]  xb_ihv = '0, xb_ihr, xb_ipv = '0, xb_ipr, xb_ifv = '0, xb_ifr;
  logic [15:0]  xb_ohv, xb_ohr = '1, xb_opv, xb_opr = '1, xb_ofv, xb_ofr = '1;

  exadma dut (
    .clk, .rst_n, .src_coord,
    .s_awvalid, .s_awready, .s_awaddr, .s_awid, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_bid, .s_arvalid, .s_arready, .s_araddr, .s_arid,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp, .s_rid, .s_rlast,
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arid,
    .m_rvalid, .m_rready, .m_rdata, .m_rid, .m_rresp, .m_rlast,
    .exa_data, .exa_header_valid(hv), .exa_header_ready(hr),
    .exa_payload_valid(pv), .exa_payload_ready(pr),
    .exa_footer_valid(fv), .exa_footer_ready(fr),
    .mb_exa_data(mb_data), .mb_exa_header_valid(mb_hv), .mb_exa_header_ready(mb_hr),
    .mb_exa_payload_valid(mb_pv), .mb_exa_payload_ready(mb_pr),
    .mb_exa_footer_valid(mb_fv), .mb_exa_footer_ready(mb_fr),
    .mb_arvalid, .mb_arready, .mb_araddr, .mb_arid,
    .mb_rvalid, .mb_rready, .mb_rdata, .mb_rresp, .mb_rid, .mb_rlast,
    .xb_in_data(xb_id), .xb_in_header_valid(xb_ihv), .xb_in_header_ready(xb_ihr),
    .xb_in_payload_valid(xb_ipv), .xb_in_payload_ready(xb_ipr),
    .xb_in_footer_valid(xb_ifv), .xb_in_footer_ready(xb_ifr),
    .xb_out_data(xb_od), .xb_out_header_valid(xb_ohv), .xb_out_header_ready(xb_ohr),
    .xb_out_payload_valid(xb_opv), .xb_out_payload_ready(xb_opr),
    .xb_out_footer_valid(xb_ofv), .xb_out_footer_ready(xb_ofr)
  );

  // crossbar monitor: packets seen per output
  int xb_seen [16];
  logic [127:0] xb_hdr_seen [16];
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < 16; o++) if (xb_ohv[o] && xb_ohr[o]) begin
      xb_seen[o]++;
      xb_hdr_seen[o] = xb_od[o];
    end

  // one mailbox beat: held from a falling edge until its ready is seen
  task automatic mb_beat(input int k, input logic [127:0] d);
    @(negedge clk);
    mb_data = d;
    if (k == 0) mb_hv = 1; else if (k == 1) mb_pv = 1; else mb_fv = 1;
    while (!((k == 0) ? mb_hr : (k == 1) ? mb_pr : mb_fr)) @(negedge clk);
    @(posedge clk);
    #1 mb_hv = 0; mb_pv = 0; mb_fv = 0;
  endtask

  task automatic xb_send(input int i, input logic [127:0] h);
    @(negedge clk); xb_id[i] = h; xb_ihv[i] = 1;
    while (!xb_ihr[i]) @(negedge clk);
    @(negedge clk); xb_ihv[i] = 0; xb_id[i] = ~h; xb_ipv[i] = 1;
    while (!xb_ipr[i]) @(negedge clk);
    @(negedge clk); xb_ipv[i] = 0; xb_ifv[i] = 1;
    while (!xb_ifr[i]) @(negedge clk);
    @(negedge clk); xb_ifv[i] = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic mb_read(input logic [4:0] a, output logic [31:0] d);
    @(negedge clk);
    mb_arvalid = 1; mb_araddr = a; mb_rready = 1;
    while (!mb_arready) @(negedge clk);
    @(negedge clk) mb_arvalid = 0;
    while (!mb_rvalid) @(negedge clk);
    d = mb_rdata;
    @(negedge clk) mb_rready = 0;
  endtask

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ memory pattern
  function automatic logic [7:0] mem_byte(input logic [63:0] a);
    logic [31:0] h;
    h = a[31:0] * 32'h9E37_79B1 ^ a[47:32];
    return h[31:24] ^ h[7:0];
  endfunction

  // ------------------------------------------------------------ transactions
  typedef struct {
    int          tid;
    logic [63:0] src, dst;
    int          len, pdid, path, dep, seq;
    bit          chained, db, notify, fault;
    int          rcvd, npkts;
    longint      last_hdr_time, first_hdr_time;
  } txn_t;
  txn_t tx [NTX];
  int   tid2idx [1024];

  // ------------------------------------------------------------ mechanism counters
  int n_mailbox = 0, n_xbar = 0, n_split4k = 0, n_noslot = 0, n_interleave = 0, n_pf = 0, n_ctrl = 0, n_ctrl_prio = 0;
  int n_chain = 0, n_linkwait = 0, n_shortfirst = 0, n_enq_bp = 0, n_cp_bp = 0, n_lead0 = 0, n_lead1 = 0;

  // ------------------------------------------------------------ AXI read memory model
  typedef struct {
    logic [2:0]  id;
    logic [63:0] addr;
    int          beats, done;
    longint      ready_at;
  } burst_t;
  burst_t bq[$];
  longint cyc = 0;
  int last_rid = -1;
  bit last_mid_burst = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    m_arready <= ($urandom_range(0, 3) != 0);
    if (m_arvalid && m_arready) begin
      automatic burst_t b;
      b.id = m_arid; b.addr = m_araddr; b.beats = int'(m_arlen) + 1; b.done = 0;
      b.ready_at = cyc + $urandom_range(5, 40);
      bq.push_back(b);
      check(m_arsize == 3'd4 && m_arburst == 2'b01, "AR size/burst");
      check((m_araddr[11:0] + 13'(16 * (int'(m_arlen) + 1))) <= 13'h1000, "AR crosses 4 KiB");
    end
    // choose one beat among bursts that are oldest of their ID and ready
    begin
      automatic int cand[$];
      m_rvalid <= 1'b0;
      for (int i = 0; i < bq.size(); i++) begin
        automatic bit oldest = 1;
        for (int j = 0; j < i; j++) if (bq[j].id == bq[i].id) oldest = 0;
        if (oldest && bq[i].ready_at <= cyc) cand.push_back(i);
      end
      if (cand.size() > 0 && $urandom_range(0, 7) != 0) begin
        automatic int k = cand[$urandom_range(0, cand.size() - 1)];
        automatic logic [63:0] a = bq[k].addr + 64'(16 * bq[k].done);
        automatic logic [127:0] d;
        for (int j = 0; j < 16; j++) d[8*j +: 8] = mem_byte(a + 64'(j));
        if (last_mid_burst && last_rid != int'(bq[k].id)) n_interleave++;
        m_rvalid <= 1'b1;
        m_rid    <= bq[k].id;
        m_rdata  <= d;
        m_rresp  <= (a >= FAULT_BASE && a < FAULT_BASE + 64'h10000) ? 2'b10 : 2'b00;
        m_rlast  <= (bq[k].done == bq[k].beats - 1);
        bq[k].done++;
        last_rid = int'(bq[k].id);
        last_mid_burst = (bq[k].done != bq[k].beats);
        if (bq[k].done == bq[k].beats) bq.delete(k);
      end
    end
  end

  // ------------------------------------------------------------ ExaNet receivers
  bit stall [NOUT];
  typedef struct {
    logic [127:0] hdr, ftr;
    logic [127:0] pld[$];
  } pkt_t;
  pkt_t cur [NOUT];
  int   phase [NOUT];          // 0 header, 1 payload/footer
  logic [63:0] ctrl_expect_pld [NOUT][4][3];   // per output, up to 4 packets
  int   ctrl_expect_tid [NOUT][4];
  int   ctrl_expect_cnt [NOUT];
  int   ctrl_rcvd [NOUT];

  task automatic check_data_pkt(input int o, input pkt_t p);
    exa_hdr_t h = exa_hdr_t'(p.hdr);
    exa_ftr_t f = exa_ftr_t'(p.ftr);
    int idx = tid2idx[f.tid];
    longint off;
    int nb, nw, doff;
    if (idx < 0) begin check(0, "unknown tid"); return; end
    off  = longint'(h.dst - tx[idx].dst);
    nb   = int'(f.pld_bytes);
    doff = int'(h.dst[3:0]);
    nw   = (doff + nb + 15) / 16;
    check(h.ptype == PT_RDMA_WRITE, "ptype");
    check(h.pdid == 16'(tx[idx].pdid), "pdid");
    check(h.src_coord == src_coord, "src_coord");
    check(o == tx[idx].path, "packet on wrong output");
    check(!tx[idx].fault, "packet of faulting transaction sent");
    check(off == longint'(tx[idx].rcvd), $sformatf("tid %0d offset %0d expected %0d", f.tid, off, tx[idx].rcvd));
    check(nb >= 1 && nb <= 256 && int'(h.dst[7:0]) + nb <= 256, "256-byte alignment");
    check(int'(h.pld_words) == nw && p.pld.size() == nw, "payload word count");
    check(f.first == (off == 0), "first flag");
    check(f.last == (off + nb == tx[idx].len), "last flag");
    check(f.notify == tx[idx].notify, "notify flag");
    check(f.seq == SEQ_W'(tx[idx].seq), "sequence number");
    if (f.first && h.dst[7:0] != 0 && nb < tx[idx].len) n_shortfirst++;
    for (int k = 0; k < p.pld.size(); k++)
      for (int j = 0; j < 16; j++) begin
        int q = 16 * k + j;
        logic [7:0] exp;
        exp = (q >= doff && q < doff + nb) ? mem_byte(tx[idx].src + 64'(off) + 64'(q - doff)) : 8'h00;
        if (p.pld[k][8*j +: 8] != exp) begin
          check(0, $sformatf("tid %0d off %0d word %0d byte %0d: %h != %h", f.tid, off, k, j, p.pld[k][8*j +: 8], exp));
          return;
        end
      end
    checks++;
    if (tx[idx].npkts == 0) tx[idx].first_hdr_time = cyc;
    tx[idx].last_hdr_time = cyc;
    tx[idx].rcvd += nb;
    tx[idx].npkts++;
  endtask

  task automatic check_ctrl_pkt(input int o, input pkt_t p);
    exa_hdr_t h = exa_hdr_t'(p.hdr);
    exa_ftr_t f = exa_ftr_t'(p.ftr);
    int idx = tid2idx[f.tid];
    int   n = ctrl_rcvd[o] % 4;
    n_ctrl++;
    check(ctrl_rcvd[o] < ctrl_expect_cnt[o], "unexpected control packet");
    check(int'(f.tid) == ctrl_expect_tid[o][n], "control packet tid");
    if (idx >= 0) check(h.dst == tx[idx].dst && h.pdid == 16'(tx[idx].pdid), "control packet destination");
    check(p.pld.size() == 2, "control payload words");
    if (p.pld.size() == 2)
      check(p.pld[0] == {ctrl_expect_pld[o][n][1], ctrl_expect_pld[o][n][0]} &&
            p.pld[1] == {64'b0, ctrl_expect_pld[o][n][2]}, "control payload");
    ctrl_rcvd[o]++;
  endtask

  for (genvar o = 0; o < NOUT; o++) begin : g_rx
    always @(posedge clk) begin
      hr[o] <= !stall[o] && ($urandom_range(0, 3) != 0);
      pr[o] <= !stall[o] && ($urandom_range(0, 5) != 0);
      fr[o] <= !stall[o] && ($urandom_range(0, 3) != 0);
      if (rst_n && hv[o] && hr[o]) begin
        check(phase[o] == 0, "header out of sequence");
        cur[o].hdr = exa_data[o];
        cur[o].pld.delete();
        phase[o] = 1;
      end
      if (rst_n && pv[o] && pr[o]) begin
        check(phase[o] == 1, "payload out of sequence");
        cur[o].pld.push_back(exa_data[o]);
      end
      if (rst_n && pv[o] && !pr[o]) n_linkwait++;
      if (rst_n && fv[o] && fr[o]) begin
        automatic exa_hdr_t h;
        check(phase[o] == 1, "footer out of sequence");
        cur[o].ftr = exa_data[o];
        phase[o] = 0;
        h = exa_hdr_t'(cur[o].hdr);
        if (h.ptype == PT_DMA_CTRL) check_ctrl_pkt(o, cur[o]);
        else check_data_pkt(o, cur[o]);
      end
    end
  end

  // ------------------------------------------------------------ internal event probes
  longint first_issue [1024], last_issue [1024];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_scheduler.slot_set && dut.u_scheduler.first) first_issue[dut.u_scheduler.cur_tid] = cyc;
    if (dut.u_scheduler.state == 3'd5 && dut.u_scheduler.last_q) last_issue[dut.u_scheduler.cur_tid] = cyc;
    if (dut.u_scheduler.state == 3'd4 && m_arready) n_split4k++;
    if (dut.u_scheduler.state == 3'd2 && !dut.u_scheduler.drop && !dut.u_scheduler.sel_avail) n_noslot++;
    if (dut.u_scheduler.state == 3'd5 && dut.u_scheduler.last_q && dut.u_scheduler.wb_q.chained) n_chain++;
    if (|dut.u_scheduler.pf_ack) n_pf++;
    if (dut.u_scheduler.bs_cntrl_enque) begin
      if (dut.u_scheduler.bs_cntrl_data.lead) n_lead1++; else n_lead0++;
    end
    if (dut.u_pending_list.wr_state == 2'd1 && dut.u_pending_list.trigger && !dut.enque_ready && s_wvalid) n_enq_bp++;
    if (dut.u_pending_list.wr_state == 2'd2 && s_wvalid && !s_wready) n_cp_bp++;
  end
  for (genvar n = 0; n < NOUT; n++) begin : g_prio_probe
    logic hv_d = 1'b0;
    always @(posedge clk) begin
      hv_d <= hv[n];
      if (rst_n && hv[n] && !hv_d && exa_data[n][105:102] == 4'(PT_DMA_CTRL) && dut.g_out[n].winner_exists)
        n_ctrl_prio++;
    end
  end

  // ------------------------------------------------------------ processor side
  task automatic axi_write(input logic [16:0] addr, input logic [127:0] data, input logic [15:0] strb);
    @(posedge clk);
    s_awvalid <= 1; s_awaddr <= addr; s_awid <= 6'($urandom);
    do @(posedge clk); while (!s_awready);
    s_awvalid <= 0;
    s_wvalid <= 1; s_wdata <= data; s_wstrb <= strb;
    do @(posedge clk); while (!s_wready);
    s_wvalid <= 0;
    s_bready <= 1;
    do @(posedge clk); while (!s_bvalid);
    s_bready <= 0;
  endtask

  task automatic axi_read(input logic [16:0] addr, output logic [127:0] data);
    @(posedge clk);
    s_arvalid <= 1; s_araddr <= addr;
    do @(posedge clk); while (!s_arready);
    s_arvalid <= 0;
    s_rready <= 1;
    do @(posedge clk); while (!s_rvalid);
    data = s_rdata;
    s_rready <= 0;
  endtask

  function automatic logic [63:0] word2(input int i);
    desc_t d = '0;
    d.pdid = 16'(tx[i].pdid);
    d.length = 15'(tx[i].len);
    d.chained = tx[i].chained;
    d.dep_id = 10'(tx[i].dep);
    d.send_notify = tx[i].notify;
    d.db = tx[i].db;
    return d[191:128];
  endfunction

  function automatic logic [63:0] word3(input int i);
    desc_t d = '0;
    d.path = 5'(tx[i].path);
    d.seq = SEQ_W'(tx[i].seq);
    return d[255:192];
  endfunction

  task automatic post(input int i);
    logic [16:0] base = {2'b00, 10'(tx[i].tid), 5'b0};
    axi_write(base, {tx[i].dst, tx[i].src}, 16'hFFFF);
    if ($urandom_range(0, 1) == 0) begin
      axi_write(base | 17'h10, {word3(i), word2(i)}, 16'hFFFF);     // one 128-bit write
    end else begin
      axi_write(base | 17'h18, {word3(i), 64'b0}, 16'hFF00);        // word 3 first
      axi_write(base | 17'h10, {64'b0, word2(i)}, 16'h00FF);        // then word 2
    end
  endtask

  task automatic send_ctrl(input int o, input int i, input logic [63:0] a, b, c);
    logic [16:0] addr = {2'(o + 1), 10'(tx[i].tid), 5'b0};
    int n = ctrl_expect_cnt[o] % 4;
    ctrl_expect_pld[o][n][0] = a; ctrl_expect_pld[o][n][1] = b; ctrl_expect_pld[o][n][2] = c;
    ctrl_expect_tid[o][n] = tx[i].tid;
    ctrl_expect_cnt[o]++;
    axi_write(addr, {64'b0, a}, 16'h00FF);
    axi_write(addr | 17'h8, {b, 64'b0}, 16'hFF00);
    axi_write(addr, {64'b0, c}, 16'h00FF);
  endtask

  // ------------------------------------------------------------ stimulus
  initial begin
    bit used_tid [1024];
    foreach (xb_id[i]) xb_id[i] = '0;
    foreach (xb_seen[o]) xb_seen[o] = 0;
    for (int t = 0; t < 1024; t++) begin tid2idx[t] = -1; used_tid[t] = 0; end
    for (int o = 0; o < NOUT; o++) begin
      stall[o] = 0; phase[o] = 0; ctrl_expect_cnt[o] = 0; ctrl_rcvd[o] = 0;
    end
    for (int i = 0; i < NTX; i++) begin
      int t, off;
      do t = $urandom_range(0, 1023); while (used_tid[t]);
      used_tid[t] = 1;
      tx[i].tid = t; tid2idx[t] = i;
      off = (i % 4 == 0) ? 0 : $urandom_range(0, 16383);
      tx[i].len = (i == 0) ? 16384 : (i < 4) ? $urandom_range(1, 40) : $urandom_range(1, 16384 - off);
      if (tx[i].len > 16384 - off) tx[i].len = 16384 - off;
      tx[i].dst = {22'($urandom), 42'({$urandom_range(0, 1023), 14'b0}) + 42'(off)};
      tx[i].src = {24'h0, $urandom, 8'($urandom)};
      if (i == 1) tx[i].src[11:0] = 12'hFF5;     // packet read crossing 4 KiB
      tx[i].pdid = $urandom_range(0, 7);
      tx[i].path = $urandom_range(0, NOUT - 1);
      tx[i].seq = $urandom_range(0, 1000);
      tx[i].notify = $urandom_range(0, 1);
      tx[i].chained = 0; tx[i].db = 0; tx[i].dep = 0; tx[i].fault = 0;
      tx[i].rcvd = 0; tx[i].npkts = 0;
    end
    // a chain: 5 -> 6 -> 7, all on the same output
    tx[5].chained = 1; tx[5].dep = tx[6].tid;
    tx[6].chained = 1; tx[6].dep = tx[7].tid; tx[6].db = 1; tx[6].path = tx[5].path;
    tx[7].db = 1; tx[7].path = tx[5].path;
    // a transaction whose source lies in the faulting region
    tx[9].src = FAULT_BASE + 64'h1234; tx[9].fault = 1; tx[9].len = 3000;

    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // chained ones first, dependants before their predecessor
    post(7); post(6);
    for (int i = 0; i < NTX; i++) if (i != 6 && i != 7) post(i);

    // control packets: one on output 1, and two back to back on a stalled output 0
    send_ctrl(1, 3, 64'h1111_2222_3333_4444, 64'h5555_6666_7777_8888, 64'h9999_AAAA_BBBB_CCCC);
    fork
      begin
        stall[0] = 1;
        repeat (300) @(posedge clk);
        stall[0] = 0;
      end
      begin
        send_ctrl(0, 2, 64'hA0, 64'hA1, 64'hA2);
        send_ctrl(0, 4, 64'hB0, 64'hB1, 64'hB2);
      end
    join_any
    // send_ctrl(0,...) of the second packet is held off by WREADY until the first leaves
    wait (ctrl_rcvd[0] == 2);

    // wait for all data
    begin
      bit all;
      do begin
        repeat (100) @(posedge clk);
        all = 1;
        for (int i = 0; i < NTX; i++) if (!tx[i].fault && tx[i].rcvd != tx[i].len) all = 0;
      end while (!all);
    end
    repeat (200) @(posedge clk);

    // final checks: completeness and descriptors read back
    for (int i = 0; i < NTX; i++) begin
      logic [127:0] r;
      desc_t d;
      axi_read({2'b00, 10'(tx[i].tid), 5'h10}, r);
      d = '0;
      d[255:128] = r;
      if (tx[i].fault) begin
        check(tx[i].npkts == 0, "faulting transaction sent packets");
        check(d.err_rsv[0] == 1'b1 && !d.done, "error bit of faulting transaction");
      end else begin
        check(tx[i].rcvd == tx[i].len, $sformatf("tx %0d received %0d of %0d", i, tx[i].rcvd, tx[i].len));
        check(d.done && int'(d.bytes_sent) == tx[i].len && !d.err_rsv[0], $sformatf("descriptor %0d readback", i));
      end
    end
    // chaining: each dependant starts after its predecessor's last packet
    check(first_issue[tx[6].tid] > last_issue[tx[5].tid], "chain 5->6 order");
    check(first_issue[tx[7].tid] > last_issue[tx[6].tid], "chain 6->7 order");
    check(tx[7].first_hdr_time > tx[5].last_hdr_time, "chain 5->7 arrival order");
    for (int o = 0; o < NOUT; o++) check(ctrl_rcvd[o] == ctrl_expect_cnt[o], "control packets received");

    // mailbox beside the send unit: one response and one read request
    begin
      automatic exa_hdr_t h = '0;
      automatic logic [127:0] rsp_p = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [127:0] rq_p  = {$urandom, $urandom, $urandom, $urandom};
      automatic logic [31:0] r;
      h.ptype = PT_DMA_CTRL; h.pld_words = 5'd1;
      mb_beat(0, 128'(h)); mb_beat(1, rsp_p); mb_beat(2, '0);
      h.ptype = pkt_type_e'(4'd2); h.pdid = 16'hBEEF;
      mb_beat(0, 128'(h)); mb_beat(1, rq_p); mb_beat(2, '0);
      mb_read(5'h00, r);
      check(r == {2'b11, rsp_p[29:0]}, "mailbox response with request-waiting bit");
      for (int w = 0; w < 4; w++) begin
        automatic logic [127:0] e = {16'hBEEF, rq_p[111:0]};
        mb_read(5'h10, r);
        check(r == e[32*w +: 32], "mailbox read-request word");
      end
      mb_read(5'h00, r);
      check(r == 32'h0, "mailbox empty after reads");
      n_mailbox++;
    end
    // crossbar beside the send unit: a data packet of link 0 entering port 8
    // for this node, address region 5 -> peripheral port 13; one for another
    // QFDB entering transceiver port 2 -> transceiver port 0 towards F1 (this
    // node has FPGA offset 1)
    begin
      automatic exa_hdr_t h = '0;
      h.ptype = PT_RDMA_WRITE; h.pld_words = 5'd1;
      h.dst = {src_coord, 3'd5, 39'h123};
      xb_send(8, 128'(h));
      check(xb_seen[13] == 1 && xb_hdr_seen[13] == 128'(h), "crossbar routes a local packet by address");
      h.dst = {src_coord ^ 22'h4_0000, 42'h0};
      xb_send(2, 128'(h));
      check(xb_seen[0] == 1 && xb_hdr_seen[0] == 128'(h), "crossbar routes a remote packet towards F1");
      n_xbar++;
    end

    $display("mechanisms: split4k=%0d noslot=%0d interleave=%0d pagefault=%0d ctrl=%0d ctrl_prio=%0d chain=%0d linkwait=%0d shortfirst=%0d enq_bp=%0d ctrl_bp=%0d lead0=%0d lead1=%0d",
             n_split4k, n_noslot, n_interleave, n_pf, n_ctrl, n_ctrl_prio, n_chain, n_linkwait, n_shortfirst, n_enq_bp, n_cp_bp, n_lead0, n_lead1);
    check(n_split4k > 0, "4 KiB read split never happened");
    check(n_mailbox > 0, "mailbox never used");
    check(n_xbar > 0, "crossbar never used");
    check(n_noslot > 0, "no-slot re-enqueue never happened");
    check(n_interleave > 0, "interleaved read data never happened");
    check(n_pf > 0, "page fault never happened");
    check(n_ctrl > 0, "control packet never sent");
    check(n_ctrl_prio > 0, "control packet priority never exercised");
    check(n_chain > 0, "chaining never happened");
    check(n_linkwait > 0, "link backpressure never happened");
    check(n_shortfirst > 0, "short first packet never happened");
    check(n_cp_bp > 0, "control packet write backpressure never happened");
    check(n_lead0 > 0 && n_lead1 > 0, "both shift directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int i = 0; i < NTX; i++) $display("tx %0d tid %0d len %0d rcvd %0d pkts %0d path %0d fault %0d", i, tx[i].tid, tx[i].len, tx[i].rcvd, tx[i].npkts, tx[i].path, tx[i].fault);
    for (int o = 0; o < NOUT; o++) $display("ctrl %0d: %0d of %0d", o, ctrl_rcvd[o], ctrl_expect_cnt[o]);
    $display("sched state %0d pf %b; buf1 used %b full %b fault %b pfhold %0d; buf0 used %b full %b; ex0 st %0d", dut.u_scheduler.state, dut.pf_valid,
      dut.g_out[1].u_output_buffer.used, dut.g_out[1].u_output_buffer.full, dut.g_out[1].u_output_buffer.fault, dut.g_out[1].u_output_buffer.pf_hold,
      dut.g_out[0].u_output_buffer.used, dut.g_out[0].u_output_buffer.full, dut.g_out[0].u_exanetizer.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
