// tb_exanetizer: self-checking testbench of the ExaNet output stage.
//
// The test models the output buffer around the stage: a queue of complete
// packets (slot, header with the payload word count, footer, payload words)
// whose head is offered as the winner, a payload RAM with a registered read
// port addressed by Buff_addr and a combinational header/footer read. The head
// is removed when the stage pulses prio_cnt_decrement, which must name the
// head's slot and priority. Control packets are offered at random times from
// a model of the pending list and removed on cntrl_pckt_consume.
// The ExaNet receiver drops and raises its three ready signals at random. It
// rebuilds each packet (header, payload words, footer) from the handshakes and
// compares it with the control packet or the data packet that must be next. A
// data header must not start while a control packet was waiting when the
// stage chose it (control packets have priority). In a phase with the link
// always ready, a 16-word data packet must take 18 cycles from the first
// header cycle to the footer handshake. A watchdog stops the run if it hangs.
module tb_exanetizer;
  import exadma_pkg::*;

  localparam int NPKT = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic                      comp_winner_exists, prio_cnt_decrement;
  logic [SLOT_W-1:0]         comp_winner, hdft_addr, current_slot;
  logic [SLOT_W:0]           comp_winner_val, current_prio;
  logic [SLOT_W+WIDX_W-1:0]  buff_addr;
  logic [DATA_W-1:0]         buff_dt, exa_data;
  logic [2*DATA_W-1:0]       hdft_dt;
  logic                      cntrl_pckt_ready, cntrl_pckt_consume;
  logic [4*DATA_W-1:0]       cntrl_data;
  logic exa_header_valid, exa_header_ready, exa_payload_valid, exa_payload_ready;
  logic exa_footer_valid, exa_footer_ready;

  exanetizer dut (
    .clk, .rst_n, .comp_winner_exists, .comp_winner, .comp_winner_val,
    .buff_addr, .hdft_addr, .buff_dt, .hdft_dt,
    .prio_cnt_decrement, .current_prio, .current_slot,
    .cntrl_pckt_ready, .cntrl_data, .cntrl_pckt_consume,
    .exa_data, .exa_header_valid, .exa_header_ready, .exa_payload_valid, .exa_payload_ready,
    .exa_footer_valid, .exa_footer_ready
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

  // ------------------------------------------------------------ buffer model
  typedef struct {
    int slot, prio, len;
    logic [DATA_W-1:0] hdr, ftr;
  } pkt_s;
  pkt_s q [$];
  logic [DATA_W-1:0]   pld  [8*16];
  logic [2*DATA_W-1:0] hdft [8];
  int next_slot = 0, n_made = 0;

  assign comp_winner_exists = q.size() > 0;
  assign comp_winner        = comp_winner_exists ? SLOT_W'(q[0].slot) : '0;
  assign comp_winner_val    = comp_winner_exists ? 4'(q[0].prio) : '0;
  assign hdft_dt            = hdft[hdft_addr];
  always @(posedge clk) buff_dt <= pld[buff_addr];

  task automatic make_pkt();
    pkt_s p;
    exa_hdr_t h = '0;
    exa_ftr_t f = '0;
    p.slot = next_slot; next_slot = (next_slot + 1) % 8;
    p.prio = $urandom_range(0, 7);
    p.len  = ($urandom_range(0, 1) == 0) ? 16 : $urandom_range(1, 16);
    h.dst = {$urandom, $urandom}; h.pdid = 16'($urandom); h.ptype = PT_RDMA_WRITE;
    h.pld_words = 5'(p.len);
    f.tid = 10'($urandom); f.seq = 14'(n_made); f.pld_bytes = 9'(p.len * 16);
    p.hdr = h; p.ftr = f;
    hdft[p.slot] = {p.ftr, p.hdr};
    for (int w = 0; w < 16; w++) pld[p.slot * 16 + w] = {$urandom, $urandom, $urandom, $urandom};
    q.push_back(p);
    n_made++;
  endtask

  // the head leaves when its last payload word is accepted
  always @(posedge clk) if (rst_n && prio_cnt_decrement) begin
    check(q.size() > 0, "decrement with a packet offered");
    if (q.size() > 0) begin
      check(current_slot == SLOT_W'(q[0].slot), "decrement names the sent slot");
      check(current_prio == 4'(q[0].prio), "decrement carries the slot's priority");
      void'(q.pop_front());
    end
  end

  // control packet model
  logic [4*DATA_W-1:0] ctrl_exp [$];
  int n_ctrl_made = 0;
  always @(posedge clk) if (rst_n && cntrl_pckt_consume) begin
    cntrl_pckt_ready <= 1'b0;
  end

  // ------------------------------------------------------------ receiver
  logic [DATA_W-1:0] expect_pld [$];
  logic [DATA_W-1:0] expect_ftr;
  bit     in_pkt = 0, is_ctrl = 0, all_ready = 0;
  int     n_data = 0, n_ctrl = 0, n_prio = 0, n_timed = 0, n_wait = 0;
  longint t_start;
  bit     ctrl_was_ready = 0, hv_prev = 0;
  // snapshot of the packet that must come next, taken when its header starts
  pkt_s   cur;

  always @(posedge clk) begin
    exa_header_ready  <= all_ready || ($urandom_range(0, 2) != 0);
    exa_payload_ready <= all_ready || ($urandom_range(0, 3) != 0);
    exa_footer_ready  <= all_ready || ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    hv_prev <= exa_header_valid;
    ctrl_was_ready <= cntrl_pckt_ready;
    if ((exa_header_valid && !exa_header_ready) || (exa_payload_valid && !exa_payload_ready) ||
        (exa_footer_valid && !exa_footer_ready)) n_wait++;
    if (exa_header_valid && !hv_prev) begin
      t_start = cyc;
      if (exa_data[105:102] == 4'(PT_DMA_CTRL)) begin
        is_ctrl = 1;
      end else begin
        is_ctrl = 0;
        check(!ctrl_was_ready, "data packet started while a control packet waited");
      end
    end
    if (exa_header_valid && exa_header_ready) begin
      check(!in_pkt, "header inside a packet");
      in_pkt = 1;
      expect_pld.delete();
      if (is_ctrl) begin
        automatic logic [4*DATA_W-1:0] c = cntrl_data;
        check(exa_data == c[0 +: DATA_W], "control header");
        expect_pld.push_back(c[DATA_W +: DATA_W]);
        expect_pld.push_back(c[2*DATA_W +: DATA_W]);
        expect_ftr = c[3*DATA_W +: DATA_W];
        if (ctrl_was_ready && q.size() > 0) n_prio++;
      end else begin
        check(q.size() > 0, "data header with a packet offered");
        if (q.size() > 0) begin
          cur = q[0];
          check(exa_data == cur.hdr, "data header");
          for (int w = 0; w < cur.len; w++) expect_pld.push_back(pld[cur.slot * 16 + w]);
          expect_ftr = cur.ftr;
        end
      end
    end
    if (exa_payload_valid && exa_payload_ready) begin
      check(in_pkt && expect_pld.size() > 0, "payload inside a packet");
      if (expect_pld.size() > 0) check(exa_data == expect_pld.pop_front(), "payload word");
    end
    if (exa_footer_valid && exa_footer_ready) begin
      check(in_pkt && expect_pld.size() == 0, "footer after all payload");
      check(exa_data == expect_ftr, "footer");
      in_pkt = 0;
      if (is_ctrl) n_ctrl++;
      else begin
        n_data++;
        if (all_ready && cur.len == 16 && cyc - t_start >= 0) begin
          check(cyc - t_start == 17, "16-word packet takes 18 cycles on a ready link");
          n_timed++;
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    cntrl_pckt_ready = 0;
    cntrl_data = '0;
    foreach (hdft[i]) hdft[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_made < NPKT) begin
      @(negedge clk);
      all_ready = (n_made > NPKT - 40);
      if (q.size() < 6 && $urandom_range(0, 2) == 0) make_pkt();
      if (!cntrl_pckt_ready && !all_ready && $urandom_range(0, 40) == 0) begin
        automatic exa_hdr_t h = '0;
        h.ptype = PT_DMA_CTRL; h.pld_words = 5'd2; h.dst = {$urandom, $urandom};
        cntrl_data = {DATA_W'($urandom), DATA_W'({$urandom, $urandom}), DATA_W'({$urandom, $urandom}), DATA_W'(h)};
        cntrl_pckt_ready = 1;
        n_ctrl_made++;
      end
    end
    wait (q.size() == 0 && !cntrl_pckt_ready);
    repeat (30) @(posedge clk);
    check(n_data == NPKT, "all data packets received");
    check(n_ctrl == n_ctrl_made, "all control packets received");
    check(n_prio > 0, "control packet sent ahead of a waiting data packet");
    check(n_timed > 0, "packet timing measured");
    check(n_wait > 0, "link back-pressure exercised");
    $display("data=%0d ctrl=%0d prio=%0d timed=%0d", n_data, n_ctrl, n_prio, n_timed);
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
