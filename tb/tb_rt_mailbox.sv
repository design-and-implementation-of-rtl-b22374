// tb_rt_mailbox: self-checking testbench of the R5 mailbox.
//
// A sender plays the ExaNet link: 400 packets with a random type (one in two
// is a read request), random header fields and 0 to 4 payload words. Each
// beat waits a random time and is held until its ready. A reader plays the
// processor: single-beat AXI reads of either queue at random addresses and
// times, with RREADY dropped at random. A model keeps both queues (filled at
// each footer handshake, emptied as the mailbox must) and predicts every read:
//   response read     {request queue not empty, valid, payload bits 29:0}
//   request read      the next 32-bit word of {header PDID, payload 111:0}
// The queues are 4 deep and reading starts late, so the header must be held
// off while a queue is full. RDATA must be valid in the cycle after AR is
// accepted. The run counts full-queue stalls, empty reads, the request bit
// and read requests whose user payload tried to carry another PDID, and fails
// if one never happened. A watchdog stops the run if it hangs.
module tb_rt_mailbox;
  import exadma_pkg::*;

  localparam int NPKT  = 400;
  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [DATA_W-1:0] exa_data = '0;
  logic hv = 0, hr, pv = 0, pr, fv = 0, fr;
  logic        s_arvalid = 0, s_arready, s_rvalid, s_rready = 0, s_rlast;
  logic [4:0]  s_araddr = '0;
  logic [5:0]  s_arid = '0, s_rid;
  logic [31:0] s_rdata;
  logic [1:0]  s_rresp;

  rt_mailbox #(.RQ_DEPTH(DEPTH), .RSP_DEPTH(DEPTH), .RDREQ_TYPE(4'd2), .AXI_ID_W(6)) dut (
    .clk, .rst_n, .exa_data,
    .exa_header_valid(hv), .exa_header_ready(hr),
    .exa_payload_valid(pv), .exa_payload_ready(pr),
    .exa_footer_valid(fv), .exa_footer_ready(fr),
    .s_arvalid, .s_arready, .s_araddr, .s_arid,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp, .s_rid, .s_rlast
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ model
  logic [127:0] rq_m [$];
  logic [29:0]  rsp_m [$];
  int           rq_w = 0;
  struct { logic [31:0] data; logic [5:0] id; } rexp [$];
  exa_hdr_t     mon_hdr;
  logic [127:0] mon_pld;
  bit           mon_first;
  bit           ar_last = 0;
  int n_rcvd = 0, n_full = 0, n_empty_rd = 0, n_rq_bit = 0, n_pdid = 0, n_reads = 0;
  bit rd_on = 0, send_done = 0;

  always @(posedge clk) if (rst_n) begin
    // RDATA one cycle after AR
    if (ar_last) check(s_rvalid, "read data one cycle after AR");
    ar_last <= s_arvalid && s_arready;
    if (hv && !hr && (rq_m.size() == DEPTH || rsp_m.size() == DEPTH)) n_full++;
    if (hv && hr && (rq_m.size() == DEPTH || rsp_m.size() == DEPTH)) check(0, "header accepted with a full queue");
    // reads see the queues as they were before this edge's push
    if (s_arvalid && s_arready) begin
      automatic logic [31:0] d;
      n_reads++;
      if (!s_araddr[4]) begin
        if (rq_m.size() > 0) n_rq_bit++;
        if (rsp_m.size() == 0) begin d = {rq_m.size() > 0, 31'b0}; n_empty_rd++; end
        else d = {rq_m.size() > 0, 1'b1, rsp_m.pop_front()};
      end else if (rq_m.size() == 0) begin
        d = '0; n_empty_rd++;
      end else begin
        d = rq_m[0][32*rq_w +: 32];
        rq_w++;
        if (rq_w == 4) begin rq_w = 0; void'(rq_m.pop_front()); end
      end
      rexp.push_back('{d, s_arid});
    end
    if (s_rvalid && s_rready) begin
      check(rexp.size() > 0, "read data with a read outstanding");
      if (rexp.size() > 0) begin
        check(s_rdata == rexp[0].data, "read data");
        check(s_rid == rexp[0].id && s_rlast && s_rresp == 2'b00, "read ID, RLAST and OKAY");
        void'(rexp.pop_front());
      end
    end
    if (hv && hr) begin mon_hdr = exa_hdr_t'(exa_data); mon_pld = '0; mon_first = 1; end
    if (pv && pr) begin if (mon_first) mon_pld = exa_data; mon_first = 0; end
    if (fv && fr) begin
      n_rcvd++;
      if (4'(mon_hdr.ptype) == 4'd2) begin
        rq_m.push_back({mon_hdr.pdid, mon_pld[111:0]});
        if (mon_pld[127:112] != mon_hdr.pdid) n_pdid++;
      end else rsp_m.push_back(mon_pld[29:0]);
    end
  end

  // ------------------------------------------------------------ sender
  task automatic beat(input int k, input logic [DATA_W-1:0] d);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    @(negedge clk);
    exa_data = d;
    if (k == 0) hv = 1; else if (k == 1) pv = 1; else fv = 1;
    while (!((k == 0) ? hr : (k == 1) ? pr : fr)) @(negedge clk);
    @(posedge clk);
    #1 hv = 0; pv = 0; fv = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      automatic exa_hdr_t h = '0;
      automatic int n = $urandom_range(0, 4);
      h.ptype = ($urandom_range(0, 1) == 0) ? pkt_type_e'(4'd2) : PT_DMA_CTRL;
      h.pld_words = 5'(n);
      h.pdid = 16'($urandom);
      h.dst = {$urandom, $urandom};
      beat(0, DATA_W'(h));
      for (int w = 0; w < n; w++) beat(1, {$urandom, $urandom, $urandom, $urandom});
      beat(2, {$urandom, $urandom, $urandom, $urandom});
    end
    send_done = 1;
  end

  // ------------------------------------------------------------ reader
  initial begin
    repeat (300) @(posedge clk);
    rd_on = 1;
  end

  always @(negedge clk) begin
    s_rready = ($urandom_range(0, 2) != 0);
    if (s_arvalid && s_arready) begin
      // accepted at the coming edge: nothing to change yet
    end else if (!s_arvalid && rd_on && $urandom_range(0, 1) == 0) begin
      s_arvalid = 1;
      s_araddr  = ($urandom_range(0, 1) == 0) ? 5'h10 : 5'h00;
      s_arid    = 6'($urandom);
    end
  end
  always @(posedge clk) if (s_arvalid && s_arready) #1 s_arvalid = 0;

  initial begin
    wait (send_done);
    while (rq_m.size() > 0 || rsp_m.size() > 0 || rexp.size() > 0) @(posedge clk);
    repeat (10) @(posedge clk);
    check(n_rcvd == NPKT, "all packets received");
    check(n_full > 0, "header held off by a full queue");
    check(n_empty_rd > 0, "read of an empty queue");
    check(n_rq_bit > 0, "request-waiting bit seen on a response read");
    check(n_pdid > 0, "PDID taken from the header");
    $display("packets=%0d reads=%0d full=%0d empty=%0d rqbit=%0d", n_rcvd, n_reads, n_full, n_empty_rd, n_rq_bit);
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
