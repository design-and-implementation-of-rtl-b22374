// tb_exacrossb: self-checking testbench of the 16 x 16 ExaNet crossbar.
//
// Sixteen senders each send packets (header, 0 to 3 payload words, footer)
// to random destinations: another QFDB, another FPGA of the same QFDB, or this
// FPGA with a random address region. Each beat is held until its ready.
// Sixteen receivers raise and drop their ready signals at random and rebuild
// every packet. A model computes the output each packet must leave on from
// the routing rules, independently of the crossbar, and keeps per input and
// output the packets in sending order; every received packet must be the next
// one expected from its input (marked in the header) on that output, with
// all its words intact. The run has two phases: this FPGA as F1 (router ports
// chosen by input port) and as another FPGA (remote traffic to the F1
// transceiver). Checked timing: at least two idle cycles between packets on an
// output (exactly two seen at least once) and a header latency of at least
// one cycle (exactly one seen). Contention for an output must occur. A
// watchdog stops the run if it hangs.
module tb_exacrossb;
  import exadma_pkg::*;

  localparam int N  = 16;
  localparam int NP = 25;     // packets per input and phase

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [COORD_W-1:0] my_coord = {20'hA5C3E, 2'd0};
  logic [DATA_W-1:0]  in_data [N], out_data [N];
  logic [N-1:0] ihv = '0, ihr, ipv = '0, ipr, ifv = '0, ifr;
  logic [N-1:0] ohv, ohr = '0, opv, opr = '0, ofv, ofr = '0;

  exacrossb #(.NPORTS(N), .F1_OFFSET(2'd0), .GAP(2)) dut (
    .clk, .rst_n, .my_coord,
    .in_data, .in_header_valid(ihv), .in_header_ready(ihr),
    .in_payload_valid(ipv), .in_payload_ready(ipr),
    .in_footer_valid(ifv), .in_footer_ready(ifr),
    .out_data, .out_header_valid(ohv), .out_header_ready(ohr),
    .out_payload_valid(opv), .out_payload_ready(opr),
    .out_footer_valid(ofv), .out_footer_ready(ofr)
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

  function automatic int exp_route(input int i, input logic [21:0] me, input logic [63:0] dst);
    logic [21:0] dc = dst[63:42];
    if (dc[21:2] != me[21:2]) return (me[1:0] != 2'd0) ? 0 : ((i < 4) ? 4 + i : 4);
    if (dc[1:0] != me[1:0]) return int'(dc[1:0]);
    return 8 + int'(dst[41:39]);
  endfunction

  typedef logic [DATA_W-1:0] pkt_t [$];
  pkt_t   expq [N][N][$];     // [output][input] packets in order
  int     n_sent = 0, n_rcvd = 0, n_gap2 = 0, n_lat1 = 0, n_cont = 0;
  longint hdr_start [N];
  longint last_ftr [N];
  bit     ihv_prev [N];
  pkt_t   cur [N];
  int     cur_in [N];

  // ---------------------------------------------------------------- receivers
  always @(posedge clk) begin
    for (int o = 0; o < N; o++) begin
      ohr[o] <= ($urandom_range(0, 3) != 0);
      opr[o] <= ($urandom_range(0, 3) != 0);
      ofr[o] <= ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    automatic int reqs [N];
    for (int o = 0; o < N; o++) reqs[o] = 0;
    for (int i = 0; i < N; i++) begin
      if (ihv[i] && !ihv_prev[i]) hdr_start[i] = cyc;
      ihv_prev[i] = ihv[i];
      if (ihv[i] && !ihr[i]) reqs[exp_route(i, my_coord, in_data[i][63:0])]++;
    end
    for (int o = 0; o < N; o++) if (reqs[o] > 1) n_cont++;
    for (int o = 0; o < N; o++) begin
      if (ohv[o] && ohr[o]) begin
        automatic exa_hdr_t h = exa_hdr_t'(out_data[o]);
        automatic int i = int'(h.pdid[15:12]);
        check(cyc - last_ftr[o] >= 3, "two idle cycles between packets");
        if (cyc - last_ftr[o] == 3) n_gap2++;
        check(cyc - hdr_start[i] >= 1, "header latency at least one cycle");
        if (cyc - hdr_start[i] == 1) n_lat1++;
        cur[o] = {};
        cur[o].push_back(out_data[o]);
        cur_in[o] = i;
      end
      if (opv[o] && opr[o]) cur[o].push_back(out_data[o]);
      if (ofv[o] && ofr[o]) begin
        automatic int i = cur_in[o];
        cur[o].push_back(out_data[o]);
        last_ftr[o] = cyc;
        n_rcvd++;
        check(expq[o][i].size() > 0, "packet expected on this output from this input");
        if (expq[o][i].size() > 0) begin
          automatic pkt_t e = expq[o][i].pop_front();
          check(e == cur[o], "packet contents and order");
        end
      end
    end
  end

  // ---------------------------------------------------------------- senders
  task automatic beat(input int i, input int k, input logic [DATA_W-1:0] d);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    @(negedge clk);
    in_data[i] = d;
    if (k == 0) ihv[i] = 1; else if (k == 1) ipv[i] = 1; else ifv[i] = 1;
    while (!((k == 0) ? ihr[i] : (k == 1) ? ipr[i] : ifr[i])) @(negedge clk);
    @(posedge clk);
    #1 ihv[i] = 0; ipv[i] = 0; ifv[i] = 0;
  endtask

  task automatic sender(input int i, input int seq0);
    for (int p = 0; p < NP; p++) begin
      automatic exa_hdr_t h = '0;
      automatic logic [21:0] dc = my_coord;
      automatic int cat = $urandom_range(0, 2);
      automatic int n = $urandom_range(0, 3);
      automatic pkt_t pk;
      automatic int o;
      if (cat == 0) dc[21:2] = my_coord[21:2] ^ 20'($urandom_range(1, 1023));
      if (cat <= 1) dc[1:0] = 2'($urandom);
      if (cat == 1 && dc[1:0] == my_coord[1:0]) dc[1:0] = dc[1:0] + 2'd1;
      h.dst = {dc, 42'({$urandom, $urandom})};
      h.pdid = {4'(i), 12'(seq0 + p)};
      h.ptype = PT_RDMA_WRITE;
      h.pld_words = 5'(n);
      pk.push_back(DATA_W'(h));
      for (int w = 0; w < n; w++) pk.push_back({$urandom, $urandom, $urandom, $urandom});
      pk.push_back({$urandom, $urandom, $urandom, $urandom});
      o = exp_route(i, my_coord, h.dst);
      expq[o][i].push_back(pk);
      n_sent++;
      beat(i, 0, pk[0]);
      for (int w = 0; w < n; w++) beat(i, 1, pk[1 + w]);
      beat(i, 2, pk[n + 1]);
    end
  endtask

  function automatic bit drained();
    for (int o = 0; o < N; o++) for (int i = 0; i < N; i++) if (expq[o][i].size() > 0) return 0;
    return 1;
  endfunction

  initial begin
    foreach (in_data[i]) in_data[i] = '0;
    foreach (last_ftr[o]) last_ftr[o] = -10;
    foreach (hdr_start[i]) hdr_start[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 2; ph++) begin
      if (ph == 1) my_coord = {20'hA5C3E, 2'd2};
      for (int i = 0; i < N; i++) begin
        fork
          automatic int ii = i;
          automatic int s0 = ph * NP;
          sender(ii, s0);
        join_none
      end
      wait fork;
      while (!drained()) @(posedge clk);
      repeat (5) @(posedge clk);
    end
    check(n_rcvd == n_sent && n_sent == 2 * N * NP, "all packets delivered");
    check(n_gap2 > 0, "back-to-back packets with two idle cycles");
    check(n_lat1 > 0, "one-cycle header latency");
    check(n_cont > 0, "contention for an output");
    $display("sent=%0d rcvd=%0d gap2=%0d lat1=%0d contention=%0d", n_sent, n_rcvd, n_gap2, n_lat1, n_cont);
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
