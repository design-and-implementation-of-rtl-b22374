// tb_pending_list: self-checking testbench of the descriptor table and
// control-packet registers behind the AXI-4 slave port.
//
// A model keeps the 256-bit descriptor of every transaction ID. The test:
//  1. writes random descriptors for 48 random IDs over AXI, word by word
//     (64-bit halves) or as 128-bit writes, with word 2 last. Its DB bit is
//     clear for most IDs, which must push exactly that ID to the scheduler
//     (enque/tid); with DB set nothing may be pushed. For some IDs the
//     scheduler side holds enque_ready low: the write must then stay
//     unfinished (WREADY low) until it is raised;
//  2. reads every written descriptor back over port B (one cycle latency) and
//     over AXI (128-bit halves), rewrites some through port B as the
//     scheduler's write-back does and reads those again over AXI;
//  3. builds a control packet on each output with three 64-bit writes and
//     checks pkt_slot_ready and the packet: header (control type, two payload
//     words, destination, protection domain and source coordinates from the
//     descriptor), payload words and footer (ID, sequence number, notify, 24
//     bytes). A further write to that window must be held off until the
//     output stage pulses pkt_slot_consume. The window reads as zero.
// A watchdog stops the run if it hangs.
module tb_pending_list;
  import exadma_pkg::*;

  localparam int NOUT = 3;
  localparam int NW   = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        s_awvalid = 0, s_awready, s_wvalid = 0, s_wready, s_bvalid, s_bready = 0;
  logic [16:0] s_awaddr = '0, s_araddr = '0;
  logic [5:0]  s_awid = '0, s_bid, s_arid = '0, s_rid;
  logic [127:0] s_wdata = '0, s_rdata;
  logic [15:0] s_wstrb = '0;
  logic [1:0]  s_bresp, s_rresp;
  logic        s_arvalid = 0, s_arready, s_rvalid, s_rready = 0, s_rlast;
  logic        enque, enque_ready = 1;
  logic [9:0]  tid, addr_b = '0;
  logic        we_b = 0;
  logic [255:0] din_b = '0, dout_b;
  logic [COORD_W-1:0] src_coord = 22'h2A_5C31;
  logic [NOUT-1:0] pkt_slot_ready, pkt_slot_consume = '0;
  logic [4*DATA_W-1:0] pkt_data [NOUT];

  pending_list #(.NUM_TID(1024), .NUM_OUT(NOUT), .AXI_ID_W(6), .AXI_AW(17)) dut (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_awid, .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_bid,
    .s_arvalid, .s_arready, .s_araddr, .s_arid,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp, .s_rid, .s_rlast,
    .enque, .tid, .enque_ready, .addr_b, .we_b, .din_b, .dout_b,
    .src_coord, .pkt_slot_ready, .pkt_data, .pkt_slot_consume
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic [255:0] model [1024];
  bit           written [1024];
  int           enq_q [$];
  int           n_held = 0, n_trig = 0;

  always @(posedge clk) if (rst_n && enque) begin
    check(enque_ready, "enque only while the scheduler is ready");
    enq_q.push_back(int'(tid));
  end

  task automatic axi_write(input logic [16:0] addr, input logic [127:0] data, input logic [15:0] strb);
    logic [5:0] id = 6'($urandom);
    @(posedge clk);
    s_awvalid <= 1; s_awaddr <= addr; s_awid <= id;
    do @(posedge clk); while (!s_awready);
    s_awvalid <= 0;
    s_wvalid <= 1; s_wdata <= data; s_wstrb <= strb;
    do @(posedge clk); while (!s_wready);
    s_wvalid <= 0;
    s_bready <= 1;
    do @(posedge clk); while (!s_bvalid);
    check(s_bid == id && s_bresp == 2'b00, "write response ID and OKAY");
    s_bready <= 0;
  endtask

  task automatic axi_read(input logic [16:0] addr, output logic [127:0] data);
    logic [5:0] id = 6'($urandom);
    @(posedge clk);
    s_arvalid <= 1; s_araddr <= addr; s_arid <= id;
    do @(posedge clk); while (!s_arready);
    s_arvalid <= 0;
    s_rready <= 1;
    do @(posedge clk); while (!s_rvalid);
    data = s_rdata;
    check(s_rid == id && s_rlast && s_rresp == 2'b00, "read response ID, RLAST and OKAY");
    s_rready <= 0;
  endtask

  task automatic write_desc(input int t, input logic [255:0] d, input bit as128);
    logic [16:0] base = {2'b00, 10'(t), 5'b0};
    if (as128) begin
      axi_write(base, d[127:0], 16'hFFFF);
      axi_write(base | 17'h10, d[255:128], 16'hFFFF);
    end else begin
      axi_write(base, {64'b0, d[63:0]}, 16'h00FF);
      axi_write(base | 17'h8, {d[127:64], 64'b0}, 16'hFF00);
      axi_write(base | 17'h18, {d[255:192], 64'b0}, 16'hFF00);
      axi_write(base | 17'h10, {64'b0, d[191:128]}, 16'h00FF);
    end
  endtask

  initial begin
    int tids [$];
    logic [127:0] rd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- 1. descriptors and triggers
    while (tids.size() < NW) begin
      automatic int t = $urandom_range(0, 1023);
      if (!written[t]) begin written[t] = 1; tids.push_back(t); end
    end
    foreach (tids[i]) begin
      automatic int t = tids[i];
      automatic logic [255:0] d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      automatic bit trig = ($urandom_range(0, 3) != 0);
      automatic bit hold = trig && ($urandom_range(0, 2) == 0);
      d[128 + DB_BIT] = !trig;
      model[t] = d;
      enq_q.delete();
      if (hold) begin
        automatic bit done = 0;
        @(negedge clk) enque_ready = 0;
        fork
          begin write_desc(t, d, i % 2 == 1); done = 1; end
          begin
            repeat (40) @(posedge clk);
            check(!done, "trigger write held while the scheduler is not ready");
            n_held++;
            @(negedge clk) enque_ready = 1;
          end
        join
      end else begin
        write_desc(t, d, i % 2 == 1);
      end
      repeat (2) @(posedge clk);
      if (trig) begin
        n_trig++;
        check(enq_q.size() == 1 && enq_q[0] == t, "starting write pushes its ID once");
      end else begin
        check(enq_q.size() == 0, "write with DB set pushes nothing");
      end
    end
    // ---------------- 2. port B and AXI read-back
    foreach (tids[i]) begin
      @(negedge clk) addr_b = 10'(tids[i]);
      @(negedge clk) check(dout_b == model[tids[i]], "port B read");
    end
    foreach (tids[i]) if (i % 3 == 0) begin
      automatic logic [255:0] d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      model[tids[i]] = d;
      @(negedge clk) begin addr_b = 10'(tids[i]); we_b = 1; din_b = d; end
      @(negedge clk) we_b = 0;
    end
    foreach (tids[i]) begin
      axi_read({2'b00, 10'(tids[i]), 5'h00}, rd);
      check(rd == model[tids[i]][127:0], "AXI read of words 0-1");
      axi_read({2'b00, 10'(tids[i]), 5'h10}, rd);
      check(rd == model[tids[i]][255:128], "AXI read of words 2-3");
    end
    // ---------------- 3. control packets
    for (int o = 0; o < NOUT; o++) begin
      automatic int t = tids[o];
      automatic logic [63:0] a = {$urandom, $urandom}, b = {$urandom, $urandom}, c = {$urandom, $urandom};
      automatic logic [16:0] addr = {2'(o + 1), 10'(t), 5'b0};
      automatic desc_t d = desc_t'(model[t]);
      automatic exa_hdr_t h;
      automatic exa_ftr_t f;
      automatic bit done = 0;
      check(pkt_slot_ready == '0, "no control packet pending");
      axi_write(addr, {64'b0, a}, 16'h00FF);
      axi_write(addr | 17'h8, {b, 64'b0}, 16'hFF00);
      check(pkt_slot_ready == '0, "control packet not ready before the third write");
      axi_write(addr, {64'b0, c}, 16'h00FF);
      repeat (3) @(posedge clk);
      check(pkt_slot_ready == NOUT'(1 << o), "control packet ready on its output");
      h = exa_hdr_t'(pkt_data[o][0 +: DATA_W]);
      f = exa_ftr_t'(pkt_data[o][3*DATA_W +: DATA_W]);
      check(h.ptype == PT_DMA_CTRL && h.pld_words == 5'd2, "control header type and size");
      check(h.dst == d.dst_va && h.pdid == d.pdid && h.src_coord == src_coord, "control header fields");
      check(pkt_data[o][DATA_W +: DATA_W] == {b, a}, "control payload word 0");
      check(pkt_data[o][2*DATA_W +: DATA_W] == {64'b0, c}, "control payload word 1");
      check(f.tid == 10'(t) && f.seq == d.seq && f.notify && f.pld_bytes == 9'd24, "control footer");
      fork
        begin axi_write(addr, {64'b0, a}, 16'h00FF); done = 1; end
        begin
          repeat (30) @(posedge clk);
          check(!done, "control write held while the packet is pending");
          @(negedge clk) pkt_slot_consume[o] = 1;
          @(negedge clk) pkt_slot_consume[o] = 0;
        end
      join
      check(done, "held control write completes after consume");
      axi_read(addr, rd);
      check(rd == '0, "control window reads zero");
      // finish the started packet and consume it
      axi_write(addr | 17'h8, {b, 64'b0}, 16'hFF00);
      axi_write(addr, {64'b0, c}, 16'h00FF);
      repeat (3) @(posedge clk);
      check(pkt_slot_ready[o], "second control packet ready");
      @(negedge clk) pkt_slot_consume[o] = 1;
      @(negedge clk) pkt_slot_consume[o] = 0;
    end
    check(n_held > 0, "enqueue back-pressure exercised");
    check(n_trig > 0, "triggers exercised");
    $display("held=%0d triggers=%0d", n_held, n_trig);
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
