// tb_vbs: self-checking testbench of the virtualized barrel shifter.
//
// Random packets (source offset, destination offset, byte count up to one
// 256-byte packet, output, slot, channel) are queued as commands exactly as
// the scheduler builds them. Their read data are then returned beat by beat,
// interleaved at random across the eight channels but in order within a
// channel, as an AXI interconnect may do. Source bytes are a hash of their
// address. For every beat that should produce an output word the expected
// buffer write (output, {slot, word}, data with unused bytes zero, fault flag)
// is queued and checked to appear exactly two cycles after the beat, which is
// the shifter's latency. Some packets get an SLVERR/DECERR beat; the fault flag
// must be set from that beat to the end of the packet and only there.
// A watchdog stops the run if it hangs.
module tb_vbs;
  import exadma_pkg::*;

  localparam int NOUT = 3;
  localparam int NPKT = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic               cmd_enque;
  logic [CH_W-1:0]    cmd_ch;
  bs_cmd_t            cmd_data;
  logic               m_rvalid, m_rready, m_rlast;
  logic [DATA_W-1:0]  m_rdata;
  logic [CH_W-1:0]    m_rid;
  logic [1:0]         m_rresp;
  logic [NOUT-1:0]    bs_we;
  logic [SLOT_W+WIDX_W-1:0] bs_addr;
  logic [DATA_W-1:0]  bs_data;
  logic               bs_err;

  vbs #(.NUM_OUT(NOUT), .CMD_DEPTH(32)) dut (
    .clk, .rst_n, .cmd_enque, .cmd_ch, .cmd_data,
    .m_rvalid, .m_rready, .m_rdata, .m_rid, .m_rresp, .m_rlast,
    .bs_we, .bs_addr, .bs_data, .bs_err
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

  function automatic logic [7:0] mem_byte(input longint a);
    return 8'((a * 131) ^ (a >> 7) ^ 8'h5A);
  endfunction

  // one packet as the test sees it
  typedef struct {
    longint src;
    int     dst_off, nbytes, path, slot, ch;
    int     n_rd, lead, fault_beat;
  } pkt_s;

  typedef struct {
    longint due;
    int     path;
    logic [SLOT_W+WIDX_W-1:0] addr;
    logic [DATA_W-1:0]        data;
    bit     err;
  } wr_s;

  pkt_s pq [NUM_CH][$];   // packets queued per channel, not yet returned
  wr_s  exp_q [$];
  int   n_fault = 0, n_lead0 = 0, n_lead1 = 0, n_inter = 0;

  function automatic pkt_s make_pkt(input int ch);
    pkt_s p;
    int n_out;
    p.src     = longint'({$urandom, $urandom}) & 64'h0000_00FF_FFFF_FFFF;
    p.dst_off = $urandom_range(0, 15);
    p.nbytes  = $urandom_range(1, 256 - p.dst_off);
    if ($urandom_range(0, 3) == 0) p.nbytes = 256 - p.dst_off;
    p.path    = $urandom_range(0, NOUT - 1);
    p.slot    = $urandom_range(0, 7);
    p.ch      = ch;
    n_out     = (p.dst_off + p.nbytes - 1) / 16 + 1;
    p.lead    = (int'(p.src & 15) >= p.dst_off);
    p.n_rd    = n_out + p.lead;
    p.fault_beat = ($urandom_range(0, 9) == 0) ? $urandom_range(0, p.n_rd - 1) : -1;
    return p;
  endfunction

  // expected byte j of output word k of packet p
  function automatic logic [DATA_W-1:0] exp_word(input pkt_s p, input int k);
    logic [DATA_W-1:0] w = '0;
    longint src_off = p.src & 15;
    for (int j = 0; j < 16; j++) begin
      int pos = 16 * k + j;
      if (pos >= p.dst_off && pos < p.dst_off + p.nbytes)
        w[8*j +: 8] = mem_byte(p.src + longint'(pos - p.dst_off));
    end
    return w;
  endfunction

  // checker: every write must be the next expected one, on its cycle
  always @(posedge clk) if (rst_n) begin
    if (exp_q.size() > 0 && exp_q[0].due == cyc) begin
      automatic wr_s e = exp_q.pop_front();
      check(bs_we == NOUT'(1 << e.path), "write on expected output");
      check(bs_addr == e.addr, "write address {slot,word}");
      check(bs_data == e.data, "aligned data");
      check(bs_err == e.err, "fault flag");
    end else begin

      check(bs_we == '0, "no unexpected write");
    end
  end

  initial begin
    pkt_s p;
    int   sent;
    m_rvalid = 0; m_rdata = '0; m_rid = '0; m_rresp = '0; m_rlast = 0;
    cmd_enque = 0; cmd_ch = '0; cmd_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    sent = 0;
    while (sent < NPKT) begin
      // queue a few commands
      for (int c = 0; c < NUM_CH; c++) begin
        if (pq[c].size() < 4 && $urandom_range(0, 1) == 1) begin
          p = make_pkt(c);
          pq[c].push_back(p);
          @(negedge clk);
          cmd_enque = 1;
          cmd_ch = CH_W'(c);
          cmd_data = '0;
          cmd_data.path     = 5'(p.path);
          cmd_data.slot     = SLOT_W'(p.slot);
          cmd_data.rot      = 4'(int'(p.src & 15) - p.dst_off);
          cmd_data.lead     = p.lead[0];
          cmd_data.rd_words = 5'(p.n_rd);
          cmd_data.dst_off  = 4'(p.dst_off);
          cmd_data.nbytes   = 9'(p.nbytes);
          @(negedge clk);
          cmd_enque = 0;
        end
      end
      // return the packets: beats of several channels interleaved
      begin
        int  beat [NUM_CH];
        bit  err  [NUM_CH];
        int  live;
        automatic int last_ch = -1;
        for (int c = 0; c < NUM_CH; c++) begin beat[c] = 0; err[c] = 0; end
        live = 0;
        for (int c = 0; c < NUM_CH; c++) if (pq[c].size() > 0) live++;
        while (live > 0) begin
          int c;
          do c = $urandom_range(0, NUM_CH - 1); while (pq[c].size() == 0);
          if (last_ch >= 0 && c != last_ch && beat[last_ch] != 0) n_inter++;
          last_ch = c;
          p = pq[c][0];
          @(negedge clk);
          if ($urandom_range(0, 3) == 0) begin
            m_rvalid = 0;
            @(negedge clk);
          end
          m_rvalid = 1;
          m_rid    = CH_W'(c);
          for (int j = 0; j < 16; j++)
            m_rdata[8*j +: 8] = mem_byte((p.src & ~longint'(15)) + 16 * beat[c] + j);
          m_rresp  = (beat[c] == p.fault_beat) ? 2'(2 + $urandom_range(0, 1)) : 2'b00;
          m_rlast  = (beat[c] == p.n_rd - 1);
          if (beat[c] == p.fault_beat) begin err[c] = 1; n_fault++; end
          if (p.lead == 0 || beat[c] != 0) begin
            wr_s e;
            automatic int k = beat[c] - p.lead;
            e.due  = cyc + 2;
            e.path = p.path;
            e.addr = {SLOT_W'(p.slot), WIDX_W'(k)};
            e.data = exp_word(p, k);
            e.err  = err[c];
            exp_q.push_back(e);
          end
          if (p.lead) n_lead1++; else n_lead0++;
          beat[c]++;
          if (beat[c] == p.n_rd) begin
            void'(pq[c].pop_front());
            beat[c] = 0; err[c] = 0;
            sent++;
            if (pq[c].size() == 0) live--;
          end
          @(posedge clk);
          #1 m_rvalid = 0;
        end
      end
    end
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all expected writes seen");
    check(m_rready == 1'b1, "RREADY high");
    check(n_fault > 0, "fault beat exercised");
    check(n_lead0 > 0 && n_lead1 > 0, "both shift directions exercised");
    check(n_inter > 0, "interleaving across channels exercised");
    $display("packets=%0d faults=%0d interleaves=%0d", sent, n_fault, n_inter);
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
