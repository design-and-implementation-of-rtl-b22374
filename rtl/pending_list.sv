// pending_list: ExaDMA register space - the table of transaction descriptors
// and the per-output control-packet registers, behind an AXI-4 slave port.
//
// Descriptor table. NUM_TID descriptors of 4 x 64-bit words (256 bits) are
// held in a true dual-port RAM. Port A belongs to the AXI slave; port B to
// the scheduler (addr_b/we_b/din_b/dout_b, one cycle read latency). Each
// descriptor occupies 32 bytes of the AXI space (address bits 14:5 are the
// transaction ID, bit 4 the 128-bit half, bits 3:0 the byte). Writes of 32, 64
// or 128 bits are taken through a 32-bit lane write enable driven by WSTRB, as
// the table is built from four 32-bit wide RAMs per 128-bit half. Writing the
// upper 32 bits of word 2 with its most significant bit (DB) clear starts the
// transaction: its ID is pushed into the scheduler's round-robin FIFO
// (enque/tid). If the scheduler cannot take it (enque_ready low), WREADY is
// held low. Word 3 (path, sequence number) has to be written before word 2 if
// it is used. Only single-beat AXI accesses are supported.
//
// Control packets. Each output n owns a 32 KiB window above the descriptor
// space (AXI address bits 16:15 = n+1; transaction ID in bits 14:5). Three
// 64-bit writes to the same address fill the two payload words of a control
// packet; on the third the header and footer are built from the descriptor of
// that transaction ID (read on port A), and pkt_slot_ready[n] rises. The
// output stage answers with pkt_slot_consume[n] once the packet is sent; a
// further write to that window before then is held off by WREADY.
//
// Write and read channels have separate FSMs (idle / wr_cntrl / wr_data /
// wr_ack and idle / rd_wait / rd_ready) that share port A, writes first. A
// read returns the addressed 128-bit half of a descriptor; the control-packet
// windows read as zero. Everything above follows the specified register map
// and FSMs; the ExaNet header/footer bit layout is defined in exadma_pkg.
module pending_list
  import exadma_pkg::*;
#(
  parameter int unsigned NUM_TID = 1024,
  parameter int unsigned NUM_OUT = 3,
  parameter int unsigned AXI_ID_W = 6,
  parameter int unsigned AXI_AW = 17
) (
  input  logic clk,
  input  logic rst_n,
  // AXI-4 slave, 128-bit data
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [AXI_AW-1:0]   s_awaddr,
  input  logic [AXI_ID_W-1:0] s_awid,
  input  logic                s_wvalid,
  output logic                s_wready,
  input  logic [DATA_W-1:0]   s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  output logic                s_bvalid,
  input  logic                s_bready,
  output logic [1:0]          s_bresp,
  output logic [AXI_ID_W-1:0] s_bid,
  input  logic                s_arvalid,
  output logic                s_arready,
  input  logic [AXI_AW-1:0]   s_araddr,
  input  logic [AXI_ID_W-1:0] s_arid,
  output logic                s_rvalid,
  input  logic                s_rready,
  output logic [DATA_W-1:0]   s_rdata,
  output logic [1:0]          s_rresp,
  output logic [AXI_ID_W-1:0] s_rid,
  output logic                s_rlast,
  // to the scheduler
  output logic                       enque,
  output logic [$clog2(NUM_TID)-1:0] tid,
  input  logic                       enque_ready,
  input  logic [$clog2(NUM_TID)-1:0] addr_b,
  input  logic                       we_b,
  input  logic [255:0]               din_b,
  output logic [255:0]               dout_b,
  // node coordinates, for control packet headers
  input  logic [COORD_W-1:0]         src_coord,
  // control packets, one per output
  output logic [NUM_OUT-1:0]         pkt_slot_ready,
  output logic [4*DATA_W-1:0]        pkt_data [NUM_OUT],
  input  logic [NUM_OUT-1:0]         pkt_slot_consume
);
  localparam int unsigned TW = $clog2(NUM_TID);

  // ------------------------------------------------------------ descriptor RAM
  logic [255:0]  ram [NUM_TID];
  logic [TW-1:0] addr_a;
  logic [7:0]    lane_we_a;   // eight 32-bit lanes of the 256-bit entry
  logic [255:0]  din_a, dout_a;

  always_ff @(posedge clk) begin
    if (we_b) ram[addr_b] <= din_b;
    for (int l = 0; l < 8; l++)
      if (lane_we_a[l]) ram[addr_a][32*l +: 32] <= din_a[32*l +: 32];
    dout_a <= ram[addr_a];
    dout_b <= ram[addr_b];
  end

  // ------------------------------------------------------------ write FSM
  typedef enum logic [1:0] {WR_IDLE, WR_CNTRL, WR_DATA, WR_ACK} wr_state_e;
  typedef enum logic [1:0] {RD_IDLE, RD_WAIT, RD_READY} rd_state_e;
  wr_state_e wr_state;
  rd_state_e rd_state;

  logic [AXI_AW-1:0]   aw_addr_q;
  logic [AXI_ID_W-1:0] aw_id_q;
  logic                aw_bank;
  logic [1:0]          aw_seg;      // 0: descriptors, n+1: control window of output n
  logic [TW-1:0]       aw_tid;
  logic                seg_ok;
  logic                trigger;
  logic                w_hs;
  logic [63:0]         w_chunk;

  assign aw_bank = aw_addr_q[4];
  assign aw_seg  = aw_addr_q[16:15];
  assign aw_tid  = aw_addr_q[TW+4:5];
  assign seg_ok  = (aw_seg != 2'd0) && (32'(aw_seg) <= NUM_OUT);
  // upper 32 bits of word 2 written with DB = 0
  assign trigger = aw_bank && (s_wstrb[7:4] != 4'b0) && !s_wdata[DB_BIT];
  assign w_chunk = (s_wstrb[15:8] != 8'b0) ? s_wdata[127:64] : s_wdata[63:0];

  // control packet state per output
  logic [1:0]          cp_stage [NUM_OUT];
  logic [DATA_W-1:0]   cp_pld   [NUM_OUT][2];
  logic [DATA_W-1:0]   cp_hdr   [NUM_OUT];
  logic [DATA_W-1:0]   cp_ftr   [NUM_OUT];
  logic                build_q;        // descriptor read for a control packet in flight
  logic [1:0]          build_port_q;
  logic [TW-1:0]       build_tid_q;

  logic cp_busy;
  assign cp_busy = seg_ok && pkt_slot_ready[aw_seg - 2'd1];

  always_comb begin
    s_wready = 1'b0;
    unique case (wr_state)
      WR_CNTRL: s_wready = !trigger || enque_ready;
      WR_DATA:  s_wready = !cp_busy;
      default:  s_wready = 1'b0;
    endcase
  end
  assign s_awready = (wr_state == WR_IDLE);
  assign s_bvalid  = (wr_state == WR_ACK);
  assign s_bresp   = 2'b00;
  assign s_bid     = aw_id_q;
  assign w_hs      = s_wvalid && s_wready;

  assign enque = (wr_state == WR_CNTRL) && w_hs && trigger;
  assign tid   = aw_tid;

  // port A: write FSM first, then the read FSM
  logic rd_issue;
  logic [AXI_AW-1:0] ar_addr_q;
  always_comb begin
    lane_we_a = '0;
    din_a     = {s_wdata, s_wdata};
    addr_a    = ar_addr_q[TW+4:5];
    rd_issue  = 1'b0;
    if (wr_state == WR_CNTRL || wr_state == WR_DATA) begin
      addr_a = aw_tid;
      if (wr_state == WR_CNTRL && w_hs)
        for (int l = 0; l < 4; l++)
          lane_we_a[4*aw_bank + l] = (s_wstrb[4*l +: 4] != 4'b0);
    end else if (wr_state == WR_IDLE && !s_awvalid && rd_state == RD_WAIT) begin
      rd_issue = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_state     <= WR_IDLE;
      aw_addr_q    <= '0;
      aw_id_q      <= '0;
      build_q      <= 1'b0;
      build_port_q <= '0;
      build_tid_q  <= '0;
      for (int n = 0; n < NUM_OUT; n++) begin
        cp_stage[n]       <= '0;
        pkt_slot_ready[n] <= 1'b0;
        cp_pld[n][0]      <= '0;
        cp_pld[n][1]      <= '0;
        cp_hdr[n]         <= '0;
        cp_ftr[n]         <= '0;
      end
    end else begin
      build_q <= 1'b0;
      for (int n = 0; n < NUM_OUT; n++)
        if (pkt_slot_consume[n]) pkt_slot_ready[n] <= 1'b0;

      unique case (wr_state)
        WR_IDLE: if (s_awvalid) begin
          aw_addr_q <= s_awaddr;
          aw_id_q   <= s_awid;
          wr_state  <= (s_awaddr[16:15] == 2'b00) ? WR_CNTRL : WR_DATA;
        end
        WR_CNTRL: if (w_hs) wr_state <= WR_ACK;
        WR_DATA: if (w_hs) begin
          wr_state <= WR_ACK;
          if (seg_ok) begin
            automatic int unsigned p = 32'(aw_seg) - 1;
            unique case (cp_stage[p])
              2'd0: cp_pld[p][0][63:0]   <= w_chunk;
              2'd1: cp_pld[p][0][127:64] <= w_chunk;
              default: cp_pld[p][1]      <= {64'b0, w_chunk};
            endcase
            if (cp_stage[p] == 2'd2) begin
              cp_stage[p]  <= 2'd0;
              build_q      <= 1'b1;        // descriptor on dout_a next cycle
              build_port_q <= aw_seg - 2'd1;
              build_tid_q  <= aw_tid;
            end else begin
              cp_stage[p] <= cp_stage[p] + 2'd1;
            end
          end
        end
        WR_ACK: if (s_bready) wr_state <= WR_IDLE;
        default: wr_state <= WR_IDLE;
      endcase

      if (build_q) begin
        automatic desc_t    d = desc_t'(dout_a);
        automatic exa_hdr_t h = '0;
        automatic exa_ftr_t f = '0;
        h.dst       = d.dst_va;
        h.pdid      = d.pdid;
        h.src_coord = src_coord;
        h.ptype     = PT_DMA_CTRL;
        h.pld_words = 5'd2;
        f.tid       = 10'(build_tid_q);
        f.seq       = d.seq;
        f.notify    = 1'b1;
        f.pld_bytes = 9'd24;
        for (int n = 0; n < NUM_OUT; n++)
          if (build_port_q == 2'(n)) begin
            cp_hdr[n]         <= h;
            cp_ftr[n]         <= f;
            pkt_slot_ready[n] <= 1'b1;
          end
      end
    end
  end

  for (genvar n = 0; n < NUM_OUT; n++) begin : g_pkt
    assign pkt_data[n] = {cp_ftr[n], cp_pld[n][1], cp_pld[n][0], cp_hdr[n]};
  end

  // ------------------------------------------------------------ read FSM
  logic rd_issued_q;
  assign s_arready = (rd_state == RD_IDLE);
  assign s_rvalid  = (rd_state == RD_READY);
  assign s_rresp   = 2'b00;
  assign s_rlast   = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_state    <= RD_IDLE;
      ar_addr_q   <= '0;
      s_rid       <= '0;
      s_rdata     <= '0;
      rd_issued_q <= 1'b0;
    end else begin
      unique case (rd_state)
        RD_IDLE: if (s_arvalid) begin
          ar_addr_q <= s_araddr;
          s_rid     <= s_arid;
          rd_state  <= RD_WAIT;
        end
        RD_WAIT: begin
          if (rd_issued_q) begin
            rd_issued_q <= 1'b0;
            rd_state    <= RD_READY;
            if (ar_addr_q[16:15] != 2'b00) s_rdata <= '0;
            else s_rdata <= ar_addr_q[4] ? dout_a[255:128] : dout_a[127:0];
          end else if (rd_issue) begin
            rd_issued_q <= 1'b1;
          end
        end
        RD_READY: if (s_rready) rd_state <= RD_IDLE;
        default: rd_state <= RD_IDLE;
      endcase
    end
  end

  // AXI rules: a response stays valid until taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
