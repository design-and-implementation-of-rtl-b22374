// exadma: ExaDMA, the send unit of an RDMA engine for the ExaNet network.
//
// A controlling processor writes transaction descriptors (source address,
// destination global address, length up to 16 KiB, protection domain, output
// path, chaining) into the pending list over the AXI-4 slave port. Starting a
// transaction puts its ID into the scheduler's round-robin list; the scheduler
// serves the active transactions one packet at a time, reserving a slot in the
// output buffer of the transaction's path and issuing an AXI-4 read on the
// master port (AXI ID = protection-domain channel). Read data, possibly out of
// order across IDs, pass through the virtualized barrel shifter, which aligns
// them to the destination byte offset and fills the slot. Each output buffer
// hands its full slots, oldest first, to its ExaNetizer, which sends header,
// payload and footer on its ExaNet link. Control packets written through the
// AXI slave bypass the buffers and go straight to the ExaNetizer of their
// output, ahead of data packets. A read answered with SLVERR/DECERR (page
// fault) drops the packet and stops the transaction (error bit in the
// descriptor).
//
// Interface: AXI-4 slave (17-bit address: 32 KiB of descriptors, then one 32
// KiB control-packet window per output), AXI-4 read-only master (64-bit
// address, 128-bit data, 3-bit ID), NUM_OUT ExaNet transmit links (128-bit data
// with header/payload/footer valid-ready pairs), and the node's 22-bit source
// coordinates. One clock, active-low asynchronous reset.
// Beside the send unit, and sharing only its clock and reset, sits the mailbox
// of the real-time processor that drives it (rt_mailbox): it takes response and
// read-request packets from an ExaNet receive link (mb_exa_*) and lets the
// processor read them over a 32-bit AXI-4 read port (mb_*). Its ports are
// brought out unchanged; the receive path that feeds it is outside this unit.
// Likewise the network interface's 16-port ExaNet crossbar (exacrossb) stands
// beside them with its ports brought out (xb_*); it routes by the node's
// src_coord. Which of its ports the ExaDMA links and the mailbox attach to is
// a matter of the surrounding system and is left to the instantiating level.
// Structure and sizes (1024 descriptors, 8 shifter channels, 8 slots per
// buffer) follow the specification; NUM_OUT = 3 (one output per link to the
// three other FPGAs of a board) is this design's default.
module exadma
  import exadma_pkg::*;
#(
  parameter int unsigned NUM_TID  = 1024,
  parameter int unsigned NUM_OUT  = 3,
  parameter int unsigned SLOTS    = 8,
  parameter int unsigned AXI_ID_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [COORD_W-1:0]  src_coord,
  // AXI-4 slave: descriptor and control-packet space
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [16:0]         s_awaddr,
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
  input  logic [16:0]         s_araddr,
  input  logic [AXI_ID_W-1:0] s_arid,
  output logic                s_rvalid,
  input  logic                s_rready,
  output logic [DATA_W-1:0]   s_rdata,
  output logic [1:0]          s_rresp,
  output logic [AXI_ID_W-1:0] s_rid,
  output logic                s_rlast,
  // AXI-4 master: read channels only
  output logic                m_arvalid,
  input  logic                m_arready,
  output logic [ADDR_W-1:0]   m_araddr,
  output logic [7:0]          m_arlen,
  output logic [2:0]          m_arsize,
  output logic [1:0]          m_arburst,
  output logic [CH_W-1:0]     m_arid,
  input  logic                m_rvalid,
  output logic                m_rready,
  input  logic [DATA_W-1:0]   m_rdata,
  input  logic [CH_W-1:0]     m_rid,
  input  logic [1:0]          m_rresp,
  input  logic                m_rlast,
  // ExaNet transmit links
  output logic [DATA_W-1:0]   exa_data          [NUM_OUT],
  output logic [NUM_OUT-1:0]  exa_header_valid,
  input  logic [NUM_OUT-1:0]  exa_header_ready,
  output logic [NUM_OUT-1:0]  exa_payload_valid,
  input  logic [NUM_OUT-1:0]  exa_payload_ready,
  output logic [NUM_OUT-1:0]  exa_footer_valid,
  input  logic [NUM_OUT-1:0]  exa_footer_ready,
  // processor mailbox: ExaNet receive link and AXI-4 read port
  input  logic [DATA_W-1:0]   mb_exa_data,
  input  logic                mb_exa_header_valid,
  output logic                mb_exa_header_ready,
  input  logic                mb_exa_payload_valid,
  output logic                mb_exa_payload_ready,
  input  logic                mb_exa_footer_valid,
  output logic                mb_exa_footer_ready,
  input  logic                mb_arvalid,
  output logic                mb_arready,
  input  logic [4:0]          mb_araddr,
  input  logic [AXI_ID_W-1:0] mb_arid,
  output logic                mb_rvalid,
  input  logic                mb_rready,
  output logic [31:0]         mb_rdata,
  output logic [1:0]          mb_rresp,
  output logic [AXI_ID_W-1:0] mb_rid,
  output logic                mb_rlast,
  // network-interface crossbar (16 ExaNet ports)
  input  logic [DATA_W-1:0]   xb_in_data        [16],
  input  logic [15:0]         xb_in_header_valid,
  output logic [15:0]         xb_in_header_ready,
  input  logic [15:0]         xb_in_payload_valid,
  output logic [15:0]         xb_in_payload_ready,
  input  logic [15:0]         xb_in_footer_valid,
  output logic [15:0]         xb_in_footer_ready,
  output logic [DATA_W-1:0]   xb_out_data       [16],
  output logic [15:0]         xb_out_header_valid,
  input  logic [15:0]         xb_out_header_ready,
  output logic [15:0]         xb_out_payload_valid,
  input  logic [15:0]         xb_out_payload_ready,
  output logic [15:0]         xb_out_footer_valid,
  input  logic [15:0]         xb_out_footer_ready
);
  localparam int unsigned TW = $clog2(NUM_TID);

  // pending list <-> scheduler
  logic          enque, enque_ready;
  logic [TW-1:0] enq_tid, addr_b;
  logic          we_b;
  logic [255:0]  din_b, dout_b;
  // control packets
  logic [NUM_OUT-1:0]  pkt_slot_ready, pkt_slot_consume;
  logic [4*DATA_W-1:0] pkt_data [NUM_OUT];
  // scheduler <-> buffers
  logic [NUM_OUT-1:0]  slot_available, pf_valid, pf_ack;
  logic [SLOT_W-1:0]   slot_id [NUM_OUT];
  logic [9:0]          pf_tid  [NUM_OUT];
  logic [4:0]          buffer_select, pckt_len;
  logic                slot_set, hdft_we;
  logic [2*DATA_W-1:0] hdft_data;
  logic [SLOT_W-1:0]   hdft_slot;
  // scheduler -> shifter
  logic                bs_cntrl_enque;
  logic [CH_W-1:0]     bs_cntrl_ch;
  bs_cmd_t             bs_cntrl_data;
  // shifter -> buffers
  logic [NUM_OUT-1:0]        bs_we;
  logic [SLOT_W+WIDX_W-1:0]  bs_addr;
  logic [DATA_W-1:0]         bs_data;
  logic                      bs_err;

  pending_list #(.NUM_TID(NUM_TID), .NUM_OUT(NUM_OUT), .AXI_ID_W(AXI_ID_W), .AXI_AW(17)) u_pending_list (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_awaddr, .s_awid,
    .s_wvalid, .s_wready, .s_wdata, .s_wstrb,
    .s_bvalid, .s_bready, .s_bresp, .s_bid,
    .s_arvalid, .s_arready, .s_araddr, .s_arid,
    .s_rvalid, .s_rready, .s_rdata, .s_rresp, .s_rid, .s_rlast,
    .enque, .tid(enq_tid), .enque_ready,
    .addr_b, .we_b, .din_b, .dout_b,
    .src_coord,
    .pkt_slot_ready, .pkt_data, .pkt_slot_consume
  );

  scheduler #(.NUM_TID(NUM_TID), .NUM_OUT(NUM_OUT)) u_scheduler (
    .clk, .rst_n,
    .enque, .tid(enq_tid), .enque_ready,
    .addr_to_pendlist(addr_b), .we_to_pendlist(we_b),
    .data_to_pendlist(din_b), .data_from_pendlist(dout_b),
    .src_coord,
    .slot_available, .slot_id, .buffer_select, .slot_set, .pckt_len,
    .hdft_data, .hdft_we, .hdft_slot,
    .pf_valid, .pf_tid, .pf_ack,
    .bs_cntrl_enque, .bs_cntrl_ch, .bs_cntrl_data,
    .m_arvalid, .m_arready, .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arid
  );

  vbs #(.NUM_OUT(NUM_OUT), .CMD_DEPTH(32)) u_vbs (
    .clk, .rst_n,
    .cmd_enque(bs_cntrl_enque), .cmd_ch(bs_cntrl_ch), .cmd_data(bs_cntrl_data),
    .m_rvalid, .m_rready, .m_rdata, .m_rid, .m_rresp, .m_rlast,
    .bs_we, .bs_addr, .bs_data, .bs_err
  );

  for (genvar n = 0; n < NUM_OUT; n++) begin : g_out
    logic                      winner_exists, prio_dec;
    logic [SLOT_W-1:0]         winner, cur_slot, hf_addr;
    logic [SLOT_W:0]           winner_val, cur_prio;
    logic [SLOT_W+WIDX_W-1:0]  buff_addr;
    logic [DATA_W-1:0]         buff_dt;
    logic [2*DATA_W-1:0]       hdft_dt;
    logic                      sel;

    assign sel = (buffer_select == 5'(n));

    output_buffer #(.SLOTS(SLOTS)) u_output_buffer (
      .clk, .rst_n,
      .slot_available(slot_available[n]), .slot_id(slot_id[n]),
      .slot_set(slot_set && sel), .pckt_len,
      .hdft_we(hdft_we && sel), .hdft_slot, .hdft_data,
      .pf_valid(pf_valid[n]), .pf_tid(pf_tid[n]), .pf_ack(pf_ack[n]),
      .we_from_bs(bs_we[n]), .addr_from_bs(bs_addr), .dt_from_bs(bs_data), .err_from_bs(bs_err),
      .buffaddr_from_out(buff_addr), .hfaddr_from_out(hf_addr),
      .dt_to_out(buff_dt), .hdft_to_out(hdft_dt),
      .comp_winner(winner), .comp_winner_val(winner_val), .comp_winner_exists(winner_exists),
      .prio_cnt_decrement(prio_dec), .current_prio(cur_prio), .current_slot(cur_slot)
    );

    exanetizer u_exanetizer (
      .clk, .rst_n,
      .comp_winner_exists(winner_exists), .comp_winner(winner), .comp_winner_val(winner_val),
      .buff_addr, .hdft_addr(hf_addr), .buff_dt, .hdft_dt,
      .prio_cnt_decrement(prio_dec), .current_prio(cur_prio), .current_slot(cur_slot),
      .cntrl_pckt_ready(pkt_slot_ready[n]), .cntrl_data(pkt_data[n]),
      .cntrl_pckt_consume(pkt_slot_consume[n]),
      .exa_data(exa_data[n]),
      .exa_header_valid(exa_header_valid[n]), .exa_header_ready(exa_header_ready[n]),
      .exa_payload_valid(exa_payload_valid[n]), .exa_payload_ready(exa_payload_ready[n]),
      .exa_footer_valid(exa_footer_valid[n]), .exa_footer_ready(exa_footer_ready[n])
    );
  end

  rt_mailbox #(.AXI_ID_W(AXI_ID_W)) u_rt_mailbox (
    .clk, .rst_n,
    .exa_data(mb_exa_data),
    .exa_header_valid(mb_exa_header_valid), .exa_header_ready(mb_exa_header_ready),
    .exa_payload_valid(mb_exa_payload_valid), .exa_payload_ready(mb_exa_payload_ready),
    .exa_footer_valid(mb_exa_footer_valid), .exa_footer_ready(mb_exa_footer_ready),
    .s_arvalid(mb_arvalid), .s_arready(mb_arready), .s_araddr(mb_araddr), .s_arid(mb_arid),
    .s_rvalid(mb_rvalid), .s_rready(mb_rready), .s_rdata(mb_rdata), .s_rresp(mb_rresp),
    .s_rid(mb_rid), .s_rlast(mb_rlast)
  );

  exacrossb #(.NPORTS(16)) u_exacrossb (
    .clk, .rst_n, .my_coord(src_coord),
    .in_data(xb_in_data),
    .in_header_valid(xb_in_header_valid), .in_header_ready(xb_in_header_ready),
    .in_payload_valid(xb_in_payload_valid), .in_payload_ready(xb_in_payload_ready),
    .in_footer_valid(xb_in_footer_valid), .in_footer_ready(xb_in_footer_ready),
    .out_data(xb_out_data),
    .out_header_valid(xb_out_header_valid), .out_header_ready(xb_out_header_ready),
    .out_payload_valid(xb_out_payload_valid), .out_payload_ready(xb_out_payload_ready),
    .out_footer_valid(xb_out_footer_valid), .out_footer_ready(xb_out_footer_ready)
  );

endmodule
