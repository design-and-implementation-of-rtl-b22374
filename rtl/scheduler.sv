// scheduler: round-robin packet scheduler of the ExaDMA send unit.
//
// Active transactions are kept as transaction IDs in a round-robin FIFO
// (NUM_TID deep, so every ID fits once). One scheduling cycle serves one
// packet of the transaction at the head:
//   idle -> rd_desc   pop an ID and read its 256-bit descriptor on port B
//   decode_desc       pick the output buffer from the descriptor's path field;
//                     with no free slot there the ID goes back to the tail
//                     (no head-of-line blocking) and the next ID is read.
//                     Otherwise allocate the slot, write the packet header and
//                     footer into it and push an alignment command into the
//                     barrel shifter queue of the transaction's channel.
//   rd_pckt(,rd_pckt2) issue the AXI read of the packet's source bytes, split
//                     in two bursts when it would cross a 4 KiB boundary
//   wb_desc           write back bytes_sent (and done on the last packet), then
//                     re-enqueue the ID, or on the last packet enqueue the
//                     chained dependant if there is one.
// A packet carries min(remaining bytes, 256 - dst[7:0]) bytes, so only the
// first packet can be short and all later ones start on a 256-byte boundary of
// the destination; no packet crosses a 4 KiB destination boundary. The read
// covers the 16-byte words holding the source bytes plus, when the source
// offset in its word is not below the destination offset, one more word, so
// that the barrel shifter emits one output word for each read beat after the
// first. The AXI ID is the low 3 bits of the protection domain; it also selects
// the barrel shifter channel.
// A page fault reported by an output buffer (pf_valid/pf_tid) is served from
// idle: the descriptor's error bit (word 2 bit 60) is set, and the ID is then
// dropped when it next reaches decode.
// All of the above follows the specified FSM; the page-fault states, the error
// bit position and the treatment of a descriptor that is done, in error or has
// an out-of-range path (dropped) are this design's choices.
module scheduler
  import exadma_pkg::*;
#(
  parameter int unsigned NUM_TID = 1024,
  parameter int unsigned NUM_OUT = 3
) (
  input  logic clk,
  input  logic rst_n,
  // from the pending list
  input  logic                       enque,
  input  logic [$clog2(NUM_TID)-1:0] tid,
  output logic                       enque_ready,
  output logic [$clog2(NUM_TID)-1:0] addr_to_pendlist,
  output logic                       we_to_pendlist,
  output logic [255:0]               data_to_pendlist,
  input  logic [255:0]               data_from_pendlist,
  input  logic [COORD_W-1:0]         src_coord,
  // output buffers
  input  logic [NUM_OUT-1:0]         slot_available,
  input  logic [SLOT_W-1:0]          slot_id [NUM_OUT],
  output logic [4:0]                 buffer_select,
  output logic                       slot_set,
  output logic [4:0]                 pckt_len,      // payload words 1..16
  output logic [2*DATA_W-1:0]        hdft_data,     // {footer, header}
  output logic                       hdft_we,
  output logic [SLOT_W-1:0]          hdft_slot,
  input  logic [NUM_OUT-1:0]         pf_valid,
  input  logic [9:0]                 pf_tid [NUM_OUT],
  output logic [NUM_OUT-1:0]         pf_ack,
  // barrel shifter command queues
  output logic                       bs_cntrl_enque,
  output logic [CH_W-1:0]            bs_cntrl_ch,
  output bs_cmd_t                    bs_cntrl_data,
  // AXI-4 master read address channel
  output logic                       m_arvalid,
  input  logic                       m_arready,
  output logic [ADDR_W-1:0]          m_araddr,
  output logic [7:0]                 m_arlen,
  output logic [2:0]                 m_arsize,
  output logic [1:0]                 m_arburst,
  output logic [CH_W-1:0]            m_arid
);
  localparam int unsigned TW = $clog2(NUM_TID);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_DESC, S_DECODE, S_RD_PCKT, S_RD_PCKT2, S_WB_DESC, S_PF_RD, S_PF_WB
  } state_e;
  state_e state;

  // ------------------------------------------------------------ round-robin FIFO
  logic          rr_push, rr_pop, rr_empty, rr_full;
  logic [TW-1:0] rr_din, rr_dout;
  logic [TW:0]   rr_count;

  sync_fifo #(.WIDTH(TW), .DEPTH(NUM_TID)) u_rr (
    .clk, .rst_n,
    .wr_en(rr_push), .wr_data(rr_din),
    .rd_en(rr_pop), .rd_data(rr_dout),
    .empty(rr_empty), .full(rr_full), .count(rr_count)
  );

  // ------------------------------------------------------------ registers
  logic [TW-1:0]       cur_tid;
  desc_t               wb_q;          // descriptor to write back
  logic                last_q;
  logic [ADDR_W-1:0]   ar1_addr_q, ar2_addr_q;
  logic [4:0]          ar1_len_q, ar2_len_q;
  logic                cross_q;
  logic [CH_W-1:0]     arid_q;

  // ------------------------------------------------------------ packet computation
  desc_t        d;
  logic [14:0]  rem;
  logic [63:0]  cur_dst, cur_src;
  logic [8:0]   room, plen;
  logic [3:0]   dst_off, src_off;
  logic [4:0]   n_out, n_rd;
  logic         lead;
  logic [ADDR_W-1:0] rd_base;
  logic [8:0]   to_4k;              // words left before the 4 KiB boundary
  logic         cross4k;
  logic [4:0]   len1;
  logic         first, last, drop, path_ok;
  exa_hdr_t     hdr;
  exa_ftr_t     ftr;
  logic [SLOT_W-1:0] sel_slot;
  logic         sel_avail;
  logic         pf_any;
  logic [$clog2(NUM_OUT+1)-1:0] pf_sel;

  always_comb begin
    d        = desc_t'(data_from_pendlist);
    rem      = d.length - d.bytes_sent;
    cur_dst  = d.dst_va + 64'(d.bytes_sent);
    cur_src  = d.src_va + 64'(d.bytes_sent);
    room     = 9'd256 - {1'b0, cur_dst[7:0]};
    plen     = (rem < 15'(room)) ? rem[8:0] : room;
    dst_off  = cur_dst[3:0];
    src_off  = cur_src[3:0];
    n_out    = 5'((10'(dst_off) + 10'(plen) - 10'd1) >> 4) + 5'd1;
    lead     = (src_off >= dst_off);
    n_rd     = n_out + 5'(lead);
    rd_base  = {cur_src[ADDR_W-1:4], 4'b0};
    to_4k    = 9'd256 - {1'b0, rd_base[11:4]};
    cross4k    = (9'(n_rd) > to_4k);
    len1     = cross4k ? to_4k[4:0] : n_rd;
    first    = (d.bytes_sent == 15'd0);
    last     = (rem == 15'(plen));
    path_ok  = (32'(d.path) < NUM_OUT);
    drop     = d.done || d.err_rsv[0] || (rem == 15'd0) || (d.length > 15'(MAX_LEN)) || !path_ok;

    sel_slot  = '0;
    sel_avail = 1'b0;
    for (int n = 0; n < NUM_OUT; n++)
      if (d.path == 5'(n)) begin
        sel_slot  = slot_id[n];
        sel_avail = slot_available[n];
      end

    hdr           = '0;
    hdr.dst       = cur_dst;
    hdr.pdid      = d.pdid;
    hdr.src_coord = src_coord;
    hdr.ptype     = PT_RDMA_WRITE;
    hdr.pld_words = n_out;
    ftr           = '0;
    ftr.tid       = 10'(cur_tid);
    ftr.seq       = d.seq;
    ftr.first     = first;
    ftr.last      = last;
    ftr.notify    = d.send_notify;
    ftr.pld_bytes = plen;

    pf_any = |pf_valid;
    pf_sel = '0;
    for (int n = NUM_OUT - 1; n >= 0; n--)
      if (pf_valid[n]) pf_sel = ($bits(pf_sel))'(n);
  end

  // ------------------------------------------------------------ outputs
  logic go_decode_ok;
  assign go_decode_ok = (state == S_DECODE) && !drop && sel_avail;

  assign buffer_select  = d.path;
  assign slot_set       = go_decode_ok;
  assign pckt_len       = n_out;
  assign hdft_we        = go_decode_ok;
  assign hdft_slot      = sel_slot;
  assign hdft_data      = {ftr, hdr};
  assign bs_cntrl_enque = go_decode_ok;
  assign bs_cntrl_ch    = d.pdid[CH_W-1:0];
  always_comb begin
    bs_cntrl_data          = '0;
    bs_cntrl_data.path     = d.path;
    bs_cntrl_data.slot     = sel_slot;
    bs_cntrl_data.rot      = src_off - dst_off;
    bs_cntrl_data.lead     = lead;
    bs_cntrl_data.rd_words = n_rd;
    bs_cntrl_data.dst_off  = dst_off;
    bs_cntrl_data.nbytes   = plen;
  end

  assign m_arvalid = (state == S_RD_PCKT) || (state == S_RD_PCKT2);
  assign m_araddr  = (state == S_RD_PCKT2) ? ar2_addr_q : ar1_addr_q;
  assign m_arlen   = 8'((state == S_RD_PCKT2) ? ar2_len_q : ar1_len_q) - 8'd1;
  assign m_arsize  = 3'd4;      // 16 bytes per beat
  assign m_arburst = 2'b01;     // INCR
  assign m_arid    = arid_q;

  // port B of the descriptor RAM
  always_comb begin
    addr_to_pendlist = cur_tid;
    we_to_pendlist   = 1'b0;
    data_to_pendlist = wb_q;
    unique case (state)
      S_RD_DESC: addr_to_pendlist = rr_dout;
      S_PF_RD:   addr_to_pendlist = TW'(pf_tid[pf_sel]);
      S_WB_DESC: we_to_pendlist = 1'b1;
      S_PF_WB: begin
        addr_to_pendlist = TW'(pf_tid[pf_sel]);
        we_to_pendlist   = 1'b1;
        data_to_pendlist = data_from_pendlist;
        data_to_pendlist[128 + 60] = 1'b1;    // error bit of word 2
      end
      default: ;
    endcase
  end

  // round-robin FIFO pushes: own re-enqueue first, then the pending list
  logic self_push;
  logic [TW-1:0] self_din;
  always_comb begin
    self_push = 1'b0;
    self_din  = cur_tid;
    if (state == S_DECODE && !drop && !sel_avail) self_push = 1'b1;
    if (state == S_WB_DESC) begin
      if (!last_q) self_push = 1'b1;
      else if (wb_q.chained) begin
        self_push = 1'b1;
        self_din  = TW'(wb_q.dep_id);
      end
    end
  end
  assign enque_ready = !rr_full && (state != S_DECODE) && (state != S_WB_DESC);
  assign rr_push = self_push || (enque && enque_ready);
  assign rr_din  = self_push ? self_din : tid;
  assign rr_pop  = (state == S_RD_DESC);

  always_comb begin
    pf_ack = '0;
    if (state == S_PF_WB) pf_ack[pf_sel] = 1'b1;
  end

  // ------------------------------------------------------------ FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur_tid    <= '0;
      wb_q       <= '0;
      last_q     <= 1'b0;
      ar1_addr_q <= '0;
      ar2_addr_q <= '0;
      ar1_len_q  <= '0;
      ar2_len_q  <= '0;
      cross_q    <= 1'b0;
      arid_q     <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (pf_any) state <= S_PF_RD;
          else if (!rr_empty) state <= S_RD_DESC;
        S_RD_DESC: begin
          cur_tid <= rr_dout;
          state   <= S_DECODE;
        end
        S_DECODE: begin
          if (drop) begin
            state <= S_IDLE;
          end else if (!sel_avail) begin
            state <= pf_any ? S_IDLE : S_RD_DESC;
          end else begin
            wb_q            <= d;
            wb_q.bytes_sent <= d.bytes_sent + 15'(plen);
            wb_q.done       <= last;
            last_q          <= last;
            ar1_addr_q      <= rd_base;
            ar1_len_q       <= len1;
            ar2_addr_q      <= rd_base + (ADDR_W'(len1) << 4);
            ar2_len_q       <= n_rd - len1;
            cross_q         <= cross4k;
            arid_q          <= d.pdid[CH_W-1:0];
            state           <= S_RD_PCKT;
          end
        end
        S_RD_PCKT:
          if (m_arready) state <= cross_q ? S_RD_PCKT2 : S_WB_DESC;
        S_RD_PCKT2:
          if (m_arready) state <= S_WB_DESC;
        S_WB_DESC:
          state <= (!pf_any && (!rr_empty || self_push)) ? S_RD_DESC : S_IDLE;
        S_PF_RD:
          state <= S_PF_WB;
        S_PF_WB:
          state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen));
  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid |-> (m_arlen < 8'd17));

endmodule
