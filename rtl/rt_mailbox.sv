// rt_mailbox: mailbox of the real-time (R5) processor of the network
// interface. It receives ExaNet packets and keeps them in two queues that the
// processor reads over a 32-bit AXI-4 slave read port:
//   * the response queue holds transaction responses (every packet type other
//     than read request), one 32-bit word per message;
//   * the read-request queue holds remote read requests, one 128-bit entry per
//     message, read as four 32-bit words.
// Two queues keep the two kinds of message independent: the processor can
// stop taking read requests (its own request list is full) and still drain
// responses, so a full request list cannot block the responses it waits for.
//
// Receiving (ExaNet side, same valid/ready protocol as the ExaNet transmit
// links): a header is accepted only while both queues have room, so a message
// is never lost; the payload words follow and the footer completes the packet,
// which is then pushed into its queue. Only the first payload word is kept.
//   response entry     = first payload word, bits 29:0
//   read-request entry = {header PDID, first payload word bits 111:0}
// The protection domain of a read request is taken from the packet header,
// which the sending node's hardware fills in, not from the user payload, so a
// process cannot ask for data of another protection domain.
//
// Reading (AXI side, single-beat reads, address bit 4 selects the queue):
//   0x00  response queue: returns {request_waiting, valid, entry[29:0]} and
//         removes the entry; valid = 0 when the queue was empty. Bit 31 tells
//         the processor whether the read-request queue holds anything, so it
//         can skip polling that queue.
//   0x10  read-request queue: returns the next 32-bit word of the head entry,
//         lowest word first; the entry is removed after its fourth word.
//         Reading an empty queue returns 0 and removes nothing.
// Timing: AR is accepted when no read data is waiting; RDATA follows one
// cycle later and is held until RREADY.
//
// Follows the specification: two FIFOs, one for read requests and one for
// responses; ExaNet in, AXI reads out; one response word removed per read and
// one request entry every four reads; the "request queue not empty" bit on
// response reads; the PDID built by the mailbox from the header. This
// design's own choices: the entry formats above, the packet type that marks a
// read request (RDREQ_TYPE), the address map, the read of an empty queue and
// the queue depths (512 entries, one block RAM each).
module rt_mailbox
  import exadma_pkg::*;
#(
  parameter int unsigned RQ_DEPTH    = 512,
  parameter int unsigned RSP_DEPTH   = 512,
  parameter logic [3:0]  RDREQ_TYPE  = 4'd2,
  parameter int unsigned AXI_ID_W    = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  // ExaNet receive link
  input  logic [DATA_W-1:0]   exa_data,
  input  logic                exa_header_valid,
  output logic                exa_header_ready,
  input  logic                exa_payload_valid,
  output logic                exa_payload_ready,
  input  logic                exa_footer_valid,
  output logic                exa_footer_ready,
  // AXI-4 slave, read channels (32-bit data)
  input  logic                s_arvalid,
  output logic                s_arready,
  input  logic [4:0]          s_araddr,
  input  logic [AXI_ID_W-1:0] s_arid,
  output logic                s_rvalid,
  input  logic                s_rready,
  output logic [31:0]         s_rdata,
  output logic [1:0]          s_rresp,
  output logic [AXI_ID_W-1:0] s_rid,
  output logic                s_rlast
);
  typedef enum logic [1:0] { RX_HDR, RX_PLD, RX_FTR } rx_e;
  rx_e rx_state;

  exa_hdr_t          hdr_q;
  logic [DATA_W-1:0] pld_q;
  logic [4:0]        left_q;   // payload words still to come
  logic              first_q;  // next payload word is the first

  logic              rq_full, rq_empty, rsp_full, rsp_empty;
  logic              rq_push, rq_pop, rsp_push, rsp_pop;
  logic [127:0]      rq_head;
  logic [29:0]       rsp_head;
  logic [1:0]        rq_word;

  exa_hdr_t          in_hdr;
  logic              is_rdreq;
  assign in_hdr   = exa_hdr_t'(exa_data);
  assign is_rdreq = (4'(hdr_q.ptype) == RDREQ_TYPE);

  // ------------------------------------------------------------ receive side
  assign exa_header_ready  = (rx_state == RX_HDR) && !rq_full && !rsp_full;
  assign exa_payload_ready = (rx_state == RX_PLD);
  assign exa_footer_ready  = (rx_state == RX_FTR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state <= RX_HDR;
      hdr_q    <= '0;
      pld_q    <= '0;
      left_q   <= '0;
      first_q  <= 1'b0;
    end else begin
      unique case (rx_state)
        RX_HDR: if (exa_header_valid && exa_header_ready) begin
          hdr_q    <= in_hdr;
          pld_q    <= '0;
          left_q   <= in_hdr.pld_words;
          first_q  <= 1'b1;
          rx_state <= (in_hdr.pld_words == 5'd0) ? RX_FTR : RX_PLD;
        end
        RX_PLD: if (exa_payload_valid) begin
          if (first_q) pld_q <= exa_data;
          first_q <= 1'b0;
          left_q  <= left_q - 5'd1;
          if (left_q == 5'd1) rx_state <= RX_FTR;
        end
        RX_FTR: if (exa_footer_valid) rx_state <= RX_HDR;
        default: rx_state <= RX_HDR;
      endcase
    end
  end

  assign rq_push  = (rx_state == RX_FTR) && exa_footer_valid && is_rdreq;
  assign rsp_push = (rx_state == RX_FTR) && exa_footer_valid && !is_rdreq;

  sync_fifo #(.WIDTH(128), .DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n,
    .wr_en(rq_push), .wr_data({hdr_q.pdid, pld_q[111:0]}),
    .rd_en(rq_pop), .rd_data(rq_head),
    .empty(rq_empty), .full(rq_full), .count()
  );

  sync_fifo #(.WIDTH(30), .DEPTH(RSP_DEPTH)) u_rsp (
    .clk, .rst_n,
    .wr_en(rsp_push), .wr_data(pld_q[29:0]),
    .rd_en(rsp_pop), .rd_data(rsp_head),
    .empty(rsp_empty), .full(rsp_full), .count()
  );

  // ------------------------------------------------------------ AXI read side
  logic ar_hs, sel_rq;
  assign s_arready = !s_rvalid;
  assign ar_hs     = s_arvalid && s_arready;
  assign sel_rq    = s_araddr[4];
  assign rsp_pop   = ar_hs && !sel_rq && !rsp_empty;
  assign rq_pop    = ar_hs && sel_rq && !rq_empty && (rq_word == 2'd3);
  assign s_rresp   = 2'b00;
  assign s_rlast   = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rid    <= '0;
      rq_word  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (ar_hs) begin
        s_rvalid <= 1'b1;
        s_rid    <= s_arid;
        if (!sel_rq) begin
          s_rdata <= rsp_empty ? {!rq_empty, 31'b0} : {!rq_empty, 1'b1, rsp_head};
        end else if (!rq_empty) begin
          s_rdata <= rq_head[32*rq_word +: 32];
          rq_word <= rq_word + 2'd1;
        end else begin
          s_rdata <= '0;
        end
      end
    end
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    !(rq_push && rq_full) && !(rsp_push && rsp_full));
  a_rdata_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
