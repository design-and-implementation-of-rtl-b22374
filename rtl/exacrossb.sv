// exacrossb: bufferless ExaNet crossbar of the network interface (16 x 16).
//
// Every port is an ExaNet link: a 128-bit data bus with header, payload and
// footer valid/ready pairs. A packet is a header, any number of payload words
// and a footer. The crossbar stores nothing: once an output is granted to an
// input, the input's valid signals and data are switched straight to the
// output and the output's ready signals straight back, until the footer
// handshake ends the packet. Back-pressure therefore reaches the sender, which
// has its own buffers.
//
// Routing (two levels, decided from the header on the input's data bus):
//   1. the destination QFDB (coordinate bits 21:2) differs from this node's:
//      - on an FPGA other than F1 (offset != F1_OFFSET) the packet goes to the
//        transceiver port of F1;
//      - on F1 it goes to a local port of the network router, chosen by the
//        input: from transceiver port k to router port k, from any other port
//        to router port 0, so traffic of different FPGAs does not block
//        each other;
//   2. only the FPGA offset (coordinate bits 1:0) differs: to the transceiver
//      port of that FPGA;
//   3. the coordinates match: to the NI peripheral port selected by the
//      destination address, bits 41:39 (eight regions).
// Port map: 0..3 transceivers to the FPGAs of offset 0..3 (the one of the own
// offset is the loop-back "dead" port), 4..7 network router local ports,
// 8..15 NI peripherals.
//
// Arbitration: each output has a round-robin arbiter over the inputs whose
// header requests it. A grant is registered, so a header reaches its output
// one cycle after it appears at the input; after each footer the output stays
// idle for two cycles before the next grant.
//
// Follows the specification: 16 ports, bufferless, two-level routing by
// coordinates then by address, the choice of router port by input port, four
// transceiver ports and four router ports, two idle cycles between packets.
// This design's own choices: the coordinate layout (offset in the two low
// bits), the port numbering, the address bits that select a peripheral, the
// round-robin arbiter, the one-cycle header latency (against two cycles of
// cut-through latency in the specification), and that every packet ends with
// a footer.
module exacrossb
  import exadma_pkg::*;
#(
  parameter int unsigned NPORTS    = 16,
  parameter logic [1:0]  F1_OFFSET = 2'd0,
  parameter int unsigned GAP       = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COORD_W-1:0]  my_coord,
  // inputs
  input  logic [DATA_W-1:0]   in_data          [NPORTS],
  input  logic [NPORTS-1:0]   in_header_valid,
  output logic [NPORTS-1:0]   in_header_ready,
  input  logic [NPORTS-1:0]   in_payload_valid,
  output logic [NPORTS-1:0]   in_payload_ready,
  input  logic [NPORTS-1:0]   in_footer_valid,
  output logic [NPORTS-1:0]   in_footer_ready,
  // outputs
  output logic [DATA_W-1:0]   out_data         [NPORTS],
  output logic [NPORTS-1:0]   out_header_valid,
  input  logic [NPORTS-1:0]   out_header_ready,
  output logic [NPORTS-1:0]   out_payload_valid,
  input  logic [NPORTS-1:0]   out_payload_ready,
  output logic [NPORTS-1:0]   out_footer_valid,
  input  logic [NPORTS-1:0]   out_footer_ready
);
  localparam int unsigned PW = $clog2(NPORTS);
  localparam int unsigned XCVR_BASE   = 0;
  localparam int unsigned ROUTER_BASE = 4;
  localparam int unsigned NI_BASE     = 8;

  // ---------------------------------------------------------------- routing
  logic [PW-1:0]     route    [NPORTS];
  logic [NPORTS-1:0] in_busy;              // input owns an output
  logic [NPORTS-1:0] req      [NPORTS];    // req[o][i]

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      automatic exa_hdr_t h = exa_hdr_t'(in_data[i]);
      automatic logic [COORD_W-1:0] dc = h.dst[63:42];
      if (dc[COORD_W-1:2] != my_coord[COORD_W-1:2]) begin
        if (my_coord[1:0] != F1_OFFSET) route[i] = PW'(XCVR_BASE + int'(F1_OFFSET));
        else if (i < 4)                 route[i] = PW'(ROUTER_BASE + i);
        else                            route[i] = PW'(ROUTER_BASE);
      end else if (dc[1:0] != my_coord[1:0]) begin
        route[i] = PW'(XCVR_BASE + int'(dc[1:0]));
      end else begin
        route[i] = PW'(NI_BASE + int'(h.dst[41:39]));
      end
    end
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = in_header_valid[i] && !in_busy[i] && (route[i] == PW'(o));
  end

  // ---------------------------------------------------------------- outputs
  logic [NPORTS-1:0] busy;
  logic [PW-1:0]     owner    [NPORTS];
  logic [PW-1:0]     rr_last  [NPORTS];
  logic [1:0]        gap_cnt  [NPORTS];
  logic [NPORTS-1:0] grant_v;
  logic [PW-1:0]     grant_i  [NPORTS];

  // round-robin pick, starting after the last granted input
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      grant_v[o] = 1'b0;
      grant_i[o] = '0;
      for (int k = 1; k <= NPORTS; k++) begin
        automatic logic [PW-1:0] c = PW'(int'(rr_last[o]) + k);
        if (!grant_v[o] && req[o][c]) begin
          grant_v[o] = 1'b1;
          grant_i[o] = c;
        end
      end
      if (busy[o] || gap_cnt[o] != 2'd0) grant_v[o] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int o = 0; o < NPORTS; o++) begin
        owner[o]   <= '0;
        rr_last[o] <= PW'(NPORTS - 1);
        gap_cnt[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (gap_cnt[o] != 2'd0) gap_cnt[o] <= gap_cnt[o] - 2'd1;
        if (grant_v[o]) begin
          busy[o]    <= 1'b1;
          owner[o]   <= grant_i[o];
          rr_last[o] <= grant_i[o];
        end else if (busy[o] && out_footer_valid[o] && out_footer_ready[o]) begin
          busy[o]    <= 1'b0;
          gap_cnt[o] <= 2'(GAP - 1);
        end
      end
    end
  end

  // ---------------------------------------------------------------- switch
  always_comb begin
    in_busy          = '0;
    in_header_ready  = '0;
    in_payload_ready = '0;
    in_footer_ready  = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_data[o]          = busy[o] ? in_data[owner[o]] : '0;
      out_header_valid[o]  = busy[o] && in_header_valid[owner[o]];
      out_payload_valid[o] = busy[o] && in_payload_valid[owner[o]];
      out_footer_valid[o]  = busy[o] && in_footer_valid[owner[o]];
      if (busy[o]) begin
        in_busy[owner[o]]          = 1'b1;
        in_header_ready[owner[o]]  = out_header_ready[o];
        in_payload_ready[owner[o]] = out_payload_ready[o];
        in_footer_ready[owner[o]]  = out_footer_ready[o];
      end
    end
  end

  // an input is granted at most one output at a time
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    for (genvar p = o + 1; p < NPORTS; p++) begin : g_pair
      a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
        !(busy[o] && busy[p] && owner[o] == owner[p]));
    end
  end
endmodule
