// vbs: virtualized barrel shifter of the ExaDMA send unit.
//
// Read data come back from the AXI-4 master port with one of NUM_CH IDs (the
// protection domain's channel). Different IDs may return out of order and
// interleaved beat by beat, so the shifter keeps one small command FIFO and
// one state (beat counter, previous data word, fault flag) per channel and
// picks them with RID on every beat. A command (from the scheduler) describes
// one packet: its output buffer and slot, the rotation (src_off - dst_off) mod
// 16, whether the first beat only primes the shifter (lead, src_off >=
// dst_off), the number of read beats and the destination offset and byte
// count. Output word k of the packet is bytes rot..rot+15 of the 32-byte
// window {current beat, previous beat of the same channel}; it is produced on
// beat k+lead. Bytes outside the packet's destination range are zeroed, so the
// payload of every packet sits at the byte lanes of its destination address.
// A beat whose RRESP is SLVERR or DECERR (2 or 3, a page fault behind the
// SMMU) marks all following words of that packet as faulty; the output buffer
// then drops the packet. The burst is still taken in full.
// Timing: RREADY is always high; the beat is registered, then the shifted word
// is registered towards the output buffer, 2 cycles after the beat.
// The per-channel organisation, 8 channels and the pipelining follow the
// specification; the rotation scheme, the extra read word and the zeroing of
// unused bytes are this design's own.
module vbs
  import exadma_pkg::*;
#(
  parameter int unsigned NUM_OUT   = 3,
  parameter int unsigned CMD_DEPTH = 32
) (
  input  logic clk,
  input  logic rst_n,
  // commands from the scheduler
  input  logic               cmd_enque,
  input  logic [CH_W-1:0]    cmd_ch,
  input  bs_cmd_t            cmd_data,
  // AXI-4 master read data channel
  input  logic               m_rvalid,
  output logic               m_rready,
  input  logic [DATA_W-1:0]  m_rdata,
  input  logic [CH_W-1:0]    m_rid,
  input  logic [1:0]         m_rresp,
  input  logic               m_rlast,
  // to the output buffers
  output logic [NUM_OUT-1:0]        bs_we,
  output logic [SLOT_W+WIDX_W-1:0]  bs_addr,   // {slot, word}
  output logic [DATA_W-1:0]         bs_data,
  output logic                      bs_err
);
  localparam int unsigned CW = $bits(bs_cmd_t);

  assign m_rready = 1'b1;

  // ------------------------------------------------------------ command FIFOs
  logic [NUM_CH-1:0] f_push, f_pop, f_empty, f_full;
  logic [CW-1:0]     f_dout [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic [$clog2(CMD_DEPTH):0] cnt_unused;
    assign f_push[c] = cmd_enque && (cmd_ch == CH_W'(c));
    sync_fifo #(.WIDTH(CW), .DEPTH(CMD_DEPTH)) u_cmd (
      .clk, .rst_n,
      .wr_en(f_push[c]), .wr_data(cmd_data),
      .rd_en(f_pop[c]), .rd_data(f_dout[c]),
      .empty(f_empty[c]), .full(f_full[c]), .count(cnt_unused)
    );
  end

  // ------------------------------------------------------------ stage 1: register the beat
  logic              r_v;
  logic [CH_W-1:0]   r_id;
  logic [DATA_W-1:0] r_data;
  logic              r_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v    <= 1'b0;
      r_id   <= '0;
      r_data <= '0;
      r_err  <= 1'b0;
    end else begin
      r_v    <= m_rvalid;
      r_id   <= m_rid;
      r_data <= m_rdata;
      r_err  <= m_rresp[1];
    end
  end

  // ------------------------------------------------------------ stage 2: shift
  logic [4:0]        beat  [NUM_CH];
  logic [DATA_W-1:0] prev  [NUM_CH];
  logic              ferr  [NUM_CH];

  bs_cmd_t           cmd;
  logic [4:0]        i_beat;
  logic              emit, last_beat, err_now;
  logic [4:0]        k;
  logic [2*DATA_W-1:0] window;
  logic [DATA_W-1:0] shifted, masked;

  always_comb begin
    cmd       = bs_cmd_t'(f_dout[r_id]);
    i_beat    = beat[r_id];
    emit      = r_v && (!cmd.lead || i_beat != 5'd0);
    k         = i_beat - 5'(cmd.lead);
    last_beat = (i_beat == cmd.rd_words - 5'd1);
    err_now   = ferr[r_id] || r_err;
    window    = {r_data, prev[r_id]};
    shifted   = window[8*cmd.rot +: DATA_W];
    for (int j = 0; j < BYTES_W; j++) begin
      automatic int p = 16 * int'(k) + j;
      automatic bit in_range = (p >= int'(cmd.dst_off)) && (p < int'(cmd.dst_off) + int'(cmd.nbytes));
      masked[8*j +: 8] = in_range ? shifted[8*j +: 8] : 8'h00;
    end
    f_pop = '0;
    if (r_v && last_beat) f_pop[r_id] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CH; c++) begin
        beat[c] <= '0;
        prev[c] <= '0;
        ferr[c] <= 1'b0;
      end
      bs_we   <= '0;
      bs_addr <= '0;
      bs_data <= '0;
      bs_err  <= 1'b0;
    end else begin
      bs_we <= '0;
      if (r_v) begin
        prev[r_id] <= r_data;
        beat[r_id] <= last_beat ? 5'd0 : i_beat + 5'd1;
        ferr[r_id] <= last_beat ? 1'b0 : err_now;
        if (emit) begin
          for (int n = 0; n < NUM_OUT; n++)
            if (cmd.path == 5'(n)) bs_we[n] <= 1'b1;
          bs_addr <= {cmd.slot, k[WIDX_W-1:0]};
          bs_data <= masked;
          bs_err  <= err_now;
        end
      end
    end
  end

  // every beat belongs to a queued command; queues never overflow
  a_cmd_present: assert property (@(posedge clk) disable iff (!rst_n) r_v |-> !f_empty[r_id]);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) cmd_enque |-> !f_full[cmd_ch]);

endmodule
