// exadma_pkg: types and constants shared by the ExaDMA RDMA send unit.
//
// The send unit moves RDMA transactions of 1 byte to 16 KiB from local memory
// (read over AXI-4) to the ExaNet network as packets of at most 256 payload
// bytes carried on a 128-bit datapath. The numbers below (1024 transaction
// descriptors, 8 protection-domain channels, 8 slots of 256 bytes per output
// buffer, 128-bit datapath, 80-bit global virtual address split 16/22/42) are
// the ones the design is specified with. The descriptor layout follows the
// specified register map; the bit layout of the ExaNet header and footer is this
// design's own, since only their content (destination address, flags
// first/last/notify, sequence number) is specified.
package exadma_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W     = 128;  // ExaNet and AXI data width
  localparam int unsigned BYTES_W    = DATA_W / 8;  // 16 bytes per word
  localparam int unsigned MTU        = 256;  // max payload bytes per packet
  localparam int unsigned PKT_WORDS  = MTU / BYTES_W;  // 16 payload words
  localparam int unsigned MAX_LEN    = 16384;  // max transaction bytes
  localparam int unsigned NUM_CH     = 8;    // barrel-shifter channels / PDIDs
  localparam int unsigned CH_W       = 3;    // AXI ID width = log2(NUM_CH)
  localparam int unsigned ADDR_W     = 64;   // AXI master address width
  localparam int unsigned COORD_W    = 22;   // node coordinate field
  localparam int unsigned VA_W       = 42;   // virtual address at destination
  localparam int unsigned PDID_W     = 16;   // protection domain field
  localparam int unsigned SLOT_W     = 3;    // log2(slots per output buffer)
  localparam int unsigned WIDX_W     = 4;    // word index inside a slot
  localparam int unsigned SEQ_W      = 14;   // retransmission sequence number

  // ---------------------------------------------------------------- descriptor
  // Four 64-bit words, stored as two 128-bit halves (bank 0: words 0,1;
  // bank 1: words 2,3). Word 2 bit positions follow the register map.
  typedef struct packed {
    // word 3 (bits 255:192)
    logic [63:19] w3_unused;
    logic [SEQ_W-1:0] seq;        // 18:5  retransmission count
    logic [4:0]   path;           // 4:0   output buffer / link
    // word 2 (bits 191:128)
    logic         db;             // 63    wait for another transaction (chained target)
    logic [2:0]   err_rsv;        // 62:60 bit 60 = error (page fault), others reserved
    logic         send_notify;    // 59
    logic         acked;          // 58    reserved
    logic         done;           // 57
    logic [14:0]  bytes_sent;     // 56:42
    logic [9:0]   dep_id;         // 41:32 transaction started when this one is done
    logic         chained;        // 31    this transaction has a dependant
    logic [14:0]  length;         // 30:16 1..16384 bytes
    logic [15:0]  pdid;           // 15:0
    // word 1
    logic [63:0]  dst_va;         // 22 MS bits coordinates, 42 LS bits address
    // word 0
    logic [63:0]  src_va;
  } desc_t;

  // Bit position of the DB flag inside the 128-bit bank-1 word; a write of the
  // upper half of word 2 with this bit clear starts the transaction.
  localparam int unsigned DB_BIT = 63;

  // ---------------------------------------------------------------- ExaNet
  typedef enum logic [3:0] {
    PT_RDMA_WRITE = 4'd1,   // remote write data packet
    PT_DMA_CTRL   = 4'd3    // DMA control packet (completion notification)
  } pkt_type_e;

  typedef struct packed {
    logic [16:0]       rsv;
    logic [4:0]        pld_words;  // 0..16 payload words that follow
    pkt_type_e         ptype;
    logic [COORD_W-1:0] src_coord;
    logic [PDID_W-1:0] pdid;       // GVA 79:64
    logic [63:0]       dst;        // GVA 63:0 = {coordinates, 42-bit address}
  } exa_hdr_t;

  typedef struct packed {
    logic [91:0]       rsv;
    logic [8:0]        pld_bytes;  // 1..256 valid payload bytes
    logic              notify;
    logic              last;
    logic              first;
    logic [SEQ_W-1:0]  seq;
    logic [9:0]        tid;
  } exa_ftr_t;

  // ---------------------------------------------------------------- barrel shifter command
  typedef struct packed {
    logic [4:0]        path;       // output buffer
    logic [SLOT_W-1:0] slot;       // slot in that buffer
    logic [3:0]        rot;        // (src_off - dst_off) mod 16
    logic              lead;       // src_off >= dst_off: first read word only primes
    logic [4:0]        rd_words;   // read beats expected (1..17)
    logic [3:0]        dst_off;    // destination byte offset in the first word
    logic [8:0]        nbytes;     // payload bytes (1..256)
  } bs_cmd_t;

endpackage
