// fvc_pkg: shared constants and types of the frequent-value (FV) compression
// network interface.
//
// A data message is one 64-byte cache line, i.e. 16 values of 32 bits. Each
// value is encoded either as a table hit (flag bit 1 followed by the 3-bit
// index into the 8-entry FV table, 4 bits) or as a miss (flag bit 0 followed
// by the 32-bit value, 33 bits). Encoded values are packed least significant
// bit first into 64-bit flits that follow one header flit. Word size, table
// size, counter width, line size and flit width follow the document; the bit
// order of the code, the header layout and the flit side-band are this
// design's own choices.
package fvc_pkg;

  localparam int unsigned WORD_W     = 32;  // value width
  localparam int unsigned FV_ENTRIES = 8;   // FV table entries
  localparam int unsigned IDX_W      = $clog2(FV_ENTRIES);
  localparam int unsigned CNT_W      = 8;   // replacement counter width
  localparam int unsigned LINE_WORDS = 16;  // 64-byte cache line
  localparam int unsigned FLIT_W     = 64;  // flit payload width
  localparam int unsigned NODES      = 24;  // 6x4 mesh
  localparam int unsigned HIT_LEN    = 1 + IDX_W;   // 4 bits
  localparam int unsigned MISS_LEN   = 1 + WORD_W;  // 33 bits
  // A fully missed line needs ceil(16*33/64) = 9 data flits.
  localparam int unsigned MAX_DATA_FLITS = (LINE_WORDS * MISS_LEN + FLIT_W - 1) / FLIT_W;

  // One encoded value between compressor and packer, unpacker and decompressor.
  typedef struct packed {
    logic              hit;    // 1: idx is valid, 0: value is valid
    logic [IDX_W-1:0]  idx;
    logic [WORD_W-1:0] value;
    logic              last;   // last value of the message
  } enc_t;

  // One network flit: head/tail side-band plus 64-bit payload.
  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Header flit payload layout (low bits first).
  typedef struct packed {
    logic [FLIT_W-2*8-WORD_W-1:0] rsvd;
    logic [WORD_W-1:0]            tag;   // opaque message tag, e.g. line address
    logic [7:0]                   src;
    logic [7:0]                   dst;
  } header_t;

endpackage
