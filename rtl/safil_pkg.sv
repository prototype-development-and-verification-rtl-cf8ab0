// safil_pkg: shared widths, frame layouts and node layout of the SAFIL
// (systolic-array fast IP lookup) engine.
//
// Two 49-bit frames travel through the array. A lookup frame carries the
// remaining address bits still to be walked (A, 30 bits, next bit in the
// MSB), the Block RAM index of the trie node to visit in the next PE
// (I, 13 bits), the port number of the longest prefix matched so far
// (P, 5 bits) and the type bit U = 0. An update frame carries a 32-bit
// trie node (D), its Block RAM address (I, 13 bits), the row of the target
// PE within its column (3 bits) and U = 1. A trie node is 32 bits: the
// south child index (SI, 13), the east child index (EI, 13), the port
// number (PN, 5) and the valid-prefix bit (V). Index 0 is the null pointer.
// The field widths and bit positions follow the frames and node words worked
// through in the PE simulation scenarios; the array size (8 x 8) and memory
// depth (2^13) are the document's main configuration.
package safil_pkg;

  localparam int unsigned FRAME_W   = 49;  // both frame types
  localparam int unsigned ADDR_W    = 30;  // A field (t bits)
  localparam int unsigned IDX_W     = 13;  // Block RAM index (p bits)
  localparam int unsigned PORT_W    = 5;   // port number (q bits)
  localparam int unsigned NODE_W    = 32;  // 2p + q + 1
  localparam int unsigned ROWID_W   = 3;   // PE id within a column (n bits)
  localparam int unsigned IP_W      = 32;
  localparam int unsigned PART_W    = 4;   // r, initial partitioning bits
  localparam int unsigned PEID_W    = 6;   // RDL PE id: {row, column}
  localparam int unsigned UPD_IN_W  = 52;  // RDL input word

  typedef struct packed {
    logic [ADDR_W-1:0] a;
    logic [IDX_W-1:0]  i;
    logic [PORT_W-1:0] p;
    logic              u;   // 0 for a lookup frame
  } lookup_frame_t;

  typedef struct packed {
    logic [NODE_W-1:0]  d;
    logic [IDX_W-1:0]   i;
    logic [ROWID_W-1:0] pe;
    logic               u;  // 1 for an update frame
  } update_frame_t;

  typedef struct packed {
    logic [IDX_W-1:0]  si;  // child followed when the address bit is 0
    logic [IDX_W-1:0]  ei;  // child followed when the address bit is 1
    logic [PORT_W-1:0] pn;
    logic              v;
  } node_t;

  typedef logic [FRAME_W-1:0] frame_t;

  // What the data flow manager started for the frame it took from a FIFO.
  typedef enum logic [1:0] {
    ACT_NONE      = 2'b00,
    ACT_LOOKUP    = 2'b01,
    ACT_PROPAGATE = 2'b10,
    ACT_UPDATE    = 2'b11
  } action_e;

endpackage
