// Shared constants and types of the URL pre-filter.
//
// The rule memory holds one bit per value of a HASH_W-bit hash of the
// destination IPv4 address (CRC-32, low 26 bits), packed MEM_DW bits per
// memory word, so a hash splits into a word address (upper bits) and a bit
// index (lower bits). The 26-bit hash and the 32-bit request width follow the
// 10 Gbps implementation; the word packing and the frame offsets are this
// design's choices (plain Ethernet II framing, no VLAN tag).
package urlf_pkg;

  // Rule memory geometry.
  localparam int unsigned HASH_W   = 26;                    // bits of CRC kept
  localparam int unsigned MEM_DW   = 32;                    // bits per memory word
  localparam int unsigned BIT_W    = $clog2(MEM_DW);        // bit index inside a word
  localparam int unsigned MEM_AW   = HASH_W - BIT_W;        // word address width

  // Frame layout (Ethernet II, byte 0 = first byte on the wire).
  localparam int unsigned ETYPE_OFS  = 12;                  // EtherType, 2 bytes
  localparam int unsigned DST_IP_OFS = 30;                  // IPv4 destination, 4 bytes
  localparam logic [15:0] ETYPE_IPV4 = 16'h0800;

  // Interface numbering.
  localparam int unsigned NUM_IFACES = 2;

  // Requester of the QDR-II Access Module.
  typedef enum logic [0:0] {
    REQ_FILTER  = 1'b0,
    REQ_UPDATER = 1'b1
  } requester_e;

  // One memory request as carried by a Request FIFO.
  typedef struct packed {
    logic              we;      // 1 = write, 0 = read
    logic [MEM_AW-1:0] addr;    // word address
    logic [MEM_DW-1:0] wdata;   // write data (ignored on reads)
  } mem_req_t;

endpackage
