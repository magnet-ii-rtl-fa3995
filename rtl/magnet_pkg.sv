// magnet_pkg: constants and field layouts shared by the MAGNET II ring,
// bus and link logic.
//
// Ring cells are 1024 bits, carried inside a station as 64 16-bit words, most
// significant bit first. Word 0 holds the 12-bit cell header (4-bit SYNC and
// the 8-bit MAC field) followed by four packet-header bits. The cell length,
// the SYNC/MAC sizes, the five MAC parts (AC, CS, BC, BR, T), the 8-bit
// addresses, the four packet sizes and the DS3 Short Frame numbers follow the
// MAGNET II description. The bit order inside the MAC field, the 4-bit AC
// encoding, the SYNC value and the placement of the packet-header fields are
// this design's own choice:
//
//   word 0 : SYNC[15:12] AC[11:8] CS[7] BC[6] BR[5] T[4] MODE[3:2] SIZE[1:0]
//   word 1 : ROUTE[15:8] DEST[7:0]
//   word 2 : SRC[15:8]   CLASS[7:6] reserved[5:0]
//   word 3+: payload
//
// AC[2:0] is a one-hot mask of the traffic classes allowed to use the cell
// (bit 0 = class I) and AC[3] names the access procedure (0 = cycle/subcycle
// scheduling). MODE selects datagram, virtual circuit or multicast routing;
// on the ring a multicast packet carries its local multicast number in DEST.
// ROUTE holds the final destination (DG), the virtual circuit number (VC) or
// the global multicast number (MC) used by the Router's address translation.
package magnet_pkg;

  localparam int CELL_BITS     = 1024;
  localparam int WORD_BITS     = 16;
  localparam int CELL_WORDS    = CELL_BITS / WORD_BITS;   // 64
  localparam int BUF_PACKETS   = 16;                      // packets per buffer
  localparam logic [3:0] SYNC_PATTERN = 4'b1011;

  // DS3 enveloping (Short Frame of 85 bits, 56 per Multiframe, 13 per packet)
  localparam int SF_BITS       = 85;
  localparam int SF_PER_MF     = 56;
  localparam int SF_PER_PKT    = 13;
  localparam int LH_BITS       = 8;
  localparam logic [3:0] PSF_START = 4'b0000;
  localparam logic [3:0] PSF_IDLE  = 4'b1111;  // any XX11 means "no start"

  typedef enum logic [1:0] {
    MODE_DG = 2'd0,
    MODE_VC = 2'd1,
    MODE_MC = 2'd2,
    MODE_RSV = 2'd3
  } route_mode_e;

  // Packet size code: 128, 256, 512 or 1024 bits
  typedef enum logic [1:0] {
    SZ_128  = 2'd0,
    SZ_256  = 2'd1,
    SZ_512  = 2'd2,
    SZ_1024 = 2'd3
  } pkt_size_e;

  typedef enum logic [1:0] {
    CLASS_I   = 2'd0,
    CLASS_II  = 2'd1,
    CLASS_III = 2'd2
  } tclass_e;

  typedef struct packed {
    logic [3:0] ac;
    logic       cs;
    logic       bc;
    logic       br;
    logic       t;
  } mac_t;

  typedef struct packed {
    logic [3:0]  sync;
    mac_t        mac;
    route_mode_e mode;
    pkt_size_e   size;
  } word0_t;

  // Number of 16-bit words occupied by a packet of the given size code
  function automatic logic [6:0] size_words(input logic [1:0] sz);
    return 7'd8 << sz;
  endfunction

  // Number of packets a THRESHOLD code allows: 2, 4, 8 or 16
  function automatic logic [4:0] threshold_packets(input logic [1:0] code);
    return 5'd2 << code;
  endfunction

  // LIMIT register: bit 8 set means NOLIMIT, else bits 7:0 are the limit
  localparam int LIMIT_BITS = 9;

endpackage
