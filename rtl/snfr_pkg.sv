// snfr_pkg: types and constants shared by the SNFR (Synchronizing Network-wide
// Function Reconfiguration) protocol processor, the on-chip interconnect and
// the reconfigurable regions.
//
// Streams are 64-bit AXI4-Stream beats (tdata/tkeep/tlast, valid/ready carried
// separately), the width of a 10 Gbps Ethernet MAC user interface at
// 156.25 MHz. Byte 0 of a frame travels in tdata[7:0] of the first beat.
//
// SNFR packet layout (after the 14-byte Ethernet and 20-byte IPv4 headers,
// 34 bytes in all, identified by the IPv4 protocol field):
//   OFFSET : 64 bits, big-endian. Index, in 64-bit SNFR words, of the first
//            ADD/DATA pair this node must apply. Word 0 is OFFSET itself, so a
//            fresh packet carries OFFSET = 1.
//   then pairs of ADD (32 bits, big-endian) followed by DATA (32 bits,
//   big-endian), one 64-bit SNFR word per pair. ADD = 0xFFFF_FFFF ends the
//   segment of one node; the next node's segment follows it.
// The field widths and the terminator follow the protocol definition; the
// byte order, the unit of OFFSET and the protocol number are this design's
// choices.
package snfr_pkg;

  localparam int unsigned DATA_W = 64;
  localparam int unsigned KEEP_W = DATA_W / 8;

  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    logic              tlast;
  } axis_beat_t;

  localparam int unsigned AXIS_BEAT_W = $bits(axis_beat_t);

  // Header sizes: Ethernet II (14 bytes) + IPv4 without options (20 bytes).
  localparam int unsigned ETH_HDR_BYTES  = 14;
  localparam int unsigned IP_HDR_BYTES   = 20;
  localparam int unsigned SNFR_HDR_BYTES = ETH_HDR_BYTES + IP_HDR_BYTES;  // 34

  // Byte positions of the fields used for classification.
  localparam int unsigned ETHERTYPE_BYTE = 12;  // 2 bytes
  localparam int unsigned IP_VIHL_BYTE   = 14;  // version/IHL
  localparam int unsigned IP_PROTO_BYTE  = 23;

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPV4_VIHL      = 8'h45;
  // IANA "use for experimentation and testing" protocol number (RFC 3692).
  localparam logic [7:0]  SNFR_IP_PROTO_DEFAULT = 8'd253;

  // End-of-segment marker in the ADD field.
  localparam logic [31:0] SNFR_ADDR_END = 32'hFFFF_FFFF;

  // AXI4 response codes
  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;

  // One extracted reconfiguration write.
  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] data;
  } cfg_write_t;

  // Byte n (0 = first on the wire) of a 64-bit beat.
  function automatic logic [7:0] beat_byte(input logic [DATA_W-1:0] d, input int unsigned n);
    return d[8*n +: 8];
  endfunction

endpackage
