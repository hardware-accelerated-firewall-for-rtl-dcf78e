// fw_pkg: types and constants shared by the 5G firewall.
//
// The lookup key is the one the firewall matches on: the 5G user's (inner)
// source and destination IPv4 address, source and destination port, transport
// protocol, and the GTP tunnel endpoint identifier (TEID).  The field set
// follows the design; the field order inside the packed key is this design's
// choice.  Protocol numbers and the GTP-U port are the standard values.
package fw_pkg;

  // AXI4-Stream data width of the packet path (NetFPGA-SUME style 256-bit bus).
  localparam int unsigned AXIS_W = 256;

  // Lookup key: inner 5-tuple plus GTP TEID, 136 bits.
  typedef struct packed {
    logic [31:0] src_ip;    // inner IPv4 source (5G user)
    logic [31:0] dst_ip;    // inner IPv4 destination
    logic [15:0] src_port;  // inner TCP/UDP source port (0 if not TCP/UDP)
    logic [15:0] dst_port;  // inner TCP/UDP destination port (0 if not TCP/UDP)
    logic [7:0]  proto;     // inner IPv4 protocol field
    logic [31:0] teid;      // GTP tunnel endpoint identifier
  } fw_key_t;

  localparam int unsigned KEY_W = $bits(fw_key_t);

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_TCP   = 8'd6;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;
  localparam logic [15:0] GTPU_UDP_PORT  = 16'd2152;
  localparam logic [7:0]  GTP_MSG_GPDU   = 8'hFF;

  // Rule-bus register map (byte addresses), see rule_ctrl.
  localparam logic [7:0] REG_KEY0   = 8'h00;  // KEY words 0..4 at 0x00..0x10
  localparam logic [7:0] REG_MASK0  = 8'h20;  // MASK words 0..4 at 0x20..0x30
  localparam logic [7:0] REG_INDEX  = 8'h40;  // rule slot
  localparam logic [7:0] REG_CMD    = 8'h44;  // bit0 insert, bit1 remove
  localparam logic [7:0] REG_INFO   = 8'h48;  // read-only: number of rule slots
  localparam int unsigned KEY_WORDS = (KEY_W + 31) / 32;

endpackage
