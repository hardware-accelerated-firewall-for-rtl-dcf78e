// gtp_parser: parsing stage of the 5G firewall.
//
// The parser watches the packet stream (it never stalls it) and copies the
// first HDR_BYTES bytes of each packet into a header window.  When the window
// is full, or the packet ends first, it walks the headers the firewall
// expects of 5G user traffic:
//   Ethernet (EtherType 0x0800) -> outer IPv4 (any IHL, protocol UDP)
//   -> outer UDP (destination port 2152, GTP-U) -> GTPv1-U G-PDU
//   (optional 4-byte field when E, S or PN is set, up to MAX_EXT extension
//   headers) -> inner IPv4 (any IHL) -> inner TCP/UDP ports.
// It outputs the inner source/destination address, ports, protocol and the
// TEID as the lookup key, plus `res_ok`, which says that the packet has the
// expected structure.  For an inner protocol other than TCP or UDP the ports
// are 0.  The header list and the key fields follow the design; the header
// window size, the checks made on each header and the extension-header
// support are this design's choices.
//
// Byte order: byte i of a beat is s_data[8*i +: 8]; s_keep is contiguous from
// bit 0.  Timing: the beat that completes the window (or the last beat of a
// shorter packet) is accepted in cycle t; res_valid pulses in cycle t+2 with
// the result of that packet.  One result per packet, in packet order.
module gtp_parser
  import fw_pkg::*;
#(
  parameter int unsigned DATA_W    = fw_pkg::AXIS_W,
  parameter int unsigned HDR_BYTES = 128,
  parameter int unsigned MAX_EXT   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // monitored stream: a beat counts when s_valid && s_ready
  input  logic              s_valid,
  input  logic              s_ready,
  input  logic [DATA_W-1:0] s_data,
  input  logic [DATA_W/8-1:0] s_keep,
  input  logic              s_last,
  // per-packet result
  output logic              res_valid,
  output logic              res_ok,
  output fw_key_t           res_key
);

  localparam int unsigned KEEP_W    = DATA_W / 8;
  localparam int unsigned HDR_BEATS = (HDR_BYTES + KEEP_W - 1) / KEEP_W;
  localparam int unsigned WIN_BYTES = HDR_BEATS * KEEP_W;
  localparam int unsigned BI_W      = $clog2(HDR_BEATS + 1);
  localparam int unsigned LEN_W     = $clog2(WIN_BYTES + 1);

  logic [WIN_BYTES*8-1:0] hdr_q;
  logic [BI_W-1:0]        beat_q;     // beats of the current packet seen, saturating
  logic [LEN_W-1:0]       len_q;      // valid bytes in the window
  logic                   done_q;     // window complete for the packet

  wire fire = s_valid && s_ready;

  function automatic logic [LEN_W-1:0] keep_count(input logic [KEEP_W-1:0] k);
    logic [LEN_W-1:0] n = '0;
    for (int i = 0; i < KEEP_W; i++) n += LEN_W'(k[i]);
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat_q <= '0;
      len_q  <= '0;
      done_q <= 1'b0;
      hdr_q  <= '0;
    end else begin
      done_q <= 1'b0;
      if (fire) begin
        if (beat_q < BI_W'(HDR_BEATS)) begin
          hdr_q[beat_q*DATA_W +: DATA_W] <= s_data;
          len_q <= ((beat_q == '0) ? '0 : len_q) + keep_count(s_keep);
          if (s_last || beat_q == BI_W'(HDR_BEATS - 1)) done_q <= 1'b1;
        end
        if (s_last)                        beat_q <= '0;
        else if (beat_q < BI_W'(HDR_BEATS)) beat_q <= beat_q + 1'b1;
      end
    end
  end

  // Byte of the window; bytes past the window read as 0.
  function automatic logic [7:0] wb(input logic [WIN_BYTES*8-1:0] w, input int unsigned off);
    return (off < WIN_BYTES) ? w[8*off +: 8] : 8'h00;
  endfunction

  logic    ok_c;
  fw_key_t key_c;

  always_comb begin
    int unsigned ip_o, udp_o, gtp_o, in_o, l4_o, need, ext_len;
    logic [7:0]  gflags, next_ext, in_proto;
    logic        ok;

    ok       = 1'b1;
    key_c    = '0;
    ext_len  = 0;
    next_ext = 8'h00;
    need     = 0;
    // Ethernet
    if ({wb(hdr_q, 12), wb(hdr_q, 13)} != ETHERTYPE_IPV4) ok = 1'b0;
    // outer IPv4
    ip_o = 14;
    if (wb(hdr_q, ip_o)[7:4] != 4'd4 || wb(hdr_q, ip_o)[3:0] < 4'd5) ok = 1'b0;
    if (wb(hdr_q, ip_o + 9) != IP_PROTO_UDP) ok = 1'b0;
    // outer UDP
    udp_o = ip_o + 4 * int'(wb(hdr_q, ip_o)[3:0]);
    if ({wb(hdr_q, udp_o + 2), wb(hdr_q, udp_o + 3)} != GTPU_UDP_PORT) ok = 1'b0;
    // GTPv1-U
    gtp_o  = udp_o + 8;
    gflags = wb(hdr_q, gtp_o);
    // version 1, protocol type GTP, spare bit zero
    if (gflags[7:5] != 3'd1 || !gflags[4] || gflags[3]) ok = 1'b0;
    if (wb(hdr_q, gtp_o + 1) != GTP_MSG_GPDU) ok = 1'b0;
    in_o = gtp_o + 8;
    if (gflags[2] || gflags[1] || gflags[0]) begin
      in_o     = gtp_o + 12;
      next_ext = gflags[2] ? wb(hdr_q, gtp_o + 11) : 8'h00;
      for (int e = 0; e < int'(MAX_EXT); e++) begin
        if (next_ext != 8'h00) begin
          ext_len = 4 * int'(wb(hdr_q, in_o));
          if (ext_len == 0) ok = 1'b0;
          in_o     = in_o + ext_len;
          next_ext = wb(hdr_q, in_o - 1);
        end
      end
      if (next_ext != 8'h00) ok = 1'b0;   // more extension headers than supported
    end
    // inner IPv4
    if (wb(hdr_q, in_o)[7:4] != 4'd4 || wb(hdr_q, in_o)[3:0] < 4'd5) ok = 1'b0;
    in_proto = wb(hdr_q, in_o + 9);
    l4_o     = in_o + 4 * int'(wb(hdr_q, in_o)[3:0]);

    key_c.src_ip = {wb(hdr_q, in_o + 12), wb(hdr_q, in_o + 13), wb(hdr_q, in_o + 14), wb(hdr_q, in_o + 15)};
    key_c.dst_ip = {wb(hdr_q, in_o + 16), wb(hdr_q, in_o + 17), wb(hdr_q, in_o + 18), wb(hdr_q, in_o + 19)};
    key_c.proto  = in_proto;
    key_c.teid   = {wb(hdr_q, gtp_o + 4), wb(hdr_q, gtp_o + 5), wb(hdr_q, gtp_o + 6), wb(hdr_q, gtp_o + 7)};
    if (in_proto == IP_PROTO_TCP || in_proto == IP_PROTO_UDP) begin
      key_c.src_port = {wb(hdr_q, l4_o),     wb(hdr_q, l4_o + 1)};
      key_c.dst_port = {wb(hdr_q, l4_o + 2), wb(hdr_q, l4_o + 3)};
      need = l4_o + 4;
    end else begin
      key_c.src_port = '0;
      key_c.dst_port = '0;
      need = in_o + 20;
    end
    // every byte used must be inside the window and inside the packet
    if (need > int'(len_q)) ok = 1'b0;
    ok_c = ok;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_ok    <= 1'b0;
      res_key   <= '0;
    end else begin
      res_valid <= done_q;
      if (done_q) begin
        res_ok  <= ok_c;
        res_key <= ok_c ? key_c : '0;
      end
    end
  end

endmodule
