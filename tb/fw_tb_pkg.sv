// fw_tb_pkg: packet builders and a reference model for the firewall tests.
//
// build_pkt assembles an Ethernet / IPv4 / UDP / GTPv1-U / IPv4 / TCP-UDP
// packet byte by byte from a lookup key and a set of shape options, and says
// independently of the RTL whether the parser must accept it.  rule_hit is the
// reference ternary match (lowest matching index wins).
package fw_tb_pkg;
  import fw_pkg::*;

  typedef byte unsigned bytes_t[$];

  typedef struct {
    int unsigned outer_ihl;   // 5..15
    int unsigned inner_ihl;   // 5..15
    bit          gtp_opt;     // E/S/PN optional word present
    int unsigned n_ext;       // extension headers (needs gtp_opt)
    int unsigned ext_len;     // length of each extension header, 4-byte units
    bit          bad_ethtype; // not IPv4
    bit          bad_udp;     // outer UDP destination port not GTP-U
    bit          bad_gtp_type;// not a G-PDU
    int unsigned payload;     // bytes after the inner L4 ports
  } shape_t;

  function automatic shape_t plain_shape(int unsigned payload);
    shape_t s;
    s.outer_ihl = 5; s.inner_ihl = 5; s.gtp_opt = 0; s.n_ext = 0; s.ext_len = 1;
    s.bad_ethtype = 0; s.bad_udp = 0; s.bad_gtp_type = 0; s.payload = payload;
    return s;
  endfunction

  function automatic shape_t random_shape();
    shape_t s = plain_shape($urandom_range(0, 120));
    if ($urandom_range(0, 3) == 0) s.outer_ihl = $urandom_range(5, 8);
    if ($urandom_range(0, 3) == 0) s.inner_ihl = $urandom_range(5, 8);
    s.gtp_opt = ($urandom_range(0, 2) == 0);
    if (s.gtp_opt) s.n_ext = $urandom_range(0, 3);
    s.ext_len = $urandom_range(1, 2);
    s.bad_ethtype  = ($urandom_range(0, 15) == 0);
    s.bad_udp      = ($urandom_range(0, 15) == 0);
    s.bad_gtp_type = ($urandom_range(0, 15) == 0);
    return s;
  endfunction

  function automatic void push16(ref bytes_t p, input logic [15:0] v);
    p.push_back(v[15:8]); p.push_back(v[7:0]);
  endfunction
  function automatic void push32(ref bytes_t p, input logic [31:0] v);
    push16(p, v[31:16]); push16(p, v[15:0]);
  endfunction
  function automatic void pushn(ref bytes_t p, input int unsigned n);
    repeat (n) p.push_back(8'($urandom));
  endfunction

  // Build a packet; exp_ok says whether a parser with a window of win bytes
  // must recognise it (and then extract key k).
  function automatic void build_pkt(input fw_key_t k, input shape_t s, input int unsigned win,
                                    output bytes_t p, output bit exp_ok);
    int unsigned hdr_end, inner_start;
    bit l4 = (k.proto == IP_PROTO_TCP || k.proto == IP_PROTO_UDP);
    p = {};
    // Ethernet
    pushn(p, 12);
    push16(p, s.bad_ethtype ? 16'h86DD : 16'h0800);
    // outer IPv4
    p.push_back(8'(8'h40 | s.outer_ihl));
    pushn(p, 8);
    p.push_back(8'd17);
    pushn(p, 10 + 4 * (s.outer_ihl - 5));
    // outer UDP
    push16(p, 16'd2152);
    push16(p, s.bad_udp ? 16'd4789 : 16'd2152);
    pushn(p, 4);
    // GTPv1-U
    p.push_back(8'(8'h30 | (s.gtp_opt ? ((s.n_ext > 0) ? 8'h04 : 8'h02) : 8'h00)));
    p.push_back(s.bad_gtp_type ? 8'h01 : 8'hFF);
    pushn(p, 2);
    push32(p, k.teid);
    if (s.gtp_opt) begin
      pushn(p, 3);
      p.push_back((s.n_ext > 0) ? 8'h85 : 8'h00);
      for (int e = 0; e < int'(s.n_ext); e++) begin
        p.push_back(8'(s.ext_len));
        pushn(p, 4 * s.ext_len - 2);
        p.push_back((e == int'(s.n_ext) - 1) ? 8'h00 : 8'h85);
      end
    end
    // inner IPv4
    inner_start = p.size();
    p.push_back(8'(8'h40 | s.inner_ihl));
    pushn(p, 8);
    p.push_back(k.proto);
    pushn(p, 2);
    push32(p, k.src_ip);
    push32(p, k.dst_ip);
    pushn(p, 4 * (s.inner_ihl - 5));
    if (l4) begin
      push16(p, k.src_port);
      push16(p, k.dst_port);
    end
    // last byte the firewall needs: the ports, or the inner addresses
    hdr_end = l4 ? p.size() : inner_start + 20;
    pushn(p, s.payload);
    exp_ok = !s.bad_ethtype && !s.bad_udp && !s.bad_gtp_type && s.n_ext <= 2 && hdr_end <= win;
  endfunction

  function automatic fw_key_t random_key();
    fw_key_t k;
    k.src_ip   = $urandom;
    k.dst_ip   = $urandom;
    k.src_port = 16'($urandom);
    k.dst_port = 16'($urandom);
    case ($urandom_range(0, 5))
      0:       k.proto = 8'd1;   // ICMP, no ports
      1, 2:    k.proto = IP_PROTO_TCP;
      default: k.proto = IP_PROTO_UDP;
    endcase
    if (!(k.proto == IP_PROTO_TCP || k.proto == IP_PROTO_UDP)) begin
      k.src_port = '0;
      k.dst_port = '0;
    end
    k.teid = $urandom;
    return k;
  endfunction

  // reference ternary lookup: returns the lowest matching index or -1
  function automatic int rule_hit(input fw_key_t key, input fw_key_t val[], input fw_key_t msk[],
                                  input bit vld[]);
    for (int i = 0; i < val.size(); i++)
      if (vld[i] && ((key & msk[i]) == (val[i] & msk[i]))) return i;
    return -1;
  endfunction

endpackage
