// tb_pkt_pkg: frame builders and reference models shared by the testbenches.
//
// Frames are byte queues, byte 0 first on the wire. Regular frames are
// Ethernet II + IPv4 (protocol 17) + pseudo-random payload; SNFR frames are
// Ethernet II + IPv4 (protocol SNFR) + OFFSET (64-bit, big-endian, = 1) + one
// segment of ADD/DATA pairs per node, each closed by ADD = 0xFFFF_FFFF.
// to_beats() cuts a frame into 64-bit stream beats.
package tb_pkt_pkg;
  import snfr_pkg::*;

  typedef byte unsigned bytes_t[$];
  typedef axis_beat_t   beats_t[$];
  typedef cfg_write_t   writes_t[$];

  function automatic bytes_t eth_ip_header(input logic [7:0] proto);
    bytes_t h;
    // destination and source MAC
    for (int i = 0; i < 6; i++) h.push_back(8'h02);
    for (int i = 0; i < 6; i++) h.push_back(8'h10 + 8'(i));
    h.push_back(8'h08); h.push_back(8'h00);          // EtherType IPv4
    h.push_back(8'h45); h.push_back(8'h00);          // version/IHL, DSCP
    h.push_back(8'h00); h.push_back(8'h00);          // total length (not checked)
    h.push_back(8'h00); h.push_back(8'h00); h.push_back(8'h40); h.push_back(8'h00);
    h.push_back(8'h40); h.push_back(proto);          // TTL, protocol
    h.push_back(8'h00); h.push_back(8'h00);          // checksum
    for (int i = 0; i < 4; i++) h.push_back(8'd10);
    for (int i = 0; i < 4; i++) h.push_back(8'd11);
    return h;
  endfunction

  // Regular frame of len bytes (len >= 34); payload bytes from a seed.
  function automatic bytes_t regular_frame(input int len, input int unsigned seed);
    bytes_t f = eth_ip_header(8'd17);
    int unsigned x = seed | 1;
    while (f.size() < len) begin
      x = x * 1103515245 + 12345;
      f.push_back(8'(x >> 16));
    end
    return f;
  endfunction

  function automatic void push64(ref bytes_t f, input logic [63:0] v);
    for (int k = 7; k >= 0; k--) f.push_back(v[8*k +: 8]);
  endfunction

  // SNFR frame. segs[n] = the writes for node n; offset0 = initial OFFSET.
  function automatic bytes_t snfr_frame(input writes_t segs[$], input logic [63:0] offset0,
                                        input logic [7:0] proto);
    bytes_t f = eth_ip_header(proto);
    push64(f, offset0);
    foreach (segs[n]) begin
      foreach (segs[n][k]) push64(f, {segs[n][k].addr, segs[n][k].data});
      push64(f, {SNFR_ADDR_END, 32'h0});
    end
    while (f.size() < 64) f.push_back(8'h00);
    return f;
  endfunction

  // 64-bit OFFSET field of an SNFR frame.
  function automatic logic [63:0] get_offset(input bytes_t f);
    logic [63:0] v = '0;
    for (int k = 0; k < 8; k++) v = {v[55:0], f[SNFR_HDR_BYTES + k]};
    return v;
  endfunction

  function automatic beats_t to_beats(input bytes_t f);
    beats_t q;
    axis_beat_t b;
    for (int i = 0; i < f.size(); i += 8) begin
      b = '0;
      for (int l = 0; l < 8; l++)
        if (i + l < f.size()) begin
          b.tdata[8*l +: 8] = f[i + l];
          b.tkeep[l] = 1'b1;
        end
      b.tlast = (i + 8 >= f.size());
      q.push_back(b);
    end
    return q;
  endfunction

  function automatic bytes_t from_beats(input beats_t q);
    bytes_t f;
    foreach (q[i])
      for (int l = 0; l < 8; l++)
        if (q[i].tkeep[l]) f.push_back(q[i].tdata[8*l +: 8]);
    return f;
  endfunction

  // Reference for the region function: XOR of bytes >= 34 with the key.
  function automatic bytes_t xor_payload(input bytes_t f, input logic [63:0] key);
    bytes_t g = f;
    for (int i = SNFR_HDR_BYTES; i < g.size(); i++) g[i] = g[i] ^ key[8*(i%8) +: 8];
    return g;
  endfunction

  function automatic bit same(input bytes_t a, input bytes_t b);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[i]) if (a[i] != b[i]) return 1'b0;
    return 1'b1;
  endfunction
endpackage
