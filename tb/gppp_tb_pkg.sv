// gppp_tb_pkg: reference models and packet builders shared by the testbenches.
//
// Frames are built byte by byte from the protocol definitions, independently
// of the RTL: the Ethernet FCS uses the textbook bit-serial CRC-32 (preset all
// ones, reflected, final inversion), checksums are plain one's complement sums
// over byte pairs. to_word() cuts a frame into the 32-bit pipeline words the
// RTL expects (first byte in bits [31:24]).
package gppp_tb_pkg;
  import gppp_pkg::*;

  typedef logic [7:0] bq_t[$];

  function automatic logic [31:0] crc32_ref(input bq_t b);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++)
        c = ((c[0] ^ b[i][k]) != 1'b0) ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    return ~c;
  endfunction

  // One's complement sum of a byte string read as big-endian 16-bit words.
  function automatic logic [15:0] csum(input bq_t b, input logic [15:0] init);
    logic [31:0] s;
    s = {16'd0, init};
    for (int i = 0; i < b.size(); i += 2)
      s += {16'd0, b[i], (i + 1 < b.size()) ? b[i+1] : 8'h00};
    while (s[31:16] != 0) s = {16'd0, s[15:0]} + {16'd0, s[31:16]};
    return s[15:0];
  endfunction

  function automatic void put16(ref bq_t b, input logic [15:0] v);
    b.push_back(v[15:8]); b.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bq_t b, input logic [31:0] v);
    put16(b, v[31:16]); put16(b, v[15:0]);
  endfunction

  // Ethernet frame: header, payload padded to 46 bytes, FCS (LSB first).
  function automatic bq_t eth_frame(input logic [47:0] da, input logic [47:0] sa,
                                    input logic [15:0] etype, input bq_t pay,
                                    input bit bad_fcs = 0);
    bq_t f;
    logic [31:0] c;
    for (int i = 5; i >= 0; i--) f.push_back(da[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(sa[8*i +: 8]);
    put16(f, etype);
    foreach (pay[i]) f.push_back(pay[i]);
    while (f.size() < 60) f.push_back(8'h00);
    c = crc32_ref(f);
    if (bad_fcs) c ^= 32'h0000_0100;
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    return f;
  endfunction

  // Transport segment with correct checksum for the given pseudo-header sum.
  function automatic bq_t udp_seg(input logic [15:0] sp, input logic [15:0] dp,
                                  input bq_t data, input logic [15:0] ph_sum,
                                  input bit bad = 0);
    bq_t s;
    logic [15:0] len, c;
    len = 16'(8 + data.size());
    put16(s, sp); put16(s, dp); put16(s, len); put16(s, 16'h0000);
    foreach (data[i]) s.push_back(data[i]);
    c = ~csum(s, csum_add(ph_sum, csum_add(16'd17, len)));
    if (c == 16'h0000) c = 16'hFFFF;
    if (bad) c ^= 16'h0010;
    s[6] = c[15:8]; s[7] = c[7:0];
    return s;
  endfunction

  function automatic bq_t tcp_seg(input logic [15:0] sp, input logic [15:0] dp,
                                  input bq_t data, input logic [15:0] ph_sum,
                                  input bit bad = 0);
    bq_t s;
    logic [15:0] c, len;
    put16(s, sp); put16(s, dp); put32(s, 32'h0102_0304); put32(s, 32'h0);
    put16(s, 16'h5018); put16(s, 16'hFFFF); put16(s, 16'h0000); put16(s, 16'h0000);
    foreach (data[i]) s.push_back(data[i]);
    len = 16'(s.size());
    c = ~csum(s, csum_add(ph_sum, csum_add(16'd6, len)));
    if (bad) c ^= 16'h0010;
    s[16] = c[15:8]; s[17] = c[7:0];
    return s;
  endfunction

  function automatic logic [15:0] csum_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  function automatic logic [15:0] v4_ph(input logic [31:0] src, input logic [31:0] dst);
    return csum_add(csum_add(src[31:16], src[15:0]), csum_add(dst[31:16], dst[15:0]));
  endfunction
  function automatic logic [15:0] v6_ph(input logic [127:0] src, input logic [127:0] dst);
    logic [15:0] s;
    s = 16'h0;
    for (int i = 0; i < 8; i++) s = csum_add(s, csum_add(src[16*i +: 16], dst[16*i +: 16]));
    return s;
  endfunction

  // IPv4 datagram. ihl in 32-bit words (>= 5), options filled with NOP (1).
  function automatic bq_t ipv4(input logic [31:0] src, input logic [31:0] dst,
                               input logic [7:0] proto, input bq_t pay,
                               input logic [15:0] id = 16'h1234, input bit mf = 0,
                               input logic [12:0] off8 = 0, input int ihl = 5,
                               input bit bad_ck = 0, input int tot_len = -1);
    bq_t h;
    logic [15:0] c, tl;
    tl = (tot_len >= 0) ? 16'(tot_len) : 16'(ihl * 4 + pay.size());
    h.push_back({4'd4, 4'(ihl)}); h.push_back(8'h00); put16(h, tl);
    put16(h, id); put16(h, {1'b0, 1'b0, mf, off8});
    h.push_back(8'd64); h.push_back(proto); put16(h, 16'h0000);
    put32(h, src); put32(h, dst);
    for (int i = 5; i < ihl; i++) put32(h, 32'h0101_0101);
    c = ~csum(h, 16'h0);
    if (bad_ck) c ^= 16'h0001;
    h[10] = c[15:8]; h[11] = c[7:0];
    foreach (pay[i]) h.push_back(pay[i]);
    return h;
  endfunction

  // IPv6 packet with optional extension headers already encoded in ext.
  function automatic bq_t ipv6(input logic [127:0] src, input logic [127:0] dst,
                               input logic [7:0] nh, input bq_t ext, input bq_t pay);
    bq_t h;
    put32(h, 32'h6000_0000); put16(h, 16'(ext.size() + pay.size()));
    h.push_back(nh); h.push_back(8'd64);
    for (int i = 7; i >= 0; i--) put16(h, src[16*i +: 16]);
    for (int i = 7; i >= 0; i--) put16(h, dst[16*i +: 16]);
    foreach (ext[i]) h.push_back(ext[i]);
    foreach (pay[i]) h.push_back(pay[i]);
    return h;
  endfunction

  function automatic bq_t rand_bytes(input int n);
    bq_t b;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  function automatic int nwords(input bq_t f);
    return (f.size() + 3) / 4;
  endfunction

  function automatic pipe_word_t to_word(input bq_t f, input int k);
    pipe_word_t w;
    w = '0;
    w.valid = 1'b1;
    w.sof   = (k == 0);
    w.eof   = (k == nwords(f) - 1);
    w.boff  = OFFW'(4 * k);
    for (int j = 0; j < 4; j++)
      if (4 * k + j < f.size()) begin
        w.be[3-j] = 1'b1;
        w.data[8*(3-j) +: 8] = f[4*k+j];
      end
    return w;
  endfunction
endpackage
