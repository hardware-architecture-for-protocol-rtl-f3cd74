// tb_gppp_top: end-to-end test of the protocol processor at its default size.
//
// The test loads the configuration chain (page select mask, Ethernet station
// address, IP address table), reads it back through cfg_dout, and then sends a
// stream of Ethernet frames over GMII, back to back with the minimum gap of
// 12 idle clocks plus 8 preamble bytes. The frames are built from the
// protocol definitions in gppp_tb_pkg, so every expected verdict comes from
// how the frame was made, not from the RTL: good IPv4/IPv6 TCP and UDP
// packets, IP options, IPv6 extension headers, ICMP, ARP, an 802.3 length
// frame, a maximum-size frame, and one frame for each discard reason (FCS,
// MAC address, IP header checksum, IP address, TCP checksum, receive error,
// duplicate fragment), plus IPv4 and IPv6 datagrams sent as fragments out of
// order, whose UDP checksum spans all fragments and is judged on the fragment
// that completes the datagram.
//
// For each frame the descriptor (accept, discard reasons, protocol, transport
// offset, fragment and reassembly flags, length) is compared with the
// expectation, and the time from the last GMII byte to pkt_done must be the
// pipeline latency: 1 clock of word hold-back + 1 output register in the PSU,
// 12 pipeline registers, 1 clock in the controller = 15 clocks. That no frame
// is lost at the minimum gap shows that processing keeps up with the line.
// The stand-alone 8-bit CRC generator is checked against a bit-serial CRC of
// each frame, three clocks per byte of latency. Each mechanism of the design
// is counted through the top's outputs or its internal page controls and a
// mechanism that never occurred counts as a failure. Reassembly time-outs
// need a reduced time-out and are exercised in tb_gppp_top_timeout.
module tb_gppp_top;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic gmii_rx_dv = 0, gmii_rx_er = 0;
  logic [7:0] gmii_rxd = 0;
  logic cfg_clk = 0, cfg_din = 0, cfg_dout;
  logic pkt_done;
  pkt_desc_t pkt;
  logic [15:0] cnt_frames, cnt_accepted, cnt_discarded, frag_boff, pay_len;
  logic reasm_timeout;
  logic [1:0] reasm_timeout_slot;
  logic crc_preset = 0, crc_in_valid = 0;
  logic [7:0] crc_in_byte = 0;
  logic [31:0] crc_out;
  logic crc_out_valid;
  int checks = 0, failures = 0;

  gppp_top dut (.*);

  always #4 clk = ~clk;                        // 125 MHz GMII clock

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- addresses
  localparam logic [47:0]  MAC  = 48'h02_00_00_00_00_01;
  localparam logic [47:0]  PEER = 48'h02_00_00_00_00_99;
  localparam logic [31:0]  IP4  = 32'hC0A8_0102;
  localparam logic [31:0]  SRC4 = 32'hC0A8_0163;
  localparam logic [127:0] IP6  = 128'h2001_0DB8_0000_0000_0000_0000_0000_0042;
  localparam logic [127:0] SRC6 = 128'h2001_0DB8_0000_0000_0000_0000_0000_0007;

  // ------------------------------------------------------------- expectations
  typedef struct {
    string    name;
    bit       acc;
    discard_t why;
    logic [7:0] l4p;
    int       l4off;      // -1: not checked
    bit       frag;
    bit       cpl;
    int       paylen;     // -1: not checked
    int       flen;
    int       last_cyc;   // clock of the last GMII byte
  } exp_t;
  exp_t exq[$];
  int   cyc = 0;
  int   mech[string];

  always @(posedge clk) cyc++;

  // ------------------------------------------------------------------ monitor
  always @(posedge clk) if (rst_n && pkt_done) begin
    exp_t e;
    if (exq.size() == 0) begin chk(0, "descriptor without a frame"); end
    else begin
      e = exq.pop_front();
      chk(pkt.accept == e.acc, $sformatf("%s: accept %0d", e.name, pkt.accept));
      chk(pkt.why == e.why, $sformatf("%s: why %b want %b", e.name, pkt.why, e.why));
      chk(pkt.frame_len == OFFW'(e.flen), $sformatf("%s: len %0d", e.name, pkt.frame_len));
      if (e.acc) begin
        chk(pkt.l4_proto == e.l4p, $sformatf("%s: proto %0d", e.name, pkt.l4_proto));
        if (e.l4off >= 0) chk(pkt.l4_off == OFFW'(e.l4off), $sformatf("%s: l4_off %0d", e.name, pkt.l4_off));
        chk(pkt.fragment == e.frag, $sformatf("%s: frag", e.name));
        chk(pkt.reasm_done == e.cpl, $sformatf("%s: reasm", e.name));
        if (e.paylen >= 0) chk(pay_len == 16'(e.paylen), $sformatf("%s: pay_len %0d", e.name, pay_len));
      end
      // pkt_done was set at the edge before this one
      chk(cyc - 1 - e.last_cyc == 15, $sformatf("%s: latency %0d", e.name, cyc - 1 - e.last_cyc));
      if (pkt.accept) mech["accepted"]++;
      if (pkt.why.ecc) mech["discard_fcs"]++;
      if (pkt.why.eda) mech["discard_mac_address"]++;
      if (pkt.why.ihc) mech["discard_ip_header_checksum"]++;
      if (pkt.why.ida) mech["discard_ip_address"]++;
      if (pkt.why.tuc) mech["discard_tcp_udp_checksum"]++;
      if (pkt.why.irf) mech["discard_duplicate_fragment"]++;
      if (pkt.why.rx_err) mech["discard_receive_error"]++;
      if (pkt.reasm_done && pkt.accept) mech["reassembly_complete"]++;
      if (pkt.reasm_done && pkt.why.tuc) mech["checksum_over_fragments_failed"]++;
      if (pkt.is_ipv6 && pkt.accept) mech["ipv6_accepted"]++;
      if (pkt.is_ipv6 && pkt.reasm_done && pkt.accept) mech["ipv6_reassembly_complete"]++;
    end
  end

  // Mechanisms seen on the page controls inside the processor.
  int tul_offs[int];
  always @(posedge clk) if (rst_n) begin
    if (dut.st[FP_IVF] && !dut.en[FP_IVF] && !dut.drop) mech["layer3_pages_off"]++;
    if (dut.st[FP_TUL] && !dut.en[FP_TUL] && !dut.drop) mech["layer4_pages_off"]++;
    if (dut.drop && dut.u_cc.state == 2'd2) begin
      mech["discard_switches_pages_off"]++;
      chk(dut.en == '0, "pages enabled after a discard");
    end
    if (dut.st[FP_TUL]) tul_offs[int'(dut.tap[FP_TUL].boff)] = 1;
    if (dut.elt_pend && dut.elt_len) mech["length_field_payload_end"]++;
    if (dut.u_ipn.walking && dut.u_ipn.b_cn[8]) mech["ipv6_extension_header"]++;
  end
  always @(posedge dut.u_ira.res_valid) if (dut.u_ira.res_frag && !dut.u_ira.res_complete)
    mech["fragment_context_open"]++;

  // ------------------------------------------------------------------ senders
  task automatic gmii_send(input bq_t f, input bit er, input exp_t e);
    for (int i = 0; i < 8; i++) begin
      gmii_rx_dv <= 1; gmii_rxd <= (i == 7) ? 8'hD5 : 8'h55; gmii_rx_er <= 0;
      @(posedge clk);
    end
    foreach (f[i]) begin
      gmii_rxd <= f[i]; gmii_rx_er <= er && (i == 20);
      @(posedge clk);
    end
    #1 e.last_cyc = cyc;                      // edge that sampled the last byte
    e.flen = f.size();
    exq.push_back(e);
    gmii_rx_dv <= 0; gmii_rx_er <= 0;
    repeat (12) @(posedge clk);                // minimum inter-frame gap
  endtask

  function automatic exp_t ok(input string n, input logic [7:0] p, input int off, input int pl = -1);
    exp_t e;
    e = '{name: n, acc: 1, why: '0, l4p: p, l4off: off, frag: 0, cpl: 0, paylen: pl,
          flen: 0, last_cyc: 0};
    return e;
  endfunction
  function automatic exp_t bad(input string n, input discard_t w);
    exp_t e;
    e = ok(n, 0, -1);
    e.acc = 0; e.why = w;
    return e;
  endfunction

  // Stand-alone CRC generator check on one frame body (runs alongside).
  task automatic crc_gen_check(input bq_t f);
    logic [31:0] want;
    bq_t body;
    for (int i = 0; i < f.size() - 4; i++) body.push_back(f[i]);
    want = crc32_ref(body);
    @(posedge clk); crc_preset <= 1; @(posedge clk); crc_preset <= 0;
    foreach (body[i]) begin crc_in_valid <= 1; crc_in_byte <= body[i]; @(posedge clk); end
    for (int i = 0; i < 4; i++) begin crc_in_valid <= 1; crc_in_byte <= 8'h00; @(posedge clk); end
    crc_in_valid <= 0;
    repeat (4) @(posedge clk);                 // output final three clocks after the last byte
    chk(crc_out == want, $sformatf("crc gen %h want %h", crc_out, want));
    chk({crc_out[7:0], crc_out[15:8], crc_out[23:16], crc_out[31:24]} ==
        {f[f.size()-4], f[f.size()-3], f[f.size()-2], f[f.size()-1]}, "crc gen FCS bytes");
    if (crc_out == want) mech["crc_generator"]++;
  endtask

  // ------------------------------------------------------------ configuration
  logic [129:0] ent [8];
  bit cfgbits[$];
  task automatic cfg_shift(input bit v, output bit o);
    o = cfg_dout; cfg_din = v; #1 cfg_clk = 1; #1 cfg_clk = 0;
  endtask

  initial begin
    bq_t f, s, p, ext, d;
    bq_t frs[3];
    discard_t w;
    bit o;
    int nb;
    ent[0] = {1'b1, 1'b0, 96'd0, IP4};
    ent[1] = {1'b1, 1'b0, 96'd0, 32'hFFFF_FFFF};
    ent[2] = {1'b1, 1'b1, IP6};
    for (int i = 3; i < 8; i++) ent[i] = '0;
    // chain order from cfg_din: controller (12), MAC page (50), IP table (1040)
    for (int i = 7; i >= 0; i--) for (int b = 129; b >= 0; b--) cfgbits.push_back(ent[i][b]);
    for (int b = 47; b >= 0; b--) cfgbits.push_back(MAC[b]);
    cfgbits.push_back(1'b1); cfgbits.push_back(1'b1);           // broadcast, multicast
    for (int b = 0; b < NFP; b++) cfgbits.push_back(1'b1);      // all pages selected
    foreach (cfgbits[i]) cfg_shift(cfgbits[i], o);
    // Read back: shifting the same vector again must return the loaded one.
    nb = 0;
    foreach (cfgbits[i]) begin cfg_shift(cfgbits[i], o); if (o == cfgbits[i]) nb++; end
    chk(nb == cfgbits.size(), $sformatf("config read back %0d of %0d", nb, cfgbits.size()));
    if (nb == cfgbits.size()) mech["config_chain_readback"]++;

    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);

    // 1. IPv4 TCP
    d = rand_bytes(100);
    s = tcp_seg(16'd1234, 16'd80, d, v4_ph(SRC4, IP4));
    f = eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd6, s));
    fork gmii_send(f, 0, ok("v4 tcp", 8'd6, 34, 100)); crc_gen_check(f); join
    // 2. IPv4 UDP
    s = udp_seg(16'd53, 16'd53, rand_bytes(37), v4_ph(SRC4, IP4));
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd17, s)), 0, ok("v4 udp", 8'd17, 34, 37));
    // 3. IPv4 UDP without checksum (zero)
    s = udp_seg(16'd53, 16'd53, rand_bytes(21), v4_ph(SRC4, IP4));
    s[6] = 0; s[7] = 0;
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd17, s)), 0, ok("v4 udp no ck", 8'd17, 34));
    // 4. IPv4 with options (IHL 7) and TCP
    d = rand_bytes(10);
    s = tcp_seg(16'd1, 16'd2, d, v4_ph(SRC4, IP4));
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd6, s, 16'h5, 0, 0, 7)), 0,
              ok("v4 options", 8'd6, 42, 10));
    // 5. IPv6 UDP
    s = udp_seg(16'd546, 16'd547, rand_bytes(33), v6_ph(SRC6, IP6));
    gmii_send(eth_frame(MAC, PEER, 16'h86DD, ipv6(SRC6, IP6, 8'd17, ext, s)), 0, ok("v6 udp", 8'd17, 54));
    // 6. IPv6 hop-by-hop + routing extension headers, TCP
    ext = {8'd43, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
    ext = {ext, 8'd6, 8'd1};
    for (int i = 0; i < 14; i++) ext.push_back(8'(i));
    d = rand_bytes(57);
    s = tcp_seg(16'd9, 16'd10, d, v6_ph(SRC6, IP6));
    gmii_send(eth_frame(MAC, PEER, 16'h86DD, ipv6(SRC6, IP6, 8'd0, ext, s)), 0,
              ok("v6 ext tcp", 8'd6, 78, 57));
    ext.delete();
    // 7. ICMP echo (layer-4 pages off)
    p = ipv4(SRC4, IP4, 8'd1, rand_bytes(40));
    gmii_send(eth_frame(MAC, PEER, 16'h0800, p), 0, ok("icmp", 8'd1, 34));
    // 8. ARP request, broadcast (layer-3 pages off)
    gmii_send(eth_frame(48'hFFFF_FFFF_FFFF, PEER, 16'h0806, rand_bytes(28)), 0, ok("arp", 8'd0, 0));
    // 9. IEEE 802.3 length frame with LLC payload
    gmii_send(eth_frame(MAC, PEER, 16'd46, rand_bytes(46)), 0, ok("802.3", 8'd0, 0));
    // 10. maximum-size frame, TCP 1460 bytes
    d = rand_bytes(1460);
    s = tcp_seg(16'd20, 16'd21, d, v4_ph(SRC4, IP4));
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd6, s)), 0, ok("max tcp", 8'd6, 34, 1460));

    // discards, each for one reason
    s = udp_seg(16'd53, 16'd53, rand_bytes(30), v4_ph(SRC4, IP4));
    w = '0; w.ecc = 1;
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd17, s), 1), 0, bad("bad fcs", w));
    w = '0; w.eda = 1;
    gmii_send(eth_frame(48'h02_00_00_00_00_02, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd17, s)), 0, bad("other mac", w));
    w = '0; w.ihc = 1;
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd17, s, 16'h1, 0, 0, 5, 1)), 0, bad("ip hdr ck", w));
    w = '0; w.ida = 1;
    s = udp_seg(16'd53, 16'd53, rand_bytes(30), v4_ph(SRC4, 32'hC0A8_0103));
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, 32'hC0A8_0103, 8'd17, s)), 0, bad("other ip", w));
    w = '0; w.tuc = 1;
    s = tcp_seg(16'd1, 16'd2, rand_bytes(64), v4_ph(SRC4, IP4), 1);
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd6, s)), 0, bad("tcp ck", w));
    w = '0; w.rx_err = 1;
    s = tcp_seg(16'd1, 16'd2, rand_bytes(64), v4_ph(SRC4, IP4));
    gmii_send(eth_frame(MAC, PEER, 16'h0800, ipv4(SRC4, IP4, 8'd6, s)), 1, bad("rx_er", w));
    w = '0; w.tuc = 1;
    s = udp_seg(16'd53, 16'd53, rand_bytes(30), v6_ph(SRC6, IP6), 1);
    gmii_send(eth_frame(MAC, PEER, 16'h86DD, ipv6(SRC6, IP6, 8'd17, ext, s)), 0, bad("v6 udp ck", w));

    // fragmented UDP datagrams: 48-byte segment in three 16-byte fragments
    for (int b = 0; b < 2; b++) begin
      exp_t e;
      int order [3];
      s = udp_seg(16'd7, 16'd9, rand_bytes(40), v4_ph(SRC4, IP4), b == 1);
      for (int j = 0; j < 3; j++) begin
        frs[j].delete();
        for (int k = 0; k < 16; k++) frs[j].push_back(s[16 * j + k]);
      end
      order = '{1, 0, 2};
      foreach (order[n]) begin
        int j;
        j = order[n];
        p = ipv4(SRC4, IP4, 8'd17, frs[j], 16'(16'h100 + b), j != 2, 13'(2 * j));
        e = ok($sformatf("frag %0d.%0d", b, j), 8'd17, 34);
        e.frag = 1; e.cpl = (n == 2);
        if (b == 1 && n == 2) begin e.acc = 0; e.why.tuc = 1; end
        gmii_send(eth_frame(MAC, PEER, 16'h0800, p), 0, e);
      end
    end
    // IPv6 fragmented UDP datagram: fragment extension header after the base
    // header, transport data at 62, fragments sent in the order 2, 0, 1
    begin
      exp_t e;
      int order [3];
      s = udp_seg(16'd7, 16'd9, rand_bytes(40), v6_ph(SRC6, IP6));
      for (int j = 0; j < 3; j++) begin
        frs[j].delete();
        for (int k = 0; k < 16; k++) frs[j].push_back(s[16 * j + k]);
      end
      order = '{2, 0, 1};
      foreach (order[n]) begin
        int j;
        j = order[n];
        ext = {8'd17, 8'd0};
        put16(ext, 16'((2 * j) << 3) | 16'(j != 2));
        put32(ext, 32'h0001_0300);
        e = ok($sformatf("v6 frag %0d", j), 8'd17, 62);
        e.frag = 1; e.cpl = (n == 2);
        gmii_send(eth_frame(MAC, PEER, 16'h86DD, ipv6(SRC6, IP6, 8'd44, ext, frs[j])), 0, e);
      end
      ext.delete();
    end
    // duplicate fragment: the same first fragment twice
    p = ipv4(SRC4, IP4, 8'd17, frs[0], 16'h200, 1, 0);
    begin
      exp_t e;
      e = ok("frag dup 1st", 8'd17, 34); e.frag = 1;
      gmii_send(eth_frame(MAC, PEER, 16'h0800, p), 0, e);
    end
    w = '0; w.irf = 1;
    gmii_send(eth_frame(MAC, PEER, 16'h0800, p), 0, bad("frag dup 2nd", w));

    repeat (40) @(posedge clk);
    chk(exq.size() == 0, $sformatf("%0d frames without descriptor", exq.size()));
    chk(cnt_frames == 16'(cnt_accepted + cnt_discarded), "counter sum");
    chk(cnt_frames == 16'd28, $sformatf("frames counted %0d", cnt_frames));
    chk(cnt_discarded == 16'd9, $sformatf("frames discarded %0d", cnt_discarded));
    if (tul_offs.size() >= 4) mech["tcp_udp_page_data_dependent_start"]++;
    begin
      static string names [21] = '{"accepted", "discard_fcs", "discard_mac_address",
               "discard_ip_header_checksum", "discard_ip_address", "discard_tcp_udp_checksum",
               "discard_duplicate_fragment", "discard_receive_error", "reassembly_complete",
               "checksum_over_fragments_failed", "ipv6_accepted", "layer3_pages_off",
               "layer4_pages_off", "discard_switches_pages_off", "length_field_payload_end",
               "ipv6_extension_header", "fragment_context_open", "crc_generator",
               "config_chain_readback", "tcp_udp_page_data_dependent_start",
               "ipv6_reassembly_complete"};
      foreach (names[i]) begin
        int n;
        n = mech.exists(names[i]) ? mech[names[i]] : 0;
        $display("mechanism %-34s %0d", names[i], n);
        checks++;
        if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
