// tb_irafp: IP reassembly support page with a short time-out. Scripted
// scenarios: an unfragmented packet; a datagram in three fragments in order;
// one out of order with a duplicate; two interleaved datagrams;
// a dropped frame; an IPv6 datagram (fragment extension header) interleaved
// with an IPv4 one; a full table; and datagrams whose last fragment never
// comes (time-out).
// After each frame the slot, new/first/complete marks, datagram length,
// buffer offset and discard are compared with the values the scenario implies.
module tb_irafp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  localparam logic [31:0] TO = 32'd400;
  logic clk = 0, rst_n = 0, en = 1, start = 0, frame_end = 0, drop = 0, is_v4 = 1;
  logic is_v6 = 0, v6_frag = 0;
  logic [OFFW-1:0] fh_off = '0;
  logic [7:0] hdr_len = 8'd20;
  logic [15:0] ip_len = 0;
  pipe_word_t w = '0;
  logic res_valid, res_frag, res_new, res_first, res_complete, discard, timeout;
  logic [1:0] res_slot, timeout_slot;
  logic [15:0] res_dgram_len, frag_boff;
  int checks = 0, failures = 0;
  int timeouts = 0;
  logic [1:0] last_to_slot;

  irafp #(.NCTX(4), .MAXF(8), .TIMEOUT(TO)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && timeout) begin timeouts++; last_to_slot = timeout_slot; end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one fragment: payload bytes, offset in 8-byte units, MF
  task automatic frag(input logic [31:0] src, input logic [15:0] id, input int off8,
                      input bit mf, input int plen, input bit drp = 0);
    bq_t f, p;
    p = ipv4(src, 32'h0A000002, 8'd17, rand_bytes(plen), id, mf, 13'(off8));
    f = eth_frame(48'h1, 48'h2, 16'h0800, p);
    ip_len <= 16'(p.size()); is_v4 <= 1; is_v6 <= 0; v6_frag <= 0; hdr_len <= 8'd20;
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); start <= (k == 3); frame_end <= (k == nwords(f) - 1);
      drop <= drp && (k == nwords(f) - 1);
      @(posedge clk);
    end
    w <= '0; start <= 0; frame_end <= 0; drop <= 0;
    @(negedge clk);
  endtask

  // IPv6 fragment: base header, then the fragment header (as the protocol
  // page reports it: present, at frame offset 54)
  task automatic frag6(input logic [127:0] src, input logic [31:0] id, input int off8,
                       input bit mf, input int plen);
    bq_t f, p, ext;
    ext = {};
    ext.push_back(8'd17); ext.push_back(8'd0); put16(ext, 16'(off8 << 3) | 16'(mf)); put32(ext, id);
    p = ipv6(src, 128'h2, 8'd44, ext, rand_bytes(plen));
    f = eth_frame(48'h1, 48'h2, 16'h86DD, p);
    ip_len <= 16'(p.size()); is_v4 <= 0; is_v6 <= 1; v6_frag <= 1; fh_off <= OFFW'(54);
    hdr_len <= 8'd40;
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); start <= (k == 3); frame_end <= (k == nwords(f) - 1);
      @(posedge clk);
    end
    w <= '0; start <= 0; frame_end <= 0;
    @(negedge clk);
  endtask

  task automatic expect_r(input string tag, input bit fr, input int slot, input bit nw,
                          input bit first, input bit cpl, input int dlen, input bit disc);
    checks++;
    if (!res_valid || res_frag !== fr || discard !== disc ||
        (fr && (res_slot != 2'(slot) || res_new !== nw || res_first !== first ||
                res_complete !== cpl || (cpl && res_dgram_len != 16'(dlen))))) begin
      failures++;
      $display("FAIL %s: v=%b frag=%b slot=%0d new=%b first=%b cpl=%b len=%0d disc=%b", tag,
               res_valid, res_frag, res_slot, res_new, res_first, res_complete, res_dgram_len, discard);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    frag(32'h0A000001, 16'h0001, 0, 0, 40);
    expect_r("plain", 0, 0, 0, 0, 0, 0, 0);
    // three fragments in order: 0..23, 24..47, 48..59
    frag(32'h0A000001, 16'h0010, 0, 1, 24);  expect_r("a1", 1, 0, 1, 1, 0, 0, 0);
    checks++; if (frag_boff != 0) failures++;
    frag(32'h0A000001, 16'h0010, 3, 1, 24);  expect_r("a2", 1, 0, 0, 0, 0, 0, 0);
    checks++; if (frag_boff != 24) failures++;
    frag(32'h0A000001, 16'h0010, 6, 0, 12);  expect_r("a3", 1, 0, 0, 0, 1, 60, 0);
    // out of order with a duplicate: last first, then a duplicate of it
    frag(32'h0A000003, 16'h0020, 4, 0, 10);  expect_r("b1", 1, 0, 1, 0, 0, 0, 0);
    frag(32'h0A000003, 16'h0020, 4, 0, 10);  expect_r("b-dup", 0, 0, 0, 0, 0, 0, 1);
    // interleaved second datagram gets another slot
    frag(32'h0A000004, 16'h0020, 0, 1, 16);  expect_r("c1", 1, 1, 1, 1, 0, 0, 0);
    frag(32'h0A000003, 16'h0020, 0, 1, 32);  expect_r("b2", 1, 0, 0, 1, 1, 42, 0);
    frag(32'h0A000004, 16'h0020, 2, 0, 8);   expect_r("c2", 1, 1, 0, 0, 1, 24, 0);
    // dropped frame leaves no trace: its datagram is new again afterwards
    frag(32'h0A000005, 16'h0030, 0, 1, 16, 1);
    checks++; if (res_valid) begin failures++; $display("FAIL drop"); end
    // IPv6 datagram (0..23, 24..33) interleaved with an IPv4 one that has the
    // same identification bits: separate contexts
    frag6(128'h2001_0DB8_0000_0000_0000_0000_0000_0001, 32'h0000_0050, 0, 1, 24);
    expect_r("v6a", 1, 0, 1, 1, 0, 0, 0);
    frag(32'h0A000001, 16'h0050, 0, 1, 16);  expect_r("v4x", 1, 1, 1, 1, 0, 0, 0);
    frag6(128'h2001_0DB8_0000_0000_0000_0000_0000_0001, 32'h0000_0050, 3, 0, 10);
    expect_r("v6b", 1, 0, 0, 0, 1, 34, 0);
    checks++; if (frag_boff != 24) failures++;
    frag6(128'h2001_0DB8_0000_0000_0000_0000_0000_0001, 32'h0000_0050, 0, 0, 20);
    expect_r("v6-whole", 0, 0, 0, 0, 0, 0, 0);
    frag(32'h0A000001, 16'h0050, 2, 0, 8);   expect_r("v4y", 1, 1, 0, 0, 1, 24, 0);
    // fill the table: four open datagrams, a fifth is refused
    for (int i = 0; i < 4; i++) begin
      frag(32'h0B000000 + i, 16'h0040, 0, 1, 16);
      expect_r("fill", 1, i, 1, 1, 0, 0, 0);
    end
    frag(32'h0B000009, 16'h0040, 0, 1, 16);  expect_r("full", 0, 0, 0, 0, 0, 0, 1);
    // nothing completes them: all four must time out
    repeat (int'(TO) + 50) @(posedge clk);
    checks++;
    if (timeouts != 4) begin failures++; $display("FAIL timeouts=%0d", timeouts); end
    frag(32'h0B000009, 16'h0040, 0, 1, 16);  expect_r("after", 1, 0, 1, 1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
