// tb_tucfp: TCP/UDP checksum page. Random TCP and UDP segments over IPv4
// (with options) and IPv6 (with an extension header), of odd and even
// lengths, with correct and corrupted checksums; a UDP/IPv4 datagram without
// checksum; and fragmented datagrams whose fragments arrive out of order,
// steered through the back-up accumulators as the reassembly page would.
// done must follow the last word by one clock with the expected discard.
module tb_tucfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, frame_end = 0, drop = 0;
  logic is_v4 = 0, is_v6 = 0, l4_valid = 0, end_valid = 0;
  logic [OFFW-1:0] l4_off = '0, ip_end = '0;
  logic [7:0] l4_proto = 0;
  logic fr_frag = 0, fr_new = 0, fr_first = 0, fr_complete = 0;
  logic [1:0] fr_slot = 0;
  logic [15:0] fr_dgram_len = 0;
  pipe_word_t w = '0;
  logic done, discard, checked;
  logic [15:0] sum;
  int checks = 0, failures = 0;

  tucfp #(.NSLOT(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bq_t f, input bit exp_chk, input bit exp_disc, input string tag);
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); start <= (k == 3); frame_end <= (k == nwords(f) - 1);
      @(posedge clk);
    end
    w <= '0; start <= 0; frame_end <= 0;
    @(negedge clk);
    checks++;
    if (!done || checked !== exp_chk || (exp_chk && discard !== exp_disc)) begin
      failures++; $display("FAIL %s done=%b chk=%b disc=%b exp %b", tag, done, checked, discard, exp_disc);
    end
    @(posedge clk);
  endtask

  initial begin
    bq_t f, p, s, ext, none;
    logic [31:0] a4, b4;
    logic [127:0] a6, b6;
    bit six, tcp, bad;
    int ihl, n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      six = (t % 3 == 2); tcp = t[0]; bad = (t % 4 >= 2);
      n = $urandom_range(0, 61);
      a4 = $urandom; b4 = $urandom; a6 = {$urandom, $urandom, $urandom, $urandom};
      b6 = {$urandom, $urandom, $urandom, $urandom};
      if (six) begin
        s = tcp ? tcp_seg(16'd80, 16'd5000, rand_bytes(n), v6_ph(a6, b6), bad)
                : udp_seg(16'd53, 16'd5000, rand_bytes(n), v6_ph(a6, b6), bad);
        ext = {}; ext.push_back(tcp ? 8'd6 : 8'd17); ext.push_back(8'd0);
        for (int j = 0; j < 6; j++) ext.push_back(8'h01);
        p = ipv6(a6, b6, 8'd60, ext, s);
        l4_off <= OFFW'(14 + 48);
      end else begin
        ihl = 5 + $urandom_range(0, 3);
        s = tcp ? tcp_seg(16'd80, 16'd5000, rand_bytes(n), v4_ph(a4, b4), bad)
                : udp_seg(16'd53, 16'd5000, rand_bytes(n), v4_ph(a4, b4), bad);
        p = ipv4(a4, b4, tcp ? 8'd6 : 8'd17, s, 16'h1, 0, 0, ihl);
        l4_off <= OFFW'(14 + ihl * 4);
      end
      f = eth_frame(48'h1, 48'h2, six ? 16'h86DD : 16'h0800, p);
      is_v4 <= !six; is_v6 <= six; l4_valid <= 1; end_valid <= 1;
      ip_end <= OFFW'(14 + p.size()); l4_proto <= tcp ? 8'd6 : 8'd17;
      fr_frag <= 0;
      send(f, 1, bad, "seg");
    end
    // UDP over IPv4 without checksum
    s = udp_seg(16'd1, 16'd2, rand_bytes(20), 16'h0);
    s[6] = 0; s[7] = 0;
    p = ipv4(32'h1, 32'h2, 8'd17, s);
    f = eth_frame(48'h1, 48'h2, 16'h0800, p);
    is_v4 <= 1; is_v6 <= 0; l4_off <= 34; ip_end <= OFFW'(14 + p.size()); l4_proto <= 8'd17;
    send(f, 0, 0, "nock");
    // fragmented UDP datagrams: fragments 1, 2 (last), 0 (first) - good, then bad
    for (int b = 0; b < 2; b++) begin
      bq_t fr [3];
      a4 = $urandom; b4 = $urandom;
      s = udp_seg(16'd7, 16'd9, rand_bytes(50), v4_ph(a4, b4), b == 1);   // 58 bytes
      for (int j = 0; j < 3; j++) begin
        fr[j] = {};
        for (int q = 24 * j; q < 24 * j + 24 && q < s.size(); q++) fr[j].push_back(s[q]);
      end
      l4_proto <= 8'd17; l4_off <= 34; fr_frag <= 1; fr_slot <= 2'(b + 1);
      fr_dgram_len <= 16'(s.size());
      for (int o = 0; o < 3; o++) begin
        int j;
        j = (o == 0) ? 1 : (o == 1) ? 2 : 0;
        p = ipv4(a4, b4, 8'd17, fr[j], 16'h77, j != 2, 13'(3 * j));
        f = eth_frame(48'h1, 48'h2, 16'h0800, p);
        ip_end <= OFFW'(14 + p.size());
        fr_new <= (o == 0); fr_first <= (j == 0); fr_complete <= (o == 2);
        send(f, o == 2, b == 1, "frag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
