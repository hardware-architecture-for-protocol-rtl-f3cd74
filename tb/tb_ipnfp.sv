// tb_ipnfp: IP protocol / next header page. IPv4 packets with options and
// several protocols; IPv6 packets with random chains of hop-by-hop, routing,
// destination-options and fragment headers in front of TCP, UDP, ICMPv6 or an
// unknown header. The reported protocol, transport offset and flags must
// match the chain built by the testbench, and be ready before the transport
// header has passed.
module tb_ipnfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, is_v4 = 0, is_v6 = 0, hl_valid = 0;
  logic [7:0] hdr_len = 0;
  pipe_word_t w = '0;
  logic done, is_tcp, is_udp, known, v6_frag;
  logic [7:0] l4_proto;
  logic [OFFW-1:0] l4_off, fh_off;
  int checks = 0, failures = 0;

  ipnfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p, ext;
    logic [7:0] protos [5] = '{8'd6, 8'd17, 8'd1, 8'd2, 8'd58};
    logic [7:0] exts [4]   = '{8'd0, 8'd43, 8'd60, 8'd44};
    logic [7:0] fin, first, cur;
    int off, n, ihl, len8, readyw, fho;
    bit six, fr, ok_by_time;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      six = t[0];
      fin = (t % 11 == 5) ? 8'd99 : protos[$urandom_range(0, 4)];
      fr = 0;
      if (!six) begin
        ihl = 5 + $urandom_range(0, 4);
        p = ipv4(32'h1, 32'h2, fin, rand_bytes(40), 16'h1, 0, 0, ihl);
        off = 14 + ihl * 4;
      end else begin
        // build the chain back to front
        ext = {};
        n = $urandom_range(0, 4);
        off = 54;
        first = fin;
        begin
          logic [7:0] kinds [$];
          for (int i = 0; i < n; i++) kinds.push_back(exts[$urandom_range(0, 3)]);
          // forward: kinds[0] is the first extension header
          for (int i = 0; i < n; i++) begin
            cur = (i + 1 < n) ? kinds[i+1] : fin;
            if (kinds[i] == 8'd44) begin
              fr = 1;
              fho = off;
              ext.push_back(cur); ext.push_back(8'd0); put16(ext, 16'h0001); put32(ext, 32'hABCD);
              off += 8;
            end else begin
              len8 = $urandom_range(0, 2);
              ext.push_back(cur); ext.push_back(8'(len8));
              for (int j = 0; j < 6 + 8 * len8; j++) ext.push_back(8'h01);
              off += 8 * (len8 + 1);
            end
          end
          if (n > 0) first = kinds[0];
        end
        p = ipv6(128'h1, 128'h2, first, ext, rand_bytes(40));
      end
      f = eth_frame(48'h1, 48'h2, six ? 16'h86DD : 16'h0800, p);
      is_v4 <= !six; is_v6 <= six; hl_valid <= 1; hdr_len <= six ? 8'd40 : 8'(ihl * 4);
      readyw = off / 4;        // word holding the first transport byte
      ok_by_time = 0;
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == 3);
        @(posedge clk);
        @(negedge clk);
        if (k == readyw && done) ok_by_time = 1;
      end
      checks++;
      if (!done || !ok_by_time || l4_proto != fin || l4_off != OFFW'(off) ||
          is_tcp !== (fin == 6) || is_udp !== (fin == 17) || known !== (fin != 99) ||
          v6_frag !== fr || (fr && fh_off != OFFW'(fho))) begin
        failures++;
        $display("FAIL t=%0d six=%b proto %0d/%0d off %0d/%0d frag %b/%b ready %b", t, six,
                 l4_proto, fin, l4_off, off, v6_frag, fr, ok_by_time);
      end
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
