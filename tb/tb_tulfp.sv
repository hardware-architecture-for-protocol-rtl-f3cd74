// tb_tulfp: TCP/UDP length page, fired on the word holding the first
// transport byte. For TCP the transport length is the datagram end minus the
// transport start and the payload length subtracts the data offset; for UDP
// the length field must agree (a wrong one raises len_err).
module tb_tulfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, is_tcp = 0, is_udp = 0;
  logic [OFFW-1:0] l4_off = '0, ip_end = '0;
  pipe_word_t w = '0;
  logic len_valid, pay_valid, len_err;
  logic [15:0] l4_len, pay_len;
  int checks = 0, failures = 0;

  tulfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p, s;
    bit tcp, wrong;
    int ihl, n, thl, sw;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 40; t++) begin
      tcp = t[0]; wrong = (t % 5 == 4) && !tcp;
      n = $urandom_range(0, 80); ihl = 5 + $urandom_range(0, 4);
      s = tcp ? tcp_seg(1, 2, rand_bytes(n), 0) : udp_seg(1, 2, rand_bytes(n), 0);
      thl = tcp ? 4 * (5 + (t % 3)) : 8;
      if (tcp) s[12] = {4'(thl / 4), 4'h0};
      if (wrong) s[5] = s[5] ^ 8'h01;
      p = ipv4(32'h1, 32'h2, tcp ? 8'd6 : 8'd17, s, 16'h1, 0, 0, ihl);
      f = eth_frame(48'h1, 48'h2, 16'h0800, p);
      is_tcp <= tcp; is_udp <= !tcp;
      l4_off <= OFFW'(14 + 4 * ihl); ip_end <= OFFW'(14 + p.size());
      sw = (14 + 4 * ihl) / 4;
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == sw);
        @(posedge clk);
        @(negedge clk);
        if (k == sw) begin
          checks++;
          if (!len_valid || l4_len != 16'(s.size())) begin
            failures++; $display("FAIL len %0d exp %0d", l4_len, s.size());
          end
        end
      end
      checks++;
      if (!pay_valid || pay_len != 16'(s.size() - thl) || len_err !== wrong) begin
        failures++; $display("FAIL t=%0d pay %0d exp %0d err %b", t, pay_len, s.size() - thl, len_err);
      end
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
