// tb_ihlfp: IP header length page. IPv4 headers with IHL 5..15 (and a bad IHL
// of 3) and IPv6 headers; the length and header-end offset must be valid one
// clock after the word holding byte 14, and hdr_end must pulse one clock
// after the word holding the last header byte.
module tb_ihlfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, is_v4 = 0, is_v6 = 0;
  pipe_word_t w = '0;
  logic len_valid, hdr_end, bad_ihl;
  logic [7:0] hdr_len;
  logic [OFFW-1:0] hdr_end_off;
  int checks = 0, failures = 0;

  ihlfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p, none;
    int ihl, hl, endw, pulses;
    bit six;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 30; t++) begin
      six = (t % 4 == 3);
      ihl = (t == 5) ? 3 : 5 + (t % 11);
      if (six) p = ipv6(128'h1, 128'h2, 8'd17, none, rand_bytes(30));
      else     p = ipv4(32'h0a000001, 32'h0a000002, 8'd17, rand_bytes(30), 16'h1, 0, 0, (ihl < 5) ? 5 : ihl);
      if (!six) p[0] = {4'd4, 4'(ihl)};
      hl = six ? 40 : ihl * 4;
      endw = (14 + hl - 1) / 4;
      f = eth_frame(48'h1, 48'h2, six ? 16'h86DD : 16'h0800, p);
      is_v4 <= !six; is_v6 <= six;
      pulses = 0;
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == 3);
        @(posedge clk);
        @(negedge clk);
        if (hdr_end) begin
          pulses++;
          checks++;
          if (k != endw) begin failures++; $display("FAIL hdr_end at word %0d exp %0d", k, endw); end
        end
        if (k == 3) begin
          checks++;
          if (!len_valid || hdr_len != 8'(hl) || hdr_end_off != OFFW'(14 + hl) ||
              bad_ihl !== (!six && ihl < 5)) begin
            failures++; $display("FAIL len %0d exp %0d", hdr_len, hl);
          end
        end
      end
      checks++;
      if (pulses != 1) begin failures++; $display("FAIL pulses=%0d", pulses); end
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
