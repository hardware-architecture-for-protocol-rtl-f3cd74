// tb_ihcfp: IPv4 header checksum page. Headers of 20..60 bytes with correct
// and corrupted checksums, sent one word per clock; done must come one clock
// after the word holding the last header byte with discard set exactly for
// the corrupted ones. IPv6 packets must not be checked.
module tb_ihcfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, is_v4 = 0, len_valid = 0, bad_ihl = 0;
  logic [OFFW-1:0] hdr_end_off = '0;
  pipe_word_t w = '0;
  logic done, discard;
  logic [15:0] sum;
  int checks = 0, failures = 0;

  ihcfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p, none;
    int ihl, endw, seen;
    bit bad, six;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 40; t++) begin
      ihl = 5 + $urandom_range(0, 10);
      bad = t[0];
      six = (t % 7 == 6);
      if (six) p = ipv6(128'h1, 128'h2, 8'd17, none, rand_bytes(20));
      else     p = ipv4($urandom, $urandom, 8'd6, rand_bytes($urandom_range(0, 40)),
                        16'($urandom), 0, 0, ihl, bad);
      f = eth_frame(48'h1, 48'h2, 16'h0800, p);
      is_v4 <= !six; len_valid <= 1; hdr_end_off <= OFFW'(14 + ihl * 4);
      endw = (14 + ihl * 4 - 1) / 4;
      seen = 0;
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == 3);
        @(posedge clk);
        @(negedge clk);
        if (k >= 3 && done && !seen) begin
          seen = 1;
          checks++;
          if (six || k != endw || discard !== bad) begin
            failures++; $display("FAIL t=%0d k=%0d endw=%0d disc=%b bad=%b", t, k, endw, discard, bad);
          end
        end
      end
      if (!six && !seen) begin failures++; $display("FAIL no done"); end
      if (six) checks++;
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
