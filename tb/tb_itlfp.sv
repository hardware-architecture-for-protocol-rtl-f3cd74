// tb_itlfp: IP total length page. IPv4 total length and IPv6 payload length
// (+40) of random packets must be reported one clock after the word holding
// bytes 16..19, with ip_end = 14 + length.
module tb_itlfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, is_v4 = 0, is_v6 = 0;
  pipe_word_t w = '0;
  logic len_valid;
  logic [15:0] ip_len;
  logic [OFFW-1:0] ip_end;
  int checks = 0, failures = 0;

  itlfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p, none;
    bit six;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 30; t++) begin
      six = t[0];
      if (six) p = ipv6(128'h1, 128'h2, 8'd17, none, rand_bytes($urandom_range(1, 200)));
      else     p = ipv4(32'h1, 32'h2, 8'd17, rand_bytes($urandom_range(1, 200)));
      f = eth_frame(48'h1, 48'h2, six ? 16'h86DD : 16'h0800, p);
      is_v4 <= !six; is_v6 <= six;
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == 3);
        @(posedge clk);
        if (k == 4) begin
          @(negedge clk);
          checks++;
          if (!len_valid || ip_len != 16'(p.size()) || ip_end != OFFW'(14 + p.size())) begin
            failures++; $display("FAIL len %0d exp %0d", ip_len, p.size());
          end
        end
      end
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
