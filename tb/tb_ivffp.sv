// tb_ivffp: IP version page. IPv4, IPv6 and other version nibbles are sent;
// version and flags must appear one clock after the word holding byte 14.
module tb_ivffp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  pipe_word_t w = '0;
  logic done, is_v4, is_v6;
  logic [3:0] version;
  int checks = 0, failures = 0;

  ivffp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p;
    logic [3:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 30; t++) begin
      v = (t % 3 == 0) ? 4'd4 : (t % 3 == 1) ? 4'd6 : 4'($urandom_range(0, 15));
      p = rand_bytes(40);
      p[0] = {v, 4'h5};
      f = eth_frame(48'h1, 48'h2, 16'h0800, p);
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == 3);
        @(posedge clk);
        if (k == 3) begin
          @(negedge clk);
          checks++;
          if (!done || version !== v || is_v4 !== (v == 4) || is_v6 !== (v == 6)) begin
            failures++; $display("FAIL v=%0d got %0d", v, version);
          end
        end
      end
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
