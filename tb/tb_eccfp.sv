// tb_eccfp: checks the CRC-32 page at full rate (one word per clock) with
// random frames of every length modulo four, half of them with a corrupted
// FCS. done must follow the last word by one clock, and discard must be set
// exactly for the corrupted frames. A frame with the page asleep (en low)
// must leave the previous verdict untouched.
module tb_eccfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, frame_end = 0;
  pipe_word_t w = '0;
  logic done, discard;
  logic [31:0] crc_result;
  int checks = 0, failures = 0;

  eccfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bq_t f);
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); start <= (k == 0); frame_end <= (k == nwords(f) - 1);
      @(posedge clk);
    end
    w <= '0; start <= 0; frame_end <= 0;
  endtask

  initial begin
    bq_t f;
    bit bad;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 80; t++) begin
      bad = t[0];
      f = eth_frame(48'h0200_0000_0001, 48'h0200_0000_0002, 16'h0800,
                    rand_bytes(46 + $urandom_range(0, 40)), bad);
      send(f);
      @(negedge clk);
      checks++;
      if (!done || discard !== bad || (!bad && crc_result != 0)) begin
        failures++;
        $display("FAIL t=%0d len=%0d done=%b disc=%b bad=%b", t, f.size(), done, discard, bad);
      end
      @(posedge clk);
    end
    // asleep: a corrupted frame with en low must not change the good verdict
    f = eth_frame(48'h1, 48'h2, 16'h0800, rand_bytes(50), 0);
    send(f);
    @(posedge clk);
    en <= 0;
    f = eth_frame(48'h1, 48'h2, 16'h0800, rand_bytes(50), 1);
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); frame_end <= (k == nwords(f) - 1); @(posedge clk);
    end
    w <= '0; frame_end <= 0;
    @(negedge clk);
    checks++;
    if (discard || done) begin failures++; $display("FAIL sleep"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
