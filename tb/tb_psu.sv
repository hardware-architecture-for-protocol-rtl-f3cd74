// tb_psu: parallelization/synchronization unit. GMII frames with preamble and
// SFD, of random lengths, with random inter-frame gaps, an occasional rx_er
// and a non-frame burst (no preamble) are sent. The words out must rebuild
// the frame bytes exactly, with sof on the first word, eof on the last, byte
// offsets counting by four, and err_eof only for the frame with rx_er. A full
// word must leave on the edge that samples the next word's first byte.
module tb_psu;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, rx_dv = 0, rx_er = 0;
  logic [7:0] rxd = 0;
  pipe_word_t dout;
  logic err_eof;
  int checks = 0, failures = 0;

  psu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bq_t got;
  int  nw, nsof, neof, nerr, bad_off, late;
  int  bytes_in;          // data bytes sampled so far in this frame
  always @(posedge clk) begin
    if (rx_dv) bytes_in <= bytes_in + 1;
    if (dout.valid) begin
      if (dout.boff != OFFW'(4 * nw)) bad_off++;
      if (dout.sof) nsof++;
      if (dout.eof) neof++;
      if (dout.eof && err_eof) nerr++;
      // a non-final word must leave right after byte 4*(nw+1) of the frame
      // (first byte of the next word) was sampled: 8 preamble bytes precede
      if (!dout.eof && bytes_in != 8 + 4 * (nw + 1) + 1) late++;
      for (int j = 3; j >= 0; j--) if (dout.be[j]) got.push_back(dout.data[8*j +: 8]);
      nw++;
    end
  end

  task automatic send(input bq_t f, input bit er);
    got = {}; nw = 0; nsof = 0; neof = 0; nerr = 0; bad_off = 0; late = 0; bytes_in = 0;
    for (int i = 0; i < 8; i++) begin
      rx_dv <= 1; rxd <= (i == 7) ? 8'hD5 : 8'h55; @(posedge clk);
    end
    foreach (f[i]) begin
      rx_dv <= 1; rxd <= f[i]; rx_er <= er && (i == 20); @(posedge clk);
    end
    rx_dv <= 0; rx_er <= 0; rxd <= 0;
    repeat (12 + $urandom_range(0, 5)) @(posedge clk);
    checks++;
    if (got != f || nsof != 1 || neof != 1 || nerr != int'(er) || bad_off != 0 || late != 0) begin
      failures++;
      $display("FAIL len=%0d got=%0d sof=%0d eof=%0d err=%0d off=%0d late=%0d", f.size(),
               got.size(), nsof, neof, nerr, bad_off, late);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      send(rand_bytes(60 + $urandom_range(0, 40)), t % 9 == 4);
      if (t == 10) begin
        // a burst that is not a frame must produce nothing
        nw = 0;
        for (int i = 0; i < 20; i++) begin rx_dv <= 1; rxd <= 8'h12; @(posedge clk); end
        rx_dv <= 0; repeat (12) @(posedge clk);
        checks++;
        if (nw != 0) begin failures++; $display("FAIL burst"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
