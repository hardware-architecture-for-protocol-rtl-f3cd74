// tb_crc32_gen8: checks the 8-bit CRC-32 generator against a bit-serial
// reference. Random messages are fed one byte per clock followed by four zero
// bytes; the output register must then hold the Ethernet FCS, three clocks
// after the last byte (input, CRC and output registers).
module tb_crc32_gen8;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, preset = 0, in_valid = 0;
  logic [7:0] in_byte = 0;
  logic [31:0] crc_out;
  logic out_valid;
  int checks = 0, failures = 0;

  crc32_gen8 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t m;
    logic [31:0] exp;
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 60; t++) begin
      m = rand_bytes(1 + $urandom_range(0, 70));
      if (t == 0) begin m = {}; for (int i = 0; i < 9; i++) m.push_back(8'h31 + 8'(i)); end
      exp = crc32_ref(m);
      @(posedge clk); preset <= 1;
      @(posedge clk); preset <= 0;
      foreach (m[i]) begin in_valid <= 1; in_byte <= m[i]; @(posedge clk); end
      for (int z = 0; z < 4; z++) begin in_valid <= 1; in_byte <= 8'h00; @(posedge clk); end
      in_valid <= 0;
      lat = 1;
      // last byte was sampled at the edge that ended the loop; the output
      // register shows its effect two further edges later.
      while (!(out_valid && lat >= 3) && lat < 10) begin @(posedge clk); lat++; end
      @(negedge clk);
      checks++;
      if (crc_out !== exp || lat != 3) begin
        failures++;
        $display("FAIL len=%0d got %h exp %h lat %0d", m.size(), crc_out, exp, lat);
      end
      if (t == 0) begin
        checks++;
        if (crc_out !== 32'hCBF43926) begin failures++; $display("FAIL check value"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
