// tb_fp_cfg_chain: two chains in cascade (5 and 9 bits). A random vector
// shifted in MSB first must appear in the registers, and the bits pushed out
// of the far end must be the ones shifted in 14 clocks earlier.
module tb_fp_cfg_chain;
  logic cfg_clk = 0, din = 0, mid, dout;
  logic [4:0] qa;
  logic [8:0] qb;
  int checks = 0, failures = 0;

  fp_cfg_chain #(.N(5)) ua (.cfg_clk, .cfg_din(din), .cfg_dout(mid), .q(qa));
  fp_cfg_chain #(.N(9)) ub (.cfg_clk, .cfg_din(mid), .cfg_dout(dout), .q(qb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] v, v2;
    logic [13:0] outbits;
    for (int t = 0; t < 20; t++) begin
      v = 14'($urandom); v2 = 14'($urandom);
      for (int i = 13; i >= 0; i--) begin din = v[i]; #1 cfg_clk = 1; #1 cfg_clk = 0; end
      checks++;
      if ({qb, qa} !== v) begin failures++; $display("FAIL load %h got %h", v, {qb, qa}); end
      for (int i = 13; i >= 0; i--) begin
        outbits[i] = dout;
        din = v2[i]; #1 cfg_clk = 1; #1 cfg_clk = 0;
      end
      checks++;
      if (outbits !== v) begin failures++; $display("FAIL out"); end
      checks++;
      if ({qb, qa} !== v2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
