// tb_edafp: Ethernet destination address page. The station address and the
// broadcast/multicast enables are shifted in through the scan chain; frames
// addressed to the station, to broadcast, to a group and to other stations
// are sent, and done/discard/flags are compared with the expected verdict one
// clock after the word holding bytes 4..7.
module tb_edafp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0;
  logic cfg_clk = 0, cfg_din = 0, cfg_dout;
  pipe_word_t w = '0;
  logic done, discard, is_bcast, is_mcast, is_own;
  int checks = 0, failures = 0;
  localparam logic [47:0] ME = 48'h0250_C2AA_BB01;

  edafp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(input logic [49:0] v);
    for (int i = 49; i >= 0; i--) begin
      cfg_din = v[i]; #1 cfg_clk = 1; #1 cfg_clk = 0;
    end
  endtask

  task automatic run(input logic [47:0] da, input bit acc_bc, input bit acc_mc);
    bq_t f;
    bit exp_disc, bc, mc;
    f = eth_frame(da, 48'h0200_0000_0099, 16'h0800, rand_bytes(46));
    bc = (da == 48'hFFFF_FFFF_FFFF);
    mc = da[40] && !bc;
    exp_disc = !((da == ME) || (bc && acc_bc) || (mc && acc_mc));
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); start <= (k == 0);
      @(posedge clk);
      if (k == 1) begin
        @(negedge clk);
        checks++;
        if (!done || discard !== exp_disc || is_bcast !== bc || is_mcast !== mc ||
            is_own !== (da == ME)) begin
          failures++;
          $display("FAIL da=%h disc=%b exp=%b", da, discard, exp_disc);
        end
      end
    end
    w <= '0; start <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      configure({ME, m[1], m[0]});
      run(ME, m[1], m[0]);
      run(48'hFFFF_FFFF_FFFF, m[1], m[0]);
      run(48'h0100_5E00_0001, m[1], m[0]);
      run(48'h0250_C2AA_BB02, m[1], m[0]);
      run({$urandom, 16'($urandom)} & 48'hFEFF_FFFF_FFFF, m[1], m[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
