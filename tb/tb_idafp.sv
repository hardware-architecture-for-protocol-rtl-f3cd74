// tb_idafp: IP destination address page. Eight entries (IPv4 and IPv6 mixed)
// are shifted in through the scan chain. Packets to every entry, to unknown
// addresses and to multicast groups are sent; the verdict (match index or
// discard, multicast flag) must be ready one clock after the word holding
// the last address bytes.
module tb_idafp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, is_v4 = 0, is_v6 = 0;
  logic cfg_clk = 0, cfg_din = 0, cfg_dout;
  pipe_word_t w = '0;
  logic done, discard, matched, is_mcast;
  logic [2:0] match_idx;
  int checks = 0, failures = 0;

  logic [129:0] ent [8];

  idafp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit six, input logic [127:0] dst);
    bq_t f, p, none;
    int exp_idx, lastw;
    bit mc;
    exp_idx = -1;
    for (int i = 7; i >= 0; i--)
      if (ent[i][129] && ent[i][128] == six &&
          (six ? ent[i][127:0] == dst : ent[i][31:0] == dst[31:0])) exp_idx = i;
    mc = six ? (dst[127:120] == 8'hFF) : (dst[31:28] == 4'hE);
    if (six) p = ipv6(128'h5, dst, 8'd17, none, rand_bytes(20));
    else     p = ipv4(32'h5, dst[31:0], 8'd17, rand_bytes(20));
    f = eth_frame(48'h1, 48'h2, six ? 16'h86DD : 16'h0800, p);
    lastw = six ? 13 : 8;
    is_v4 <= !six; is_v6 <= six;
    for (int k = 0; k < nwords(f); k++) begin
      w <= to_word(f, k); start <= (k == 3);
      @(posedge clk);
      @(negedge clk);
      if (k == lastw - 1 && done) begin failures++; $display("FAIL early"); end
      if (k == lastw) begin
        checks++;
        if (!done || discard !== (exp_idx < 0) || is_mcast !== mc ||
            (exp_idx >= 0 && match_idx != 3'(exp_idx))) begin
          failures++;
          $display("FAIL six=%b dst=%h exp=%0d got disc=%b idx=%0d", six, dst, exp_idx, discard, match_idx);
        end
      end
    end
    w <= '0; start <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    ent[0] = {1'b1, 1'b0, 96'd0, 32'hC0A8_0102};        // own IPv4
    ent[1] = {1'b1, 1'b0, 96'd0, 32'hFFFF_FFFF};        // broadcast
    ent[2] = {1'b1, 1'b0, 96'd0, 32'hE000_0001};        // all-hosts
    ent[3] = {1'b1, 1'b1, 128'h2001_0DB8_0000_0000_0000_0000_0000_0042}; // own IPv6
    ent[4] = {1'b1, 1'b1, 128'hFF02_0000_0000_0000_0000_0000_0000_0001}; // all-nodes
    ent[5] = {1'b1, 1'b0, 96'd0, 32'hC0A8_01FF};        // subnet broadcast
    ent[6] = {1'b0, 1'b0, 96'd0, 32'h0A00_0001};        // unused entry
    ent[7] = {1'b1, 1'b1, 128'hFF02_0000_0000_0000_0000_0001_FF00_0042}; // solicited node
    for (int i = 7; i >= 0; i--)
      for (int b = 129; b >= 0; b--) begin
        cfg_din = ent[i][b]; #1 cfg_clk = 1; #1 cfg_clk = 0;
      end
    rst_n <= 1;
    for (int i = 0; i < 8; i++) run(ent[i][128], ent[i][127:0]);
    run(0, 128'hC0A8_0103);
    run(0, 128'hE000_00FB);
    run(1, 128'h2001_0DB8_0000_0000_0000_0000_0000_0043);
    run(1, 128'hFF02_0000_0000_0000_0000_0000_0000_0002);
    run(1, 128'hC0A8_0102);   // IPv4 entry value must not match an IPv6 packet
    for (int t = 0; t < 10; t++) run(t[0], {$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
