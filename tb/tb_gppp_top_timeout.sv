// tb_gppp_top_timeout: reassembly time-out through the whole processor.
//
// The time-out is reduced to 3000 clocks (the default corresponds to 15 s at
// 125 MHz and cannot be simulated). The first fragment of a datagram opens a
// reassembly context; no further fragment arrives, so after 3000 clocks the
// context must be released with a reasm_timeout pulse naming its slot, and not
// before. A fragment of the same datagram sent afterwards must open a new
// context instead of completing the old one. The mechanism counts (context
// opened, time-out) must both be non-zero.
module tb_gppp_top_timeout;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  localparam int TO = 3000;
  logic clk = 0, rst_n = 0;
  logic gmii_rx_dv = 0, gmii_rx_er = 0;
  logic [7:0] gmii_rxd = 0;
  logic cfg_clk = 0, cfg_din = 0, cfg_dout;
  logic pkt_done;
  pkt_desc_t pkt;
  logic [15:0] cnt_frames, cnt_accepted, cnt_discarded, frag_boff, pay_len;
  logic reasm_timeout;
  logic [1:0] reasm_timeout_slot;
  logic [31:0] crc_out;
  logic crc_out_valid;
  int checks = 0, failures = 0;
  int n_open = 0, n_to = 0, to_cyc = -1, open_cyc = -1, cyc = 0;

  gppp_top #(.TIMEOUT(32'(TO))) dut (.*, .crc_preset(1'b0), .crc_in_valid(1'b0), .crc_in_byte(8'h00));

  always #4 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pkt_done && pkt.fragment && pkt.accept && !pkt.reasm_done) begin
      n_open++; open_cyc = cyc;
    end
    if (reasm_timeout) begin n_to++; to_cyc = cyc; end
  end

  task automatic cfg_shift(input bit v);
    cfg_din = v; #1 cfg_clk = 1; #1 cfg_clk = 0;
  endtask

  task automatic gmii_send(input bq_t f);
    for (int i = 0; i < 8; i++) begin
      gmii_rx_dv <= 1; gmii_rxd <= (i == 7) ? 8'hD5 : 8'h55; @(posedge clk);
    end
    foreach (f[i]) begin gmii_rxd <= f[i]; @(posedge clk); end
    gmii_rx_dv <= 0;
    repeat (40) @(posedge clk);
  endtask

  initial begin
    bq_t s, fr0, fr1, f;
    logic [129:0] ent;
    logic [31:0] a = 32'h0A00_0002, b = 32'h0A00_0001;
    // IP table: entry 0 = own address, others empty; MAC page: station, no
    // broadcast/multicast; controller: all pages.
    for (int i = 7; i >= 0; i--) begin
      ent = (i == 0) ? {1'b1, 1'b0, 96'd0, a} : '0;
      for (int k = 129; k >= 0; k--) cfg_shift(ent[k]);
    end
    for (int k = 47; k >= 0; k--) cfg_shift(1'(48'h02_00_00_00_00_01 >> k));
    cfg_shift(0); cfg_shift(0);
    for (int k = 0; k < NFP; k++) cfg_shift(1);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    s = udp_seg(16'd5, 16'd6, rand_bytes(24), v4_ph(b, a));      // 32 bytes
    for (int k = 0; k < 16; k++) begin fr0.push_back(s[k]); fr1.push_back(s[16 + k]); end
    f = eth_frame(48'h02_00_00_00_00_01, 48'h1, 16'h0800, ipv4(b, a, 8'd17, fr0, 16'h55, 1, 0));
    gmii_send(f);
    chk(n_open == 1, "first fragment did not open a context");
    chk(dut.u_ira.ctx[dut.u_ira.res_slot].valid, "context not valid");
    while (to_cyc < 0 && cyc < open_cyc + TO + 100) @(posedge clk);
    chk(n_to == 1, "no time-out");
    // The timer is loaded at the clock after the frame end (about 5 clocks
    // before the descriptor) and counts TO+1 clocks down to release.
    chk(to_cyc - open_cyc >= TO - 10 && to_cyc - open_cyc <= TO + 10,
        $sformatf("time-out after %0d clocks", to_cyc - open_cyc));
    chk(reasm_timeout_slot == dut.u_ira.res_slot, "time-out slot");
    chk(!dut.u_ira.ctx[reasm_timeout_slot].valid, "context still valid");
    // The last fragment alone cannot complete the released datagram.
    f = eth_frame(48'h02_00_00_00_00_01, 48'h1, 16'h0800, ipv4(b, a, 8'd17, fr1, 16'h55, 0, 2));
    gmii_send(f);
    chk(pkt_done == 0 && !pkt.reasm_done && pkt.accept, "late fragment completed a released datagram");
    chk(n_open == 2, "late fragment did not open a new context");
    $display("mechanism fragment_context_open %0d", n_open);
    $display("mechanism reassembly_timeout    %0d", n_to);
    checks++; if (n_open == 0) failures++;
    checks++; if (n_to == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
