// tb_cc: unit test of the controller-and-counter unit.
//
// A local 12-stage data pipeline carries synthetic frames past the unit; the
// flags that the pages would produce (ethertype class, transport protocol,
// discard requests) are driven directly. For each frame the test records when
// each page was started and whether it was enabled, and checks:
//  * layer-2 pages start on the first word, layer-3 pages on the word at byte
//    12 (which holds the first IP byte), the TCP/UDP length page on the word
//    holding the transport header offset, which varies from frame to frame;
//  * every page starts exactly once, and only if selected in the scan chain;
//  * layer-dependent control: layer-3/4 pages stay off for a non-IP frame,
//    layer-4 pages stay off for a non-TCP/UDP IP packet;
//  * layer-transparent control: after a discard request every page is off;
//  * a discard flag left over from the previous frame is ignored until its
//    page has started;
//  * the descriptor (accept, discard reasons) arrives one clock after the last
//    word has passed the last tap, and the frame counters agree.
module tb_cc;
  import gppp_pkg::*;
  logic clk = 0, rst_n = 0;
  pipe_word_t din = '0;
  pipe_word_t tap [NFP];
  logic rx_err = 0, err_valid;
  logic cfg_clk = 0, cfg_din = 0, cfg_dout;
  logic [NFP-1:0] fp_en, fp_start, fp_frame_end, fp_discard = '0;
  logic drop;
  logic type_valid = 0, eth_ip = 0, eth_arp = 0, ip_v4 = 0, ip_v6 = 0;
  logic l4_done = 0, l4_tcp_udp = 0, frag = 0, reasm_done = 0;
  logic [15:0] ethertype = 0, l4_len = 0;
  logic [7:0] l4_proto = 0;
  logic [OFFW-1:0] l4_off = 0;
  logic pkt_done;
  pkt_desc_t pkt;
  logic [15:0] cnt_frames, cnt_accepted, cnt_discarded;
  int checks = 0, failures = 0;

  data_pipeline #(.STAGES(NFP)) u_pipe (.clk, .rst_n, .din, .tap);
  cc dut (.*);
  assign err_valid = din.valid && din.eof;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observation of one frame.
  int             nstart [NFP];
  int             sboff  [NFP];
  bit             en_at_start [NFP];
  bit             en_after_disc;
  int             disc_page = -1;     // page whose discard the test raises
  bit             disc_raised;
  int             last_out_cyc, done_cyc, cyc;

  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < NFP; i++)
      if (fp_start[i]) begin
        nstart[i]++; sboff[i] = int'(tap[i].boff); en_at_start[i] = fp_en[i];
      end
    if (tap[NFP-1].valid && tap[NFP-1].eof) last_out_cyc = cyc;
    if (pkt_done) done_cyc = cyc;
    if (disc_raised && |fp_en) en_after_disc = 1;
    // Model of a page: raise discard one clock after its start, hold it.
    if (disc_page >= 0 && fp_start[disc_page]) begin
      fp_discard[disc_page] <= 1'b1;
    end
    if (disc_page >= 0 && fp_discard[disc_page]) disc_raised = 1;
  end

  task automatic load_sel(input logic [NFP-1:0] m);
    for (int i = NFP - 1; i >= 0; i--) begin
      cfg_din = m[i]; #1 cfg_clk = 1; #1 cfg_clk = 0;
    end
  endtask

  task automatic frame(input int nbytes, input bit err);
    int nw = (nbytes + 3) / 4;
    for (int i = 0; i < NFP; i++) begin nstart[i] = 0; sboff[i] = -1; en_at_start[i] = 0; end
    en_after_disc = 0; disc_raised = 0; done_cyc = -1;
    for (int k = 0; k < nw; k++) begin
      pipe_word_t x;
      x = '0; x.valid = 1; x.sof = (k == 0); x.eof = (k == nw - 1);
      x.boff = OFFW'(4 * k); x.data = $urandom;
      x.be = (x.eof && nbytes % 4 != 0) ? 4'(4'hF << (4 - nbytes % 4)) : 4'hF;
      din <= x; rx_err <= err && x.eof;
      @(posedge clk);
      din <= '0; rx_err <= 0;
      repeat (3) @(posedge clk);               // GMII: one word every 4 clocks
    end
    repeat (60) @(posedge clk);
  endtask

  task automatic set_flags(input bit tv, input bit ip, input bit l4d, input bit tu, input int off);
    type_valid = tv; eth_ip = ip; eth_arp = tv && !ip; ip_v4 = ip; ethertype = ip ? 16'h0800 : 16'h0806;
    l4_done = l4d; l4_tcp_udp = tu; l4_proto = tu ? 8'd6 : 8'd1; l4_off = OFFW'(off);
  endtask

  function automatic int want_boff(input int i, input int off);
    if (i <= int'(FP_ELT)) return 0;
    if (i == int'(FP_TUL)) return off & ~3;
    return 12;
  endfunction

  initial begin
    logic [NFP-1:0] all = '1;
    int fr = 0, acc = 0;
    load_sel(all);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // 1..4: IPv4/TCP frames with different transport offsets, all accepted.
    for (int t = 0; t < 4; t++) begin
      int off = 34 + 4 * t + ((t == 3) ? 2 : 0);
      set_flags(1, 1, 1, 1, off);
      frame(64 + t * 5, 0); fr++; acc++;
      for (int i = 0; i < NFP; i++) begin
        chk(nstart[i] == 1, $sformatf("t%0d page %0d started %0d times", t, i, nstart[i]));
        chk(sboff[i] == want_boff(i, off), $sformatf("t%0d page %0d start at %0d", t, i, sboff[i]));
        chk(en_at_start[i], $sformatf("t%0d page %0d not enabled", t, i));
      end
      // last word sampled in tap 11 at edge c; pkt_done rises at edge c+1
      chk(done_cyc == last_out_cyc + 2, "descriptor latency");
      chk(pkt.accept && pkt.why == '0 && pkt.is_ipv4 && pkt.l4_proto == 8'd6, "accept");
      chk(pkt.l4_off == OFFW'(off), "l4_off");
      chk(pkt.frame_len == OFFW'(64 + t * 5), $sformatf("frame_len %0d", pkt.frame_len));
    end

    // 5: ARP frame: layer-3/4 pages stay off (layer-dependent control).
    set_flags(1, 0, 0, 0, 0);
    frame(60, 0); fr++; acc++;
    for (int i = 0; i < NFP; i++)
      chk(en_at_start[i] == (i <= int'(FP_ELT)), $sformatf("arp page %0d en=%0d", i, en_at_start[i]));
    chk(pkt.accept && pkt.is_arp && !pkt.is_ipv4, "arp descriptor");

    // 6: ICMP over IPv4: layer-4 pages off, layer-3 on.
    set_flags(1, 1, 1, 0, 34);
    frame(70, 0); fr++; acc++;
    for (int i = 0; i < NFP; i++)
      chk(en_at_start[i] == (i < int'(FP_TUL)), $sformatf("icmp page %0d en=%0d", i, en_at_start[i]));
    chk(pkt.accept && pkt.l4_proto == 8'd1, "icmp descriptor");

    // 7..9: discard requested by page 6, 7 and 11: all pages off afterwards.
    for (int n = 0; n < 3; n++) begin
      int pg;
      pg = (n == 0) ? int'(FP_IHC) : (n == 1) ? int'(FP_IDA) : int'(FP_TUC);
      set_flags(1, 1, 1, 1, 34);
      disc_page = pg;
      frame(80, 0); fr++;
      disc_page = -1;
      chk(disc_raised && !en_after_disc, $sformatf("page %0d discard did not stop pages", pg));
      chk(!pkt.accept, "discard not reported");
      chk((pg == int'(FP_IHC)) ? pkt.why.ihc : (pg == int'(FP_IDA)) ? pkt.why.ida : pkt.why.tuc,
          "discard reason");
      // The model page keeps its flag until it is started again: the next
      // frame must not be dropped because of it.
      set_flags(1, 1, 1, 1, 34);
      fork
        begin wait (fp_start[pg]); @(posedge clk); fp_discard[pg] <= 1'b0; end
        frame(64, 0);
      join
      fr++; acc++;
      chk(pkt.accept, $sformatf("stale discard of page %0d dropped the next frame", pg));
    end

    // 10: receive error reported by the PHY.
    set_flags(1, 1, 1, 1, 34);
    frame(64, 1); fr++;
    chk(!pkt.accept && pkt.why.rx_err, "rx error");

    // 11: page 6 deselected: never started, its discard ignored.
    load_sel(all & ~(NFP'(1) << FP_IHC));
    fp_discard[FP_IHC] = 1'b1;
    frame(64, 0); fr++; acc++;
    chk(nstart[FP_IHC] == 0, "deselected page started");
    chk(pkt.accept, "deselected page's discard counted");
    fp_discard[FP_IHC] = 1'b0;

    chk(cnt_frames == 16'(fr), $sformatf("frames %0d/%0d", cnt_frames, fr));
    chk(cnt_accepted == 16'(acc), "accepted count");
    chk(cnt_discarded == 16'(fr - acc), "discarded count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
