// gppp_top: general-purpose protocol processor, Ethernet/IP/TCP-UDP receive
// instance (the deep pipeline serial processor), plus a stand-alone 8-bit
// CRC-32 generator.
//
// A received frame is never stored: it streams from the PHY (GMII) through
// the parallelization/synchronization unit into a 12-register data pipeline.
// Each of the twelve functional pages taps one pipeline register, picks out
// the header fields it needs as they pass, and reports flags to the
// controller-and-counter unit, which fires the pages, forwards values between
// them, switches pages off when a packet is to be discarded or a protocol
// layer does not apply, and finally hands a packet descriptor to the
// microcontroller. All layers (Ethernet, IP, TCP/UDP) are processed
// concurrently, each page working on its own part of the frame.
//
// Pipeline placement (page = tap): 0 CRC check, 1 Ethernet destination,
// 2 length/type, 3 IP version, 4 header length, 5 total length, 6 IPv4 header
// checksum, 7 IP destination, 8 protocol/next header, 9 reassembly,
// 10 TCP/UDP length, 11 TCP/UDP checksum. Values are passed forward only:
// a page is placed after the pages whose results it needs.
//
// Configuration: one scan chain, cfg_din -> controller (12) -> Ethernet
// destination page (50) -> IP destination page (1040) -> cfg_dout, shifted
// with cfg_clk before operation. Outputs: pkt_done pulses with pkt one clock
// after the frame's last word has passed the last page; reassembly placement
// and time-outs for the microcontroller. The crc_* ports belong to the
// separate 8-bit generator (bytes in, FCS out three clocks later).
// The page set and their roles follow the document; the tap order, the
// GMII byte interface and the single clock are this design's choices.
module gppp_top
  import gppp_pkg::*;
#(
  parameter int unsigned NCTX    = 4,
  parameter logic [31:0] TIMEOUT = 32'd1_875_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // PHY side
  input  logic        gmii_rx_dv,
  input  logic [7:0]  gmii_rxd,
  input  logic        gmii_rx_er,
  // configuration
  input  logic        cfg_clk,
  input  logic        cfg_din,
  output logic        cfg_dout,
  // microcontroller side
  output logic        pkt_done,
  output pkt_desc_t   pkt,
  output logic [15:0] cnt_frames,
  output logic [15:0] cnt_accepted,
  output logic [15:0] cnt_discarded,
  output logic [15:0] frag_boff,
  output logic [15:0] pay_len,
  output logic        reasm_timeout,
  output logic [$clog2(NCTX)-1:0] reasm_timeout_slot,
  // stand-alone 8-bit CRC-32 generator
  input  logic        crc_preset,
  input  logic        crc_in_valid,
  input  logic [7:0]  crc_in_byte,
  output logic [31:0] crc_out,
  output logic        crc_out_valid
);
  pipe_word_t        pin;
  pipe_word_t        tap [NFP];
  logic              err_eof;
  logic [NFP-1:0]    en, st, fe, disc;
  logic              drop;
  logic              c1, c2;

  psu u_psu (.clk, .rst_n, .rx_dv(gmii_rx_dv), .rxd(gmii_rxd), .rx_er(gmii_rx_er),
             .dout(pin), .err_eof);

  data_pipeline #(.STAGES(NFP)) u_pipe (.clk, .rst_n, .din(pin), .tap);

  // ---- layer 2 ----
  logic        ecc_done;
  logic [31:0] ecc_res;
  eccfp u_ecc (.clk, .rst_n, .en(en[FP_ECC]), .start(st[FP_ECC]), .frame_end(fe[FP_ECC]),
               .w(tap[FP_ECC]), .done(ecc_done), .discard(disc[FP_ECC]), .crc_result(ecc_res));

  logic eda_done, eda_bc, eda_mc, eda_own;
  edafp u_eda (.clk, .rst_n, .en(en[FP_EDA]), .start(st[FP_EDA]), .w(tap[FP_EDA]),
               .cfg_clk, .cfg_din(c1), .cfg_dout(c2), .done(eda_done),
               .discard(disc[FP_EDA]), .is_bcast(eda_bc), .is_mcast(eda_mc), .is_own(eda_own));

  logic            elt_tv, elt_len, elt_v4, elt_v6, elt_arp, elt_pend;
  logic [15:0]     elt_type;
  logic [OFFW-1:0] elt_pend_off;
  logic            itl_valid;
  logic [15:0]     itl_len;
  logic [OFFW-1:0] itl_end;
  eltfp u_elt (.clk, .rst_n, .en(en[FP_ELT]), .start(st[FP_ELT]), .w(tap[FP_ELT]),
               .ip_end(itl_end), .ip_end_valid(itl_valid), .type_valid(elt_tv),
               .ethertype(elt_type), .is_length(elt_len), .is_ipv4(elt_v4), .is_ipv6(elt_v6),
               .is_arp(elt_arp), .pay_end(elt_pend), .pay_end_off(elt_pend_off));
  assign disc[FP_ELT] = 1'b0;

  // ---- layer 3 ----
  logic       ivf_done, v4, v6;
  logic [3:0] ivf_ver;
  ivffp u_ivf (.clk, .rst_n, .en(en[FP_IVF]), .start(st[FP_IVF]), .w(tap[FP_IVF]),
               .done(ivf_done), .version(ivf_ver), .is_v4(v4), .is_v6(v6));
  assign disc[FP_IVF] = 1'b0;

  logic            ihl_valid, ihl_end, ihl_bad;
  logic [7:0]      ihl_len;
  logic [OFFW-1:0] ihl_end_off;
  ihlfp u_ihl (.clk, .rst_n, .en(en[FP_IHL]), .start(st[FP_IHL]), .w(tap[FP_IHL]),
               .is_v4(v4), .is_v6(v6), .len_valid(ihl_valid), .hdr_len(ihl_len),
               .hdr_end_off(ihl_end_off), .hdr_end(ihl_end), .bad_ihl(ihl_bad));
  assign disc[FP_IHL] = 1'b0;

  itlfp u_itl (.clk, .rst_n, .en(en[FP_ITL]), .start(st[FP_ITL]), .w(tap[FP_ITL]),
               .is_v4(v4), .is_v6(v6), .len_valid(itl_valid), .ip_len(itl_len), .ip_end(itl_end));
  assign disc[FP_ITL] = 1'b0;

  logic        ihc_done;
  logic [15:0] ihc_sum;
  ihcfp u_ihc (.clk, .rst_n, .en(en[FP_IHC]), .start(st[FP_IHC]), .w(tap[FP_IHC]),
               .is_v4(v4), .len_valid(ihl_valid), .hdr_end_off(ihl_end_off), .bad_ihl(ihl_bad),
               .done(ihc_done), .discard(disc[FP_IHC]), .sum(ihc_sum));

  logic       ida_done, ida_match, ida_mc;
  logic [2:0] ida_idx;
  idafp #(.NADDR(8)) u_ida (.clk, .rst_n, .en(en[FP_IDA]), .start(st[FP_IDA]), .w(tap[FP_IDA]),
               .is_v4(v4), .is_v6(v6), .cfg_clk, .cfg_din(c2), .cfg_dout,
               .done(ida_done), .discard(disc[FP_IDA]), .matched(ida_match),
               .match_idx(ida_idx), .is_mcast(ida_mc));

  logic            ipn_done, ipn_tcp, ipn_udp, ipn_known, ipn_frag6;
  logic [7:0]      ipn_proto;
  logic [OFFW-1:0] ipn_off, ipn_fh;
  ipnfp u_ipn (.clk, .rst_n, .en(en[FP_IPN]), .start(st[FP_IPN]), .w(tap[FP_IPN]),
               .is_v4(v4), .is_v6(v6), .hl_valid(ihl_valid), .hdr_len(ihl_len),
               .done(ipn_done), .l4_proto(ipn_proto), .l4_off(ipn_off), .is_tcp(ipn_tcp),
               .is_udp(ipn_udp), .known(ipn_known), .v6_frag(ipn_frag6), .fh_off(ipn_fh));
  assign disc[FP_IPN] = 1'b0;

  logic                    ira_valid, ira_frag, ira_new, ira_first, ira_cpl;
  logic [$clog2(NCTX)-1:0] ira_slot;
  logic [15:0]             ira_dlen;
  irafp #(.NCTX(NCTX), .TIMEOUT(TIMEOUT)) u_ira (
               .clk, .rst_n, .en(en[FP_IRA]), .start(st[FP_IRA]), .frame_end(fe[FP_IRA]),
               .drop, .w(tap[FP_IRA]), .is_v4(v4), .is_v6(v6), .v6_frag(ipn_frag6),
               .fh_off(ipn_fh), .hdr_len(ihl_len), .ip_len(itl_len),
               .res_valid(ira_valid), .res_frag(ira_frag), .res_slot(ira_slot), .res_new(ira_new),
               .res_first(ira_first), .res_complete(ira_cpl), .res_dgram_len(ira_dlen),
               .frag_boff, .discard(disc[FP_IRA]), .timeout(reasm_timeout),
               .timeout_slot(reasm_timeout_slot));

  // ---- layer 4 ----
  logic        tul_valid, tul_pvalid, tul_err;
  logic [15:0] tul_len;
  tulfp u_tul (.clk, .rst_n, .en(en[FP_TUL]), .start(st[FP_TUL]), .w(tap[FP_TUL]),
               .l4_off(ipn_off), .is_tcp(ipn_tcp), .is_udp(ipn_udp), .ip_end(itl_end),
               .len_valid(tul_valid), .l4_len(tul_len), .pay_valid(tul_pvalid),
               .pay_len, .len_err(tul_err));
  assign disc[FP_TUL] = 1'b0;

  logic        tuc_done, tuc_checked;
  logic [15:0] tuc_sum;
  tucfp #(.NSLOT(NCTX)) u_tuc (.clk, .rst_n, .en(en[FP_TUC]), .start(st[FP_TUC]),
               .frame_end(fe[FP_TUC]), .drop, .w(tap[FP_TUC]), .is_v4(v4), .is_v6(v6),
               .l4_valid(ipn_done), .l4_off(ipn_off), .l4_proto(ipn_proto),
               .end_valid(itl_valid), .ip_end(itl_end), .fr_frag(ira_frag), .fr_slot(ira_slot),
               .fr_new(ira_new), .fr_first(ira_first), .fr_complete(ira_cpl),
               .fr_dgram_len(ira_dlen), .done(tuc_done), .discard(disc[FP_TUC]),
               .checked(tuc_checked), .sum(tuc_sum));

  // ---- controller and counter ----
  cc #(.STAGES(NFP)) u_cc (
    .clk, .rst_n, .tap, .rx_err(err_eof), .err_valid(pin.valid && pin.eof),
    .cfg_clk, .cfg_din, .cfg_dout(c1),
    .fp_en(en), .fp_start(st), .fp_frame_end(fe), .fp_discard(disc), .drop,
    .type_valid(elt_tv), .eth_ip((elt_v4 || elt_v6) && !elt_len), .eth_arp(elt_arp),
    .ethertype(elt_type), .ip_v4(v4), .ip_v6(v6),
    .l4_done(ipn_done), .l4_tcp_udp(ipn_tcp || ipn_udp), .l4_proto(ipn_proto),
    .l4_off(ipn_off), .l4_len(tul_len), .frag(ira_frag), .reasm_done(ira_cpl),
    .pkt_done, .pkt, .cnt_frames, .cnt_accepted, .cnt_discarded);

  // ---- stand-alone 8-bit CRC-32 generator ----
  crc32_gen8 u_crc8 (.clk, .rst_n, .preset(crc_preset), .in_valid(crc_in_valid),
                     .in_byte(crc_in_byte), .crc_out, .out_valid(crc_out_valid));
endmodule
