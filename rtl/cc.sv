// cc: controller and counter unit.
//
// High-level control of the pipeline; everything specific to a task stays
// inside its functional page. The unit
//  * fires the pages: layer-2 pages on the first word of the frame, layer-3
//    pages and the checksum page on the word that holds the first IP byte, and
//    the TCP/UDP length page on the word that holds the first transport byte,
//    an instant that depends on the packet (IP options, IPv6 extension
//    headers);
//  * gives each page its enable: a page is enabled if it is selected in the
//    configuration and its protocol layer applies to this packet (layer-3
//    pages only for IPv4/IPv6 frames, layer-4 pages only for TCP/UDP), and
//    every page is switched off as soon as any page asks for a discard, until
//    the next frame (the PSU keeps running and finds it);
//  * gives each page the frame-end mark when the last word passes its tap;
//  * collects the discard flags into a drop signal for the pages still at
//    work, and, one clock after the last word passed the last page, hands the
//    microcontroller a packet descriptor (pkt_done/pkt) and counts frames.
//
// Configuration (scan chain, 12 bits): page select mask, bit i = page i.
// The structure (configurable FSM, flag collection, start/enable/discard per
// page, layer-transparent and layer-dependent control) follows the document.
// The descriptor contents and the statistics counters are this design's. One
// frame is in the pipeline at a time: the GMII inter-frame gap plus preamble
// (20 byte times) is longer than the 12-stage pipeline.
module cc
  import gppp_pkg::*;
#(
  parameter int unsigned STAGES = NFP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pipe_word_t      tap [STAGES],
  input  logic            rx_err,        // with the last word at the pipeline input
  input  logic            err_valid,
  input  logic            cfg_clk,
  input  logic            cfg_din,
  output logic            cfg_dout,
  // fixed FP controls
  output logic [NFP-1:0]  fp_en,
  output logic [NFP-1:0]  fp_start,
  output logic [NFP-1:0]  fp_frame_end,
  input  logic [NFP-1:0]  fp_discard,
  output logic            drop,
  // flags from the pages used for control and the descriptor
  input  logic            type_valid,
  input  logic            eth_ip,        // ethertype IPv4 or IPv6
  input  logic            eth_arp,
  input  logic [15:0]     ethertype,
  input  logic            ip_v4,
  input  logic            ip_v6,
  input  logic            l4_done,
  input  logic            l4_tcp_udp,
  input  logic [7:0]      l4_proto,
  input  logic [OFFW-1:0] l4_off,
  input  logic [15:0]     l4_len,
  input  logic            frag,
  input  logic            reasm_done,
  // to the microcontroller
  output logic            pkt_done,
  output pkt_desc_t       pkt,
  output logic [15:0]     cnt_frames,
  output logic [15:0]     cnt_accepted,
  output logic [15:0]     cnt_discarded
);
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DROP, C_FIN} cstate_e;
  cstate_e state;

  logic [NFP-1:0] sel;
  logic [NFP-1:0] why;           // discard flags seen in this frame
  logic [NFP-1:0] fired;         // pages started in this frame
  logic [NFP-1:0] live;          // discard flags that belong to this frame
  logic           err_q;
  logic [OFFW-1:0] flen;
  logic           l3_on, l4_on, any_disc;

  fp_cfg_chain #(.N(NFP)) u_cfg (.cfg_clk, .cfg_din, .cfg_dout, .q(sel));

  // A page's discard flag counts only once the page was fired in this frame;
  // until then it may still hold the previous frame's verdict.
  assign live     = fp_discard & sel & fired;
  assign any_disc = (state != C_IDLE) && (|live);
  assign drop     = (state == C_DROP) || any_disc;
  assign l3_on    = !type_valid || eth_ip;
  assign l4_on    = !l4_done || l4_tcp_udp || frag;

  // Layer membership of each page.
  function automatic logic layer_on(input int i, input logic on3, input logic on4);
    if (i <= int'(FP_ELT)) return 1'b1;
    if (i >= int'(FP_TUL)) return on3 && on4;
    return on3;
  endfunction

  always_comb begin
    for (int i = 0; i < NFP; i++) begin
      fp_en[i]        = sel[i] && (state == C_RUN) && !any_disc && layer_on(i, l3_on, l4_on);
      fp_frame_end[i] = tap[i].valid && tap[i].eof;
      if (i <= int'(FP_ELT))
        fp_start[i] = sel[i] && tap[i].valid && tap[i].sof;
      else if (i == int'(FP_TUL))
        fp_start[i] = sel[i] && tap[i].valid && l4_done &&
                      (tap[i].boff[OFFW-1:2] == l4_off[OFFW-1:2]);
      else
        fp_start[i] = sel[i] && tap[i].valid && (tap[i].boff == (L3_OFF & ~OFFW'(3)));
    end
    // The first word of a frame enables the layer-2 pages in the same clock.
    if (state == C_IDLE && tap[0].valid && tap[0].sof)
      for (int i = 0; i <= int'(FP_ELT); i++) fp_en[i] = sel[i];
  end

  // Verdict of the frame, used in C_FIN.
  logic [NFP-1:0] w_all;
  logic           acc;
  assign w_all = why | live;
  assign acc   = (w_all == '0) && !err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; why <= '0; fired <= '0; err_q <= 1'b0; flen <= '0;
      pkt_done <= 1'b0; pkt <= '0;
      cnt_frames <= '0; cnt_accepted <= '0; cnt_discarded <= '0;
    end else begin
      pkt_done <= 1'b0;
      if (err_valid && rx_err) err_q <= 1'b1;
      fired <= fired | fp_start;
      unique case (state)
        C_IDLE: if (tap[0].valid && tap[0].sof) begin
          state <= C_RUN;
          why   <= '0;
          fired <= fp_start;
          err_q <= err_valid && rx_err;
        end
        C_RUN, C_DROP: begin
          why <= why | live;
          if (any_disc) state <= C_DROP;
          if (tap[STAGES-1].valid && tap[STAGES-1].eof) begin
            state <= C_FIN;
            flen  <= tap[STAGES-1].boff + OFFW'($countones(tap[STAGES-1].be));
          end
        end
        C_FIN: begin
          pkt_done          <= 1'b1;
          pkt.accept        <= acc;
          pkt.why.rx_err    <= err_q;
          pkt.why.ecc       <= w_all[FP_ECC];
          pkt.why.eda       <= w_all[FP_EDA];
          pkt.why.ihc       <= w_all[FP_IHC];
          pkt.why.ida       <= w_all[FP_IDA];
          pkt.why.tuc       <= w_all[FP_TUC];
          pkt.why.irf       <= w_all[FP_IRA];
          pkt.ethertype     <= ethertype;
          pkt.is_ipv4       <= ip_v4 && eth_ip;
          pkt.is_ipv6       <= ip_v6 && eth_ip;
          pkt.is_arp        <= eth_arp;
          pkt.l4_proto      <= l4_done ? l4_proto : 8'd0;
          pkt.l4_off        <= l4_done ? l4_off : '0;
          pkt.l4_len        <= l4_len;
          pkt.fragment      <= frag;
          pkt.reasm_done    <= reasm_done;
          pkt.frame_len     <= flen;
          cnt_frames        <= cnt_frames + 16'd1;
          if (acc) cnt_accepted  <= cnt_accepted + 16'd1;
          else     cnt_discarded <= cnt_discarded + 16'd1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
