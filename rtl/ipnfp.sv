// ipnfp: IP protocol / next header extraction page.
//
// IPv4: takes the protocol field (frame byte 23); the transport header starts
// right after the IPv4 header (offset from the header length page).
// IPv6: takes the next-header field (byte 20) and walks the extension header
// chain. Hop-by-hop, routing and destination options headers are skipped using
// their length field ((len+1) x 8 bytes); a fragment header (fixed 8 bytes)
// is skipped and reported with v6_frag and its offset fh_off. The walk ends at the first header that
// is not an extension header; TCP, UDP, ICMP, IGMP and ICMPv6 are "known".
// Result: the transport protocol, the frame offset where its header starts,
// and TCP/UDP flags for the transport pages.
//
// Control inputs: IP version flags, header length. Timing: for IPv4 done one
// clock after the word holding byte 23 (if the header length is known); for
// IPv6 one clock after the word holding the last next-header byte. The chain
// walk follows the document; limiting it to the four extension types named
// above is this design's choice (other types end the walk as "unknown").
module ipnfp
  import gppp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            start,
  input  pipe_word_t      w,
  input  logic            is_v4,
  input  logic            is_v6,
  input  logic            hl_valid,
  input  logic [7:0]      hdr_len,
  output logic            done,
  output logic [7:0]      l4_proto,
  output logic [OFFW-1:0] l4_off,
  output logic            is_tcp,
  output logic            is_udp,
  output logic            known,
  output logic            v6_frag,
  output logic [OFFW-1:0] fh_off       // IPv6: offset of the fragment header
);
  logic [7:0]      nh;          // IPv6 header type found at cursor
  logic [OFFW-1:0] cursor;      // IPv6: start of the header of type nh
  logic            walking;     // IPv6 chain walk in progress
  logic [8:0]      b_p4, b_nh6, b_cn, b_cl;

  function automatic logic is_ext(input logic [7:0] t);
    return (t == PROTO_HOPOPT) || (t == PROTO_ROUTE) || (t == PROTO_DSTOPT) || (t == PROTO_FRAG);
  endfunction
  function automatic logic is_known(input logic [7:0] t);
    return (t == PROTO_TCP) || (t == PROTO_UDP) || (t == PROTO_ICMP) || (t == PROTO_IGMP) ||
           (t == PROTO_ICMP6);
  endfunction

  assign b_p4  = byte_at(w, L3_OFF + OFFW'(9));
  assign b_nh6 = byte_at(w, L3_OFF + OFFW'(6));
  assign b_cn  = byte_at(w, cursor);
  assign b_cl  = byte_at(w, cursor + OFFW'(1));

  task automatic finish(input logic [7:0] t, input logic [OFFW-1:0] o);
    done     <= 1'b1;
    walking  <= 1'b0;
    l4_proto <= t;
    l4_off   <= o;
    is_tcp   <= t == PROTO_TCP;
    is_udp   <= t == PROTO_UDP;
    known    <= is_known(t);
  endtask

  // Offset of the header after the current extension header: the fragment
  // header is 8 bytes, the others give their length in 8-byte units minus one.
  logic [OFFW-1:0] nc;
  assign nc = (nh == PROTO_FRAG) ? cursor + OFFW'(8)
                                 : cursor + (OFFW'(b_cl[7:0]) + OFFW'(1)) * OFFW'(8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; l4_proto <= '0; l4_off <= '0; is_tcp <= 1'b0; is_udp <= 1'b0;
      known <= 1'b0; v6_frag <= 1'b0; fh_off <= '0; nh <= '0; cursor <= '0; walking <= 1'b0;
    end else begin
      if (start) begin
        done <= 1'b0; is_tcp <= 1'b0; is_udp <= 1'b0; known <= 1'b0; v6_frag <= 1'b0;
        walking <= 1'b0;
      end
      if (en && w.valid && (start || !done)) begin
        if (is_v4 && hl_valid && b_p4[8])
          finish(b_p4[7:0], L3_OFF + OFFW'(hdr_len));
        if (is_v6 && b_nh6[8]) begin
          if (is_ext(b_nh6[7:0])) begin
            nh <= b_nh6[7:0]; cursor <= L3_OFF + OFFW'(40); walking <= 1'b1;
          end else finish(b_nh6[7:0], L3_OFF + OFFW'(40));
        end
        if (walking && b_cn[8] && b_cl[8]) begin
          if (nh == PROTO_FRAG) begin v6_frag <= 1'b1; fh_off <= cursor; end
          if (is_ext(b_cn[7:0])) begin
            nh <= b_cn[7:0]; cursor <= nc;
          end else finish(b_cn[7:0], nc);
        end
      end
    end
  end
endmodule
