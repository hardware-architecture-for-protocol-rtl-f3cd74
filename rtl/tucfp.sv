// tucfp: TCP/UDP checksum calculation page.
//
// Adds up, 16 bits at a time in one's complement arithmetic, the transport
// segment (frame offsets l4_off up to ip_end) and the pseudo header: source and
// destination address taken from the IP header as it passes (IPv4 bytes
// 26..33, IPv6 bytes 22..53), the protocol number and the transport length
// (IP datagram end minus transport start). Per word, the two halves are first
// added together and the result is added to the accumulator. An odd last byte
// is padded with a zero byte. A correct segment sums to 0xFFFF; otherwise
// discard is raised. A UDP/IPv4 datagram with checksum field 0 carries no
// checksum and is not checked.
//
// Fragmented datagrams: each fragment's payload is summed on its own and
// folded into one of NSLOT back-up accumulators chosen by the reassembly page
// (a new context starts its accumulator afresh). The address part of the
// pseudo header is added with the first fragment only, and protocol and
// datagram length when the reassembly page reports the datagram complete; the
// check is made then. Duplicates were already removed by the reassembly page.
//
// Control inputs come from the version, header length, total length,
// protocol and reassembly pages; drop means another page has already
// discarded the packet, so nothing is folded in. Timing: done and discard one
// clock after the frame's last word. Follows the document; the UDP zero
// checksum rule is from the UDP standard.
module tucfp
  import gppp_pkg::*;
#(
  parameter int unsigned NSLOT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            start,
  input  logic            frame_end,
  input  logic            drop,
  input  pipe_word_t      w,
  input  logic            is_v4,
  input  logic            is_v6,
  input  logic            l4_valid,
  input  logic [OFFW-1:0] l4_off,
  input  logic [7:0]      l4_proto,
  input  logic            end_valid,
  input  logic [OFFW-1:0] ip_end,
  input  logic            fr_frag,
  input  logic [$clog2(NSLOT)-1:0] fr_slot,
  input  logic            fr_new,
  input  logic            fr_first,
  input  logic            fr_complete,
  input  logic [15:0]     fr_dgram_len,
  output logic            done,
  output logic            discard,
  output logic            checked,     // a checksum was verified this packet
  output logic [15:0]     sum
);
  logic [15:0] dsum, psum;             // segment part, address part
  logic [15:0] acc [NSLOT];
  logic [15:0] udp_ck;

  logic [OFFW-1:0] o_hi, o_lo, p_beg, p_end;
  logic            d_hi, d_lo, p_hi, p_lo, odd_hi, odd_lo, rng;
  logic [15:0]     dh, dl, ph, pl, dsum_n, psum_n;
  logic [16:0]     h_ck;

  assign o_hi  = w.boff;
  assign o_lo  = w.boff + OFFW'(2);
  assign rng   = l4_valid && end_valid;
  assign d_hi  = rng && w.be[3] && (o_hi >= l4_off) && (o_hi < ip_end);
  assign d_lo  = rng && w.be[1] && (o_lo >= l4_off) && (o_lo < ip_end);
  assign odd_hi = (o_hi + OFFW'(1) == ip_end);
  assign odd_lo = (o_lo + OFFW'(1) == ip_end);
  assign dh = d_hi ? (odd_hi ? {w.data[31:24], 8'h00} : w.data[31:16]) : 16'h0000;
  assign dl = d_lo ? (odd_lo ? {w.data[15:8],  8'h00} : w.data[15:0])  : 16'h0000;

  assign p_beg = is_v6 ? (L3_OFF + OFFW'(8))  : (L3_OFF + OFFW'(12));
  assign p_end = is_v6 ? (L3_OFF + OFFW'(40)) : (L3_OFF + OFFW'(20));
  assign p_hi  = (is_v4 || is_v6) && (o_hi >= p_beg) && (o_hi < p_end);
  assign p_lo  = (is_v4 || is_v6) && (o_lo >= p_beg) && (o_lo < p_end);
  assign ph = p_hi ? w.data[31:16] : 16'h0000;
  assign pl = p_lo ? w.data[15:0]  : 16'h0000;

  assign dsum_n = ones_add(start ? 16'h0000 : dsum, ones_add(dh, dl));
  assign psum_n = ones_add(start ? 16'h0000 : psum, ones_add(ph, pl));
  assign h_ck   = half_at(w, l4_off + OFFW'(6));
  assign sum    = ones_add(dsum, psum);

  // End-of-frame arithmetic.
  logic [15:0] l4_len, whole, part, acc_n, fin;
  logic        no_ck;
  assign l4_len = 16'(ip_end - l4_off);
  assign whole  = ones_add(ones_add(dsum_n, psum_n), ones_add({8'd0, l4_proto}, l4_len));
  assign part   = fr_first ? ones_add(dsum_n, psum_n) : dsum_n;
  assign acc_n  = fr_new ? part : ones_add(acc[fr_slot], part);
  assign fin    = ones_add(acc_n, ones_add({8'd0, l4_proto}, fr_dgram_len));
  assign no_ck  = is_v4 && (l4_proto == PROTO_UDP) && (udp_ck == 16'h0000) &&
                  !(h_ck[16] && h_ck[15:0] != 16'h0000);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsum <= '0; psum <= '0; udp_ck <= '0; done <= 1'b0; discard <= 1'b0; checked <= 1'b0;
      for (int i = 0; i < NSLOT; i++) acc[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dsum <= '0; psum <= '0; udp_ck <= 16'hFFFF; discard <= 1'b0; checked <= 1'b0;
      end
      if (en && w.valid) begin
        dsum <= dsum_n;
        psum <= psum_n;
        if (l4_valid && h_ck[16]) udp_ck <= h_ck[15:0];
        if (frame_end && !drop) begin
          done <= 1'b1;
          if (fr_frag) begin
            acc[fr_slot] <= acc_n;
            if (fr_complete) begin
              checked <= 1'b1;
              discard <= (fin != 16'hFFFF);
            end
          end else if (!no_ck) begin
            checked <= 1'b1;
            discard <= (whole != 16'hFFFF);
          end
        end
      end
    end
  end
endmodule
