// eltfp: Ethernet length/ethertype field extraction page.
//
// Extracts frame bytes 12..13. A value below 0x0600 is an IEEE 802.3 length;
// otherwise it is an ethertype, and the payload length is taken from the IP
// total length that the IP total length page provides (ip_end, the frame
// offset where the IP datagram ends, forwarded by the controller). A byte
// counter follows the frame; when it reaches the end of the payload, pay_end
// pulses once. Everything after that point is padding and frame check
// sequence. The ethertype is decoded into flags so the controller can treat
// IPv4, IPv6 and ARP/RARP differently.
//
// Timing: type_valid and the flags follow one clock after the word holding
// bytes 12..15; pay_end pulses one clock after the word holding the last
// payload byte. The behaviour follows the document; the decode flags and the
// 0x0600 threshold come from the Ethernet standard.
module eltfp
  import gppp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            start,
  input  pipe_word_t      w,
  input  logic [OFFW-1:0] ip_end,       // end of the IP datagram (from ITLFP)
  input  logic            ip_end_valid,
  output logic            type_valid,
  output logic [15:0]     ethertype,    // or 802.3 length
  output logic            is_length,
  output logic            is_ipv4,
  output logic            is_ipv6,
  output logic            is_arp,       // ARP or RARP
  output logic            pay_end,      // payload end reached (pulse)
  output logic [OFFW-1:0] pay_end_off
);
  logic [16:0]     f;
  logic [OFFW-1:0] cnt, cnt_nxt, end_off;
  logic            end_known, seen, len_now, tv_now;
  logic [15:0]     et_now;

  assign f = half_at(w, OFFW'(12));
  assign cnt_nxt = (start ? '0 : cnt) + OFFW'($countones(w.be));
  // The word that carries the length field may already hold the last payload
  // byte of a short 802.3 frame, so the field is used in the clock it arrives.
  assign tv_now    = f[16] | type_valid;
  assign et_now    = f[16] ? f[15:0] : ethertype;
  assign len_now   = et_now < ETH_TYPE_MIN;
  assign end_off   = len_now ? (L3_OFF + et_now) : ip_end;
  assign end_known = tv_now & (len_now | ip_end_valid);
  assign pay_end_off = end_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; type_valid <= 1'b0; ethertype <= '0; is_length <= 1'b0;
      is_ipv4 <= 1'b0; is_ipv6 <= 1'b0; is_arp <= 1'b0; pay_end <= 1'b0; seen <= 1'b0;
    end else begin
      pay_end <= 1'b0;
      if (start) begin
        type_valid <= 1'b0; is_length <= 1'b0; is_ipv4 <= 1'b0; is_ipv6 <= 1'b0;
        is_arp <= 1'b0; seen <= 1'b0;
      end
      if (en && w.valid) begin
        cnt <= cnt_nxt;
        if (f[16]) begin
          type_valid <= 1'b1;
          ethertype  <= f[15:0];
          is_length  <= f[15:0] < ETH_TYPE_MIN;
          is_ipv4    <= f[15:0] == ETH_IPV4;
          is_ipv6    <= f[15:0] == ETH_IPV6;
          is_arp     <= (f[15:0] == ETH_ARP) || (f[15:0] == ETH_RARP);
        end
        if (end_known && !seen && !start && cnt_nxt >= end_off) begin
          pay_end <= 1'b1;
          seen    <= 1'b1;
        end
      end
    end
  end
endmodule
