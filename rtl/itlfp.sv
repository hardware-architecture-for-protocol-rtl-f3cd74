// itlfp: IP total length extraction page.
//
// IPv4: the total length field (frame bytes 16..17) is the datagram length.
// IPv6: the payload length field (frame bytes 18..19) plus the 40-byte fixed
// header. The page reports the datagram length and the frame offset where the
// datagram ends (ip_end), which the controller forwards to the Ethernet
// length/type page and the transport pages.
// Control input: IP version flags. Timing: valid one clock after the word
// holding bytes 16..19. Follows the document.
module itlfp
  import gppp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            start,
  input  pipe_word_t      w,
  input  logic            is_v4,
  input  logic            is_v6,
  output logic            len_valid,
  output logic [15:0]     ip_len,
  output logic [OFFW-1:0] ip_end
);
  logic [16:0] tl, pl;
  assign tl = half_at(w, L3_OFF + OFFW'(2));
  assign pl = half_at(w, L3_OFF + OFFW'(4));
  assign ip_end = L3_OFF + OFFW'(ip_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_valid <= 1'b0; ip_len <= '0;
    end else begin
      if (start) len_valid <= 1'b0;
      if (en) begin
        if (is_v4 && tl[16]) begin len_valid <= 1'b1; ip_len <= tl[15:0]; end
        if (is_v6 && pl[16]) begin len_valid <= 1'b1; ip_len <= pl[15:0] + 16'd40; end
      end
    end
  end
endmodule
