// ihlfp: IP header length extraction page.
//
// For IPv4 the header length is the IHL field (low nibble of frame byte 14)
// times four bytes; for IPv6 the fixed header is 40 bytes (extension headers
// are followed by the protocol/next-header page). The page reports the length
// and the frame offset where the fixed header ends, and pulses hdr_end when
// the word holding the last header byte has passed. An IPv4 IHL below 5 is
// flagged as bad_ihl.
//
// Control input: the IP version flags from the version page. Timing: hdr_len
// valid one clock after the word holding byte 14; hdr_end one clock after the
// word holding the last header byte. Follows the document.
module ihlfp
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
  output logic [7:0]      hdr_len,   // bytes
  output logic [OFFW-1:0] hdr_end_off,
  output logic            hdr_end,   // pulse
  output logic            bad_ihl
);
  logic [8:0] b;
  logic       seen;
  assign b = byte_at(w, L3_OFF);
  assign hdr_end_off = L3_OFF + OFFW'(hdr_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_valid <= 1'b0; hdr_len <= '0; hdr_end <= 1'b0; bad_ihl <= 1'b0; seen <= 1'b0;
    end else begin
      hdr_end <= 1'b0;
      if (start) begin len_valid <= 1'b0; bad_ihl <= 1'b0; seen <= 1'b0; end
      if (en && w.valid) begin
        if (b[8] && (is_v4 || is_v6)) begin
          len_valid <= 1'b1;
          hdr_len   <= is_v4 ? {2'b00, b[3:0], 2'b00} : 8'd40;
          bad_ihl   <= is_v4 && (b[3:0] < 4'd5);
        end
        if (len_valid && !seen && !start && (w.boff + OFFW'(4) >= hdr_end_off)) begin
          hdr_end <= 1'b1;
          seen    <= 1'b1;
        end
      end
    end
  end
endmodule
