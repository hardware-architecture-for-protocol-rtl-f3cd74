// tulfp: TCP/UDP packet length page.
//
// Fired by the controller on the word that holds the first transport header
// byte (a data-dependent instant). The transport length is the IP datagram end
// minus the transport start. For UDP the length field (transport bytes 4..5)
// is also extracted and must agree, else len_err. The payload length handed to
// host software is the transport length minus the header: 8 bytes for UDP,
// the data offset field (byte 12, high nibble, in 32-bit words) for TCP.
//
// Control inputs: transport offset and protocol flags (protocol page), IP
// datagram end (total length page). Timing: l4_len valid one clock after the
// start word, pay_len one clock after the word holding the header length
// field. Follows the document; the UDP consistency check is this design's.
module tulfp
  import gppp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            start,
  input  pipe_word_t      w,
  input  logic [OFFW-1:0] l4_off,
  input  logic            is_tcp,
  input  logic            is_udp,
  input  logic [OFFW-1:0] ip_end,
  output logic            len_valid,
  output logic [15:0]     l4_len,
  output logic            pay_valid,
  output logic [15:0]     pay_len,
  output logic            len_err
);
  logic [16:0] h_ul;
  logic [8:0]  b_do;
  logic [15:0] len_now;
  assign h_ul = half_at(w, l4_off + OFFW'(4));
  assign b_do = byte_at(w, l4_off + OFFW'(12));
  assign len_now = start ? 16'(ip_end - l4_off) : l4_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len_valid <= 1'b0; l4_len <= '0; pay_valid <= 1'b0; pay_len <= '0; len_err <= 1'b0;
    end else begin
      if (start) begin
        len_valid <= 1'b0; pay_valid <= 1'b0; len_err <= 1'b0;
      end
      if (en && w.valid && (start || len_valid)) begin
        if (start) begin
          len_valid <= 1'b1;
          l4_len    <= len_now;
        end
        if (is_udp && h_ul[16]) begin
          pay_valid <= 1'b1;
          pay_len   <= len_now - 16'd8;
          len_err   <= h_ul[15:0] != len_now;
        end
        if (is_tcp && b_do[8]) begin
          pay_valid <= 1'b1;
          pay_len   <= len_now - {10'd0, b_do[7:4], 2'b00};
        end
      end
    end
  end
endmodule
