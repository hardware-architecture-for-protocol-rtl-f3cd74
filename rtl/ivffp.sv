// ivffp: IP version field extraction page.
//
// Extracts the 4-bit version field, the high nibble of the first IP header
// byte (frame byte 14), and reports whether the packet is IPv4 or IPv6.
// Timing: flags valid one clock after the word holding byte 14, held until the
// next start. Follows the document; the byte position assumes an untagged
// Ethernet II header of 14 bytes.
module ivffp
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  pipe_word_t w,
  output logic       done,
  output logic [3:0] version,
  output logic       is_v4,
  output logic       is_v6
);
  logic [8:0] b;
  assign b = byte_at(w, L3_OFF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; version <= '0; is_v4 <= 1'b0; is_v6 <= 1'b0;
    end else begin
      if (start) begin done <= 1'b0; is_v4 <= 1'b0; is_v6 <= 1'b0; end
      if (en && b[8]) begin
        done    <= 1'b1;
        version <= b[7:4];
        is_v4   <= b[7:4] == 4'd4;
        is_v6   <= b[7:4] == 4'd6;
      end
    end
  end
endmodule
