// ihcfp: IPv4 header checksum calculation page.
//
// Active only for IPv4. Adds the header 16 bits at a time in one's complement
// arithmetic, from frame byte 14 up to the header end given by the header
// length page. For each word the two halves that lie inside the header are
// first added together and the result is added to the running sum. A correct
// header sums to 0xFFFF (its complement is zero); otherwise, or if the IHL is
// below five words, discard is raised.
//
// Control inputs: is_v4 (version page), hdr_len/hdr_end_off (header length
// page). Timing: done and discard one clock after the word holding the last
// header byte; held until the next start. Follows the document.
module ihcfp
  import gppp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            start,
  input  pipe_word_t      w,
  input  logic            is_v4,
  input  logic            len_valid,
  input  logic [OFFW-1:0] hdr_end_off,
  input  logic            bad_ihl,
  output logic            done,
  output logic            discard,
  output logic [15:0]     sum
);
  logic [15:0]     acc, hi, lo, wsum, nxt;
  logic [OFFW-1:0] o_hi, o_lo;
  logic            in_hi, in_lo, last;

  assign o_hi  = w.boff;
  assign o_lo  = w.boff + OFFW'(2);
  assign in_hi = (o_hi >= L3_OFF) && (o_hi < hdr_end_off) && w.be[3];
  assign in_lo = (o_lo >= L3_OFF) && (o_lo < hdr_end_off) && w.be[1];
  assign hi    = in_hi ? w.data[31:16] : 16'h0000;
  assign lo    = in_lo ? w.data[15:0]  : 16'h0000;
  assign wsum  = ones_add(hi, lo);
  assign nxt   = ones_add(start ? 16'h0000 : acc, wsum);
  assign last  = (w.boff + OFFW'(4) >= hdr_end_off);
  assign sum   = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; done <= 1'b0; discard <= 1'b0;
    end else begin
      if (start) begin acc <= '0; done <= 1'b0; discard <= 1'b0; end
      if (en && is_v4 && len_valid && w.valid && (start || !done)) begin
        acc <= nxt;
        if (last) begin
          done    <= 1'b1;
          discard <= (nxt != 16'hFFFF) || bad_ihl;
        end
      end
    end
  end
endmodule
