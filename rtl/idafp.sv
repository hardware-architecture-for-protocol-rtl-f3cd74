// idafp: IP destination address extraction and comparison page.
//
// Collects the destination address of an IPv4 (frame bytes 30..33) or IPv6
// (bytes 38..53) header sixteen bits at a time and compares it in parallel
// with the eight configured acceptable addresses: one for the terminal and
// seven for broadcast and multicast groups. The result is ready one clock
// after the last address bytes reach the page. If no entry of the packet's IP
// version matches, discard is raised. The page also flags multicast
// destinations (224.0.0.0/4 for IPv4, ff00::/8 for IPv6).
//
// Configuration (scan chain, 8 x 130 bits, entry 7 shifted in first, each
// entry MSB first): {valid, is_v6, addr[127:0]}; an IPv4 entry uses
// addr[31:0]. Control inputs: IP version flags. Timing: done, discard,
// match_idx and is_mcast one clock after the word holding the last address
// bytes, held until the next start. Eight entries and the parallel compare
// follow the document; the entry format is this design's choice.
module idafp
  import gppp_pkg::*;
#(
  parameter int unsigned NADDR = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         start,
  input  pipe_word_t   w,
  input  logic         is_v4,
  input  logic         is_v6,
  input  logic         cfg_clk,
  input  logic         cfg_din,
  output logic         cfg_dout,
  output logic         done,
  output logic         discard,
  output logic         matched,
  output logic [$clog2(NADDR)-1:0] match_idx,
  output logic         is_mcast
);
  typedef struct packed {
    logic         valid;
    logic         is_v6;
    logic [127:0] addr;
  } entry_t;

  entry_t [NADDR-1:0] tab;
  logic [127:0]    sh, sh_nxt;
  logic [OFFW-1:0] a_beg, a_end, o_hi, o_lo;
  logic            in_hi, in_lo, last, any;
  logic [$clog2(NADDR)-1:0] idx;

  fp_cfg_chain #(.N(NADDR*130)) u_cfg (.cfg_clk, .cfg_din, .cfg_dout, .q(tab));

  assign a_beg = is_v6 ? OFFW'(38) : OFFW'(30);
  assign a_end = is_v6 ? OFFW'(54) : OFFW'(34);
  assign o_hi  = w.boff;
  assign o_lo  = w.boff + OFFW'(2);
  assign in_hi = (o_hi >= a_beg) && (o_hi < a_end);
  assign in_lo = (o_lo >= a_beg) && (o_lo < a_end);
  assign last  = in_lo ? (o_lo + OFFW'(2) == a_end) : (in_hi && (o_hi + OFFW'(2) == a_end));

  always_comb begin
    sh_nxt = sh;
    if (in_hi) sh_nxt = {sh_nxt[111:0], w.data[31:16]};
    if (in_lo) sh_nxt = {sh_nxt[111:0], w.data[15:0]};
  end

  // Parallel comparison with every entry.
  always_comb begin
    any = 1'b0;
    idx = '0;
    for (int i = NADDR - 1; i >= 0; i--) begin
      if (tab[i].valid && (tab[i].is_v6 == is_v6) &&
          (is_v6 ? (tab[i].addr == sh_nxt) : (tab[i].addr[31:0] == sh_nxt[31:0]))) begin
        any = 1'b1;
        idx = i[$clog2(NADDR)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; done <= 1'b0; discard <= 1'b0; matched <= 1'b0; match_idx <= '0; is_mcast <= 1'b0;
    end else begin
      if (start) begin done <= 1'b0; discard <= 1'b0; matched <= 1'b0; is_mcast <= 1'b0; end
      if (en && w.valid && (is_v4 || is_v6) && (start || !done)) begin
        sh <= sh_nxt;
        if (last) begin
          done      <= 1'b1;
          matched   <= any;
          match_idx <= idx;
          discard   <= ~any;
          is_mcast  <= is_v6 ? (sh_nxt[127:120] == 8'hFF) : (sh_nxt[31:28] == 4'hE);
        end
      end
    end
  end
endmodule
