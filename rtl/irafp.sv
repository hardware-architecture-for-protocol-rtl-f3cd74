// irafp: IP reassembly support page (IPv4 and IPv6).
//
// Extracts the fragmentation fields of the packet and, for a packet that is
// a fragment, keeps track of its datagram in a small context table.
// IPv4: identification (bytes 18..19), more-fragments flag and fragment
// offset (bytes 20..21), protocol (byte 23) and source address (bytes
// 26..29). IPv6: the fragment extension header, whose position the protocol
// page finds while walking the extension headers (fh_off, v6_frag): offset
// and M flag at fh_off+2, 32-bit identification at fh_off+4, and the 128-bit
// source address (bytes 22..37).
// A context is keyed by {IP version, source, identification, protocol (IPv4
// only)} and remembers how many payload bytes have arrived, the offsets
// already seen (a fragment whose offset was seen before is a duplicate and is
// discarded before anything is added up), and, once the last fragment (no
// more-fragments flag) arrived, the datagram's payload length. When all bytes
// are in, the context completes and is freed. Every context has a timer
// started by its first fragment; if the datagram is not complete when it runs
// out, the context is dropped and timeout pulses. The slot number, the "first
// fragment" and "complete" marks and the datagram length steer the back-up
// accumulators of the TCP/UDP checksum page, and frag_boff tells where the
// fragment's payload belongs in the reassembly buffer.
//
// Control inputs: IP version flags, header length, IP datagram length, the
// IPv6 fragment header position, drop (packet already discarded by another
// page). Timing: the table is updated on the frame's last word; res_* outputs
// are valid from the next clock until the next start. The function follows
// the document; the table size, the per-context offset list, the key and the
// timer are this design's choices.
module irafp
  import gppp_pkg::*;
#(
  parameter int unsigned NCTX    = 4,
  parameter int unsigned MAXF    = 8,
  parameter int unsigned TW      = 32,
  parameter logic [31:0] TIMEOUT = 32'd1_875_000_000  // 15 s at 125 MHz
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
  input  logic            v6_frag,      // IPv6 fragment header found (protocol page)
  input  logic [OFFW-1:0] fh_off,       // its offset
  input  logic [7:0]      hdr_len,
  input  logic [15:0]     ip_len,
  output logic            res_valid,
  output logic            res_frag,
  output logic [$clog2(NCTX)-1:0] res_slot,
  output logic            res_new,
  output logic            res_first,
  output logic            res_complete,
  output logic [15:0]     res_dgram_len,
  output logic [15:0]     frag_boff,
  output logic            discard,
  output logic            timeout,
  output logic [$clog2(NCTX)-1:0] timeout_slot
);
  localparam int SW = $clog2(NCTX);
  localparam int FW = $clog2(MAXF + 1);
  localparam int KW = 1 + 128 + 32 + 8;     // {is_v6, source, identification, protocol}

  typedef struct packed {
    logic        valid;
    logic [KW-1:0] key;
    logic [15:0] rcv;
    logic        have_last;
    logic [15:0] total;
    logic [FW-1:0] nof;
    logic [TW-1:0] timer;
  } ctx_t;

  ctx_t        ctx  [NCTX];
  logic [12:0] offs [NCTX][MAXF];

  logic [15:0] id, fo;
  logic [31:0] src;
  logic [7:0]  proto;
  logic [16:0] h_id, h_fo, h_s0, h_s1;
  logic [8:0]  b_pr;
  logic [KW-1:0] key;
  logic        mf, frag;
  logic [12:0] off8;
  logic [15:0] plen;
  // IPv6
  logic [127:0] src6;
  logic [31:0]  id6;
  logic [15:0]  fo6;
  logic [16:0]  h6_fo, h6_i0, h6_i1;
  logic [16:0]  h6_s [8];
  logic [127:0] src6_c;
  logic [31:0]  id6_c;
  logic [15:0]  fo6_c;
  logic         mf6, frag6;
  logic [12:0]  off8_6;

  assign h_id = half_at(w, L3_OFF + OFFW'(4));
  assign h_fo = half_at(w, L3_OFF + OFFW'(6));
  assign b_pr = byte_at(w, L3_OFF + OFFW'(9));
  assign h_s0 = half_at(w, L3_OFF + OFFW'(12));
  assign h_s1 = half_at(w, L3_OFF + OFFW'(14));

  assign h6_fo = v6_frag ? half_at(w, fh_off + OFFW'(2)) : 17'd0;
  assign h6_i0 = v6_frag ? half_at(w, fh_off + OFFW'(4)) : 17'd0;
  assign h6_i1 = v6_frag ? half_at(w, fh_off + OFFW'(6)) : 17'd0;
  for (genvar i = 0; i < 8; i++) begin : g_s6
    assign h6_s[i] = half_at(w, L3_OFF + OFFW'(8 + 2 * i));
  end

  // Field values as seen including the current word.
  always_comb begin
    src6_c = src6;
    for (int i = 0; i < 8; i++)
      if (h6_s[i][16]) src6_c[127 - 16 * i -: 16] = h6_s[i][15:0];
  end
  assign id6_c  = {h6_i0[16] ? h6_i0[15:0] : id6[31:16], h6_i1[16] ? h6_i1[15:0] : id6[15:0]};
  assign fo6_c  = h6_fo[16] ? h6_fo[15:0] : fo6;
  assign mf6    = fo6_c[0];
  assign off8_6 = fo6_c[15:3];
  assign frag6  = is_v6 && v6_frag && (mf6 || off8_6 != 13'd0);

  logic [15:0] fo_c;
  assign fo_c = h_fo[16] ? h_fo[15:0] : fo;
  assign mf   = is_v6 ? mf6 : fo_c[13];
  assign off8 = is_v6 ? off8_6 : fo_c[12:0];
  assign frag = (is_v4 && (fo_c[13] || fo_c[12:0] != 13'd0)) || frag6;
  assign key  = is_v6 ? {1'b1, src6_c, id6_c, 8'd0}
                      : {1'b0, 96'd0, h_s1[16] ? {src[31:16], h_s1[15:0]} : src,
                         16'd0, h_id[16] ? h_id[15:0] : id, b_pr[8] ? b_pr[7:0] : proto};
  // Payload bytes of this fragment: after the IPv4 header, or after the IPv6
  // fragment header (ip_len counts the 40-byte IPv6 header).
  assign plen = is_v6 ? 16'(ip_len + 16'(L3_OFF) - 16'(fh_off) - 16'd8)
                      : ip_len - {8'd0, hdr_len};

  // Table lookup.
  logic          hit, dup, has_free;
  logic [SW-1:0] hslot, fslot;
  always_comb begin
    hit = 1'b0; hslot = '0; has_free = 1'b0; fslot = '0; dup = 1'b0;
    for (int i = NCTX - 1; i >= 0; i--) begin
      if (ctx[i].valid && ctx[i].key == key) begin hit = 1'b1; hslot = SW'(i); end
      if (!ctx[i].valid) begin has_free = 1'b1; fslot = SW'(i); end
    end
    for (int j = 0; j < MAXF; j++)
      if (hit && (FW'(j) < ctx[hslot].nof) && offs[hslot][j] == off8) dup = 1'b1;
  end

  // Context state after this fragment (slot s: the matching or a free one).
  logic [SW-1:0] s;
  logic [15:0]   rcv_n, tot_n;
  logic          last_n;
  always_comb begin
    s      = hit ? hslot : fslot;
    rcv_n  = (hit ? ctx[s].rcv : 16'd0) + plen;
    last_n = (hit && ctx[s].have_last) || !mf;
    tot_n  = !mf ? ({off8, 3'b000} + plen) : (hit ? ctx[s].total : 16'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCTX; i++) begin
        ctx[i] <= '0;
        for (int j = 0; j < MAXF; j++) offs[i][j] <= '0;
      end
      id <= '0; fo <= '0; src <= '0; proto <= '0; src6 <= '0; id6 <= '0; fo6 <= '0;
      res_valid <= 1'b0; res_frag <= 1'b0; res_slot <= '0; res_new <= 1'b0;
      res_first <= 1'b0; res_complete <= 1'b0; res_dgram_len <= '0; frag_boff <= '0;
      discard <= 1'b0; timeout <= 1'b0; timeout_slot <= '0;
    end else begin
      // Timers run whether or not a packet is being processed.
      timeout <= 1'b0;
      for (int i = 0; i < NCTX; i++) begin
        if (ctx[i].valid) begin
          if (ctx[i].timer == '0) begin
            ctx[i].valid <= 1'b0;
            timeout      <= 1'b1;
            timeout_slot <= SW'(i);
          end else ctx[i].timer <= ctx[i].timer - 1'b1;
        end
      end

      if (start) begin
        id <= '0; fo <= '0; src <= '0; proto <= '0; src6 <= '0; id6 <= '0; fo6 <= '0;
        res_valid <= 1'b0; res_frag <= 1'b0; res_new <= 1'b0; res_first <= 1'b0;
        res_complete <= 1'b0; discard <= 1'b0;
      end
      if (en && w.valid) begin
        if (h_id[16]) id <= h_id[15:0];
        if (h_fo[16]) fo <= h_fo[15:0];
        if (b_pr[8])  proto <= b_pr[7:0];
        if (h_s0[16]) src[31:16] <= h_s0[15:0];
        if (h_s1[16]) src[15:0]  <= h_s1[15:0];
        src6 <= src6_c;
        id6  <= id6_c;
        fo6  <= fo6_c;
        if (frame_end && !drop) begin
          res_valid <= 1'b1;
          res_frag  <= frag;
          res_first <= frag && (off8 == 13'd0);
          frag_boff <= {off8, 3'b000};
          if (frag) begin
            if (hit && (dup || ctx[hslot].nof == FW'(MAXF))) begin
              discard <= 1'b1;          // duplicate, or no room to record it
              res_frag <= 1'b0;
            end else if (!hit && !has_free) begin
              discard <= 1'b1;          // table full
              res_frag <= 1'b0;
            end else begin
              res_slot      <= s;
              res_new       <= !hit;
              res_dgram_len <= tot_n;
              res_complete  <= last_n && (rcv_n == tot_n);
              ctx[s].valid     <= !(last_n && (rcv_n == tot_n));
              ctx[s].key       <= key;
              ctx[s].rcv       <= rcv_n;
              ctx[s].have_last <= last_n;
              ctx[s].total     <= tot_n;
              ctx[s].nof       <= (hit ? ctx[s].nof : FW'(0)) + FW'(1);
              offs[s][hit ? ctx[s].nof[$clog2(MAXF)-1:0] : '0] <= off8;
              if (!hit) ctx[s].timer <= TW'(TIMEOUT);
            end
          end
        end
      end
    end
  end
endmodule
