// gppp_pkg: types and constants shared by the protocol processor.
//
// The processor moves a received frame through a pipeline one 32-bit word per
// clock. Every word travels together with its byte offset in the frame, a byte
// mask and start/end-of-frame marks (pipe_word_t), so a functional page (FP)
// finds its header fields by comparing offsets instead of counting cycles.
// Bytes are packed big-endian: the first received byte of a word sits in
// bits [31:24], so 16-bit protocol fields fall on the word halves.
// The 32-bit word length follows the document; the side-band fields, the
// offset width and the descriptor layout are this design's own choices.
package gppp_pkg;

  localparam int unsigned W      = 32;   // pipeline word length
  localparam int unsigned OFFW   = 16;   // width of a byte offset in the frame

  // Functional pages of this instance, in pipeline order: page i taps the
  // output of pipeline register i.
  typedef enum logic [3:0] {
    FP_ECC = 4'd0,  // Ethernet CRC check
    FP_EDA = 4'd1,  // Ethernet destination address
    FP_ELT = 4'd2,  // Ethernet length/ethertype
    FP_IVF = 4'd3,  // IP version
    FP_IHL = 4'd4,  // IP header length
    FP_ITL = 4'd5,  // IP total length
    FP_IHC = 4'd6,  // IPv4 header checksum
    FP_IDA = 4'd7,  // IP destination address
    FP_IPN = 4'd8,  // IP protocol / next header
    FP_IRA = 4'd9,  // IP reassembly support
    FP_TUL = 4'd10, // TCP/UDP length
    FP_TUC = 4'd11  // TCP/UDP checksum
  } fp_id_e;
  localparam int unsigned NFP = 12;

  // Ethernet / IP constants
  localparam logic [15:0] ETH_IPV4 = 16'h0800;
  localparam logic [15:0] ETH_IPV6 = 16'h86DD;
  localparam logic [15:0] ETH_ARP  = 16'h0806;
  localparam logic [15:0] ETH_RARP = 16'h8035;
  localparam logic [15:0] ETH_TYPE_MIN = 16'h0600; // below: 802.3 length field
  localparam logic [OFFW-1:0] L3_OFF = 16'd14;     // IP header starts after 14 header bytes

  localparam logic [7:0] PROTO_HOPOPT = 8'd0;
  localparam logic [7:0] PROTO_ICMP   = 8'd1;
  localparam logic [7:0] PROTO_IGMP   = 8'd2;
  localparam logic [7:0] PROTO_TCP    = 8'd6;
  localparam logic [7:0] PROTO_UDP    = 8'd17;
  localparam logic [7:0] PROTO_ROUTE  = 8'd43;
  localparam logic [7:0] PROTO_FRAG   = 8'd44;
  localparam logic [7:0] PROTO_ICMP6  = 8'd58;
  localparam logic [7:0] PROTO_NONXT  = 8'd59;
  localparam logic [7:0] PROTO_DSTOPT = 8'd60;

  // CRC-32 (IEEE 802.3), bit-reflected because Ethernet sends each byte LSB first.
  localparam logic [31:0] CRC32_POLY_R = 32'hEDB88320;
  // Preset of the division register for the augmented (Glaise-Jacquart) form:
  // 0x46AF6449 bit-reversed. After 32 zero bits it equals all ones.
  localparam logic [31:0] CRC32_GJ_PRESET_R = 32'h9226F562;
  // Register value after a whole frame, FCS included, when the frame is intact.
  localparam logic [31:0] CRC32_GJ_RESIDUE_R = 32'hFFFFFFFF;

  typedef struct packed {
    logic            valid;  // word present this cycle
    logic            sof;    // first word of a frame
    logic            eof;    // last word of a frame
    logic [3:0]      be;     // byte valid mask, be[3] = bits [31:24]
    logic [OFFW-1:0] boff;   // byte offset in the frame of bits [31:24]
    logic [W-1:0]    data;
  } pipe_word_t;

  // Reason a packet was discarded, one bit per functional page.
  typedef struct packed {
    logic rx_err;   // GMII receive error
    logic ecc;      // bad Ethernet CRC
    logic eda;      // Ethernet destination not accepted
    logic ihc;      // bad IPv4 header checksum
    logic ida;      // IP destination not accepted
    logic tuc;      // bad TCP/UDP checksum
    logic irf;      // fragment duplicate or table full
  } discard_t;

  // Packet descriptor handed to the microcontroller at the end of a frame.
  typedef struct packed {
    logic            accept;     // packet passed every check
    discard_t        why;        // discard reasons
    logic [15:0]     ethertype;
    logic            is_ipv4;
    logic            is_ipv6;
    logic            is_arp;     // ARP or RARP: handed to software
    logic [7:0]      l4_proto;
    logic [OFFW-1:0] l4_off;     // byte offset of the TCP/UDP header
    logic [15:0]     l4_len;     // TCP/UDP length (header + data)
    logic            fragment;   // this frame carries an IP fragment
    logic            reasm_done; // last missing fragment of a datagram arrived
    logic [OFFW-1:0] frame_len;  // bytes in the frame, FCS included
  } pkt_desc_t;

  // One's complement 16-bit addition with end-around carry.
  function automatic logic [15:0] ones_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

  // One reflected CRC-32 division step in augmented form: one data bit is
  // shifted into the register, the polynomial is subtracted on overflow.
  function automatic logic [31:0] crc_aug_bit(input logic [31:0] r, input logic b);
    logic [31:0] n;
    n = {b, r[31:1]};
    return r[0] ? (n ^ CRC32_POLY_R) : n;
  endfunction

  // Eight bits of a byte, LSB first as on the wire.
  function automatic logic [31:0] crc_aug_byte(input logic [31:0] r, input logic [7:0] d);
    logic [31:0] t;
    t = r;
    for (int i = 0; i < 8; i++) t = crc_aug_bit(t, d[i]);
    return t;
  endfunction

  // Byte at frame offset off if the word w holds it: {hit, byte}.
  function automatic logic [8:0] byte_at(input pipe_word_t w, input logic [OFFW-1:0] off);
    logic [1:0] lane;
    lane = 2'd3 - off[1:0];
    return {w.valid && (off[OFFW-1:2] == w.boff[OFFW-1:2]) && w.be[lane], w.data[8*lane +: 8]};
  endfunction

  // 16-bit field at even frame offset off if the word w holds it: {hit, value}.
  function automatic logic [16:0] half_at(input pipe_word_t w, input logic [OFFW-1:0] off);
    logic hit;
    hit = w.valid && (off[OFFW-1:2] == w.boff[OFFW-1:2]);
    return off[1] ? {hit && w.be[1], w.data[15:0]} : {hit && w.be[3], w.data[31:16]};
  endfunction

endpackage
