// eccfp: Ethernet checksum calculation functional page (CRC-32 check).
//
// Computes the CRC-32 of every byte of the frame, frame check sequence
// included, 32 bits per clock. The division register works in augmented form
// with the preset of the Glaise-Jacquart method (see crc32_gen8). Run over the
// data and the received FCS, an intact frame leaves the register all ones, so
// its inverted value - what the output register of the CRC generator shows -
// is all zeros. Bytes outside the word's byte mask are skipped, which handles
// frames whose length is not a multiple of four bytes.
//
// Interface: the fixed FP controls start (first word of the frame is on w),
// en (sleep when low) and discard. frame_end marks the last word; one clock
// later done pulses and discard rises if the check failed. discard stays set
// until the next start. The 32-bit width follows the document; the byte-mask
// handling of the last word is this design's own.
module eccfp
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  logic       frame_end,
  input  pipe_word_t w,
  output logic       done,
  output logic       discard,
  output logic [31:0] crc_result  // inverted register: zero for an intact frame
);
  logic [31:0] crc_q, base, nxt;

  always_comb begin
    base = start ? CRC32_GJ_PRESET_R : crc_q;
    nxt  = base;
    for (int b = 3; b >= 0; b--)
      if (w.be[b]) nxt = crc_aug_byte(nxt, w.data[8*b +: 8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_q   <= CRC32_GJ_PRESET_R;
      done    <= 1'b0;
      discard <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) discard <= 1'b0;
      if (en && w.valid) begin
        crc_q <= nxt;
        if (frame_end) begin
          done    <= 1'b1;
          discard <= (nxt != CRC32_GJ_RESIDUE_R);
        end
      end
    end
  end
  assign crc_result = ~crc_q;
endmodule
