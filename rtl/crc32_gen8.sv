// crc32_gen8: 8-bit parallel CRC-32 generator for Ethernet (IEEE 802.3).
//
// The generator is three registers in a row: an input register for the data
// byte, the 32-bit CRC register, and an output register. The CRC register
// performs polynomial division in augmented form (the method of Glaise and
// Jacquart): each byte is shifted in as eight division steps in one clock,
// which reduces to an XOR network of at most eight inputs per register bit.
// In this form the register must be preset to 0x46AF6449 (0x9226F562 in the
// bit-reflected order used here) instead of all ones, and four zero bytes must
// follow the data. The output register holds the inverted CRC register, which
// after the four zero bytes is the frame check sequence, least significant
// byte transmitted first.
//
// Interface: assert preset for one clock before a frame; then give one byte
// per clock with in_valid. crc_out is updated three clocks after a byte is
// given (input, CRC and output registers). The document uses an asynchronous
// set/reset on the CRC register; here the preset is a synchronous input, a
// choice of this design. Input and output registers have no reset, as in the
// document; only the valid tracking is reset.
module crc32_gen8
  import gppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        preset,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  output logic [31:0] crc_out,
  output logic        out_valid
);
  logic [7:0]  in_q;
  logic        in_q_valid, crc_valid;
  logic [31:0] crc_q;

  always_ff @(posedge clk) begin
    in_q <= in_byte;
    crc_out <= ~crc_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_q      <= CRC32_GJ_PRESET_R;
      in_q_valid <= 1'b0;
      crc_valid  <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      in_q_valid <= in_valid & ~preset;
      if (preset) begin
        crc_q     <= CRC32_GJ_PRESET_R;
        crc_valid <= 1'b0;
      end else if (in_q_valid) begin
        crc_q     <= crc_aug_byte(crc_q, in_q);
        crc_valid <= 1'b1;
      end else begin
        crc_valid <= 1'b0;
      end
      out_valid <= crc_valid;
    end
  end
endmodule
