// edafp: Ethernet destination address extraction and comparison page.
//
// Extracts the 48-bit destination address (frame bytes 0..5: the first word
// and the upper half of the second) and accepts the frame if it equals the
// configured station address, is the broadcast address (when enabled), or is
// a group (multicast) address, recognised by the I/G bit - the least
// significant bit of the first byte - when multicast reception is enabled.
// Otherwise discard is raised.
//
// Configuration (scan chain, 50 bits, first bit in = MSB):
//   {station_addr[47:0], accept_broadcast, accept_multicast}
// Timing: done and the flags appear one clock after the word holding bytes
// 4..7 is on w, and hold until the next start. The check itself follows the
// document; the enable bits for broadcast and multicast are this design's
// reading of "checks if the extracted address is a multicast address".
module edafp
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  pipe_word_t w,
  input  logic       cfg_clk,
  input  logic       cfg_din,
  output logic       cfg_dout,
  output logic       done,
  output logic       discard,
  output logic       is_bcast,
  output logic       is_mcast,
  output logic       is_own
);
  logic [49:0] cfg;
  logic [47:0] station;
  logic        acc_bc, acc_mc;
  logic [31:0] w0;
  logic [47:0] da;
  logic        own, bc, mc;

  fp_cfg_chain #(.N(50)) u_cfg (.cfg_clk, .cfg_din, .cfg_dout, .q(cfg));
  assign {station, acc_bc, acc_mc} = cfg;

  assign da  = {w0, w.data[31:16]};
  assign own = (da == station);
  assign bc  = (da == 48'hFFFF_FFFF_FFFF);
  assign mc  = da[40] & ~bc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0 <= '0; done <= 1'b0; discard <= 1'b0;
      is_bcast <= 1'b0; is_mcast <= 1'b0; is_own <= 1'b0;
    end else begin
      if (start) begin
        done <= 1'b0; discard <= 1'b0;
        is_bcast <= 1'b0; is_mcast <= 1'b0; is_own <= 1'b0;
      end
      if (en && w.valid) begin
        if (w.boff == OFFW'(0)) w0 <= w.data;
        if (w.boff == OFFW'(4) && !start) begin
          done     <= 1'b1;
          is_own   <= own;
          is_bcast <= bc;
          is_mcast <= mc;
          discard  <= ~(own | (bc & acc_bc) | (mc & acc_mc));
        end
      end
    end
  end
endmodule
