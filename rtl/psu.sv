// psu: parallelization/synchronization unit.
//
// Receives the GMII byte stream from the PHY, finds the start of a frame
// (preamble bytes 0x55 ended by the start-of-frame delimiter 0xD5) and packs
// the following bytes four at a time into 32-bit pipeline words, first byte in
// bits [31:24]. Each word carries its byte offset in the frame and a byte mask.
// Because the last word of a frame is only known when rx_dv falls, a completed
// word is held back until the next byte arrives (then it is not the last) or
// rx_dv falls (then it is sent with eof). A partial last word is sent with the
// unused lanes masked off. rx_er anywhere in the frame is reported with the
// last word (err_eof). The unit keeps running while the rest of the processor
// is switched off after a discard, so it always finds the next frame.
//
// Timing: one GMII byte per clock. A complete word leaves on the clock edge
// that samples the first byte of the next word (or the edge that sees rx_dv
// low), so data words leave at most every fourth clock. The role
// of the unit follows the document; GMII framing details, the single clock and
// the hold-back scheme are this design's choices.
module psu
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_dv,
  input  logic [7:0] rxd,
  input  logic       rx_er,
  output pipe_word_t dout,
  output logic       err_eof    // with dout.eof: an rx_er was seen in this frame
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_SKIP} state_t;
  state_t state;

  logic [23:0]     acc;       // bytes 0..2 of the word being built
  logic [1:0]      k;         // bytes held in acc
  logic [31:0]     pend;      // completed word waiting to be sent
  logic            pend_v;
  logic [OFFW-1:0] pend_off;  // offset of pend
  logic [OFFW-1:0] off;       // offset of the word being built
  logic            first;     // next word sent is the first of the frame
  logic            err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      acc     <= '0;
      k       <= '0;
      pend    <= '0;
      pend_v  <= 1'b0;
      pend_off<= '0;
      off     <= '0;
      first   <= 1'b0;
      err     <= 1'b0;
      dout    <= '0;
      err_eof <= 1'b0;
    end else begin
      dout.valid <= 1'b0;
      dout.sof   <= 1'b0;
      dout.eof   <= 1'b0;
      err_eof    <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (rx_dv) begin
            if (rxd == 8'hD5) state <= S_DATA;
            else if (rxd == 8'h55) state <= S_PRE;
            else state <= S_SKIP;            // not a frame start: ignore it
          end
          k <= '0; pend_v <= 1'b0; off <= '0; first <= 1'b1; err <= rx_er;
        end
        S_PRE: begin
          if (!rx_dv) state <= S_IDLE;
          else if (rxd == 8'hD5) state <= S_DATA;
          else if (rxd != 8'h55) state <= S_SKIP;
          if (rx_er) err <= 1'b1;
        end
        S_SKIP: if (!rx_dv) state <= S_IDLE;
        S_DATA: begin
          if (rx_dv) begin
            if (rx_er) err <= 1'b1;
            if (pend_v) begin                // a byte follows: pend is not last
              dout.valid <= 1'b1;
              dout.sof   <= first;
              dout.be    <= 4'hF;
              dout.boff  <= pend_off;
              dout.data  <= pend;
              first      <= 1'b0;
              pend_v     <= 1'b0;
            end
            if (k == 2'd3) begin
              pend     <= {acc, rxd};
              pend_v   <= 1'b1;
              pend_off <= off;
              off      <= off + OFFW'(4);
              k        <= '0;
            end else begin
              acc <= {acc[15:0], rxd};
              k   <= k + 2'd1;
            end
          end else begin                     // end of frame
            state <= S_IDLE;
            if (pend_v || k != 0) begin
              dout.valid <= 1'b1;
              dout.sof   <= first;
              dout.eof   <= 1'b1;
              err_eof    <= err | rx_er;
              if (pend_v) begin
                dout.be   <= 4'hF;
                dout.boff <= pend_off;
                dout.data <= pend;
              end else begin
                dout.boff <= off;
                unique case (k)
                  2'd1:    begin dout.be <= 4'b1000; dout.data <= {acc[7:0], 24'd0}; end
                  2'd2:    begin dout.be <= 4'b1100; dout.data <= {acc[15:0], 16'd0}; end
                  default: begin dout.be <= 4'b1110; dout.data <= {acc[23:0], 8'd0}; end
                endcase
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
