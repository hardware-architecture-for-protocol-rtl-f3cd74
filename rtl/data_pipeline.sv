// data_pipeline: the deep data pipeline that carries the received frame past
// the functional pages.
//
// The parallelized words from the PSU enter a chain of STAGES registers. A
// functional page taps the output of one register, so there is one pipeline
// register between neighbouring pages and no data line has to fan out to all
// pages at once. The chain shifts every clock; an empty slot travels as a word
// with valid = 0. Word k of a frame is on tap[s] s+1 clocks after it was on
// the input. Only the valid bits are reset; data is don't-care when invalid.
// The register-per-page structure follows the document; the stage count is a
// property of the instance (one stage per page, twelve pages).
module data_pipeline
  import gppp_pkg::*;
#(
  parameter int unsigned STAGES = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  pipe_word_t din,
  output pipe_word_t tap [STAGES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) tap[s] <= '0;
    end else begin
      tap[0] <= din;
      for (int s = 1; s < STAGES; s++) tap[s] <= tap[s-1];
    end
  end
endmodule
