// fp_cfg_chain: configuration scan chain of a functional page.
//
// Every functional page that holds configuration keeps it in a shift register
// clocked by a separate configuration clock. Before operation the
// microcontroller shifts the configuration vector in, one bit per cfg_clk edge,
// through cfg_din; the bit that falls out of the far end leaves on cfg_dout so
// chains of several pages can be cascaded. Once configured, cfg_clk is stopped
// and q stays constant while packets are processed. The first bit shifted in
// ends up in q[N-1] after N clocks (MSB-first loading).
// The two-input interface and the separate clock follow the document; the
// bit order is this design's choice. The chain has no reset: the vector is
// valid only after N configuration clocks.
module fp_cfg_chain #(
  parameter int unsigned N = 8
) (
  input  logic         cfg_clk,
  input  logic         cfg_din,
  output logic         cfg_dout,
  output logic [N-1:0] q
);
  if (N == 1) begin : g_one
    always_ff @(posedge cfg_clk) q <= cfg_din;
  end else begin : g_many
    always_ff @(posedge cfg_clk) q <= {q[N-2:0], cfg_din};
  end
  assign cfg_dout = q[N-1];
endmodule
