// tb_data_pipeline: random words with random gaps enter the pipeline; every
// tap s must show the input word exactly s+1 clocks later, bubbles included.
module tb_data_pipeline;
  import gppp_pkg::*;
  localparam int S = 12;
  logic clk = 0, rst_n = 0;
  pipe_word_t din = '0;
  pipe_word_t tap [S];
  pipe_word_t hist [$];
  int checks = 0, failures = 0;

  data_pipeline #(.STAGES(S)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pipe_word_t x;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 500; c++) begin
      x = '0;
      if ($urandom_range(0, 3) != 0) begin
        x.valid = 1; x.data = $urandom; x.be = 4'($urandom); x.boff = 16'($urandom);
        x.sof = 1'($urandom); x.eof = 1'($urandom);
      end
      din <= x;
      @(posedge clk);
      hist.push_front(x);
      @(negedge clk);
      for (int s = 0; s < S; s++)
        if (hist.size() > s) begin
          checks++;
          if (tap[s] !== hist[s]) begin failures++; $display("FAIL c=%0d s=%0d", c, s); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
