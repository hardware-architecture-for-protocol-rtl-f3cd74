// tb_eltfp: Ethernet length/ethertype page. IPv4 frames (payload end taken
// from the forwarded IP datagram end), IEEE 802.3 frames with a length field,
// and ARP/RARP frames. The type flags must appear one clock after word 3, and
// pay_end must pulse once, one clock after the word holding the last payload
// byte (padding and FCS follow).
module tb_eltfp;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, start = 0, ip_end_valid = 0;
  logic [OFFW-1:0] ip_end = '0;
  pipe_word_t w = '0;
  logic type_valid, is_length, is_ipv4, is_ipv6, is_arp, pay_end;
  logic [15:0] ethertype;
  logic [OFFW-1:0] pay_end_off;
  int checks = 0, failures = 0;

  eltfp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t f, p;
    logic [15:0] et;
    int plen, endoff, endw, pulses;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 40; t++) begin
      plen = $urandom_range(1, 120);
      p = rand_bytes(plen);
      case (t % 4)
        0: et = 16'h0800;
        1: et = 16'(plen);
        2: et = (t % 8 == 2) ? 16'h0806 : 16'h8035;
        default: et = 16'h86DD;
      endcase
      f = eth_frame(48'h1, 48'h2, et, p);
      endoff = 14 + plen;
      endw = (endoff - 1) / 4;
      ip_end_valid <= 0;
      ip_end <= OFFW'(endoff);
      pulses = 0;
      for (int k = 0; k < nwords(f); k++) begin
        w <= to_word(f, k); start <= (k == 0);
        if (k == 5) ip_end_valid <= (t % 4 == 0) || (t % 4 == 3);
        @(posedge clk);
        @(negedge clk);
        if (k == 3) begin
          checks++;
          if (!type_valid || ethertype != et || is_length !== (et < 16'h0600) ||
              is_ipv4 !== (et == 16'h0800) || is_ipv6 !== (et == 16'h86DD) ||
              is_arp !== (et == 16'h0806 || et == 16'h8035)) begin
            failures++; $display("FAIL type %h", ethertype);
          end
        end
        if (pay_end) begin
          pulses++;
          checks++;
          if (k != ((endw < 5 && t % 4 != 1) ? 5 : endw) || pay_end_off != OFFW'(endoff)) begin
            failures++; $display("FAIL t=%0d pay_end at %0d exp %0d", t, k, endw);
          end
        end
      end
      checks++;
      if (pulses != ((t % 4 == 2) ? 0 : 1)) begin failures++; $display("FAIL t=%0d pulses %0d", t, pulses); end
      w <= '0; start <= 0; @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
