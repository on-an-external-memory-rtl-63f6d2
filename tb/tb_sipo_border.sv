// tb_sipo_border: a new word is offered every memory cycle. After each PA
// clock edge the SIPO must show, in order, the words sampled at the two
// memory clock edges before that PA edge: with a bank in front, the words
// read by the two addresses of the previous PA cycle.
module tb_sipo_border;
  import ems_pkg::*;
  logic clk_2x = 0, clk_1x = 0;
  word_t din, d0, d1;
  word_t hist [$];
  int checks = 0, failures = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  sipo_border u_dut (.clk_2x, .clk_1x, .din, .dout0(d0), .dout1(d1));

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = '0;
    for (int e = 0; e < 400; e++) begin
      @(posedge clk_2x);
      hist.push_back(din);   // word sampled at this edge by the memory-side pair
      din <= $urandom;
      #1;
      // after a PA edge (clk_1x now high) the pair of the previous PA cycle shows
      if (clk_1x && e >= 4) begin
        checks++;
        if (d0 !== hist[e-2] || d1 !== hist[e-1]) begin
          failures++; $display("FAIL edge %0d got %h %h exp %h %h", e, d0, d1, hist[e-2], hist[e-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
