// tb_piso_border: two random words are offered per PA cycle; in the next PA
// cycle the PISO must put the first on its output during the first memory
// cycle and the second during the second memory cycle.
module tb_piso_border;
  import ems_pkg::*;
  logic clk_2x = 0, clk_1x = 0, rst = 1, phase;
  word_t din0, din1, dout, p0, p1;
  int checks = 0, failures = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  always_ff @(posedge clk_2x) phase <= rst ? 1'b0 : ~phase;

  piso_border u_dut (.clk_2x, .phase, .din0, .din1, .dout);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din0 = 0; din1 = 0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    for (int t = 0; t < 300; t++) begin
      @(posedge clk_1x);
      p0 = din0; p1 = din1;          // words of the PA cycle just ended
      din0 <= $urandom; din1 <= $urandom;
      #1;
      if (t > 1) begin
        checks++;
        if (dout !== p0) begin failures++; $display("FAIL first word %h exp %h", dout, p0); end
      end
      @(posedge clk_2x); #1;
      if (t > 1) begin
        checks++;
        if (dout !== p1) begin failures++; $display("FAIL second word %h exp %h", dout, p1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
