// tb_sipo_bcast: random words are shifted in with a random enable; after
// every edge bus[p] must hold the p-th of the last SSP words shifted in.
module tb_sipo_bcast;
  import ems_pkg::*;
  localparam int SSP = 8;
  logic clk_2x = 0, en;
  word_t din, bus [SSP];
  word_t q [$];
  int checks = 0, failures = 0;

  always #5 clk_2x = ~clk_2x;

  sipo_bcast #(.SSP(SSP)) u_dut (.clk_2x, .en, .din, .bus);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      en = ($urandom % 3) != 0; din = $urandom;
      @(posedge clk_2x); #1;
      if (en) q.push_back(din);
      if (q.size() > SSP) void'(q.pop_front());
      if (q.size() == SSP)
        for (int p = 0; p < SSP; p++) begin
          checks++;
          if (bus[p] !== q[p]) begin failures++; $display("FAIL bus[%0d] %h exp %h", p, bus[p], q[p]); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
