// tb_te: a row of four transporting elements with random selects and PE
// results, compared cycle by cycle with a model of the chain (each element
// registers either its PE's result or its upstream neighbour's output).
module tb_te;
  import ems_pkg::*;
  localparam int L = 4;
  logic clk_1x = 0, rst = 1;
  logic sel [L];
  word_t res [L];
  word_t chain [L+1];
  word_t model [L];
  int checks = 0, failures = 0;

  always #5 clk_1x = ~clk_1x;
  assign chain[0] = '0;

  for (genvar s = 0; s < L; s++) begin : g
    te u_te (.clk_1x, .rst, .sel_pe(sel[s]), .pe_res(res[s]), .prev(chain[s]), .out(chain[s+1]));
  end

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t nm [L];
    foreach (sel[s]) begin sel[s] = 0; res[s] = 0; model[s] = 0; end
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    @(posedge clk_1x);
    for (int t = 0; t < 300; t++) begin
      for (int s = 0; s < L; s++) begin
        sel[s] <= ($urandom % 3) == 0;
        res[s] <= $urandom;
      end
      #1;
      for (int s = 0; s < L; s++) nm[s] = sel[s] ? res[s] : (s == 0 ? '0 : model[s-1]);
      @(posedge clk_1x); #1;
      model = nm;
      for (int s = 0; s < L; s++) begin
        checks++;
        if (chain[s+1] !== model[s]) begin failures++; $display("FAIL te %0d got %h exp %h", s, chain[s+1], model[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
