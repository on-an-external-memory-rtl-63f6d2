// tb_two_pisos: random loads of two sub-block buses and random store scans.
// A model keeps the loaded words and the scan counter (restart on 'first',
// advance on every write cycle, wrap after SSP-1); during each PA cycle the
// port word must be bus0's selected word in the first memory cycle and
// bus1's in the second.
module tb_two_pisos;
  import ems_pkg::*;
  localparam int SSP = 8;
  logic clk_2x = 0, clk_1x = 0, rst = 1, phase;
  logic load, wr_valid, wr_first;
  word_t bus0 [SSP], bus1 [SSP], dout;
  word_t m0 [SSP], m1 [SSP];
  int cnt, sel;
  int checks = 0, failures = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end
  always_ff @(posedge clk_2x) phase <= rst ? 1'b0 : ~phase;

  two_pisos #(.SSP(SSP)) u_dut (.clk_2x, .rst, .phase, .load, .bus0, .bus1, .wr_valid, .wr_first, .dout);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; wr_valid = 0; wr_first = 0;
    foreach (bus0[p]) begin bus0[p] = 0; bus1[p] = 0; m0[p] = 0; m1[p] = 0; end
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    cnt = 0;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk_1x);
      // model update for the cycle that just ended
      if (load) begin m0 = bus0; m1 = bus1; end
      if (wr_valid) cnt = (sel + 1) % SSP;
      load     <= (t % 9) == 0 || ($urandom % 7) == 0;
      wr_valid <= ($urandom % 4) != 0;
      wr_first <= (t % 9) == 1;
      for (int p = 0; p < SSP; p++) begin bus0[p] <= $urandom; bus1[p] <= $urandom; end
      #1;
      sel = (wr_valid && wr_first) ? 0 : cnt;
      if (t > 2) begin
        checks++;
        if (dout !== m0[sel]) begin failures++; $display("FAIL bus0 word %0d: %h exp %h", sel, dout, m0[sel]); end
      end
      @(posedge clk_2x); #1;
      if (t > 2) begin
        checks++;
        if (dout !== m1[sel]) begin failures++; $display("FAIL bus1 word %0d: %h exp %h", sel, dout, m1[sel]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
