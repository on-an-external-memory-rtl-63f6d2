// tb_tagm: checks the two-address generator module. After reset the T
// flip-flop must be 0 in the first memory cycle of every PA cycle and 1 in
// the second, and the port address must be AGU0's (lane LANE0) in the first
// and AGU1's (lane LANE1) in the second, both against the addressing formula.
// A scanning TAGM is checked the same way with a model scan counter.
module tb_tagm;
  import ems_pkg::*;
  import tb_util_pkg::*;

  logic clk_2x = 0, clk_1x = 0, rst = 1;
  idx_bus_t idx;
  idx_t n;
  addr_t a, as;
  logic ph, phs;
  logic [2:0] pos, poss;
  logic last, lasts;
  int checks = 0, failures = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  tagm #(.BANK(1), .LANE0(2), .LANE1(3), .SCAN(1'b0)) u_dut (
    .clk_2x, .clk_1x, .rst, .idx, .n, .addr(a), .phase(ph), .pos, .last);
  tagm #(.BANK(0), .LANE0(5), .LANE1(7), .SCAN(1'b1)) u_scan (
    .clk_2x, .clk_1x, .rst, .idx, .n, .addr(as), .phase(phs), .pos(poss), .last(lasts));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int mpos;
    idx = '0; n = 8'd37;
    repeat (3) @(posedge clk_1x);
    rst <= 0;
    mpos = 0;
    for (int t = 0; t < 300; t++) begin
      @(posedge clk_1x);
      idx.valid <= ($urandom % 3) != 0;
      idx.first <= ($urandom % 9) == 0;
      idx.i     <= idx_t'($urandom % 171);
      idx.k     <= idx_t'($urandom % 171);
      idx.tilep <= idx_t'($urandom % 21);
      n         <= idx_t'(1 + $urandom % 170);
      #1;
      if (idx.valid && idx.first) mpos = 0;
      if (t > 0) begin
        chk(ph == 1'b0 && phs == 1'b0, "phase 0 at PA edge");
        chk(a == addr_t'(ref_addr(n, idx.i, idx.k, idx.tilep, 1, 2)), "first address");
        chk(as == addr_t'(ref_addr(n, idx.i + mpos, idx.k, idx.tilep, 0, 5)), "scan first address");
      end
      @(posedge clk_2x); #1;
      chk(ph == 1'b1 && phs == 1'b1, "phase 1 at mid cycle");
      chk(a == addr_t'(ref_addr(n, idx.i, idx.k, idx.tilep, 1, 3)), "second address");
      chk(as == addr_t'(ref_addr(n, idx.i + mpos, idx.k, idx.tilep, 0, 7)), "scan second address");
      chk(lasts == (mpos == 7), "scan last");
      if (idx.valid) mpos = (mpos + 1) % 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
