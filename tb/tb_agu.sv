// tb_agu: checks the address generator unit against the addressing formula.
// A border AGU (no scan) and a broadcast AGU (scan counter) see the same
// random index bus; their addresses are compared with the formula, and the
// broadcast AGU's scan position with a model counter that restarts on
// 'first' and wraps after SSP-1.
module tb_agu;
  import ems_pkg::*;
  import tb_util_pkg::*;

  logic clk_1x = 0, rst = 1;
  idx_bus_t idx;
  idx_t n;
  addr_t a_b, a_s;
  logic [2:0] pos_b, pos_s;
  logic last_b, last_s;
  int checks = 0, failures = 0;

  agu #(.SSP(8), .FCOL(4), .BANK(1), .LANE(6), .SCAN(1'b0)) u_b (
    .clk_1x, .rst, .idx, .n, .addr(a_b), .pos(pos_b), .last(last_b));
  agu #(.SSP(8), .FCOL(4), .BANK(0), .LANE(3), .SCAN(1'b1)) u_s (
    .clk_1x, .rst, .idx, .n, .addr(a_s), .pos(pos_s), .last(last_s));

  always #5 clk_1x = ~clk_1x;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int mpos;
    idx = '0; n = 8'd100;
    repeat (3) @(posedge clk_1x);
    rst <= 0;
    mpos = 0;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk_1x);
      idx.valid <= ($urandom % 4) != 0;
      idx.first <= ($urandom % 11) == 0;
      idx.i     <= idx_t'($urandom % 171);
      idx.k     <= idx_t'(8 * ($urandom % 21));
      idx.tilep <= idx_t'($urandom % 21);
      n         <= idx_t'(1 + $urandom % 170);
      #1;
      if (idx.valid && idx.first) mpos = 0;
      chk(a_b == addr_t'(ref_addr(n, idx.i, idx.k, idx.tilep, 1, 6)), $sformatf("border address %0d exp %0d n=%0d i=%0d k=%0d t=%0d", a_b, ref_addr(n, idx.i, idx.k, idx.tilep, 1, 6), n, idx.i, idx.k, idx.tilep));
      chk(pos_s == 3'(mpos), "scan position");
      chk(last_s == (mpos == 7), "scan last");
      chk(a_s == addr_t'(ref_addr(n, idx.i + mpos, idx.k, idx.tilep, 0, 3)), "scan address");
      if (idx.valid) mpos = (mpos + 1) % 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
