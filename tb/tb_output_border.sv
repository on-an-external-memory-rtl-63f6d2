// tb_output_border: random words are offered on the four lanes for a stream
// of indexes with distinct addresses (i counts up, k and tilep fixed), with
// gaps. Every word of a valid cycle must land at the formula's address for
// its lane; words of idle cycles must not be written. The bank is cleared
// and finally read back through the host port.
module tb_output_border;
  import ems_pkg::*;
  import tb_util_pkg::*;
  localparam int BK = 0, T = 160;
  logic clk_2x = 0, clk_1x = 0, rst = 1;
  idx_bus_t idx;
  idx_t n;
  word_t din [4], hrd;
  host_req_t host;
  word_t model [int];
  int checks = 0, failures = 0, seen = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  output_border #(.BANK(BK)) u_dut (.clk_2x, .clk_1x, .rst, .idx, .n, .din, .host, .host_rdata(hrd));

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idx = '0; n = 8'd160; host = '0;
    foreach (din[q]) din[q] = '0;
    // clear the region the test writes to
    for (int a = 0; a < 4 * 160; a++) begin
      @(posedge clk_2x);
      host <= '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: 32'hDEAD0000};
    end
    @(posedge clk_1x);
    host <= '0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      @(posedge clk_1x);
      idx.valid <= (t < T - 5) && (($urandom % 4) != 0);
      idx.first <= 1'b0;
      idx.i     <= idx_t'(t);
      idx.k     <= 8'd8;
      idx.tilep <= 8'd2;
      for (int q = 0; q < 4; q++) din[q] <= $urandom;
      #1;
      if (idx.valid)
        for (int q = 0; q < 4; q++) model[ref_addr(n, idx.i, idx.k, idx.tilep, BK, q)] = din[q];
    end
    repeat (3) @(posedge clk_1x);
    rst <= 1;   // stops nothing in flight: all writes are done
    for (int a = 0; a < 4 * 160; a++) begin
      word_t e;
      e = model.exists(a) ? model[a] : 32'hDEAD0000;
      if (model.exists(a)) seen++;
      @(posedge clk_2x);
      host <= '{en: 1'b1, we: 1'b0, addr: addr_t'(a), wdata: '0};
      @(posedge clk_2x); #1;
      @(posedge clk_2x); #1;
      checks++;
      if (hrd !== e) begin failures++; $display("FAIL addr %0d got %h exp %h", a, hrd, e); end
    end
    if (model.num() < 300) begin failures++; $display("FAIL too few writes"); end
    checks++;
    if (seen != model.num()) begin failures++; $display("FAIL written words outside the read-back range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
