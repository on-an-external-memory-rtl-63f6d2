// tb_output_bcast: twenty stores of four random sub-blocks. The buses carry
// new random words every cycle; only the words present in the cycle of a
// store's first index belong to that store. Each store is SSP valid indexes
// with random stalls and gaps; i advances by SSP per store so all addresses
// differ. Word p of bus q must land at the formula's address for row q with
// the scanned index i+p, checked by reading the bank through the host port.
module tb_output_bcast;
  import ems_pkg::*;
  import tb_util_pkg::*;
  localparam int BK = 1, SSP = 8, NST = 20;
  logic clk_2x = 0, clk_1x = 0, rst = 1;
  idx_bus_t idx;
  idx_t n;
  word_t bus [4][SSP], hrd;
  host_req_t host;
  word_t model [int];
  int checks = 0, failures = 0, seen = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  output_bcast #(.BANK(BK)) u_dut (.clk_2x, .clk_1x, .rst, .idx, .n, .bus, .host, .host_rdata(hrd));

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pos, gap, st;
    word_t held [4][SSP];
    idx = '0; n = 8'd160; host = '0;
    foreach (bus[q, p]) bus[q][p] = '0;
    for (int a = 0; a < 4 * 160; a++) begin
      @(posedge clk_2x);
      host <= '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: 32'hDEAD0000};
    end
    @(posedge clk_1x);
    host <= '0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    pos = 0; gap = 0; st = 0;
    while (st < NST) begin
      @(posedge clk_1x);
      foreach (bus[q, p]) bus[q][p] <= $urandom;
      if (gap > 0 || (pos > 0 && ($urandom % 6) == 0)) begin
        if (gap > 0) gap--;
        idx <= '0;
        #1;
      end else begin
        idx <= '{valid: 1'b1, first: pos == 0, i: idx_t'(SSP * st), k: 8'd0, tilep: 8'd0};
        #1;
        if (pos == 0) held = bus;
        for (int q = 0; q < 4; q++)
          model[ref_addr(n, SSP * st + pos, 0, 0, BK, 4 * BK + q)] = held[q][pos];
        pos++;
        if (pos == SSP) begin pos = 0; st++; gap = ($urandom % 2) ? 0 : $urandom % 3; end
      end
    end
    @(posedge clk_1x);
    idx <= '0;
    repeat (3) @(posedge clk_1x);
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
    checks++;
    if (model.num() != 4 * SSP * NST) begin failures++; $display("FAIL model holds %0d words", model.num()); end
    checks++;
    if (seen != model.num()) begin failures++; $display("FAIL written words outside the read-back range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
