// tb_input_bcast: the bank (bank id 0) is filled through the host port with
// a pattern naming each address. Scans of SSP valid indexes follow, the
// first flagged 'first', with random stalls inside a scan and random gaps
// (often none) between scans. bus_ready must be high exactly in the cycle
// after each scan's last index; at the end of that cycle bus[q][p] must be
// the word at the formula's address for row q with the scanned index i+p.
module tb_input_bcast;
  import ems_pkg::*;
  import tb_util_pkg::*;
  localparam int BK = 0, SSP = 8, NSCAN = 40;
  logic clk_2x = 0, clk_1x = 0, rst = 1;
  idx_bus_t idx;
  idx_t n;
  word_t bus [4][SSP], hrd;
  logic bus_ready;
  host_req_t host;
  int checks = 0, failures = 0, nready = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  input_bcast #(.BANK(BK)) u_dut (.clk_2x, .clk_1x, .rst, .idx, .n, .bus, .bus_ready,
                                  .host, .host_rdata(hrd));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int pos, gap, scans, prev_last;
    idx_bus_t cur, done_scan, prev_scan;
    idx_t ncur, ndone, nprev;
    idx = '0; n = 8'd100; host = '0;
    for (int a = 0; a < BANK_DEPTH; a++) begin
      @(posedge clk_2x);
      host <= '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: data_word(BK, a)};
    end
    @(posedge clk_1x);
    host <= '0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    pos = 0; gap = 0; scans = 0; prev_last = 0;
    cur = '0; ncur = 8'd100;
    cur.i = 8'd3; cur.k = 8'd8; cur.tilep = 8'd1;
    while (scans < NSCAN || prev_last) begin
      int this_last;
      @(posedge clk_1x);
      this_last = 0;
      if (scans >= NSCAN || gap > 0 || (pos > 0 && ($urandom % 6) == 0)) begin
        if (gap > 0) gap--;
        idx <= '0;
      end else begin
        idx <= '{valid: 1'b1, first: pos == 0, i: cur.i, k: cur.k, tilep: cur.tilep};
        n   <= ncur;
        pos++;
        if (pos == SSP) begin
          this_last = 1; done_scan = cur; ndone = ncur;
          pos = 0; scans++;
          gap = ($urandom % 2) ? 0 : $urandom % 4;
          cur.i = idx_t'($urandom % 160); cur.k = idx_t'(8 * ($urandom % 20));
          cur.tilep = idx_t'($urandom % 20); ncur = idx_t'(1 + $urandom % 170);
        end
      end
      #1;
      chk(bus_ready == 1'(prev_last), "bus_ready one cycle after the last index");
      if (bus_ready && prev_last) begin
        nready++;
        @(posedge clk_2x); #1;   // the last word is in after the mid-cycle edge
        for (int q = 0; q < 4; q++)
          for (int p = 0; p < SSP; p++) begin
            int unsigned ea;
            ea = ref_addr(nprev, prev_scan.i + p, prev_scan.k, prev_scan.tilep, BK, 4 * BK + q);
            chk(bus[q][p] == data_word(BK, ea), $sformatf("bus[%0d][%0d] %h exp %h", q, p, bus[q][p], data_word(BK, ea)));
          end
      end
      prev_last = this_last; prev_scan = done_scan; nprev = ndone;
    end
    chk(nready == NSCAN, "every scan completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
