// tb_input_border: the bank (bank id 1 of its pair) is filled through the
// host port with a pattern naming each address, then read back through the
// host port at a few addresses. A random index stream follows, valid in most
// cycles and back to back. For an index in PA cycle c, out_valid must be high
// in cycle c+2 and data[q] must be the word at the formula's address for lane
// 4*1+q: four words per PA cycle, two cycles after the index.
module tb_input_border;
  import ems_pkg::*;
  import tb_util_pkg::*;
  localparam int BK = 1, T = 400;
  logic clk_2x = 0, clk_1x = 0, rst = 1;
  idx_bus_t idx;
  idx_t n;
  word_t data [4], hrd;
  logic out_valid;
  host_req_t host;
  idx_bus_t ih [T];
  idx_t nh [T];
  int checks = 0, failures = 0, words = 0, vcycles = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  input_border #(.BANK(BK)) u_dut (.clk_2x, .clk_1x, .rst, .idx, .n, .data, .out_valid,
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
    idx = '0; n = 8'd170; host = '0;
    // fill through the host port
    for (int a = 0; a < BANK_DEPTH; a++) begin
      @(posedge clk_2x);
      host <= '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: data_word(BK, a)};
    end
    for (int a = 0; a < 20; a++) begin
      @(posedge clk_2x);
      host <= '{en: 1'b1, we: 1'b0, addr: addr_t'(a * 811), wdata: '0};
      @(posedge clk_2x);
      host <= '0;
      #1;
      chk(hrd == data_word(BK, a * 811 % BANK_DEPTH), "host read back");
    end
    @(posedge clk_1x);
    host <= '0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      @(posedge clk_1x);
      idx.valid <= (t < T - 5) && (($urandom % 5) != 0);
      idx.first <= 1'b0;
      idx.i     <= idx_t'($urandom % 170);
      idx.k     <= idx_t'(8 * ($urandom % 21));
      idx.tilep <= idx_t'($urandom % 21);
      n         <= idx_t'(1 + $urandom % 170);
      #1;
      ih[t] = idx; nh[t] = n;
      if (t >= 2) begin
        chk(out_valid == ih[t-2].valid, "out_valid two cycles after the index");
        if (ih[t-2].valid) begin
          vcycles++;
          for (int q = 0; q < 4; q++) begin
            int unsigned ea;
            ea = ref_addr(nh[t-2], ih[t-2].i, ih[t-2].k, ih[t-2].tilep, BK, 4 * BK + q);
            chk(data[q] == data_word(BK, ea), $sformatf("lane %0d word %h exp %h", q, data[q], data_word(BK, ea)));
            if (data[q] == data_word(BK, ea)) words++;
          end
        end
      end
    end
    chk(words == 4 * vcycles && vcycles > 200, "four words per valid PA cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
