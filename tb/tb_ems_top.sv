// tb_ems_top: end-to-end run of the whole memory system at its default size
// (8 x 8 array, 16384-word banks), acting as array controller, array and
// host around it.
//   1. The host fills the two A banks and the two B banks with a pattern
//      that names bank and address, and reads some words back.
//   2. A and B run together: 16 back-to-back A reads (every border lane
//      checked every cycle, 2 cycles after its index) and three B scans, the
//      first two back to back; every PE hold register is checked when its
//      column's pe_valid comes.
//   3. C and D run together. C: twelve results per row, each produced by a
//      PE at a random column and carried by the transporting elements to the
//      border, all rows arriving together for one store index per cycle.
//      D: two captures of all 64 PE results, each stored as one scan once
//      the sub-blocks reach the border.
//   4. The host reads the C and D banks back and every stored word is
//      compared with what was produced.
// Each mechanism is counted and a count of zero is a failure.
module tb_ems_top;
  import ems_pkg::*;
  import tb_util_pkg::*;
  localparam int SSP = 8, NB = 2, NH = 8;
  localparam int N = 170;

  logic clk_2x = 0, clk_1x = 0, rst = 1;
  idx_t n;
  idx_bus_t idx_a, idx_b, idx_c, idx_d;
  word_t a_data [SSP];
  logic a_valid;
  word_t b_data [SSP][SSP];
  logic b_valid [SSP];
  word_t c_res [SSP][SSP];
  logic c_sel [SSP][SSP];
  logic d_capture, d_bus_valid;
  word_t d_res [SSP][SSP];
  host_req_t host [NH];
  word_t host_rdata [NH];

  int checks = 0, failures = 0;
  int n_host = 0, n_a = 0, n_b_cols = 0, n_b_b2b = 0, n_te_inner = 0, n_c = 0, n_d = 0;

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  ems_top u_dut (.clk_2x, .clk_1x, .rst, .n, .idx_a, .a_data, .a_valid, .idx_b, .b_data, .b_valid,
                 .idx_c, .c_res, .c_sel, .idx_d, .d_capture, .d_res, .d_bus_valid, .host, .host_rdata);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // bank index on the host ports: variable v (A=0, B=1, C=2, D=3), bank b
  function automatic int hb(int v, int b); return NB * v + b; endfunction

  word_t c_model [NB][int];
  word_t d_model [NB][int];

  // ---------------- A: 16 back-to-back border reads ----------------
  task automatic run_a();
    idx_bus_t ih [32];
    for (int t = 0; t < 20; t++) begin
      @(posedge clk_1x);
      if (t < 16) idx_a <= '{valid: 1'b1, first: 1'b0, i: idx_t'(5 + t), k: 8'd8, tilep: 8'd1};
      else        idx_a <= '0;
      #1;
      ih[t] = idx_a;
      if (t >= 2) begin
        chk(a_valid == ih[t-2].valid, "a_valid");
        if (ih[t-2].valid)
          for (int p = 0; p < SSP; p++) begin
            word_t e;
            e = data_word(hb(0, p / 4), ref_addr(N, ih[t-2].i, ih[t-2].k, ih[t-2].tilep, p / 4, p));
            chk(a_data[p] == e, $sformatf("a_data[%0d] %h exp %h", p, a_data[p], e));
            if (a_data[p] == e) n_a++;
          end
      end
    end
  endtask

  // ---------------- B: three scans, the first two back to back ----------------
  task automatic run_b();
    int sc_i [3] = '{0, 8, 40};
    int sc_k [3] = '{0, 8, 16};
    int sc_t [3] = '{0, 1, 2};
    int starts [3] = '{0, 8, 20};
    int col_seen [3];
    int t;
    col_seen = '{0, 0, 0};
    t = 0;
    fork
      begin
        for (int c = 0; c < 30; c++) begin
          @(posedge clk_1x);
          idx_b <= '0;
          for (int s = 0; s < 3; s++)
            if (c >= starts[s] && c < starts[s] + SSP)
              idx_b <= '{valid: 1'b1, first: c == starts[s], i: idx_t'(sc_i[s]), k: idx_t'(sc_k[s]),
                         tilep: idx_t'(sc_t[s])};
        end
        @(posedge clk_1x);
        idx_b <= '0;
      end
      begin
        // scan s's last index is in cycle starts[s]+7; column col's hold
        // registers show it in cycle starts[s]+7+1+2+col
        for (int c = 0; c < 45; c++) begin
          @(posedge clk_1x); #1;
          for (int col = 0; col < SSP; col++) begin
            int s;
            s = -1;
            for (int x = 0; x < 3; x++) if (c == starts[x] + SSP + 2 + col) s = x;
            chk(b_valid[col] == (s >= 0), $sformatf("b_valid[%0d] in cycle %0d", col, c));
            if (s >= 0 && b_valid[col]) begin
              col_seen[s]++;
              n_b_cols++;
              for (int r = 0; r < SSP; r++) begin
                word_t e;
                e = data_word(hb(1, r / 4), ref_addr(N, sc_i[s] + col, sc_k[s], sc_t[s], r / 4, r));
                chk(b_data[r][col] == e, $sformatf("b_data[%0d][%0d] %h exp %h", r, col, b_data[r][col], e));
              end
            end
          end
        end
      end
    join
    for (int s = 0; s < 3; s++) chk(col_seen[s] == SSP, "every column of every B scan delivered");
    if (starts[1] == starts[0] + SSP && col_seen[1] == SSP) n_b_b2b++;
  endtask

  // ---------------- C: results carried by the TE layer to the border ----------------
  task automatic run_c();
    localparam int NW = 12, C0 = SSP + 2;
    int col [NW][SSP];
    word_t val [NW][SSP];
    for (int w = 0; w < NW; w++)
      for (int r = 0; r < SSP; r++) begin
        col[w][r] = $urandom % SSP;
        val[w][r] = $urandom;
      end
    // word w of row r reaches the border in cycle C0+w; it enters at column
    // col in cycle C0+w-(SSP-col)
    for (int c = 0; c < C0 + NW + 2; c++) begin
      @(posedge clk_1x);
      for (int r = 0; r < SSP; r++)
        for (int s = 0; s < SSP; s++) begin
          c_sel[r][s] <= 1'b0;
          c_res[r][s] <= $urandom;   // noise that must never be picked up
        end
      for (int w = 0; w < NW; w++)
        for (int r = 0; r < SSP; r++)
          if (c == C0 + w - (SSP - col[w][r])) begin
            c_sel[r][col[w][r]] <= 1'b1;
            c_res[r][col[w][r]] <= val[w][r];
            if (col[w][r] < SSP - 1) n_te_inner++;
          end
      if (c >= C0 && c < C0 + NW) begin
        idx_c <= '{valid: 1'b1, first: 1'b0, i: idx_t'(c - C0), k: 8'd0, tilep: 8'd0};
        for (int r = 0; r < SSP; r++)
          c_model[r / 4][ref_addr(N, c - C0, 0, 0, r / 4, r)] = val[c - C0][r];
      end else idx_c <= '0;
    end
    @(posedge clk_1x);
    idx_c <= '0;
  endtask

  // ---------------- D: two captures, each stored as one scan ----------------
  task automatic run_d();
    for (int st = 0; st < 2; st++) begin
      word_t res [SSP][SSP];
      int waited;
      @(posedge clk_1x);
      for (int r = 0; r < SSP; r++) for (int s = 0; s < SSP; s++) begin
        res[r][s] = $urandom; d_res[r][s] <= res[r][s];
      end
      d_capture <= 1'b1;
      @(posedge clk_1x);
      d_capture <= 1'b0;
      for (int r = 0; r < SSP; r++) for (int s = 0; s < SSP; s++) d_res[r][s] <= $urandom;
      waited = 1;
      #1;
      while (!d_bus_valid) begin @(posedge clk_1x); #1; waited++; end
      chk(waited == SSP + 1, $sformatf("D sub-blocks at the border %0d cycles after capture", waited));
      for (int p = 0; p < SSP; p++) begin
        @(posedge clk_1x);
        idx_d <= '{valid: 1'b1, first: p == 0, i: idx_t'(SSP * st), k: 8'd0, tilep: 8'd0};
        for (int r = 0; r < SSP; r++)
          d_model[r / 4][ref_addr(N, SSP * st + p, 0, 0, r / 4, r)] = res[r][p];
      end
      @(posedge clk_1x);
      idx_d <= '0;
      n_d++;
    end
  endtask

  task automatic host_read_check(int h, int a, word_t e, string what);
    @(posedge clk_2x);
    host[h] <= '{en: 1'b1, we: 1'b0, addr: addr_t'(a), wdata: '0};
    @(posedge clk_2x);
    host[h] <= '0;
    #1;
    chk(host_rdata[h] == e, $sformatf("%s bank %0d addr %0d: %h exp %h", what, h, a, host_rdata[h], e));
    if (host_rdata[h] == e) n_host++;
  endtask

  initial begin
    n = idx_t'(N);
    idx_a = '0; idx_b = '0; idx_c = '0; idx_d = '0; d_capture = 0;
    foreach (host[h]) host[h] = '0;
    foreach (c_sel[r, s]) begin c_sel[r][s] = 0; c_res[r][s] = 0; d_res[r][s] = 0; end
    // 1. fill A and B banks
    for (int a = 0; a < BANK_DEPTH; a++) begin
      @(posedge clk_2x);
      for (int h = 0; h < 4; h++)
        host[h] <= '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: data_word(h, a)};
    end
    @(posedge clk_2x);
    for (int h = 0; h < 4; h++) host[h] <= '0;
    for (int h = 0; h < 4; h++)
      for (int x = 0; x < 4; x++) host_read_check(h, x * 4093 + h, data_word(h, x * 4093 + h), "fill");
    @(posedge clk_1x);
    rst <= 1;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    // 2. A and B together
    fork run_a(); run_b(); join
    // 3. C and D together
    fork run_c(); run_d(); join
    repeat (4) @(posedge clk_1x);
    // 4. read the results back
    for (int b = 0; b < NB; b++) begin
      foreach (c_model[b][a]) begin host_read_check(hb(2, b), a, c_model[b][a], "C"); n_c++; end
      foreach (d_model[b][a]) host_read_check(hb(3, b), a, d_model[b][a], "D");
    end
    $display("mechanisms: host=%0d A-words=%0d B-columns=%0d B-back-to-back=%0d TE-inner=%0d C-words=%0d D-stores=%0d",
             n_host, n_a, n_b_cols, n_b_b2b, n_te_inner, n_c, n_d);
    chk(n_host > 0, "host access happened");
    chk(n_a == 16 * SSP, "A border reads: four words per module per cycle");
    chk(n_b_cols == 3 * SSP, "B broadcast delivered");
    chk(n_b_b2b > 0, "B back-to-back scans happened");
    chk(n_te_inner > 0, "TE forwarding from inner PEs happened");
    chk(n_c == 12 * SSP, "C border stores");
    chk(n_d == 2, "D broadcast stores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
