// tb_matmul: matrix products C = A x B through the whole memory system, for
// problem sizes N = 8 (the array fits the problem exactly), 5 and 3 (results
// come from inner PEs and are carried to the border by the transporting
// elements), and two tiles of a 170 x 170 product (the largest size the
// banks are meant for): with the full matrices stored, the array computes
// the partial product of one 8-wide k strip for one 8-wide j strip over all
// 170 rows, using tile indexes other than 0. The array is an 8 x 8 grid of PEs (j, k) modelled here, as the
// array generator would build it for the recurrences
//     y[i,j,k] = A[i,k] (j = 0) or y[i,j-1,k]
//     x[i,j,k] = B[k,j] (held in the PE, loaded by broadcast)
//     z[i,j,k] = y*x (k = 0) or z[i,j,k-1] + y*x
//     C[i,j]   = z[i,j,N-1]
// with schedule t = i + j + k: PE (j, k) works on iteration i = t - j - k.
// The model includes the array's own skew FIFOs: lane k of A is delayed k
// cycles on entry, lane j of C is delayed 7-j cycles on exit so that a whole
// row of C reaches the output border in one cycle.
// Memory layout used (from the addressing formula with k = tilep = 0):
// A[i][k] at N*(k mod 4) + i of A bank k/4; B[r][s] at N*(r mod 4) + s of
// B bank r/4; C[i][j] at N*(j mod 4) + i of C bank j/4.
module tb_matmul;
  import ems_pkg::*;
  import tb_util_pkg::*;
  localparam int SSP = 8, NH = 8;

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

  int checks = 0, failures = 0, inner_fwd = 0, products = 0, tile_words = 0;
  int nn;     // depth of the k strip in use: PE column nn-1 holds the result
  int tj_c;   // column tile of the C store index

  initial forever begin #5 clk_2x = 1; clk_1x = ~clk_1x; #5 clk_2x = 0; end

  ems_top u_dut (.clk_2x, .clk_1x, .rst, .n, .idx_a, .a_data, .a_valid, .idx_b, .b_data, .b_valid,
                 .idx_c, .c_res, .c_sel, .idx_d, .d_capture, .d_res, .d_bus_valid, .host, .host_rdata);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- processor array model ----------------
  // The row index i of each A word follows it, delayed like the data.
  logic [7:0] a_i_q [3];
  always_ff @(posedge clk_1x) begin
    a_i_q[0] <= idx_a.i; a_i_q[1] <= a_i_q[0]; a_i_q[2] <= a_i_q[1];
  end

  // entry skew: lane k delayed k cycles
  word_t      aq [SSP][SSP];
  logic       avq [SSP][SSP];
  logic [7:0] aiq [SSP][SSP];
  word_t      a_in [SSP];
  logic       a_in_v [SSP];
  logic [7:0] a_in_i [SSP];
  always_ff @(posedge clk_1x) begin
    for (int k = 0; k < SSP; k++) begin
      aq[k][0] <= a_data[k]; avq[k][0] <= a_valid && !rst; aiq[k][0] <= a_i_q[1];
      for (int d = 1; d < SSP; d++) begin
        aq[k][d] <= aq[k][d-1]; avq[k][d] <= avq[k][d-1]; aiq[k][d] <= aiq[k][d-1];
      end
    end
  end
  always_comb
    for (int k = 0; k < SSP; k++) begin
      a_in[k]   = (k == 0) ? a_data[0] : aq[k][k-1];
      a_in_v[k] = (k == 0) ? (a_valid && !rst) : avq[k][k-1];
      a_in_i[k] = (k == 0) ? a_i_q[1] : aiq[k][k-1];
    end

  // PE grid, index [j][k]
  word_t      y_r [SSP][SSP], z_r [SSP][SSP];
  logic       v_r [SSP][SSP];
  logic [7:0] i_r [SSP][SSP];
  always_ff @(posedge clk_1x) begin
    for (int j = 0; j < SSP; j++)
      for (int k = 0; k < SSP; k++) begin
        word_t y;
        y = (j == 0) ? a_in[k] : y_r[j-1][k];
        y_r[j][k] <= y;
        v_r[j][k] <= (j == 0) ? a_in_v[k] : v_r[j-1][k];
        i_r[j][k] <= (j == 0) ? a_in_i[k] : i_r[j-1][k];
        z_r[j][k] <= ((k == 0) ? 32'd0 : z_r[j][k-1]) + y * b_data[k][j];
      end
  end

  // exit skew: PE (j, N-1) delayed 7-j cycles, then handed to the TE layer
  word_t      oq [SSP][SSP];
  logic       ovq [SSP][SSP];
  logic [7:0] oiq [SSP][SSP];
  word_t      o_res [SSP];
  logic       o_v [SSP];
  logic [7:0] o_i [SSP];
  always_ff @(posedge clk_1x) begin
    for (int j = 0; j < SSP; j++) begin
      oq[j][0] <= z_r[j][nn-1]; ovq[j][0] <= v_r[j][nn-1]; oiq[j][0] <= i_r[j][nn-1];
      for (int d = 1; d < SSP; d++) begin
        oq[j][d] <= oq[j][d-1]; ovq[j][d] <= ovq[j][d-1]; oiq[j][d] <= oiq[j][d-1];
      end
    end
  end
  always_comb
    for (int j = 0; j < SSP; j++) begin
      o_res[j] = (j == SSP - 1) ? z_r[j][nn-1] : oq[j][SSP-2-j];
      o_v[j]   = (j == SSP - 1) ? v_r[j][nn-1] : ovq[j][SSP-2-j];
      o_i[j]   = (j == SSP - 1) ? i_r[j][nn-1] : oiq[j][SSP-2-j];
    end
  always_comb
    for (int r = 0; r < SSP; r++)
      for (int s = 0; s < SSP; s++) begin
        c_sel[r][s] = (s == nn - 1) && o_v[r];
        c_res[r][s] = (s == nn - 1) ? o_res[r] : 32'hBAD0_0000;
      end

  // store index: a word handed to TE column N-1 in cycle X leaves the border
  // TE in cycle X+1+(7-(N-1)); the controller issues its index then
  logic       cq_v [SSP+1];
  logic [7:0] cq_i [SSP+1];
  always_ff @(posedge clk_1x) begin
    cq_v[0] <= c_sel[0][nn-1] && !rst; cq_i[0] <= o_i[0];
    for (int d = 1; d <= SSP; d++) begin cq_v[d] <= cq_v[d-1]; cq_i[d] <= cq_i[d-1]; end
  end
  always_comb idx_c = '{valid: cq_v[SSP-nn], first: 1'b0, i: cq_i[SSP-nn], k: idx_t'(SSP * tj_c),
                        tilep: idx_t'(tj_c)};

  always_ff @(posedge clk_1x)
    if (c_sel[0][nn-1] && nn < SSP) inner_fwd <= inner_fwd + 1;

  // ---------------- one product ----------------
  task automatic host_write(int h, int a, word_t w);
    @(posedge clk_2x);
    host[h] <= '{en: 1'b1, we: 1'b1, addr: addr_t'(a), wdata: w};
    @(posedge clk_2x);
    host[h] <= '0;
  endtask

  task automatic host_read(int h, int a, output word_t w);
    @(posedge clk_2x);
    host[h] <= '{en: 1'b1, we: 1'b0, addr: addr_t'(a), wdata: '0};
    @(posedge clk_2x);
    host[h] <= '0;
    #1 w = host_rdata[h];
  endtask

  task automatic run_product(int N);
    word_t A [SSP][SSP], B [SSP][SSP], C [SSP][SSP], got;
    nn = N; n = idx_t'(N); tj_c = 0;
    @(posedge clk_1x);
    rst <= 1;
    for (int r = 0; r < SSP; r++) for (int c = 0; c < SSP; c++) begin
      A[r][c] = (r < N && c < N) ? $urandom % 4096 : 0;
      B[r][c] = (r < N && c < N) ? $urandom % 4096 : 0;
    end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      C[i][j] = 0;
      for (int k = 0; k < N; k++) C[i][j] += A[i][k] * B[k][j];
    end
    // clear the first words of every A, B and C bank, then load A and B
    for (int a = 0; a < 4 * N + SSP; a++) for (int h = 0; h < 6; h++) host_write(h, a, 0);
    for (int i = 0; i < N; i++) for (int k = 0; k < N; k++)
      host_write(k / 4, ref_addr(N, i, 0, 0, k / 4, k), A[i][k]);
    for (int r = 0; r < N; r++) for (int s = 0; s < N; s++)
      host_write(2 + r / 4, ref_addr(N, s, 0, 0, r / 4, r), B[r][s]);
    @(posedge clk_1x);
    rst <= 0;
    // broadcast B into the PEs: one scan
    for (int p = 0; p < SSP; p++) begin
      @(posedge clk_1x);
      idx_b <= '{valid: 1'b1, first: p == 0, i: 8'd0, k: 8'd0, tilep: 8'd0};
    end
    @(posedge clk_1x);
    idx_b <= '0;
    while (!b_valid[SSP-1]) @(posedge clk_1x);
    // stream A along the border, one row index i per cycle
    for (int i = 0; i < N; i++) begin
      @(posedge clk_1x);
      idx_a <= '{valid: 1'b1, first: 1'b0, i: idx_t'(i), k: 8'd0, tilep: 8'd0};
    end
    @(posedge clk_1x);
    idx_a <= '0;
    repeat (5 * SSP) @(posedge clk_1x);
    // read C back
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      host_read(4 + j / 4, ref_addr(N, i, 0, 0, j / 4, j), got);
      chk(got == C[i][j], $sformatf("N=%0d C[%0d][%0d] = %0d, expected %0d", N, i, j, got, C[i][j]));
      if (got == C[i][j]) products++;
    end
  endtask


  // ---------------- one tile of the N = 170 product ----------------
  // Full 170 x 170 matrices A and B are stored in the layout of the
  // addressing formula: element (row, col) of a matrix that is scanned by
  // row and blocked by col sits in bank (col mod 8)/4 at
  // N*(4*(col/8) + col mod 4) + row. The array computes the partial product
  // of k strip tk for the j strip tj, over all 170 rows i, and the C banks
  // must then hold sum over k in strip tk of A[i][k]*B[k][j].
  function automatic int lay_bank(int col); return (col % SSP) / 4; endfunction
  function automatic int lay_addr(int N, int row, int col);
    return ref_addr(N, row, SSP * (col / SSP), col / SSP, (col % SSP) / 4, col % SSP);
  endfunction
  function automatic word_t mat_a(int i, int k); return 32'((i * 7 + k * 13) % 251); endfunction
  function automatic word_t mat_b(int k, int j); return 32'((k * 11 + j * 5 + 3) % 241); endfunction

  task automatic run_tile(int N, int tk, int tj);
    word_t got, e;
    nn = SSP; n = idx_t'(N); tj_c = tj;
    @(posedge clk_1x);
    rst <= 1;
    // A: row i, block column k; B: row j (scanned), block column k
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(posedge clk_2x);
        host[lay_bank(c)]     <= '{en: 1'b1, we: 1'b1, addr: addr_t'(lay_addr(N, r, c)), wdata: mat_a(r, c)};
        host[2 + lay_bank(c)] <= '{en: 1'b1, we: 1'b1, addr: addr_t'(lay_addr(N, r, c)), wdata: mat_b(c, r)};
        @(posedge clk_2x);
        host[lay_bank(c)] <= '0; host[2 + lay_bank(c)] <= '0;
      end
    @(posedge clk_1x);
    rst <= 0;
    for (int p = 0; p < SSP; p++) begin
      @(posedge clk_1x);
      idx_b <= '{valid: 1'b1, first: p == 0, i: idx_t'(SSP * tj), k: idx_t'(SSP * tk), tilep: idx_t'(tk)};
    end
    @(posedge clk_1x);
    idx_b <= '0;
    while (!b_valid[SSP-1]) @(posedge clk_1x);
    for (int i = 0; i < N; i++) begin
      @(posedge clk_1x);
      idx_a <= '{valid: 1'b1, first: 1'b0, i: idx_t'(i), k: idx_t'(SSP * tk), tilep: idx_t'(tk)};
    end
    @(posedge clk_1x);
    idx_a <= '0;
    repeat (5 * SSP) @(posedge clk_1x);
    for (int i = 0; i < N; i++)
      for (int j = SSP * tj; j < SSP * tj + SSP; j++) begin
        e = 0;
        for (int k = SSP * tk; k < SSP * tk + SSP; k++) e += mat_a(i, k) * mat_b(k, j);
        host_read(4 + lay_bank(j), lay_addr(N, i, j), got);
        chk(got == e, $sformatf("tile (%0d,%0d) C[%0d][%0d] = %0d, expected %0d", tk, tj, i, j, got, e));
        if (got == e) tile_words++;
      end
  endtask

  initial begin
    nn = SSP; n = 8'd8; tj_c = 0;
    idx_a = '0; idx_b = '0; idx_d = '0; d_capture = 0;
    foreach (host[h]) host[h] = '0;
    foreach (d_res[r, s]) d_res[r][s] = 0;
    repeat (3) @(posedge clk_1x);
    run_product(8);
    run_product(5);
    run_product(3);
    run_tile(170, 5, 3);
    run_tile(170, 20, 20);
    $display("tiles of the N = 170 product: %0d words right", tile_words);
    chk(tile_words == 2 * 170 * SSP, "every word of both N = 170 tiles right");
    $display("products: %0d words right, %0d cycles of results from inner PEs", products, inner_fwd);
    chk(products == 64 + 25 + 9, "every product word right");
    chk(inner_fwd > 0, "results from inner PEs carried by the TE layer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
