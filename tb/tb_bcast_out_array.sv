// tb_bcast_out_array: random PE results captured at random times at least
// COLS+1 cycles apart. For a capture in PA cycle c, bus_valid must be high
// exactly in cycle c+1+COLS and sub[r][p] must then be the result of PE
// (r, p) captured in cycle c.
module tb_bcast_out_array;
  import ems_pkg::*;
  localparam int R = 8, C = 8, T = 400;
  logic clk_1x = 0, rst = 1, capture, bus_valid;
  word_t pe_res [R][C], sub [R][C];
  logic  ch [T];
  word_t rh [T][R][C];
  int checks = 0, failures = 0, nvalid = 0;

  always #5 clk_1x = ~clk_1x;

  bcast_out_array #(.ROWS(R), .COLS(C)) u_dut (.clk_1x, .rst, .capture, .pe_res, .sub, .bus_valid);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int gap;
    capture = 0; gap = 0;
    foreach (pe_res[r, p]) pe_res[r][p] = 0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      @(posedge clk_1x);
      gap++;
      if (t < T - 20 && gap > C && ($urandom % 3) == 0) begin capture <= 1; gap = 0; end
      else capture <= 0;
      for (int r = 0; r < R; r++) for (int p = 0; p < C; p++) pe_res[r][p] <= $urandom;
      #1;
      ch[t] = capture; rh[t] = pe_res;
      begin
        bit exp_v;
        exp_v = (t >= 1 + C) ? ch[t-1-C] : 1'b0;
        checks++;
        if (bus_valid !== exp_v) begin failures++; $display("FAIL bus_valid at %0d", t); end
        if (exp_v) begin
          nvalid++;
          for (int r = 0; r < R; r++) for (int p = 0; p < C; p++) begin
            checks++;
            if (sub[r][p] !== rh[t-1-C][r][p]) begin
              failures++; $display("FAIL sub[%0d][%0d] %h exp %h", r, p, sub[r][p], rh[t-1-C][r][p]);
            end
          end
        end
      end
    end
    checks++;
    if (nvalid < 5) begin failures++; $display("FAIL too few captures"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
