// tb_bcast_in_array: random blocks loaded at random times, some back to
// back. For a block loaded in PA cycle c, column s of the PE hold registers
// must show its words, and pe_valid[s] be high, exactly in cycle c+2+s; no
// pe_valid may come without a load.
module tb_bcast_in_array;
  import ems_pkg::*;
  localparam int R = 8, C = 8, T = 300;
  logic clk_1x = 0, rst = 1, load;
  word_t sub [R][C], pe_data [R][C];
  logic pe_valid [C];
  logic  lh [T];
  word_t sh [T][R][C];
  int checks = 0, failures = 0;

  always #5 clk_1x = ~clk_1x;

  bcast_in_array #(.ROWS(R), .COLS(C)) u_dut (.clk_1x, .rst, .load, .sub, .pe_data, .pe_valid);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0;
    foreach (sub[r, p]) sub[r][p] = 0;
    repeat (2) @(posedge clk_1x);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      @(posedge clk_1x);
      load <= (t < T - 20) && (($urandom % 3) == 0);
      for (int r = 0; r < R; r++) for (int p = 0; p < C; p++) sub[r][p] <= $urandom;
      #1;
      lh[t] = load; sh[t] = sub;
      for (int s = 0; s < C; s++) begin
        bit exp_v;
        exp_v = (t >= 2 + s) ? lh[t-2-s] : 1'b0;
        checks++;
        if (pe_valid[s] !== exp_v) begin failures++; $display("FAIL pe_valid[%0d] at %0d", s, t); end
        if (exp_v)
          for (int r = 0; r < R; r++) begin
            checks++;
            if (pe_data[r][s] !== sh[t-2-s][r][s]) begin
              failures++; $display("FAIL pe_data[%0d][%0d] %h exp %h", r, s, pe_data[r][s], sh[t-2-s][r][s]);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
