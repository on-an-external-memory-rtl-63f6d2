// tb_dp_mem_bank: random reads and writes on both ports of a reduced-depth
// bank, compared with a model array: read data one memory cycle after the
// address, old word returned on a write (read-first), no write collisions.
module tb_dp_mem_bank;
  localparam int D = 64;
  logic clk_2x = 0;
  logic we0, we1;
  logic [5:0] a0, a1;
  logic [31:0] w0, w1, r0, r1;
  logic [31:0] model [D];
  logic [31:0] e0, e1;
  int checks = 0, failures = 0;

  dp_mem_bank #(.DEPTH(D), .W(32)) u_dut (
    .clk_2x, .we0, .addr0(a0), .wdata0(w0), .rdata0(r0),
    .we1, .addr1(a1), .wdata1(w1), .rdata1(r1));

  always #5 clk_2x = ~clk_2x;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we0 = 1; we1 = 1;
    // initialise every word through both ports
    for (int x = 0; x < D; x += 2) begin
      a0 = 6'(x); a1 = 6'(x + 1); w0 = $urandom; w1 = $urandom;
      model[x] = w0; model[x+1] = w1;
      @(posedge clk_2x); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      we0 = $urandom % 2; we1 = $urandom % 2;
      a0 = 6'($urandom); a1 = 6'($urandom);
      if (a1 == a0) a1 = a0 + 1;
      w0 = $urandom; w1 = $urandom;
      e0 = model[a0]; e1 = model[a1];
      if (we0) model[a0] = w0;
      if (we1) model[a1] = w1;
      @(posedge clk_2x); #1;
      checks += 2;
      if (r0 !== e0) begin failures++; $display("FAIL port0 addr %0d got %h exp %h", a0, r0, e0); end
      if (r1 !== e1) begin failures++; $display("FAIL port1 addr %0d got %h exp %h", a1, r1, e1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
