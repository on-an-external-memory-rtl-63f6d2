// output_border: output border module, storing four lanes of an array border.
//
// Used when an output variable leaves the array along one border. One
// dual-port bank, one TAGM and one PISO per port: each port is written twice
// per PA cycle (memory clock = 2 x PA clock), so the module stores four words
// per PA cycle. Port 0 takes din[0] and din[1] (lanes 0 and 1), port 1 takes
// din[2] and din[3]; lane q of bank BANK has processor index offset
// 4*BANK + q. This interconnection follows the memory scheme.
//
// Interface: words on din[] in a PA cycle with idx.valid are written at the
// addresses that idx gives. The PISOs send the words to the bank in the next
// PA cycle, so the module keeps idx in a register for one PA cycle to pair
// each address with its word (this design's choice). The host port (memory
// clock domain) takes over port 0 while host.en is set, to read results out
// while the array is idle; host_rdata follows one memory cycle after the
// address.
module output_border
  import ems_pkg::*;
#(
  parameter int unsigned SSP   = 8,
  parameter int unsigned FCOL  = 4,
  parameter int unsigned BANK  = 0,
  parameter int unsigned DEPTH = BANK_DEPTH
) (
  input  logic      clk_2x,
  input  logic      clk_1x,
  input  logic      rst,
  input  idx_bus_t  idx,
  input  idx_t      n,
  input  word_t     din [4],
  input  host_req_t host,
  output word_t     host_rdata
);

  if (FCOL != 4) begin : g_fcol_check
    $error("output_border serves four lanes per bank: FCOL must be 4");
  end

  localparam int unsigned LB = FCOL * BANK;

  idx_bus_t idx_d;
  always_ff @(posedge clk_1x) begin
    if (rst) idx_d <= '0;
    else     idx_d <= idx;
  end

  addr_t a0, a1;
  logic  ph0, ph1;
  word_t wd0, wd1, rd0, rd1;
  logic [$clog2(SSP)-1:0] pos0, pos1;
  logic  last0, last1;

  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+0), .LANE1(LB+1), .SCAN(1'b0)) u_tagm0 (
    .clk_2x, .clk_1x, .rst, .idx(idx_d), .n, .addr(a0), .phase(ph0), .pos(pos0), .last(last0)
  );
  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+2), .LANE1(LB+3), .SCAN(1'b0)) u_tagm1 (
    .clk_2x, .clk_1x, .rst, .idx(idx_d), .n, .addr(a1), .phase(ph1), .pos(pos1), .last(last1)
  );

  piso_border u_piso0 (.clk_2x, .phase(ph0), .din0(din[0]), .din1(din[1]), .dout(wd0));
  piso_border u_piso1 (.clk_2x, .phase(ph1), .din0(din[2]), .din1(din[3]), .dout(wd1));

  dp_mem_bank #(.DEPTH(DEPTH)) u_bank (
    .clk_2x,
    .we0(host.en ? host.we : idx_d.valid),
    .addr0(host.en ? host.addr[$clog2(DEPTH)-1:0] : a0[$clog2(DEPTH)-1:0]),
    .wdata0(host.en ? host.wdata : wd0), .rdata0(rd0),
    .we1(idx_d.valid && !host.en), .addr1(a1[$clog2(DEPTH)-1:0]), .wdata1(wd1), .rdata1(rd1)
  );

  assign host_rdata = rd0;

  a_host_idle: assert property (@(posedge clk_1x) disable iff (rst) !(host.en && idx_d.valid));

endmodule
