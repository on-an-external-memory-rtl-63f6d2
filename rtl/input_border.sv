// input_border: input border module, feeding four lanes of an array border.
//
// Used when an input variable enters the array along one border and one of
// its indexes is scanned in time. One dual-port bank, one TAGM per port and
// one SIPO per port: each port is read twice per PA cycle (memory clock =
// 2 x PA clock), so the module delivers four words per PA cycle. Port 0
// serves lanes 0 and 1 (outputs data[0], data[1]), port 1 lanes 2 and 3
// (data[2], data[3]); lane q of bank BANK has processor index offset
// 4*BANK + q. This interconnection follows the memory scheme. Replicating the
// module covers wider borders.
//
// Interface: the index bus (PA clock domain) starts one read of every lane
// per valid cycle. data[] and out_valid follow 2 PA cycles later (one cycle
// to read the bank at the memory clock, one to cross into the PA domain).
// The host port (memory clock domain) takes over port 0 while host.en is set
// and returns the read word on host_rdata one memory cycle later; it is for
// filling the bank while the array is idle (this design's addition).
module input_border
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
  output word_t     data [4],
  output logic      out_valid,
  input  host_req_t host,
  output word_t     host_rdata
);

  if (FCOL != 4) begin : g_fcol_check
    $error("input_border serves four lanes per bank: FCOL must be 4");
  end

  localparam int unsigned LB = FCOL * BANK;

  addr_t a0, a1;
  logic  ph0, ph1;
  word_t rd0, rd1;
  logic [$clog2(SSP)-1:0] pos0, pos1;
  logic  last0, last1;

  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+0), .LANE1(LB+1), .SCAN(1'b0)) u_tagm0 (
    .clk_2x, .clk_1x, .rst, .idx, .n, .addr(a0), .phase(ph0), .pos(pos0), .last(last0)
  );
  tagm #(.SSP(SSP), .FCOL(FCOL), .BANK(BANK), .LANE0(LB+2), .LANE1(LB+3), .SCAN(1'b0)) u_tagm1 (
    .clk_2x, .clk_1x, .rst, .idx, .n, .addr(a1), .phase(ph1), .pos(pos1), .last(last1)
  );

  dp_mem_bank #(.DEPTH(DEPTH)) u_bank (
    .clk_2x,
    .we0(host.en && host.we), .addr0(host.en ? host.addr[$clog2(DEPTH)-1:0] : a0[$clog2(DEPTH)-1:0]),
    .wdata0(host.wdata), .rdata0(rd0),
    .we1(1'b0), .addr1(a1[$clog2(DEPTH)-1:0]), .wdata1('0), .rdata1(rd1)
  );

  assign host_rdata = rd0;

  sipo_border u_sipo0 (.clk_2x, .clk_1x, .din(rd0), .dout0(data[0]), .dout1(data[1]));
  sipo_border u_sipo1 (.clk_2x, .clk_1x, .din(rd1), .dout0(data[2]), .dout1(data[3]));

  logic [1:0] vpipe;
  always_ff @(posedge clk_1x) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[0], idx.valid};
  end
  assign out_valid = vpipe[1];

  a_host_idle: assert property (@(posedge clk_1x) disable iff (rst) !(host.en && idx.valid));

endmodule
