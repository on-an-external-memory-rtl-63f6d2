// piso_bcast: parallel-in/serial-out register of the output broadcast case.
//
// Takes a whole sub-block bus of SSP words at once and hands it to a bank
// port one word per PA cycle, through an SSP-to-1 multiplexer whose select
// comes from a counter scanning the sub-block. Register, multiplexer and
// counter follow the memory scheme.
//
// It runs in the memory clock domain and acts at the end of each PA cycle
// (an edge with phase = 1): 'load' takes the bus; the counter restarts on a
// write cycle flagged 'wr_first' and advances on every write cycle. During
// a write cycle, dout is word sel, where sel = 0 if wr_first is set and the
// counter otherwise.
module piso_bcast
  import ems_pkg::*;
#(
  parameter int unsigned SSP = 8
) (
  input  logic  clk_2x,
  input  logic  rst,
  input  logic  phase,
  input  logic  load,
  input  word_t bus [SSP],
  input  logic  wr_valid,
  input  logic  wr_first,
  output word_t dout
);

  localparam int unsigned PW = $clog2(SSP);

  word_t         r [SSP];
  logic [PW-1:0] cnt, sel;

  assign sel = (wr_valid && wr_first) ? '0 : cnt;

  always_ff @(posedge clk_2x) begin
    if (phase && load) r <= bus;
  end

  always_ff @(posedge clk_2x) begin
    if (rst)                   cnt <= '0;
    else if (phase && wr_valid) cnt <= (sel == PW'(SSP-1)) ? '0 : sel + 1'b1;
  end

  assign dout = r[sel];

endmodule
