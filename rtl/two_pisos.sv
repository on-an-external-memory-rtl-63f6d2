// two_pisos: the pair of broadcast PISOs that share one bank port.
//
// Each bank port is written twice per PA cycle, so two sub-block buses share
// it: the PISO of bus0 supplies the word of the first memory cycle
// (phase 0) and the PISO of bus1 the word of the second (phase 1). Pairing
// two PISOs on a port follows the memory scheme; which bus takes which
// memory cycle is this design's choice.
module two_pisos
  import ems_pkg::*;
#(
  parameter int unsigned SSP = 8
) (
  input  logic  clk_2x,
  input  logic  rst,
  input  logic  phase,
  input  logic  load,
  input  word_t bus0 [SSP],
  input  word_t bus1 [SSP],
  input  logic  wr_valid,
  input  logic  wr_first,
  output word_t dout
);

  word_t d0, d1;

  piso_bcast #(.SSP(SSP)) u_piso0 (
    .clk_2x, .rst, .phase, .load, .bus(bus0), .wr_valid, .wr_first, .dout(d0)
  );
  piso_bcast #(.SSP(SSP)) u_piso1 (
    .clk_2x, .rst, .phase, .load, .bus(bus1), .wr_valid, .wr_first, .dout(d1)
  );

  assign dout = phase ? d1 : d0;

endmodule
