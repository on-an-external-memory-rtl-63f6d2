// ems_pkg: types and constants shared by the external memory scheme.
//
// The memory scheme feeds a processor array (PA) from dual-port memory banks
// that run at twice the PA clock. Every bank access is driven by an "index
// bus" from the PA controller, and every address is computed from that bus
// by the bank addressing formula
//     addr = N*k + i - FCOL*N*(tilep + bank)
// Defaults follow the 8x8 matrix-multiplication configuration: 32-bit words,
// strips of 8 processors, 512 Kbit banks (16384 words of 32 bits) and problem
// sizes below 171 (8-bit indexes). The index bus layout, the 'first' flag and
// the index width are this design's own choices.
package ems_pkg;

  // Word size of the data moved between memory and array.
  parameter int unsigned WORD_W = 32;
  // Index width of i, k, tilep and N on the index bus.
  parameter int unsigned IDX_W  = 8;
  // Words per bank: 512 Kbit / 32 bit.
  parameter int unsigned BANK_DEPTH = 16384;
  parameter int unsigned ADDR_W = $clog2(BANK_DEPTH);

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Index bus, driven by the PA controller once per PA clock cycle.
  //   valid : this cycle carries one access per address generator
  //   first : first index of a broadcast block scan (resets the scan counters)
  //   i, k  : the indexes of the I/O variable
  //   tilep : tile index of the partitioned processor space
  typedef struct packed {
    logic valid;
    logic first;
    idx_t i;
    idx_t k;
    idx_t tilep;
  } idx_bus_t;

  // Host access to a bank, used to fill input banks and drain output banks
  // while the array is idle. It takes over port 0 of the bank.
  typedef struct packed {
    logic  en;
    logic  we;
    addr_t addr;
    word_t wdata;
  } host_req_t;

endpackage
