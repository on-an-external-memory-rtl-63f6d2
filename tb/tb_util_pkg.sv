// tb_util_pkg: reference models shared by the testbenches.
//
// ref_addr is the bank addressing formula written independently of the RTL:
//     addr = (N*(k+lane) + i - fcol*N*(tilep+bank)) mod 2^aw
// data_word gives the test pattern stored at an address of a bank, so that a
// word read back names the bank and address it came from.
package tb_util_pkg;
  function automatic int unsigned ref_addr(int n, int i, int k, int tilep, int bank, int lane,
                                           int fcol = 4, int aw = 14);
    int s;
    s = n * (k + lane) + i - fcol * n * (tilep + bank);
    return int'(s) & ((1 << aw) - 1);
  endfunction

  function automatic logic [31:0] data_word(int bank, int addr);
    return {8'hA0 + 8'(bank), 8'h00, 16'(addr)};
  endfunction
endpackage
