// aer_pkg: constants shared by the address-event (AER) transmitter, receiver and link.
//
// The default array is 64 columns by 64 rows, the size of the local-readout
// transmitter this design follows. An address-event carries the column (X) and
// row (Y) addresses side by side on a bit-parallel bus, each ceil(log2) bits wide.
package aer_pkg;
  localparam int unsigned NX_DEFAULT = 64;  // columns (X)
  localparam int unsigned NY_DEFAULT = 64;  // rows (Y)

  // Number of address bits needed for n lines (at least one bit).
  function automatic int unsigned addr_bits(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction
endpackage
