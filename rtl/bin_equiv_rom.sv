// bin_equiv_rom: bin-equivalence memory of FAPEC.
//
// A small read-only table that gives, for each of the 37 histogram bins,
// the highest sample modulus that falls into that bin. The table
// constructor uses it to turn the ceiling bins chosen by the histogram
// parser into sample values, so that the mapping between bins and values
// never has to be recomputed. The table is a constant array filled at
// elaboration from fapec_pkg::bin_max, and is read synchronously: the
// value for `addr` appears on `dout` one clock later. Addresses past the
// last bin read as the largest modulus.
module bin_equiv_rom
  import fapec_pkg::*;
#(
  parameter int unsigned N = NBINS
) (
  input  logic                   clk,
  input  logic [BIN_W-1:0]       addr,
  output logic [SYMBOL_SIZE-1:0] dout
);

  localparam int unsigned DEPTH = 1 << BIN_W;

  function automatic logic [DEPTH-1:0][SYMBOL_SIZE-1:0] fill();
    logic [DEPTH-1:0][SYMBOL_SIZE-1:0] t;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i] = (i < N) ? bin_max(i) : bin_max(NBINS);
    return t;
  endfunction

  localparam logic [DEPTH-1:0][SYMBOL_SIZE-1:0] TABLE = fill();

  always_ff @(posedge clk)
    dout <= TABLE[addr];

endmodule
