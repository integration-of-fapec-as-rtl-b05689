// fapec_pkg: types, constants and helper functions shared by the FAPEC
// compressor blocks.
//
// Sizes that come from the FAPEC design itself: 16-bit samples, a residual
// carried as a 17-bit sign+modulus word (sign in the top bit), 4-bit segment
// size fields, a coding-table header of at most 17 bits (10 bits for LE,
// 13 for DS, 17 for LC), 37 histogram bins, and code words of at most
// 23 bits (LE, DS) and 20 bits (LC).
//
// The mapping of a 16-bit modulus onto the 37 logarithmic-like histogram
// bins is this design's own "binary-like" rule, since only the bin count is
// fixed: moduli 0..15 get one bin each (bins 0..15); each octave
// [2^o, 2^(o+1)) for o = 4..12 is split into two halves (bins 16..33); the
// octaves o = 13, 14, 15 get one bin each (bins 34..36).
// Lint note: bin_max computes the bin ceiling one bit wider than a sample
// so the top octave cannot overflow; the extra top bit is dropped when the
// value is returned.
package fapec_pkg;

  localparam int unsigned SYMBOL_SIZE  = 16;  // bits per input sample
  localparam int unsigned LOG2_SSYZE   = 4;   // width of a segment size field
  localparam int unsigned TAB_LONG_REF = 17;  // widest coding table header
  localparam int unsigned LE_TAB_LONG  = 10;
  localparam int unsigned DS_TAB_LONG  = 13;
  localparam int unsigned LC_TAB_LONG  = 17;
  localparam int unsigned NBINS        = 37;  // histogram bins
  localparam int unsigned BIN_W        = 6;   // bits to index a bin
  localparam int unsigned LE_W         = 23;  // widest LE code word
  localparam int unsigned DS_W         = 23;  // widest DS code word
  localparam int unsigned LC_W         = 20;  // widest LC code word
  localparam int unsigned NB_W         = 5;   // width of a code length

  // PEC variant encoding. Any value with bit 1 clear selects LE.
  typedef enum logic [1:0] {
    VAR_LE  = 2'b00,
    VAR_LE1 = 2'b01,
    VAR_DS  = 2'b10,
    VAR_LC  = 2'b11
  } variant_e;

  // Residual after the pre-compressor: sign (1 = negative) and modulus.
  typedef struct packed {
    logic                   sign;
    logic [SYMBOL_SIZE-1:0] modulus;
  } residual_t;

  // Histogram bin of a modulus (single-cycle combinational rule).
  function automatic logic [BIN_W-1:0] value_to_bin(input logic [SYMBOL_SIZE-1:0] v);
    int unsigned o;
    logic [BIN_W-1:0] b;
    if (v < 16) begin
      b = BIN_W'(v);
    end else begin
      o = 4;
      for (int unsigned k = 5; k < SYMBOL_SIZE; k++)
        if (v[k]) o = k;
      if (o <= 12) b = BIN_W'(16 + 2 * (o - 4) + int'(v[o-1]));
      else         b = BIN_W'(34 + (o - 13));
    end
    return b;
  endfunction

  // Highest modulus that falls into bin b (content of the bin-equivalence
  // memory). Bins past the last one return the largest modulus.
  function automatic logic [SYMBOL_SIZE-1:0] bin_max(input int unsigned b);
    int unsigned o;
    logic [SYMBOL_SIZE:0] m;
    if (b < 16) begin
      m = (SYMBOL_SIZE+1)'(b);
    end else if (b < 34) begin
      o = 4 + (b - 16) / 2;
      m = (SYMBOL_SIZE+1)'((1 << o) + (((b - 16) % 2) + 1) * (1 << (o - 1)) - 1);
    end else if (b < NBINS) begin
      o = 13 + (b - 34);
      m = (SYMBOL_SIZE+1)'((1 << (o + 1)) - 1);
    end else begin
      m = (SYMBOL_SIZE+1)'((1 << SYMBOL_SIZE) - 1);
    end
    return m[SYMBOL_SIZE-1:0];
  endfunction

  // Mask with the n lowest bits set (n up to 31).
  function automatic logic [31:0] low_mask(input int unsigned n);
    return (n >= 32) ? '1 : ((32'd1 << n) - 32'd1);
  endfunction

  // Number of values segment `seg` (0..3) holds for a given variant and
  // size in bits, following the PEC escape rules: LE reserves "-0" in the
  // first segment and all-ones in the second; DS reserves all-ones in the
  // first segment and "-0" ahead of the third and fourth; LC reserves
  // nothing.
  function automatic logic [SYMBOL_SIZE+1:0] seg_capacity(input logic [1:0] variant,
                                                          input int unsigned seg,
                                                          input int unsigned bits);
    logic [SYMBOL_SIZE+1:0] p;
    p = (SYMBOL_SIZE+2)'(1) << bits;
    if (!variant[1]) begin        // LE
      if (seg == 1) return p - 1;
      return p;
    end else if (!variant[0]) begin  // DS
      if (seg == 0) return p - 1;
      return p;
    end
    return p;                     // LC
  endfunction

endpackage
