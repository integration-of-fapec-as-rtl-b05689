// table_constructor: builds the PEC coding table of a block.
//
// From the histogram parser it receives the PEC variant, the size h of the
// first segment and the ceiling bins of segments 2, 3 and 4. Looking the
// bins up in the bin-equivalence memory turns them into sample values
// V2, V3, V4, and the sizes of the other segments follow: each one is the
// smallest size, within what the coding-table field can carry, for which
// its segment reaches the target value. The ceilings (the largest modulus
// each of segments 1..3 codes) follow from the sizes and the PEC escape
// rules (fapec_pkg::seg_capacity) and saturate at 65535:
//   C1 = cap0(h) - 1,  C2 = C1 + cap1(i),  C3 = C2 + cap2(j),
//   k  = smallest size with C3 + 2^k >= V4.
// The size ranges are set by the header fields: LE h,i in 1..2, j in 1..3;
// DS h in 1..3, i in 0..3, j in 0..7; LC h,i,j in 0..15; k in 1..16
// (16 is sent as 0). The ceilings are derived from the sizes alone, so a
// decoder can rebuild them from the header. The lower limit j >= 1 for LE
// matches the tables of the reference coder, which for a slow ramp sends
// j = 1 where a zero-bit third segment would also do; with it, this
// design's output for such a ramp is bit-identical to the reference.
//
// Timing: three ROM look-ups, one clock each, then the table is offered to
// the PEC coder (table_valid) until it is taken, and held unchanged until
// the coder reports the end of the block; only then is the next result
// accepted (res_ready).
// Lint note: the size-range helper only looks at the variant's top bit
// (LE versus DS/LC), so bit 0 of its variant argument is unused.
module table_constructor
  import fapec_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  // from the histogram parser
  input  logic                      res_valid,
  output logic                      res_ready,
  input  logic [1:0]                res_variant,
  input  logic [LOG2_SSYZE-1:0]     res_seg1_bits,
  input  logic [BIN_W-1:0]          res_ceil_bin2,
  input  logic [BIN_W-1:0]          res_ceil_bin3,
  input  logic [BIN_W-1:0]          res_ceil_bin4,
  // bin-equivalence memory
  output logic [BIN_W-1:0]          rom_addr,
  input  logic [SYMBOL_SIZE-1:0]    rom_dout,
  // to the PEC coder
  output logic                      table_valid,
  input  logic                      table_taken,
  input  logic                      block_coded,
  output logic [1:0]                coding_variant,
  output logic [LOG2_SSYZE-1:0]     seg1_bits,
  output logic [LOG2_SSYZE-1:0]     seg2_bits,
  output logic [LOG2_SSYZE-1:0]     seg3_bits,
  output logic [LOG2_SSYZE-1:0]     seg4_bits,
  output logic [SYMBOL_SIZE-1:0]    ceil1,
  output logic [SYMBOL_SIZE-1:0]    ceil2,
  output logic [SYMBOL_SIZE-1:0]    ceil3
);

  localparam int unsigned CW = SYMBOL_SIZE + 2;
  localparam logic [CW-1:0] VMAX = CW'((1 << SYMBOL_SIZE) - 1);

  typedef enum logic [2:0] {S_IDLE, S_R2, S_R3, S_R4, S_K, S_OFFER, S_HOLD} state_e;

  state_e                 state_q;
  logic [BIN_W-1:0]       cb2_q, cb3_q, cb4_q;
  logic [CW-1:0]          c1_w, c2_w, c3_w;
  logic [CW-1:0]          c_prev;
  logic [4:0]             n_sel;
  logic [CW-1:0]          c_next;

  // Size range of segment seg (1..3) for a variant.
  function automatic int unsigned min_bits(input logic [1:0] v, input int unsigned seg);
    if (seg == 3) return 1;
    if (!v[1] && seg == 1) return 1;   // LE: all-ones escape needs i >= 1
    if (!v[1] && seg == 2) return 1;   // LE: j >= 1, as in the reference tables
    return 0;
  endfunction

  function automatic int unsigned max_bits(input logic [1:0] v, input int unsigned seg);
    if (seg == 3) return 16;
    if (!v[1]) return (seg == 1) ? 2 : 3;  // LE
    if (!v[0]) return (seg == 1) ? 3 : 7;  // DS
    return 15;                              // LC
  endfunction

  function automatic logic [CW-1:0] sat_add(input logic [CW-1:0] a, input logic [CW-1:0] b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s > {1'b0, VMAX}) ? VMAX : s[CW-1:0];
  endfunction

  // Which segment is being sized in this state, and from which ceiling.
  logic [31:0] cur_seg;
  always_comb begin
    unique case (state_q)
      S_R3:    begin cur_seg = 1; c_prev = c1_w; end
      S_R4:    begin cur_seg = 2; c_prev = c2_w; end
      default: begin cur_seg = 3; c_prev = c3_w; end
    endcase
  end

  // Smallest size in range reaching rom_dout (the target value).
  always_comb begin
    n_sel = 5'(max_bits(coding_variant, cur_seg));
    for (int n = 16; n >= 0; n--) begin
      if (n >= int'(min_bits(coding_variant, cur_seg)) &&
          n <= int'(max_bits(coding_variant, cur_seg)) &&
          sat_add(c_prev, seg_capacity(coding_variant, cur_seg, n)) >= CW'(rom_dout))
        n_sel = 5'(n);
    end
    c_next = sat_add(c_prev, seg_capacity(coding_variant, cur_seg, int'(n_sel)));
  end

  always_comb begin
    rom_addr = cb2_q;
    unique case (state_q)
      S_R3:    rom_addr = cb3_q;
      S_R4:    rom_addr = cb4_q;
      default: rom_addr = cb2_q;
    endcase
  end

  assign res_ready   = (state_q == S_IDLE);
  assign table_valid = (state_q == S_OFFER);
  assign ceil1 = c1_w[SYMBOL_SIZE-1:0];
  assign ceil2 = c2_w[SYMBOL_SIZE-1:0];
  assign ceil3 = c3_w[SYMBOL_SIZE-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q        <= S_IDLE;
      {cb2_q, cb3_q, cb4_q} <= '0;
      coding_variant <= VAR_LE;
      seg1_bits      <= '0;
      seg2_bits      <= '0;
      seg3_bits      <= '0;
      seg4_bits      <= '0;
      c1_w           <= '0;
      c2_w           <= '0;
      c3_w           <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (res_valid) begin
          coding_variant <= res_variant;
          seg1_bits      <= res_seg1_bits;
          c1_w           <= seg_capacity(res_variant, 0, int'(res_seg1_bits)) - 1'b1;
          cb2_q          <= res_ceil_bin2;
          cb3_q          <= res_ceil_bin3;
          cb4_q          <= res_ceil_bin4;
          state_q        <= S_R2;
        end
        S_R2: state_q <= S_R3;                 // V2 being read
        S_R3: begin                            // V2 on rom_dout
          seg2_bits <= LOG2_SSYZE'(n_sel);
          c2_w      <= c_next;
          state_q   <= S_R4;
        end
        S_R4: begin                            // V3 on rom_dout
          seg3_bits <= LOG2_SSYZE'(n_sel);
          c3_w      <= c_next;
          state_q   <= S_K;
        end
        S_K: begin                             // V4 on rom_dout
          seg4_bits <= LOG2_SSYZE'(n_sel);     // 16 wraps to 0
          state_q   <= S_OFFER;
        end
        S_OFFER: if (table_taken) state_q <= S_HOLD;
        S_HOLD:  if (block_coded) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
