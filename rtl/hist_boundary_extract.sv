// hist_boundary_extract: histogram parser of FAPEC.
//
// Once a block has been accumulated, this block walks through its 37
// histogram bins, accumulates the occurrences and finds the bins at which
// the accumulated count first reaches three fractions of the block
// (TH1/256, TH2/256, TH3/256) and the last non-empty bin. From these it
// selects the PEC variant and the size of the first segment, and it hands
// the ceiling bins of segments 2, 3 and 4 to the table constructor. It
// then clears the bank it has read so that it can be filled again.
//
// The choice rule is this design's own, simple and threshold based: the
// calibration that FAPEC actually uses is not public. The bin holding the
// TH1 point (the median by default) decides: bins 0..1 give LE with a
// 1-bit first segment, bins 2..3 LE with 2 bits, bins 4..6 DS with 3 bits,
// and anything larger LC with a first segment just wide enough for the
// largest modulus of that bin (at most 15 bits). The ceiling bins are the
// TH2 bin, the TH3 bin and the last non-empty bin.
//
// Memory: port B of the histogram memory, whose read data is pipelined and
// appears two read cycles after the address. After reset the block first
// clears both histogram banks and then raises hist_ready.
// Timing: about 2*NBINS + 4 clocks per block (NBINS+2 reads, NBINS writes),
// then res_valid is held until res_ready.
// Note: b_din (write data to the histogram memory) is always zero, because
// this block only ever writes to clear bins; synthesis therefore sees its
// bits as constant.
module hist_boundary_extract
  import fapec_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 255,
  parameter int unsigned TH1 = 128,
  parameter int unsigned TH2 = 230,
  parameter int unsigned TH3 = 252,
  localparam int unsigned CNT_W = $clog2(BLOCK_SIZE + 1),
  localparam int unsigned HA_W  = $clog2(2 * NBINS)
) (
  input  logic                      clk,
  input  logic                      rst,
  // finished block from the histogram accumulator
  input  logic                      done_valid,
  input  logic                      done_bank,
  output logic                      done_ready,
  output logic                      hist_ready,
  // histogram memory, port B
  output logic                      b_en,
  output logic                      b_we,
  output logic [HA_W-1:0]           b_addr,
  output logic [CNT_W-1:0]          b_din,
  input  logic [CNT_W-1:0]          b_dout,
  // calibration result to the table constructor
  output logic                      res_valid,
  input  logic                      res_ready,
  output logic [1:0]                res_variant,
  output logic [LOG2_SSYZE-1:0]     res_seg1_bits,
  output logic [BIN_W-1:0]          res_ceil_bin2,
  output logic [BIN_W-1:0]          res_ceil_bin3,
  output logic [BIN_W-1:0]          res_ceil_bin4
);

  // Accumulated-count thresholds, fixed at elaboration (no multiplier).
  localparam int unsigned T1 = (TH1 * BLOCK_SIZE + 255) / 256;
  localparam int unsigned T2 = (TH2 * BLOCK_SIZE + 255) / 256;
  localparam int unsigned T3 = (TH3 * BLOCK_SIZE + 255) / 256;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_READ, S_DECIDE, S_CLEAR, S_OUT} state_e;

  state_e            state_q;
  logic              bank_q;
  logic [HA_W-1:0]   ptr_q;     // read / clear index
  logic [CNT_W:0]    cum_q;
  logic              f1_q, f2_q, f3_q;
  logic [BIN_W-1:0]  b1_q, b2_q, b3_q, bmax_q;
  logic [BIN_W-1:0]  proc_bin;
  logic [CNT_W:0]    cum_n;
  logic [HA_W-1:0]   base;

  assign base       = bank_q ? HA_W'(NBINS) : '0;
  assign hist_ready = (state_q != S_INIT);
  assign done_ready = (state_q == S_IDLE);
  assign res_valid  = (state_q == S_OUT);
  assign proc_bin   = BIN_W'(ptr_q - 2);
  assign cum_n      = cum_q + (CNT_W+1)'(b_dout);

  always_comb begin
    b_en   = 1'b0;
    b_we   = 1'b0;
    b_din  = '0;
    b_addr = ptr_q;
    unique case (state_q)
      S_INIT:  begin b_en = 1'b1; b_we = 1'b1; end
      S_READ:  begin
                 b_en   = 1'b1;
                 b_addr = base + ((ptr_q < HA_W'(NBINS)) ? ptr_q : HA_W'(NBINS - 1));
               end
      S_CLEAR: begin b_en = 1'b1; b_we = 1'b1; b_addr = base + ptr_q; end
      default: ;
    endcase
  end

  // Width in bits of the largest modulus in a bin (LC first segment).
  function automatic logic [LOG2_SSYZE-1:0] lc_first_bits(input logic [BIN_W-1:0] b);
    logic [SYMBOL_SIZE-1:0] v;
    int unsigned n;
    v = bin_max(32'(b));
    n = 0;
    for (int unsigned k = 0; k < SYMBOL_SIZE; k++)
      if (v[k]) n = k + 1;
    if (n > 15) n = 15;
    return LOG2_SSYZE'(n);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q       <= S_INIT;
      ptr_q         <= '0;
      bank_q        <= 1'b0;
      cum_q         <= '0;
      {f1_q, f2_q, f3_q} <= '0;
      {b1_q, b2_q, b3_q, bmax_q} <= '0;
      res_variant   <= VAR_LE;
      res_seg1_bits <= '0;
      res_ceil_bin2 <= '0;
      res_ceil_bin3 <= '0;
      res_ceil_bin4 <= '0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          if (ptr_q == HA_W'(2 * NBINS - 1)) begin
            ptr_q   <= '0;
            state_q <= S_IDLE;
          end else begin
            ptr_q <= ptr_q + 1'b1;
          end
        end
        S_IDLE: if (done_valid) begin
          bank_q  <= done_bank;
          ptr_q   <= '0;
          cum_q   <= '0;
          {f1_q, f2_q, f3_q} <= '0;
          {b1_q, b2_q, b3_q, bmax_q} <= '0;
          state_q <= S_READ;
        end
        S_READ: begin
          if (ptr_q >= 2) begin
            // count of bin ptr_q-2 is on b_dout now
            cum_q <= cum_n;
            if (!f1_q && cum_n >= (CNT_W+1)'(T1)) begin f1_q <= 1'b1; b1_q <= proc_bin; end
            if (!f2_q && cum_n >= (CNT_W+1)'(T2)) begin f2_q <= 1'b1; b2_q <= proc_bin; end
            if (!f3_q && cum_n >= (CNT_W+1)'(T3)) begin f3_q <= 1'b1; b3_q <= proc_bin; end
            if (b_dout != '0) bmax_q <= proc_bin;
          end
          if (ptr_q == HA_W'(NBINS + 1)) begin
            state_q <= S_DECIDE;
          end
          ptr_q <= ptr_q + 1'b1;
        end
        S_DECIDE: begin
          if (b1_q <= 1) begin
            res_variant   <= VAR_LE;
            res_seg1_bits <= LOG2_SSYZE'(1);
          end else if (b1_q <= 3) begin
            res_variant   <= VAR_LE;
            res_seg1_bits <= LOG2_SSYZE'(2);
          end else if (b1_q <= 6) begin
            res_variant   <= VAR_DS;
            res_seg1_bits <= LOG2_SSYZE'(3);
          end else begin
            res_variant   <= VAR_LC;
            res_seg1_bits <= lc_first_bits(b1_q);
          end
          res_ceil_bin2 <= b2_q;
          res_ceil_bin3 <= b3_q;
          res_ceil_bin4 <= bmax_q;
          ptr_q   <= '0;
          state_q <= S_CLEAR;
        end
        S_CLEAR: begin
          if (ptr_q == HA_W'(NBINS - 1)) begin
            ptr_q   <= '0;
            state_q <= S_OUT;
          end else begin
            ptr_q <= ptr_q + 1'b1;
          end
        end
        S_OUT: if (res_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
