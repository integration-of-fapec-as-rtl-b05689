// hist_constructor: histogram accumulator of FAPEC.
//
// For every residual of a block it finds the histogram bin of the modulus
// in a single clock (fapec_pkg::value_to_bin), reads that bin's count from
// the histogram memory, adds one and writes it back, and stores the
// residual in the block memory, where it waits for its coding table. After
// BLOCK_SIZE residuals it announces the finished block (done_valid/bank)
// to the histogram parser and moves to the other bank.
//
// Both memories are split in two banks so that one block can be coded
// while the next one is accumulated: histogram bank b holds bins
// b*NBINS .. b*NBINS+36, block-memory bank b holds entries
// b*BLOCK_SIZE .. b*BLOCK_SIZE+BLOCK_SIZE-1.
//
// Timing: one residual every 6 clocks, the rate of the histogram
// accumulator this design follows (accept, bin, read, read data, increment,
// write back). A new block is only started once the histogram memory has
// been cleared (hist_ready), the bank to be filled has been freed by the
// coder (bank_free) and the previous block has been handed over.
module hist_constructor
  import fapec_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 255,
  localparam int unsigned CNT_W = $clog2(BLOCK_SIZE + 1),
  localparam int unsigned HA_W  = $clog2(2 * NBINS),
  localparam int unsigned MA_W  = $clog2(2 * BLOCK_SIZE)
) (
  input  logic                   clk,
  input  logic                   rst,
  // residuals from the pre-compressor
  input  residual_t              in_res,
  input  logic                   in_valid,
  output logic                   in_ready,
  // status of the downstream stages
  input  logic                   hist_ready,
  input  logic [1:0]             bank_free,
  // histogram memory, port A
  output logic                   h_en,
  output logic                   h_we,
  output logic [HA_W-1:0]        h_addr,
  output logic [CNT_W-1:0]       h_din,
  input  logic [CNT_W-1:0]       h_dout,
  // block memory, port A (write only)
  output logic                   m_en,
  output logic [MA_W-1:0]        m_addr,
  output logic [SYMBOL_SIZE:0]   m_din,
  // finished block to the histogram parser
  output logic                   done_valid,
  output logic                   done_bank,
  input  logic                   done_ready
);

  typedef enum logic [2:0] {
    S_IDLE, S_BIN, S_READ, S_WAIT, S_INC, S_WRITE, S_DONE
  } state_e;

  state_e               state_q;
  residual_t            res_q;
  logic [BIN_W-1:0]     bin_q;
  logic [CNT_W-1:0]     cnt_q;
  logic [CNT_W-1:0]     idx_q;   // residual index inside the block
  logic                 bank_q;

  logic [HA_W-1:0]      h_base;
  logic [MA_W-1:0]      m_base;

  assign h_base = bank_q ? HA_W'(NBINS) : '0;
  assign m_base = bank_q ? MA_W'(BLOCK_SIZE) : '0;

  assign in_ready   = (state_q == S_IDLE) && hist_ready && bank_free[bank_q];
  assign done_valid = (state_q == S_DONE);
  assign done_bank  = bank_q;

  always_comb begin
    h_en   = 1'b0;
    h_we   = 1'b0;
    h_addr = h_base + HA_W'(bin_q);
    h_din  = cnt_q;
    m_en   = 1'b0;
    m_addr = m_base + MA_W'(idx_q);
    m_din  = res_q;
    unique case (state_q)
      S_READ: begin
        h_en = 1'b1;          // read the bin count
        m_en = 1'b1;          // store the residual
      end
      S_WRITE: begin
        h_en = 1'b1;
        h_we = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      idx_q   <= '0;
      bank_q  <= 1'b0;
      res_q   <= '0;
      bin_q   <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:  if (in_valid && in_ready) begin
                   res_q   <= in_res;
                   state_q <= S_BIN;
                 end
        S_BIN:   begin
                   bin_q   <= value_to_bin(res_q.modulus);
                   state_q <= S_READ;
                 end
        S_READ:  state_q <= S_WAIT;
        S_WAIT:  state_q <= S_INC;
        S_INC:   begin
                   cnt_q   <= h_dout + 1'b1;
                   state_q <= S_WRITE;
                 end
        S_WRITE: begin
                   if (idx_q == CNT_W'(BLOCK_SIZE - 1)) begin
                     idx_q   <= '0;
                     state_q <= S_DONE;
                   end else begin
                     idx_q   <= idx_q + 1'b1;
                     state_q <= S_IDLE;
                   end
                 end
        S_DONE:  if (done_ready) begin
                   bank_q  <= ~bank_q;
                   state_q <= S_IDLE;
                 end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
