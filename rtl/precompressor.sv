// precompressor: predictor and differentiator at the front of FAPEC.
//
// Each sample is predicted to equal the previous one, and the prediction
// error is passed on as a sign+modulus residual (sign set for a negative
// error, never a "-0"). Blocks are coded independently, so the first
// sample of every block of BLOCK_SIZE samples is predicted as 0 and passes
// through as its own value; that reset of the prediction is this design's
// reading of the statement that only the leading value of a block differs
// from the sample-to-sample differences.
//
// Interface: valid/ready on both sides. The incoming sample is registered
// first (the source may change its value right after a transfer), then the
// residual is computed and registered, so a residual leaves two clocks
// after its sample is accepted. Both stages stall when the output is not
// taken.
module precompressor
  import fapec_pkg::*;
#(
  parameter int unsigned BLOCK_SIZE = 255
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [SYMBOL_SIZE-1:0] in_data,
  input  logic                   in_valid,
  output logic                   in_ready,
  output residual_t              out_res,
  output logic                   out_valid,
  input  logic                   out_ready
);

  localparam int unsigned CW = $clog2(BLOCK_SIZE);

  logic [SYMBOL_SIZE-1:0] s1_data;
  logic                   s1_valid;
  logic [SYMBOL_SIZE-1:0] prev_q;
  logic [CW-1:0]          idx_q;     // position of the s1 sample in its block
  logic                   s2_adv;
  logic [SYMBOL_SIZE-1:0] pred;
  logic [SYMBOL_SIZE:0]   diff;

  assign s2_adv   = s1_valid && (!out_valid || out_ready);
  assign in_ready = !s1_valid || s2_adv;

  assign pred = (idx_q == '0) ? '0 : prev_q;
  assign diff = {1'b0, s1_data} - {1'b0, pred};

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
      idx_q     <= '0;
      prev_q    <= '0;
      s1_data   <= '0;
      out_res   <= '0;
    end else begin
      if (in_valid && in_ready) begin
        s1_data  <= in_data;
        s1_valid <= 1'b1;
      end else if (s2_adv) begin
        s1_valid <= 1'b0;
      end

      if (s2_adv) begin
        out_valid       <= 1'b1;
        out_res.sign    <= diff[SYMBOL_SIZE];
        out_res.modulus <= diff[SYMBOL_SIZE] ? SYMBOL_SIZE'(-diff) : diff[SYMBOL_SIZE-1:0];
        prev_q          <= s1_data;
        idx_q           <= (idx_q == CW'(BLOCK_SIZE - 1)) ? '0 : idx_q + 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
