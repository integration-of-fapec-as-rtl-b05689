// data_generator: test-pattern source feeding FAPEC on a virtual channel.
//
// Produces a simple increasing pattern: the 16-bit value goes up by one
// each time it is read, starting from start_value after reset, so the
// sample-to-sample differences are all 1. Two transfers are always at
// least MIN_GAP clocks apart, whatever the enable pattern, because the
// histogram accumulator takes one sample every 6 clocks.
//
// Interface: valid/ready; out_data changes right after a transfer.
// start_value is sampled while rst is high.
module data_generator #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned MIN_GAP = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [WIDTH-1:0] start_value,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);

  localparam int unsigned GW = (MIN_GAP > 1) ? $clog2(MIN_GAP) : 1;

  logic [GW-1:0] gap_q;   // clocks since the last transfer, saturating

  assign out_valid = enable && (gap_q >= GW'(MIN_GAP - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_data <= start_value;
      gap_q    <= GW'(MIN_GAP - 1);
    end else if (out_valid && out_ready) begin
      out_data <= out_data + 1'b1;
      gap_q    <= '0;
    end else if (gap_q < GW'(MIN_GAP - 1)) begin
      gap_q <= gap_q + 1'b1;
    end
  end

endmodule
