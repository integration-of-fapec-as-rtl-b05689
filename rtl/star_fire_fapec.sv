// star_fire_fapec: compressed virtual-channel path of a two-port
// SpaceFibre test unit.
//
// Each SpaceFibre port of the unit has eight virtual channels (VCs); on
// VC 2 of every port a FAPEC compressor is inserted between the data
// pattern generator and the VC transmit input, so the link carries the
// compressed stream instead of the raw pattern. This module holds, for each
// of NUM_PORTS ports, the VC 2 pattern generator and its FAPEC compressor.
// The SpaceFibre codec itself (VC buffers, link, lane and physical layers),
// the SpaceWire router, USB and configuration logic and the generators and
// checkers of the other VCs are outside this module: the VC 2 transmit
// words (vc2_tx_valid / vc2_tx_data) and the VC buffer's half-full flag
// (vc2_half_full) are ports, and so are the generator controls that the
// configuration software would drive.
//
// Timing: every port accepts at most one 16-bit sample per 6 clocks and
// emits a 32-bit word on a one-clock vc2_tx_valid pulse. Synchronous
// active-high reset; gen_start is sampled during reset.
module star_fire_fapec #(
  parameter int unsigned NUM_PORTS  = 2,
  parameter int unsigned BLOCK_SIZE = 255
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [NUM_PORTS-1:0]        gen_enable,
  input  logic [NUM_PORTS-1:0][15:0]  gen_start,
  input  logic [NUM_PORTS-1:0]        vc2_half_full,
  output logic [NUM_PORTS-1:0]        vc2_tx_valid,
  output logic [NUM_PORTS-1:0][31:0]  vc2_tx_data
);

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic [15:0] smp;
    logic        smp_valid, smp_ready;

    data_generator #(.WIDTH(16), .MIN_GAP(6)) u_gen (
      .clk, .rst,
      .enable(gen_enable[p]), .start_value(gen_start[p]),
      .out_data(smp), .out_valid(smp_valid), .out_ready(smp_ready)
    );

    fapec #(.BLOCK_SIZE(BLOCK_SIZE)) u_fapec (
      .clk, .rst,
      .in_data(smp), .in_valid(smp_valid), .in_ready(smp_ready),
      .vcb_half_full(vc2_half_full[p]),
      .out_valid(vc2_tx_valid[p]), .out_data(vc2_tx_data[p])
    );
  end

endmodule
