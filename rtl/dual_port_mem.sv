// dual_port_mem: single-clock, technology-independent dual-port RAM.
//
// Two independent ports, A and B, each either reads or writes one word per
// clock. A read returns the word one clock after the address is presented
// (synchronous read, old data on a same-cycle write). FAPEC uses two
// flavours of this memory, selected by B_PIPE:
//   B_PIPE = 0  both ports answer after one clock (block memory);
//   B_PIPE = 1  port B has one extra output register, so its data appears
//               two read cycles after the address (histogram memory). As in
//               the memory this follows, that register only advances on
//               port-B read cycles.
// The memory is written as an array so that synthesis infers block RAM;
// it is not reset. Write enables take priority over reads on each port.
module dual_port_mem #(
  parameter int unsigned WIDTH  = 17,
  parameter int unsigned DEPTH  = 510,
  parameter bit          B_PIPE = 1'b0,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  output logic [WIDTH-1:0] a_dout,
  // port B
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_din,
  output logic [WIDTH-1:0] b_dout
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] b_rd_q;

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_din;
      else      a_dout      <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_din;
      else      b_rd_q      <= mem[b_addr];
    end
  end

  if (B_PIPE) begin : g_bpipe
    always_ff @(posedge clk)
      if (b_en && !b_we) b_dout <= b_rd_q;
  end else begin : g_bnopipe
    assign b_dout = b_rd_q;
  end

endmodule
