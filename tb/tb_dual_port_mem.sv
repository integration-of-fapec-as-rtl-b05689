// tb_dual_port_mem: self-checking test of the dual-port RAM in both of its
// flavours as FAPEC uses them: the block memory (17 bits x 510, both ports
// one clock of read latency) and the histogram memory (8 bits x 74, port B
// pipelined: data two read cycles after the address, the extra register
// advancing only on port-B reads). Random reads and writes on both ports
// (never the same address written by both in one clock) are compared with
// a model array; the pipelined port-B output is checked on every clock,
// since it must hold its value between reads.
module tb_dual_port_mem;

  localparam int unsigned NOPS = 20000;

  logic        clk = 1'b0;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block-memory flavour (defaults)
  logic        a_en, a_we, b_en, b_we;
  logic [8:0]  a_addr, b_addr;
  logic [16:0] a_din, a_dout, b_din, b_dout;
  dual_port_mem u_blk (.clk, .a_en, .a_we, .a_addr, .a_din, .a_dout,
                       .b_en, .b_we, .b_addr, .b_din, .b_dout);

  // histogram flavour
  logic        ha_en, ha_we, hb_en, hb_we;
  logic [6:0]  ha_addr, hb_addr;
  logic [7:0]  ha_din, ha_dout, hb_din, hb_dout;
  dual_port_mem #(.WIDTH(8), .DEPTH(74), .B_PIPE(1'b1)) u_hist (
    .clk, .a_en(ha_en), .a_we(ha_we), .a_addr(ha_addr), .a_din(ha_din), .a_dout(ha_dout),
    .b_en(hb_en), .b_we(hb_we), .b_addr(hb_addr), .b_din(hb_din), .b_dout(hb_dout));

  logic [16:0] m1[510];
  logic [7:0]  m2[74];

  function automatic void chk(int unsigned got, int unsigned exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("ERROR: %s read %h, expected %h", what, got, exp_v);
    end
  endfunction

  initial begin
    int unsigned ea, eb, eha, ehb_1, ehb_2;
    bit          ra, rb, rha;
    int unsigned rhb_n;
    for (int a = 0; a < 510; a++) m1[a] = 17'($urandom);
    for (int a = 0; a < 74; a++) m2[a] = 8'($urandom);
    // fill both memories through port A
    for (int a = 0; a < 510; a++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 9'(a); a_din = m1[a]; b_en = 0; b_we = 0;
      ha_en = (a < 74); ha_we = 1; ha_addr = 7'(a % 74); ha_din = m2[a % 74]; hb_en = 0; hb_we = 0;
    end
    rhb_n = 0; ehb_1 = 0; ehb_2 = 0;
    for (int unsigned n = 0; n < NOPS; n++) begin
      @(negedge clk);
      // block memory
      a_en = $urandom_range(0, 3) != 0; a_we = $urandom_range(0, 1); a_addr = 9'($urandom_range(0, 509));
      b_en = $urandom_range(0, 3) != 0; b_we = $urandom_range(0, 1); b_addr = 9'($urandom_range(0, 509));
      if (b_addr == a_addr) b_addr = 9'((a_addr + 1) % 510);
      a_din = 17'($urandom); b_din = 17'($urandom);
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = m1[a_addr]; eb = m1[b_addr];
      // histogram memory
      ha_en = $urandom_range(0, 3) != 0; ha_we = $urandom_range(0, 1); ha_addr = 7'($urandom_range(0, 73));
      hb_en = $urandom_range(0, 3) != 0; hb_we = $urandom_range(0, 1); hb_addr = 7'($urandom_range(0, 73));
      if (hb_addr == ha_addr) hb_addr = 7'((ha_addr + 1) % 74);
      ha_din = 8'($urandom); hb_din = 8'($urandom);
      rha = ha_en && !ha_we;
      eha = m2[ha_addr];
      if (hb_en && !hb_we) begin
        // pipeline advances: the read two reads back comes out
        ehb_2 = ehb_1;
        ehb_1 = m2[hb_addr];
      end
      @(posedge clk);
      if (a_en && a_we) m1[a_addr] = a_din;
      if (b_en && b_we) m1[b_addr] = b_din;
      if (ha_en && ha_we) m2[ha_addr] = ha_din;
      if (hb_en && hb_we) m2[hb_addr] = hb_din;
      #1;
      if (ra) chk(a_dout, ea, "block A");
      if (rb) chk(b_dout, eb, "block B");
      if (rha) chk(ha_dout, eha, "hist A");
      // the pipelined output must hold between reads, so it is checked on
      // every clock once two reads have primed it
      if (hb_en && !hb_we) rhb_n++;
      if (rhb_n >= 2) chk(hb_dout, ehb_2, "hist B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
