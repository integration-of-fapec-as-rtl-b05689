// tb_table_constructor: self-checking test of the coding-table constructor.
//
// The bin-equivalence memory is modelled in the testbench (one clock of
// read latency, values from fapec_ref_pkg::ref_bin_max). The first case is
// the worked DS example: h=3 with ceiling bins 10, 17 and 30 (values 10,
// 31 and 3071) must give sizes 3, 2, 5, 12 and ceilings 6, 10, 42. Then
// random variants, first-segment sizes and ordered ceiling bins are
// applied and the table is compared with a reference search: each size is
// the smallest in the header field's range whose segment reaches the bin's
// value. Also checked: table_valid stays up until table_taken, the table
// stays unchanged until block_coded, and no new result is taken meanwhile.
module tb_table_constructor;
  import fapec_pkg::*;
  import fapec_ref_pkg::*;

  localparam int unsigned NCASE = 3000;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        res_valid, res_ready;
  logic [1:0]  res_variant;
  logic [3:0]  res_seg1_bits;
  logic [5:0]  res_ceil_bin2, res_ceil_bin3, res_ceil_bin4;
  logic [5:0]  rom_addr;
  logic [15:0] rom_dout;
  logic        table_valid, table_taken, block_coded;
  logic [1:0]  coding_variant;
  logic [3:0]  seg1_bits, seg2_bits, seg3_bits, seg4_bits;
  logic [15:0] ceil1, ceil2, ceil3;

  int unsigned checks = 0, failures = 0;

  table_constructor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) rom_dout <= 16'(ref_bin_max(rom_addr));

  function automatic int unsigned lo_of(int unsigned v, int unsigned seg);
    if (seg == 3) return 1;
    if (v < 2 && seg == 1) return 1;
    if (v < 2 && seg == 2) return 1;
    return 0;
  endfunction

  function automatic int unsigned hi_of(int unsigned v, int unsigned seg);
    if (seg == 3) return 16;
    if (v < 2) return (seg == 1) ? 2 : 3;
    if (v == 2) return (seg == 1) ? 3 : 7;
    return 15;
  endfunction

  // expected table
  function automatic table_t expect_table(int unsigned v, int unsigned h, int unsigned b2,
                                          int unsigned b3, int unsigned b4);
    table_t      t;
    int unsigned c[4], tgt[4], n, sel;
    t.variant = v;
    t.h = h;
    tgt[1] = ref_bin_max(b2); tgt[2] = ref_bin_max(b3); tgt[3] = ref_bin_max(b4);
    c[0] = sat(ref_cap(v, 0, h) - 1);
    for (int unsigned s = 1; s <= 3; s++) begin
      sel = hi_of(v, s);
      for (n = hi_of(v, s); n + 1 > lo_of(v, s); n--) begin
        if (sat(longint'(c[s-1]) + ref_cap(v, s, n)) >= tgt[s]) sel = n;
        if (n == 0) break;
      end
      if (s < 3) c[s] = sat(longint'(c[s-1]) + ref_cap(v, s, sel));
      if (s == 1) t.i = sel; else if (s == 2) t.j = sel; else t.k = sel;
    end
    return t;
  endfunction

  int unsigned n_taken_early = 0;

  initial begin
    int unsigned v, h, b2, b3, b4, c1, c2, c3, wait_c;
    table_t      e;
    res_valid = 0; table_taken = 0; block_coded = 0;
    {res_variant, res_seg1_bits, res_ceil_bin2, res_ceil_bin3, res_ceil_bin4} = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int unsigned n = 0; n < NCASE; n++) begin
      if (n == 0) begin
        v = 2; h = 3; b2 = 10; b3 = 17; b4 = 30;
      end else begin
        int unsigned pick;
        pick = $urandom_range(0, 2);
        v  = (pick == 0) ? 0 : (pick == 1) ? 2 : 3;
        h  = (v == 0) ? $urandom_range(1, 2) : (v == 2) ? $urandom_range(1, 3) : $urandom_range(0, 15);
        b2 = $urandom_range(0, 36);
        b3 = $urandom_range(b2, 36);
        b4 = $urandom_range(b3, 36);
      end
      e = expect_table(v, h, b2, b3, b4);
      ref_ceilings(e, c1, c2, c3);
      @(negedge clk);
      res_variant = 2'(v); res_seg1_bits = 4'(h);
      res_ceil_bin2 = 6'(b2); res_ceil_bin3 = 6'(b3); res_ceil_bin4 = 6'(b4);
      res_valid = 1;
      do @(posedge clk); while (!res_ready);
      @(negedge clk);
      res_valid = 0;
      wait_c = 0;
      while (!table_valid) begin
        @(negedge clk);
        wait_c++;
      end
      // hold the table a little before taking it
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (!table_valid) begin failures++; $display("ERROR: table_valid dropped"); end
      end
      checks++;
      if (coding_variant != 2'(v) || seg1_bits != 4'(e.h) || seg2_bits != 4'(e.i) ||
          seg3_bits != 4'(e.j) || seg4_bits != 4'(e.k % 16) ||
          ceil1 != 16'(c1) || ceil2 != 16'(c2) || ceil3 != 16'(c3)) begin
        failures++;
        if (failures < 10)
          $display("ERROR: case %0d v%0d h%0d bins %0d %0d %0d: got %0d %0d %0d %0d / %0d %0d %0d, expected %0d %0d %0d %0d / %0d %0d %0d",
                   n, v, h, b2, b3, b4, seg1_bits, seg2_bits, seg3_bits, seg4_bits,
                   ceil1, ceil2, ceil3, e.h, e.i, e.j, e.k % 16, c1, c2, c3);
      end
      if (n == 0) begin
        checks++;
        if (seg2_bits != 2 || seg3_bits != 5 || seg4_bits != 12 || ceil1 != 6 || ceil2 != 10 || ceil3 != 42) begin
          failures++;
          $display("ERROR: worked example gave %0d %0d %0d / %0d %0d %0d",
                   seg2_bits, seg3_bits, seg4_bits, ceil1, ceil2, ceil3);
        end
      end
      table_taken = 1;
      @(negedge clk);
      table_taken = 0;
      // while the block is being coded: table held, no new result taken
      repeat ($urandom_range(1, 6)) begin
        checks++;
        if (res_ready || table_valid || seg2_bits != 4'(e.i) || ceil3 != 16'(c3)) begin
          failures++;
          $display("ERROR: table not held while coding");
        end
        @(negedge clk);
      end
      block_coded = 1;
      @(negedge clk);
      block_coded = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
