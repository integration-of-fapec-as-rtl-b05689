// tb_pec_coder: self-checking test of the PEC coder.
//
// A small block size (8) is used so that the first block is the worked
// example of the DS coding strategy: table h=3, i=2, j=5, k=12, residuals
// +13, +76, +51, -88, -42, -9, +2, 0, for which the code words and header
// are known (given below as value / length, first stream bit in bit 0).
// Then random tables of all three variants are applied to random residuals
// spread over all four segments, and every header and code word is
// compared with the reference model in fapec_ref_pkg. The packer's Ready
// is driven low at random.
//
// Rate check: the coder emits at most one code word every 3 clocks.
module tb_pec_coder;
  import fapec_pkg::*;
  import fapec_ref_pkg::*;

  localparam int unsigned BS   = 8;
  localparam int unsigned NBLK = 400;

  logic                    clk = 1'b0;
  logic                    rst = 1'b1;
  logic                    table_valid;
  logic [1:0]              coding_variant;
  logic [3:0]              seg1_bits, seg2_bits, seg3_bits, seg4_bits;
  logic [15:0]             ceil1, ceil2, ceil3;
  logic                    table_taken, block_coded, ready;
  logic                    table_valid_out, comp_sample_valid;
  logic [4:0]              table_num_bits;
  logic [16:0]             table_vector;
  logic [1:0]              coding_variant_out;
  logic [4:0]              le_num_bits, ds_num_bits, lc_num_bits;
  logic [22:0]             le_comp_val, ds_comp_val;
  logic [19:0]             lc_comp_val;
  logic [16:0]             rd;
  logic [$clog2(2*BS)-1:0] raddr;

  int unsigned checks = 0, failures = 0;

  pec_coder #(.BLOCK_SIZE(BS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block memory model: one clock of read latency
  logic [16:0] mem[2*BS];
  always_ff @(posedge clk) rd <= mem[raddr];

  // ready: low now and then
  always_ff @(posedge clk) ready <= rst ? 1'b0 : ($urandom_range(0, 9) > 2);

  // expected output stream
  code_t exp_q[$];
  int unsigned fig_idx = 0;   // code words of the worked example seen

  localparam logic [22:0] FIG_VAL[8] = '{23'h81, 23'h861, 23'h221, 23'hB71,
                                         23'h7D1, 23'h2F, 23'h4, 23'h0};
  localparam int unsigned FIG_LEN[8] = '{11, 18, 18, 18, 11, 6, 4, 4};

  int unsigned cyc = 0, last_word = 0, n_fast = 0, n_words = 0, n_tables = 0;
  bit          seen_word = 0;

  function automatic void compare(code_t e, logic [22:0] got, int unsigned len, string what);
    logic [22:0] ev;
    ev = 23'(e.bits);
    checks++;
    if (len != e.len || got != ev) begin
      failures++;
      if (failures < 10)
        $display("ERROR: %s: got %0h/%0d expected %0h/%0d", what, got, len, ev, e.len);
    end
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst && table_valid_out) begin
      n_tables++;
      compare(exp_q.pop_front(), 23'(table_vector), table_num_bits, "header");
      if (n_tables == 1) begin
        checks++;
        if (table_vector != 17'h075C || table_num_bits != 13) begin
          failures++;
          $display("ERROR: worked-example header %0h/%0d", table_vector, table_num_bits);
        end
      end
    end
    if (!rst && comp_sample_valid) begin
      if (seen_word && cyc - last_word < 3) n_fast++;
      seen_word = 1;
      last_word = cyc;
      n_words++;
      unique case (coding_variant_out)
        2'b00, 2'b01: compare(exp_q.pop_front(), le_comp_val, le_num_bits, "LE word");
        2'b10:        compare(exp_q.pop_front(), ds_comp_val, ds_num_bits, "DS word");
        default:      compare(exp_q.pop_front(), 23'(lc_comp_val), lc_num_bits, "LC word");
      endcase
      if (fig_idx < 8) begin
        checks++;
        if (ds_comp_val != FIG_VAL[fig_idx] || ds_num_bits != 5'(FIG_LEN[fig_idx])) begin
          failures++;
          $display("ERROR: worked example word %0d: %0h/%0d", fig_idx, ds_comp_val, ds_num_bits);
        end
        fig_idx++;
      end
    end
  end

  function automatic table_t random_table();
    table_t t;
    int unsigned pick;
    pick = $urandom_range(0, 2);
    case (pick)
      0: begin t.variant = 0; t.h = $urandom_range(1, 2); t.i = $urandom_range(1, 2);
               t.j = $urandom_range(0, 3); t.k = $urandom_range(1, 16); end
      1: begin t.variant = 2; t.h = $urandom_range(1, 3); t.i = $urandom_range(0, 3);
               t.j = $urandom_range(0, 7); t.k = $urandom_range(1, 16); end
      default: begin t.variant = 3; t.h = $urandom_range(0, 15); t.i = $urandom_range(0, 15);
                     t.j = $urandom_range(0, 15); t.k = $urandom_range(1, 16); end
    endcase
    return t;
  endfunction

  // a modulus the table can code (segment 4 covers up to c3 + 2^k)
  function automatic int unsigned random_modulus(table_t t);
    int unsigned c1, c2, c3, top, seg;
    longint unsigned lim;
    ref_ceilings(t, c1, c2, c3);
    lim = longint'(c3) + (longint'(1) << t.k);
    top = (lim > 65535) ? 65535 : int'(lim);
    seg = $urandom_range(0, 3);
    case (seg)
      0: return $urandom_range(0, c1);
      1: return (c2 > c1) ? $urandom_range(c1 + 1, c2) : c1;
      2: return (c3 > c2) ? $urandom_range(c2 + 1, c3) : c2;
      default: return (top > c3) ? $urandom_range(c3 + 1, top) : c3;
    endcase
  endfunction

  initial begin
    table_t      t;
    int unsigned c1, c2, c3, m, bank;
    bit          s;
    table_valid = 1'b0;
    {coding_variant, seg1_bits, seg2_bits, seg3_bits, seg4_bits, ceil1, ceil2, ceil3} = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    bank = 0;
    for (int b = 0; b < NBLK; b++) begin
      if (b == 0) begin
        t.variant = 2; t.h = 3; t.i = 2; t.j = 5; t.k = 12;
      end else t = random_table();
      ref_ceilings(t, c1, c2, c3);
      exp_q.push_back(ref_header(t));
      for (int n = 0; n < BS; n++) begin
        if (b == 0) begin
          int unsigned fig_rd[8] = '{13, 76, 51, 65624, 65578, 65545, 2, 0};
          s = fig_rd[n][16];
          m = fig_rd[n] & 16'hffff;
        end else begin
          m = random_modulus(t);
          s = (m == 0) ? 1'b0 : 1'($urandom_range(0, 1));
        end
        mem[bank * BS + n] = {s, 16'(m)};
        exp_q.push_back(ref_encode(t, s, m));
      end
      // table applied until the block is coded
      @(negedge clk);
      coding_variant = 2'(t.variant);
      seg1_bits = 4'(t.h); seg2_bits = 4'(t.i); seg3_bits = 4'(t.j); seg4_bits = 4'(t.k % 16);
      ceil1 = 16'(c1); ceil2 = 16'(c2); ceil3 = 16'(c3);
      table_valid = 1'b1;
      do @(posedge clk); while (!table_taken);
      @(negedge clk);
      table_valid = 1'b0;
      do @(posedge clk); while (!block_coded);
      bank ^= 1;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_words != NBLK * BS) begin
      failures++;
      $display("ERROR: %0d words, %0d expected items left", n_words, exp_q.size());
    end
    checks++;
    if (n_fast != 0) begin
      failures++;
      $display("ERROR: %0d code words less than 3 clocks apart", n_fast);
    end
    $display("tables %0d, words %0d", n_tables, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
