// tb_word_packer: self-checking test of the word packer.
//
// Headers (table_valid_out) and code words of all three variants, with
// random lengths up to the widest word, are presented whenever Ready is
// high; the bits they carry are appended to a model bit queue, and every
// 32-bit output word must equal the next 32 bits of that queue, taken as
// four bytes (bits 7:0 first), each with its first bit in the byte's most
// significant position. The VC-buffer half-full flag is raised at random, also right
// after a word was presented; once it has been high for 6 clocks no output
// word may appear.
//
// Rate check: with half-full low, Ready must be back at most 4 clocks after
// a word was presented (register, then up to three clocks of splitting).
// Counted (from the model's fill level): words split over two and over
// three clocks, and words held by half-full; each must happen.
module tb_word_packer;
  import fapec_pkg::*;

  localparam int unsigned NWORDS = 20000;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        ready;
  logic        table_valid_out;
  logic [4:0]  table_num_bits;
  logic [16:0] table_vector;
  logic        comp_sample_valid;
  logic [1:0]  coding_variant_out;
  logic [4:0]  le_num_bits, ds_num_bits, lc_num_bits;
  logic [22:0] le_comp_val, ds_comp_val;
  logic [19:0] lc_comp_val;
  logic        vcb_half_full;
  logic        out_valid;
  logic [31:0] out_data;

  int unsigned checks = 0, failures = 0;

  word_packer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          model_q[$];
  int unsigned n_out = 0, n_split2 = 0, n_split3 = 0, n_hold = 0;
  int unsigned since = 0, n_slow = 0;
  bit          hf_seen = 0;

  // output check
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      bit [31:0] e;
      for (int b = 0; b < 32; b++) e[8 * (b / 8) + 7 - b % 8] = model_q.pop_front();
      checks++;
      n_out++;
      if (out_data != e) begin
        failures++;
        if (failures < 10) $display("ERROR: word %0d is %h, expected %h", n_out, out_data, e);
      end
    end
  end

  // no word may leave once half-full has been high for 6 clocks
  int unsigned hf_run = 0, n_leak = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid && hf_run >= 6) n_leak++;
      hf_run = vcb_half_full ? hf_run + 1 : 0;
    end
  end

  int unsigned fill = 0;   // stream bits so far, modulo 16

  initial begin
    int unsigned n, kind;
    logic [22:0] w;
    {table_valid_out, comp_sample_valid} = '0;
    {table_num_bits, table_vector, coding_variant_out, le_num_bits, ds_num_bits, lc_num_bits,
     le_comp_val, ds_comp_val, lc_comp_val} = '0;
    vcb_half_full = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int unsigned k = 0; k < NWORDS; k++) begin
      // wait for ready, measuring how long it takes with half-full low
      since = 0;
      hf_seen = 0;
      @(negedge clk);
      while (!ready) begin
        if (vcb_half_full) hf_seen = 1;
        @(negedge clk);
        since++;
        // half-full: random, decided away from the clock edge
        if ($urandom_range(0, 29) == 0) vcb_half_full = ~vcb_half_full;
      end
      checks++;
      if (!hf_seen && !vcb_half_full && since > 4) begin
        failures++;
        n_slow++;
        $display("ERROR: ready came back after %0d clocks", since);
      end
      if ($urandom_range(0, 4) == 0) begin
        vcb_half_full = 1'b1;
        continue;
      end
      if ($urandom_range(0, 2) == 0) vcb_half_full = 1'b0;
      if (vcb_half_full) continue;
      kind = $urandom_range(0, 3);
      w = 23'({$urandom, $urandom});
      unique case (kind)
        0: begin n = $urandom_range(10, 17); table_vector = 17'(w); table_num_bits = 5'(n);
                 table_valid_out = 1; end
        1: begin n = $urandom_range(1, 23); le_comp_val = w; le_num_bits = 5'(n);
                 coding_variant_out = 2'b00; comp_sample_valid = 1; end
        2: begin n = $urandom_range(1, 23); ds_comp_val = w; ds_num_bits = 5'(n);
                 coding_variant_out = 2'b10; comp_sample_valid = 1; end
        default: begin n = $urandom_range(1, 20); lc_comp_val = 20'(w); lc_num_bits = 5'(n);
                       coding_variant_out = 2'b11; comp_sample_valid = 1; end
      endcase
      for (int unsigned b = 0; b < n; b++) model_q.push_back(w[b]);
      // splitting needed, from the word's place in the 16-bit buffer
      if (fill + n > 32) n_split3++;
      else if (fill + n > 16) n_split2++;
      fill = (fill + n) % 16;
      @(negedge clk);
      table_valid_out = 0;
      comp_sample_valid = 0;
      // half-full raised while the word waits in the input register
      if ($urandom_range(0, 3) == 0) begin vcb_half_full = 1'b1; n_hold++; end
      // garbage beyond the word length must not leak into the stream
      le_comp_val = 23'($urandom); ds_comp_val = 23'($urandom);
      lc_comp_val = 20'($urandom); table_vector = 17'($urandom);
    end
    vcb_half_full = 0;
    repeat (20) @(posedge clk);
    $display("words out %0d, left in model %0d bits, 2-clock splits %0d, 3-clock splits %0d, holds %0d",
             n_out, model_q.size(), n_split2, n_split3, n_hold);
    checks++;
    if (model_q.size() >= 32) begin
      failures++;
      $display("ERROR: %0d bits never came out", model_q.size());
    end
    checks++;
    if (n_leak != 0) begin
      failures++;
      $display("ERROR: %0d words left after 6 clocks of half-full", n_leak);
    end
    checks++;
    if (n_split2 == 0 || n_split3 == 0 || n_hold == 0) begin
      failures++;
      $display("ERROR: a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
