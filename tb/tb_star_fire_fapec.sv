// tb_star_fire_fapec: full-size test of the top level (two SpaceFibre
// ports, each with a data generator feeding FAPEC on VC2), with the top's
// default parameters.
//
// Each port's generator counts up from its own start value; the 32-bit VC2
// words of both ports are decoded by the reference decoder and must give
// back the same count, wrapping at 16 bits. Port 0 starts near the wrap
// point so the 0xFFFF -> 0x0000 step (a large residual) is crossed. Port 1
// starts at 0, like the published output of the reference coder for this
// pattern, and its first 84 words (six blocks) must equal that output byte
// for byte.
// The VC2 half-full flags are driven at random, and the generators are
// paused now and then through gen_enable.
//
// Checked, from the ports only: every decoded sample; the rate (no more
// than one sample per 6 enabled clocks, and not slower than one per 7); no word leaving once half-full
// has been high for 6 clocks; and that on both ports the output was held
// by half-full and a generator pause happened. Since the pattern makes
// every residual but the first of a block +1, which codes into the two bits
// "0","1", at least three quarters of the words must be 0xAAAAAAAA or
// 0x55555555 (the two phases of that bit pair).
module tb_star_fire_fapec;
  import fapec_ref_pkg::*;

  localparam int unsigned NP   = 2;
  localparam int unsigned BS   = 255;
  localparam int unsigned NBLK = 24;     // blocks per port

  logic                  clk = 1'b0;
  logic                  rst = 1'b1;
  logic [NP-1:0]         gen_enable;
  logic [NP-1:0][15:0]   gen_start;
  logic [NP-1:0]         vc2_half_full;
  logic [NP-1:0]         vc2_tx_valid;
  logic [NP-1:0][31:0]   vc2_tx_data;

  int unsigned checks = 0, failures = 0;

  star_fire_fapec dut (.clk, .rst, .gen_enable, .gen_start, .vc2_half_full,
                       .vc2_tx_valid, .vc2_tx_data);

  always #5 clk = ~clk;

  initial begin
    #100_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign gen_start[0] = 16'hFF00;
  assign gen_start[1] = 16'h0000;

  // Reference stream for a ramp starting at 0: the first 336 bytes of the
  // reference coder's output file. Long runs are 0x55 or 0xAA (the +1 code
  // in its two bit phases); the other bytes are the block headers and the
  // first code word of each block. Word n of the port carries bytes 4n
  // (bits 7:0) to 4n+3 (bits 31:24).
  localparam int unsigned NREF = 84;
  function automatic logic [7:0] ref_byte(int unsigned a);
    unique case (a)
      'h000: return 8'h74;  'h001: return 8'h45;
      'h041: return 8'h76;  'h042: return 8'h26;  'h043: return 8'hBE;
      'h083: return 8'hAE;  'h084: return 8'hCC;  'h085: return 8'hE7;  'h086: return 8'hEA;
      'h0C6: return 8'hED;  'h0C7: return 8'h4C;  'h0C8: return 8'h7D;
      'h108: return 8'h57;  'h109: return 8'h6A;  'h10A: return 8'h7D;  'h10B: return 8'hFA;
      'h14B: return 8'hBB;  'h14C: return 8'h73;  'h14D: return 8'h6F;  'h14E: return 8'h2A;
      default: return (a < 'h041 || (a > 'h0C8 && a < 'h108)) ? 8'h55 : 8'hAA;
    endcase
  endfunction
  logic [31:0]  ref_seen[NREF];

  fapec_decoder dec[NP];
  int unsigned  n_ok[NP], n_hold[NP], n_pause[NP];
  int unsigned  next_exp[NP];
  int unsigned  cyc = 0;
  int unsigned  hf_cnt[NP], en_cnt[NP];
  int unsigned  n_words[NP], n_alt[NP];

  initial begin
    for (int p = 0; p < NP; p++) begin
      dec[p]       = new(BS);
      n_ok[p]      = 0;
      n_hold[p]    = 0;
      n_pause[p]   = 0;
      next_exp[p]  = gen_start[p];
      hf_cnt[p]    = 0;
      en_cnt[p]    = 0;
      n_words[p]   = 0;
      n_alt[p]     = 0;
    end
  end

  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < NP; p++) begin
      if (rst) begin
        vc2_half_full[p] <= 1'b0;
        gen_enable[p]    <= 1'b1;
      end else begin
        if (hf_cnt[p] == 0) begin
          vc2_half_full[p] <= ($urandom_range(0, 3) == 0);
          hf_cnt[p] = $urandom_range(1, 60);
        end else hf_cnt[p]--;
        if (en_cnt[p] == 0) begin
          gen_enable[p] <= ($urandom_range(0, 9) != 0);
          en_cnt[p] = $urandom_range(1, 300);
        end else en_cnt[p]--;
        if (!gen_enable[p]) n_pause[p]++;
        if (vc2_tx_valid[p]) begin
          dec[p].push_word(vc2_tx_data[p]);
          n_words[p]++;
          if (vc2_tx_data[p] == 32'hAAAAAAAA || vc2_tx_data[p] == 32'h55555555) n_alt[p]++;
          if (p == 1 && n_words[p] <= NREF) ref_seen[n_words[p] - 1] = vc2_tx_data[p];
        end
      end
    end
  end

  // half-full as seen on the ports: no word once the flag has been high
  // for 6 clocks; a burst that long followed by output counts as a hold
  int unsigned hf_run[NP], n_leak[NP], en_clk[NP];
  bit          long_burst[NP];
  initial for (int p = 0; p < NP; p++) begin
    hf_run[p] = 0; n_leak[p] = 0; long_burst[p] = 0; en_clk[p] = 0;
  end
  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < NP; p++) begin
        if (vc2_tx_valid[p] && hf_run[p] >= 6) n_leak[p]++;
        if (vc2_tx_valid[p] && long_burst[p]) begin n_hold[p]++; long_burst[p] = 0; end
        hf_run[p] = vc2_half_full[p] ? hf_run[p] + 1 : 0;
        if (hf_run[p] == 6) long_burst[p] = 1;
        if (gen_enable[p]) en_clk[p]++;
      end
    end
  end

  int unsigned samples[$];

  initial begin
    int unsigned bad;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    while (n_ok[0] < NBLK || n_ok[1] < NBLK) begin
      @(posedge clk);
      for (int p = 0; p < NP; p++) begin
        while (dec[p].decode_block(samples)) begin
          bad = 0;
          for (int unsigned n = 0; n < BS; n++) begin
            if (samples[n] != next_exp[p]) begin
              if (bad < 3) $display("ERROR: port %0d block %0d sample %0d is %0h, expected %0h",
                                    p, n_ok[p], n, samples[n], next_exp[p]);
              bad++;
            end
            next_exp[p] = (next_exp[p] + 1) & 16'hffff;
          end
          checks++;
          if (bad != 0) failures++;
          n_ok[p]++;
        end
      end
    end
    for (int p = 0; p < NP; p++) begin
      $display("port %0d: words %0d, alternating %0d, blocks %0d (LE %0d DS %0d LC %0d), holds %0d, pause clocks %0d, enabled clocks per sample x100 %0d",
               p, n_words[p], n_alt[p], n_ok[p], dec[p].n_variant[0], dec[p].n_variant[2], dec[p].n_variant[3],
               n_hold[p], n_pause[p], en_clk[p] * 100 / (n_ok[p] * BS));
      // rate: at most one sample per 6 enabled clocks
      checks++;
      if (n_ok[p] * BS > en_clk[p] / 6 + 1) begin
        $display("ERROR: port %0d: %0d samples in %0d enabled clocks", p, n_ok[p] * BS, en_clk[p]);
        failures++;
      end
      // and close to one per 6 when running (half-full stalls cost a little)
      checks++;
      if (en_clk[p] * 100 > n_ok[p] * BS * 700) begin
        $display("ERROR: port %0d: slower than 7 clocks per sample", p);
        failures++;
      end
      checks++;
      if (n_leak[p] != 0) begin
        $display("ERROR: port %0d: %0d words after 6 clocks of half-full", p, n_leak[p]);
        failures++;
      end
      checks++;
      if (n_hold[p] == 0) begin
        $display("ERROR: port %0d: output never held by half-full", p);
        failures++;
      end
      // steady state: every residual is +1, coded in 2 bits "0" then "1",
      // so most words are alternating bits (which of the two phases depends
      // on the length of the block's first code word)
      checks++;
      if (n_alt[p] * 4 < n_words[p] * 3) begin
        $display("ERROR: port %0d: only %0d of %0d words are alternating bits", p, n_alt[p], n_words[p]);
        failures++;
      end
      checks++;
      if (n_pause[p] == 0) begin
        $display("ERROR: port %0d: generator never paused", p);
        failures++;
      end
    end
    // port 1 against the reference stream
    for (int unsigned n = 0; n < NREF; n++) begin
      logic [31:0] e;
      e = {ref_byte(4 * n + 3), ref_byte(4 * n + 2), ref_byte(4 * n + 1), ref_byte(4 * n)};
      checks++;
      if (ref_seen[n] != e) begin
        failures++;
        $display("ERROR: port 1 word %0d is %h, reference %h", n, ref_seen[n], e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
