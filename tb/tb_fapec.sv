// tb_fapec: end-to-end test of one FAPEC instance.
//
// Samples of several statistics (slow and fast random walks, outliers,
// full-range noise, constant runs) are fed block by block; the 32-bit
// output words are decoded by the reference decoder in fapec_ref_pkg and
// every decoded sample must equal the one that was sent. The VC-buffer
// half-full flag is toggled at random in the second phase.
//
// Rate checks: the histogram accumulator takes one residual every 6
// clocks, so once the pre-compressor's two-sample buffer has filled,
// samples must be accepted at least 6 clocks apart, and in the first
// phase (no half-full, small residuals) the average must stay below 6.5
// clocks per sample.
//
// Mechanisms counted (each must happen at least once): LE, DS and LC
// tables; code words in segments 1 to 4; codes the packer splits over
// three clocks (found from their place in the decoded stream); output held
// by half-full; input backpressure; a long input stall with both banks
// waiting to be coded. Also checked: no word leaves once half-full has
// been high for 6 clocks. Only the ports of the design are observed.
module tb_fapec;
  import fapec_ref_pkg::*;

  localparam int unsigned BS       = 255;
  localparam int unsigned NBLK     = 48;
  localparam int unsigned PHASE1   = 12;   // blocks without half-full

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] in_data;
  logic        in_valid;
  logic        in_ready;
  logic        vcb_half_full;
  logic        out_valid;
  logic [31:0] out_data;

  int unsigned checks = 0, failures = 0;

  fapec dut (
    .clk, .rst, .in_data, .in_valid, .in_ready, .vcb_half_full, .out_valid, .out_data
  );

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus ---------------------------------------------------------
  int unsigned sent_q[$];
  int unsigned n_sent = 0;
  int unsigned cur = 0;
  int unsigned mode = 0;
  bit          phase2 = 0;

  function automatic int unsigned next_sample(int unsigned prev, int unsigned m);
    int d;
    unique case (m)
      0: d = int'($urandom_range(0, 2)) - 1;                 // +-1
      1: d = int'($urandom_range(0, 16)) - 8;                // +-8
      2: d = int'($urandom_range(0, 1000)) - 500;            // +-500
      3: d = ($urandom_range(0, 9) == 0) ? int'($urandom_range(0, 65535)) : int'($urandom_range(0, 6)) - 3;
      4: d = int'($urandom_range(0, 65535));                 // noise
      5: d = 1;                                               // ramp
      7: d = ($urandom_range(0, 9) < 7) ? int'($urandom_range(0, 4)) - 2 :
             ($urandom_range(0, 2) != 0) ? int'($urandom_range(0, 600)) - 300 :
                                           int'($urandom_range(0, 65535));
      default: d = 0;                                         // constant
    endcase
    return (prev + d) & 16'hffff;
  endfunction

  int unsigned n_gen = 0;
  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 1'b0;
      in_data  <= '0;
    end else if (!in_valid || in_ready) begin
      if (in_valid) begin
        sent_q.push_back(int'(in_data));
        n_sent <= n_sent + 1;
      end
      // every statistic twice in turn, then at random
      if (n_gen % BS == 0) mode = (n_gen < 16 * BS) ? (n_gen / BS) % 8 : $urandom_range(0, 7);
      cur = next_sample(cur, mode);
      n_gen++;
      in_data  <= 16'(cur);
      in_valid <= 1'b1;
    end
  end

  // half-full: off in phase 1, random bursts in phase 2
  int unsigned hf_cnt = 0;
  always_ff @(posedge clk) begin
    if (rst || !phase2) begin
      vcb_half_full <= 1'b0;
    end else if (hf_cnt == 0) begin
      // mostly short bursts, sometimes a long one that backs up both banks
      vcb_half_full <= ($urandom_range(0, 2) == 0);
      hf_cnt <= ($urandom_range(0, 19) == 0) ? $urandom_range(1000, 3000) : $urandom_range(1, 40);
    end else begin
      hf_cnt <= hf_cnt - 1;
    end
  end

  // ---- monitors (ports only) ---------------------------------------------
  // hold: the packer may finish a word already in its buffer stages, but no
  // word may come out once half-full has been high for 6 clocks; a burst
  // that long followed by more output counts as a hold.
  // stall: in_ready low for over 100 clocks once running means both banks
  // were waiting for the coder.
  int unsigned n_hold = 0, n_backpressure = 0, n_both_busy = 0, n_hf_leak = 0;
  int unsigned hf_run = 0, lo_run = 0;
  int unsigned last_accept = 0, cyc = 0, n_short_gap = 0, n_acc = 0;
  int unsigned p1_samples = 0, p1_cycles = 0;
  bit          long_burst = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (out_valid && hf_run >= 6) n_hf_leak++;
      if (out_valid && long_burst) begin n_hold++; long_burst = 0; end
      hf_run = vcb_half_full ? hf_run + 1 : 0;
      if (hf_run == 6) long_burst = 1;
      if (in_valid && !in_ready) n_backpressure++;
      lo_run = (in_valid && !in_ready) ? lo_run + 1 : 0;
      if (lo_run == 100 && n_acc > 2 * BS) n_both_busy++;
      // after the two-sample pre-compressor buffer has filled, samples can
      // only enter at the accumulator's pace
      if (in_valid && in_ready) begin
        if (n_acc >= 3 && cyc - last_accept < 6) n_short_gap++;
        n_acc++;
        last_accept = cyc;
      end
    end
  end

  // ---- output collection and decoding -------------------------------------
  fapec_decoder dec = new(BS);
  int unsigned  n_words = 0;

  always_ff @(posedge clk) begin
    if (!rst && out_valid) begin
      dec.push_word(out_data);
      n_words <= n_words + 1;
    end
  end

  int unsigned n_blocks_ok = 0;
  int unsigned samples[$];
  int unsigned exp_s;
  int unsigned bad;

  task automatic drain_decoder();
    while (dec.decode_block(samples)) begin
      bad = 0;
      for (int unsigned n = 0; n < BS; n++) begin
        exp_s = sent_q.pop_front();
        if (samples[n] != exp_s) begin
          if (bad < 3)
            $display("ERROR: block %0d sample %0d decoded %0h expected %0h",
                     n_blocks_ok, n, samples[n], exp_s);
          bad++;
        end
      end
      checks++;
      if (bad != 0) failures++;
      n_blocks_ok++;
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    // phase 1: no half-full, measure the sample rate
    wait (n_sent >= 2 * BS);
    p1_samples = n_sent;
    p1_cycles  = cyc;
    wait (n_sent >= PHASE1 * BS);
    p1_samples = n_sent - p1_samples;
    p1_cycles  = cyc - p1_cycles;
    phase2 = 1;
    while (n_blocks_ok < NBLK) begin
      @(posedge clk);
      drain_decoder();
    end

    checks++;
    if (n_short_gap != 0) begin
      $display("ERROR: %0d samples accepted less than 6 clocks apart", n_short_gap);
      failures++;
    end
    checks++;
    if (p1_cycles * 10 > p1_samples * 65) begin
      $display("ERROR: phase 1 rate %0d cycles for %0d samples", p1_cycles, p1_samples);
      failures++;
    end

    $display("blocks decoded %0d, words %0d, phase-1 clocks/sample x100 = %0d",
             n_blocks_ok, n_words, p1_cycles * 100 / p1_samples);
    $display("tables LE %0d DS %0d LC %0d; segments %0d %0d %0d %0d",
             dec.n_variant[0], dec.n_variant[2], dec.n_variant[3],
             dec.n_segment[0], dec.n_segment[1], dec.n_segment[2], dec.n_segment[3]);
    $display("3-clock splits %0d, half-full holds %0d, backpressure %0d, both banks busy %0d",
             dec.n_split3, n_hold, n_backpressure, n_both_busy);
    checks++;
    if (n_hf_leak != 0) begin
      $display("ERROR: %0d words left while half-full had been high for 6 clocks", n_hf_leak);
      failures++;
    end

    begin
      int unsigned cnt[10];
      string       nm[10];
      cnt = '{dec.n_variant[0], dec.n_variant[2], dec.n_variant[3],
              dec.n_segment[0], dec.n_segment[1], dec.n_segment[2], dec.n_segment[3],
              dec.n_split3, n_hold, n_backpressure};
      nm  = '{"LE table", "DS table", "LC table", "segment 1", "segment 2", "segment 3",
              "segment 4", "3-clock split", "half-full hold", "input backpressure"};
      for (int m = 0; m < 10; m++) begin
        checks++;
        if (cnt[m] == 0) begin
          $display("ERROR: mechanism never seen: %s", nm[m]);
          failures++;
        end
      end
      checks++;
      if (n_both_busy == 0) begin
        $display("ERROR: mechanism never seen: both banks busy");
        failures++;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
