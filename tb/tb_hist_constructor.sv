// tb_hist_constructor: self-checking test of the histogram accumulator.
//
// The histogram memory (port A, one clock of read latency) and the block
// memory are modelled in the testbench. Random residuals are offered
// continuously; when a block is announced (done_valid) the histogram bank
// must hold the bin counts of the block's moduli (reference bin rule) and
// the block-memory bank the residuals in order. The testbench then plays
// the parser and the coder: it clears the histogram bank, and keeps the
// block-memory bank marked busy (bank_free low) for a random time.
// A reduced block size (20) keeps the run short.
//
// Rate check: residuals are taken at most one every 6 clocks, and exactly
// every 6 clocks when nothing holds the accumulator back.
module tb_hist_constructor;
  import fapec_pkg::*;
  import fapec_ref_pkg::*;

  localparam int unsigned BS   = 20;
  localparam int unsigned NBLK = 600;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  residual_t   in_res;
  logic        in_valid, in_ready, hist_ready;
  logic [1:0]  bank_free;
  logic        h_en, h_we;
  logic [6:0]  h_addr;
  logic [4:0]  h_din, h_dout;
  logic        m_en;
  logic [5:0]  m_addr;
  logic [16:0] m_din;
  logic        done_valid, done_bank, done_ready;

  int unsigned checks = 0, failures = 0;

  hist_constructor #(.BLOCK_SIZE(BS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0]  hmem[2*NBINS];
  logic [16:0] mmem[2*BS];
  always_ff @(posedge clk) begin
    if (h_en && h_we) hmem[h_addr] <= h_din;
    if (h_en && !h_we) h_dout <= hmem[h_addr];
    if (m_en) mmem[m_addr] <= m_din;
  end

  // stimulus: a new residual as soon as the previous one is taken
  int unsigned sent_q[$];
  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 0;
    end else if (!in_valid || in_ready) begin
      int unsigned m;
      if (in_valid) sent_q.push_back({in_res.sign, in_res.modulus});
      m = $urandom_range(0, (1 << $urandom_range(0, 16)) - 1);
      in_res.modulus <= 16'(m);
      in_res.sign    <= (m == 0) ? 1'b0 : 1'($urandom_range(0, 1));
      in_valid       <= 1;
    end
  end

  // rate monitor
  int unsigned cyc = 0, last = 0, n_fast = 0, n_six = 0;
  bit          seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && in_valid && in_ready) begin
      if (seen && cyc - last < 6) n_fast++;
      if (seen && cyc - last == 6) n_six++;
      seen = 1;
      last = cyc;
    end
  end

  // coder model: a bank stays busy for a while after its block is done
  int unsigned busy_cnt[2];
  always @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      if (rst) begin bank_free[b] <= 1; busy_cnt[b] = 0; end
      else if (busy_cnt[b] != 0) begin
        busy_cnt[b]--;
        if (busy_cnt[b] == 0) bank_free[b] <= 1;
      end
    end
  end

  initial begin
    int unsigned exp_hist[NBINS], v;
    bit          bank;
    hist_ready = 0; done_ready = 0;
    for (int a = 0; a < 2 * NBINS; a++) hmem[a] = '0;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (10) begin
      @(posedge clk);
      checks++;
      if (in_ready) begin failures++; $display("ERROR: in_ready before hist_ready"); end
    end
    hist_ready = 1;
    bank = 0;
    for (int unsigned n = 0; n < NBLK; n++) begin
      while (!done_valid) @(negedge clk);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      checks++;
      if (done_bank != bank) begin failures++; $display("ERROR: block %0d in bank %0d", n, done_bank); end
      exp_hist = '{default: 0};
      for (int unsigned s = 0; s < BS; s++) begin
        v = sent_q.pop_front();
        exp_hist[ref_value_to_bin(v & 16'hffff)]++;
        checks++;
        if (mmem[bank * BS + s] != 17'(v)) begin
          failures++;
          $display("ERROR: block %0d residual %0d stored as %h, expected %h", n, s,
                   mmem[bank * BS + s], v);
        end
      end
      checks++;
      for (int b = 0; b < NBINS; b++)
        if (hmem[bank * NBINS + b] != 5'(exp_hist[b])) begin
          failures++;
          $display("ERROR: block %0d bin %0d count %0d, expected %0d", n, b,
                   hmem[bank * NBINS + b], exp_hist[b]);
          break;
        end
      // parser: clear the bank; coder: keep it busy a while
      for (int b = 0; b < NBINS; b++) hmem[bank * NBINS + b] = '0;
      bank_free[bank] = 0;
      busy_cnt[bank] = $urandom_range(1, 400);
      done_ready = 1;
      @(negedge clk);
      done_ready = 0;
      bank = ~bank;
    end
    checks++;
    if (n_fast != 0 || n_six == 0) begin
      failures++;
      $display("ERROR: %0d residuals under 6 clocks apart, %0d exactly 6", n_fast, n_six);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
