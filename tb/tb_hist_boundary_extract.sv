// tb_hist_boundary_extract: self-checking test of the histogram parser.
//
// The histogram memory is modelled in the testbench with the parser's port
// (port B) pipelined: read data appears two read cycles after the address,
// the extra register advancing only on read cycles. The memory starts with
// random contents, which the parser must clear after reset before it
// raises hist_ready. Then random histograms (residual moduli of random
// spread, binned with the reference bin rule) are written into alternating
// banks and announced with done_valid; the result is compared with a
// reference of the threshold rule, and the bank must read back as zero
// afterwards while the other bank is left alone.
module tb_hist_boundary_extract;
  import fapec_pkg::*;
  import fapec_ref_pkg::*;

  localparam int unsigned BS    = 255;
  localparam int unsigned NCASE = 1500;
  localparam int unsigned TH1 = 128, TH2 = 230, TH3 = 252;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       done_valid, done_bank, done_ready, hist_ready;
  logic       b_en, b_we;
  logic [6:0] b_addr;
  logic [7:0] b_din, b_dout;
  logic       res_valid, res_ready;
  logic [1:0] res_variant;
  logic [3:0] res_seg1_bits;
  logic [5:0] res_ceil_bin2, res_ceil_bin3, res_ceil_bin4;

  int unsigned checks = 0, failures = 0;

  hist_boundary_extract dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // histogram memory, port B pipelined
  logic [7:0] hmem[2*NBINS];
  logic [7:0] r1;
  always_ff @(posedge clk) begin
    if (b_en && b_we) hmem[b_addr] <= b_din;
    if (b_en && !b_we) begin
      r1     <= hmem[b_addr];
      b_dout <= r1;
    end
  end

  function automatic int unsigned width_of(int unsigned v);
    int unsigned n = 0;
    for (int unsigned k = 0; k < 16; k++) if (v[k]) n = k + 1;
    return n;
  endfunction

  int unsigned n_var[4] = '{default: 0};

  initial begin
    int unsigned hist[NBINS], cum, b1, b2, b3, bm, t1, t2, t3, spread, m;
    int unsigned ev, eh, other[NBINS];
    bit          f1, f2, f3, bank;
    for (int a = 0; a < 2 * NBINS; a++) hmem[a] = 8'($urandom);
    done_valid = 0; done_bank = 0; res_ready = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    @(posedge clk);
    checks++;
    if (hist_ready) begin failures++; $display("ERROR: hist_ready before the clear"); end
    while (!hist_ready) @(posedge clk);
    checks++;
    for (int a = 0; a < 2 * NBINS; a++)
      if (hmem[a] != 0) begin failures++; $display("ERROR: entry %0d not cleared", a); break; end
    t1 = (TH1 * BS + 255) / 256; t2 = (TH2 * BS + 255) / 256; t3 = (TH3 * BS + 255) / 256;
    bank = 0;
    for (int unsigned n = 0; n < NCASE; n++) begin
      // histogram of BS moduli with a random spread
      hist = '{default: 0};
      spread = 1 << $urandom_range(0, 16);
      for (int unsigned s = 0; s < BS; s++) begin
        m = $urandom_range(0, spread - 1);
        if ($urandom_range(0, 19) == 0) m = $urandom_range(0, 65535);
        hist[ref_value_to_bin(m)]++;
      end
      for (int b = 0; b < NBINS; b++) begin
        hmem[bank * NBINS + b] = 8'(hist[b]);
        other[b] = hmem[(1 - bank) * NBINS + b];
      end
      // reference
      cum = 0; f1 = 0; f2 = 0; f3 = 0; bm = 0; b1 = 0; b2 = 0; b3 = 0;
      for (int unsigned b = 0; b < NBINS; b++) begin
        cum += hist[b];
        if (!f1 && cum >= t1) begin f1 = 1; b1 = b; end
        if (!f2 && cum >= t2) begin f2 = 1; b2 = b; end
        if (!f3 && cum >= t3) begin f3 = 1; b3 = b; end
        if (hist[b] != 0) bm = b;
      end
      if (b1 <= 1)      begin ev = 0; eh = 1; end
      else if (b1 <= 3) begin ev = 0; eh = 2; end
      else if (b1 <= 6) begin ev = 2; eh = 3; end
      else begin ev = 3; eh = width_of(ref_bin_max(b1)); if (eh > 15) eh = 15; end
      n_var[ev]++;
      @(negedge clk);
      done_valid = 1; done_bank = bank;
      do @(posedge clk); while (!done_ready);
      @(negedge clk);
      done_valid = 0;
      while (!res_valid) @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      checks++;
      if (res_variant != 2'(ev) || res_seg1_bits != 4'(eh) || res_ceil_bin2 != 6'(b2) ||
          res_ceil_bin3 != 6'(b3) || res_ceil_bin4 != 6'(bm)) begin
        failures++;
        if (failures < 10)
          $display("ERROR: case %0d: got v%0d h%0d %0d %0d %0d, expected v%0d h%0d %0d %0d %0d",
                   n, res_variant, res_seg1_bits, res_ceil_bin2, res_ceil_bin3, res_ceil_bin4,
                   ev, eh, b2, b3, bm);
      end
      checks++;
      for (int b = 0; b < NBINS; b++) begin
        if (hmem[bank * NBINS + b] != 0 || hmem[(1 - bank) * NBINS + b] != 8'(other[b])) begin
          failures++;
          $display("ERROR: case %0d: bank not cleared or other bank touched (bin %0d)", n, b);
          break;
        end
      end
      res_ready = 1;
      @(negedge clk);
      res_ready = 0;
      bank = ~bank;
    end
    $display("variants LE %0d DS %0d LC %0d", n_var[0], n_var[2], n_var[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
