// tb_precompressor: self-checking test of the predictor / differentiator.
//
// Random 16-bit samples (random walks of random step and full-range
// jumps) are offered with random gaps and taken with random output
// stalls. Every residual must be sign+modulus of the sample minus the
// previous sample, and the first sample of each 255-sample block must pass
// through unchanged (prediction 0). The source changes its data right
// after each transfer, so a stage that did not register its input would
// be caught. No rate is checked here: the stage passes one sample per
// clock when nothing stalls it.
module tb_precompressor;
  import fapec_pkg::*;

  localparam int unsigned BS = 255;
  localparam int unsigned NSAMP = 40 * BS;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] in_data;
  logic        in_valid, in_ready;
  residual_t   out_res;
  logic        out_valid, out_ready;

  int unsigned checks = 0, failures = 0;

  precompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned exp_q[$];     // expected {sign, modulus}
  int unsigned prev = 0, idx = 0, cur = 0, n_in = 0, n_out = 0, step = 1;

  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 0;
      in_data  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        int d, p;
        p = (idx == 0) ? 0 : int'(prev);
        d = int'(in_data) - p;
        exp_q.push_back(d < 0 ? (32'h10000 | 32'(-d)) : 32'(d));
        prev = in_data;
        idx = (idx == BS - 1) ? 0 : idx + 1;
        n_in++;
      end
      if (!in_valid || in_ready) begin
        if (n_in < NSAMP && $urandom_range(0, 3) != 0) begin
          if (n_in % 97 == 0) step = 1 << $urandom_range(0, 16);
          cur = ($urandom_range(0, 30) == 0) ? $urandom_range(0, 65535)
                                            : (cur + $urandom_range(0, step) - step / 2) & 16'hffff;
          in_valid <= 1;
          in_data  <= 16'(cur);
        end else begin
          // nothing offered: the data lines change freely
          in_valid <= 0;
          in_data  <= 16'($urandom);
        end
      end
      out_ready <= ($urandom_range(0, 4) != 0);
    end
  end

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int unsigned e, g;
      e = exp_q.pop_front();
      g = {out_res.sign, out_res.modulus};
      checks++;
      n_out++;
      if (g != e) begin
        failures++;
        if (failures < 10) $display("ERROR: residual %0d is %h, expected %h", n_out, g, e);
      end
    end
  end

  initial begin
    wait (n_in >= NSAMP);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != NSAMP || exp_q.size() != 0) begin
      failures++;
      $display("ERROR: %0d samples in, %0d residuals out", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
  end

endmodule
