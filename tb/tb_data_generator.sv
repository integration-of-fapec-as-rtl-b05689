// tb_data_generator: self-checking test of the incrementing data generator.
//
// The generator must start at start_value, increase by one (wrapping at 16
// bits) on every transfer, never offer data while disabled, and keep at
// least 6 clocks between two transfers (the accumulator's rate). enable
// and the consumer's ready are driven at random; with both held high the
// transfers must come exactly every 6 clocks.
module tb_data_generator;

  localparam int unsigned NXFER = 5000;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        enable;
  logic [15:0] start_value;
  logic [15:0] out_data;
  logic        out_valid, out_ready;

  int unsigned checks = 0, failures = 0;

  data_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned expv, cyc = 0, last = 0, n_x = 0, n_six = 0, phase = 0;
  bit          seen = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (out_valid && !enable) begin
        failures++;
        $display("ERROR: data offered while disabled");
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != 16'(expv)) begin
          failures++;
          if (failures < 10) $display("ERROR: value %h, expected %h", out_data, expv);
        end
        checks++;
        if (seen && cyc - last < 6) begin
          failures++;
          $display("ERROR: transfers %0d clocks apart", cyc - last);
        end
        if (seen && cyc - last == 6 && phase == 1) n_six++;
        if (seen && cyc - last != 6 && phase == 1) begin
          failures++;
          $display("ERROR: free-running transfers %0d clocks apart", cyc - last);
        end
        seen = 1;
        last = cyc;
        expv = (expv + 1) & 16'hffff;
        n_x++;
      end
      if (phase == 0) begin
        enable    <= ($urandom_range(0, 3) != 0);
        out_ready <= ($urandom_range(0, 2) != 0);
      end
    end
  end

  initial begin
    start_value = 16'hFFF0;
    expv = start_value;
    enable = 1; out_ready = 1;
    repeat (4) @(posedge clk);
    rst = 0;
    wait (n_x >= NXFER);
    @(negedge clk);
    enable = 1; out_ready = 1;
    @(posedge clk);
    @(posedge clk);
    phase = 1;
    wait (n_x >= NXFER + 200);
    checks++;
    if (n_six < 150) begin failures++; $display("ERROR: only %0d 6-clock gaps", n_six); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
