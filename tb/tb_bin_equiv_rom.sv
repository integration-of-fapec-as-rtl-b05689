// tb_bin_equiv_rom: self-checking test of the bin-equivalence memory.
//
// Every address is read (one clock of latency) and compared with the
// reference bin rule; each entry must also be the largest modulus of its
// bin: every one of the 65536 moduli must fall into the first bin whose
// entry is not below it, and the entries must rise strictly, ending at
// 65535. Addresses past the last bin must read 65535.
module tb_bin_equiv_rom;
  import fapec_pkg::*;
  import fapec_ref_pkg::*;

  logic        clk = 1'b0;
  logic [5:0]  addr;
  logic [15:0] dout;

  int unsigned checks = 0, failures = 0;

  bin_equiv_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned tab[64];

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      addr = 6'(a);
      @(negedge clk);
      tab[a] = dout;
      checks++;
      if (a < NBINS && dout != 16'(ref_bin_max(a))) begin
        failures++;
        $display("ERROR: bin %0d reads %0d, expected %0d", a, dout, ref_bin_max(a));
      end
      if (a >= NBINS && dout != 16'hFFFF) begin
        failures++;
        $display("ERROR: address %0d past the bins reads %0d", a, dout);
      end
    end
    checks++;
    if (tab[NBINS-1] != 65535) begin failures++; $display("ERROR: last bin is %0d", tab[NBINS-1]); end
    for (int a = 1; a < NBINS; a++) begin
      checks++;
      if (tab[a] <= tab[a-1]) begin failures++; $display("ERROR: bin %0d not rising", a); end
    end
    // every modulus: the first bin whose maximum is not below it
    begin
      int unsigned b = 0, bad = 0;
      for (int unsigned v = 0; v < 65536; v++) begin
        while (tab[b] < v) b++;
        if (b != ref_value_to_bin(v) && bad < 5) begin
          bad++;
          $display("ERROR: modulus %0d lands in bin %0d, rule says %0d", v, b, ref_value_to_bin(v));
        end
      end
      checks++;
      if (bad != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
