// Testbench for famb_gen: for each length setting (544, 1056, 2080) the
// counter must run through entries 0..len-1 and wrap, and every entry must
// equal the reference (OQPSK-mapped PN bits from seed 0x31337, +/-16384).
module tb_famb_gen;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic en, clr;
  logic [11:0] len;
  iq16_t sample;
  famb_gen dut (.clk, .rst, .en, .clr, .len, .sample);

  int ref_i [2080], ref_q [2080];
  initial begin
    bit r [20];
    int seed;
    seed = 'h31337;
    for (int k = 0; k < 20; k++) r[k] = seed[k];
    for (int n = 0; n < 2080; n++) begin
      bit b, fb;
      b = r[19];
      ref_i[n] = (n % 2 == 0) ? (b ? -16384 : 16384) : 0;
      ref_q[n] = (n % 2 == 1) ? (b ? -16384 : 16384) : 0;
      fb = r[19] ^ r[16];
      for (int k = 19; k > 0; k--) r[k] = r[k-1];
      r[0] = fb;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [3] = '{544, 1056, 2080};
    en = 0; clr = 0; len = 12'd544;
    repeat (3) @(posedge clk);
    rst <= 0;
    foreach (lens[l]) begin
      @(negedge clk);
      len = 12'(lens[l]); clr = 1; @(negedge clk); clr = 0; en = 1;
      for (int n = 0; n < lens[l] + 3; n++) begin
        int e;
        e = n % lens[l];
        checks++;
        if (int'(sample.i) != ref_i[e] || int'(sample.q) != ref_q[e]) begin
          failures++; $display("FAIL len %0d entry %0d", lens[l], n);
        end
        @(negedge clk);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
