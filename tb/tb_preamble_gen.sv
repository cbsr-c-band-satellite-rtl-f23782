// Testbench for preamble_gen: the table read through the counter must equal
// a reference built here (OQPSK-mapped PN bits, seed 0x5A5A5 for the 256
// G_AMB entries and 0x0ACE1 for the 512 T_AMB entries, +/-16384); en must
// advance, the counter must wrap to 0, or to entry 256 with loop_t, and clr
// must restart it.
module tb_preamble_gen;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic en, clr, loop_t;
  iq16_t sample;
  preamble_gen dut (.clk, .rst, .en, .clr, .loop_t, .sample);

  int ref_i [768], ref_q [768];
  initial begin
    bit r [20];
    for (int n = 0; n < 768; n++) begin
      bit b, fb;
      int seed;
      if (n == 0 || n == 256) begin
        seed = (n == 0) ? 'h5A5A5 : 'h0ACE1;
        for (int k = 0; k < 20; k++) r[k] = seed[k];   // r[19] = stage 20 = output
      end
      b = r[19];
      ref_i[n] = (n % 2 == 0) ? (b ? -16384 : 16384) : 0;
      ref_q[n] = (n % 2 == 1) ? (b ? -16384 : 16384) : 0;
      fb = r[19] ^ r[16];
      for (int k = 19; k > 0; k--) r[k] = r[k-1];
      r[0] = fb;
    end
  end

  task automatic expect_idx(input int n);
    checks++;
    if (int'(sample.i) != ref_i[n] || int'(sample.q) != ref_q[n]) begin
      failures++; $display("FAIL entry %0d: %0d %0d", n, sample.i, sample.q);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; loop_t = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int n = 0; n < 768; n++) begin
      expect_idx(n);
      en = ($urandom_range(0, 3) != 0);
      while (!en) begin @(negedge clk); expect_idx(n); en = 1; end
      @(negedge clk);
    end
    en = 0;
    expect_idx(0);          // wrapped to 0
    en = 1;
    repeat (767) @(negedge clk);
    expect_idx(767);
    loop_t = 1;
    @(negedge clk);
    loop_t = 0;
    expect_idx(256);        // looped to the start of T_AMB
    repeat (10) @(negedge clk);
    expect_idx(266);
    en = 0; clr = 1; @(negedge clk); clr = 0;
    expect_idx(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
