// Testbench for pamb_gen: for every CRI 0..7 the 166 entries must be the
// Zadoff-Chu sequence exp(-j*pi*n*(n+1)/83), n = m + 10*cri mod 83, at even
// entries (amplitude 16384, +/-1 rounding) and zero at odd entries; the
// counter must wrap after entry 165. Different CRIs must give different
// midambles.
module tb_pamb_gen;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic en, clr;
  logic [2:0] cri;
  iq16_t sample;
  pamb_gen dut (.clk, .rst, .en, .clr, .cri, .sample);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_i [8];
    en = 0; clr = 0; cri = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      cri = 3'(c); clr = 1; @(negedge clk); clr = 0; en = 1;
      for (int k = 0; k < 168; k++) begin
        int e, n;
        real ph, ei, eq;
        e = k % 166;
        n = (e / 2 + 10 * c) % 83;
        ph = 3.141592653589793 * real'(n * (n + 1)) / 83.0;
        ei = (e % 2 == 0) ? 16384.0 * $cos(ph) : 0.0;
        eq = (e % 2 == 0) ? -16384.0 * $sin(ph) : 0.0;
        checks++;
        if ($rtoi(real'(sample.i) - ei + 1.5) < 0 || $rtoi(real'(sample.i) - ei + 1.5) > 3 ||
            $rtoi(real'(sample.q) - eq + 1.5) < 0 || $rtoi(real'(sample.q) - eq + 1.5) > 3) begin
          failures++; $display("FAIL cri %0d entry %0d: %0d %0d vs %f %f", c, k, sample.i, sample.q, ei, eq);
        end
        if (k == 2) first_i[c] = int'(sample.i);
        @(negedge clk);
      end
      en = 0;
    end
    for (int c = 1; c < 8; c++) begin
      checks++;
      if (first_i[c] == first_i[0]) begin failures++; $display("FAIL cri %0d same as cri 0", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
