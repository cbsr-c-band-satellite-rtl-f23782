// Testbench for scrambler: random bits in valid bursts of random length; the
// output must be the input XOR a reference x^20+x^17+1 sequence that starts
// from its initial state at the beginning of every burst.
module tb_scrambler;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic bit_in, valid_in, bit_out, valid_out;
  scrambler dut (.clk, .rst, .bit_in, .valid_in, .bit_out, .valid_out);

  bit ref_bits [$];
  initial begin
    bit r [20];
    for (int k = 0; k < 20; k++) r[k] = (k == 0);
    for (int n = 0; n < 8000; n++) begin
      bit fb;
      ref_bits.push_back(r[19]);
      fb = r[19] ^ r[16];
      for (int k = 19; k > 0; k--) r[k] = r[k-1];
      r[0] = fb;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid_in = 0; bit_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < 12; b++) begin
      int len;
      len = (b == 0) ? 5984 : $urandom_range(1, 300);
      for (int n = 0; n < len; n++) begin
        @(negedge clk);
        valid_in = 1; bit_in = 1'($urandom);
        #1;
        checks++;
        if (!(valid_out && bit_out == (bit_in ^ ref_bits[n]))) begin
          failures++;
          $display("FAIL burst %0d bit %0d", b, n);
        end
      end
      @(negedge clk);
      valid_in = 0;
      #1;
      checks++;
      if (valid_out) failures++;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
