// Testbench for internal_data_gen: bursts of requests must produce words
// that pack consecutive bits of the x^20+x^17+1 sequence (LSB first), with
// valid one cycle after each request, restarting the sequence after 4 or
// more idle cycles but continuing it across shorter gaps.
module tb_internal_data_gen;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic req, valid;
  logic [31:0] data;
  internal_data_gen dut (.clk, .rst, .request_in(req), .data_out(data), .valid_out(valid));

  // Reference sequence: s(n) = s(n-3) xor s(n-20) relation of x^20+x^17+1,
  // produced here by a shift register written out independently.
  bit ref_bits [$];
  task automatic make_ref(input int nbits);
    bit r [20];
    for (int k = 0; k < 20; k++) r[k] = (k == 0);   // r[0] = stage 1 ... r[19] = stage 20
    ref_bits.delete();
    for (int n = 0; n < nbits; n++) begin
      bit fb;
      ref_bits.push_back(r[19]);
      fb = r[19] ^ r[16];
      for (int k = 19; k > 0; k--) r[k] = r[k-1];
      r[0] = fb;
    end
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] ref_word(input int w);
    logic [31:0] x;
    for (int b = 0; b < 32; b++) x[b] = ref_bits[w*32 + b];
    return x;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0;
    make_ref(32 * 200);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (6) @(posedge clk);
    // back-to-back burst of 187 requests
    @(negedge clk); req = 1;
    for (int k = 0; k < 187; k++) begin
      @(negedge clk);
      check(valid && data == ref_word(k), $sformatf("burst word %0d", k));
    end
    req = 0;
    @(negedge clk);
    check(!valid, "valid drops after last request");
    // short gap (2 cycles) continues the sequence
    @(negedge clk); req = 1;
    @(negedge clk); req = 0;
    check(valid && data == ref_word(187), "continues after short gap");
    // long gap restarts
    repeat (6) @(negedge clk);
    req = 1;
    @(negedge clk); req = 0;
    check(valid && data == ref_word(0), "restarts after idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
