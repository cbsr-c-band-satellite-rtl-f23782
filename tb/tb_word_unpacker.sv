// Testbench for word_unpacker (reduced to 5 words per subframe, FIFO of 16):
// words pushed in arbitrary rhythm must come out LSB first, one bit per
// cycle without gaps, only after data_start, and a second subframe whose
// data_start arrives while the first is still being unpacked must follow.
module tb_word_unpacker;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int WORDS = 5;
  logic [31:0] word_in;
  logic word_valid, data_start, bit_out, bit_valid, busy;
  bit exp_bits [$];
  int gaps;

  word_unpacker #(.DEPTH(16), .WORDS(WORDS)) dut (.clk, .rst, .word_in, .word_valid, .data_start,
    .bit_out, .bit_valid, .busy);

  task automatic push_words(input int n);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      word_in = $urandom; word_valid = 1;
      for (int b = 0; b < 32; b++) exp_bits.push_back(word_in[b]);
      @(negedge clk);
      word_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  bit started;
  int nbits;
  always @(posedge clk) begin
    if (!rst) begin
      if (bit_valid) begin
        checks++;
        if (exp_bits.size() == 0 || bit_out != exp_bits[0]) begin
          failures++; $display("FAIL bit %0d", nbits);
        end
        if (exp_bits.size() != 0) void'(exp_bits.pop_front());
        nbits++;
        started = 1;
      end else if (started && (nbits % (32 * WORDS)) != 0) gaps++;
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
    word_valid = 0; data_start = 0; word_in = 0; nbits = 0; gaps = 0; started = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    push_words(WORDS);
    repeat (10) @(negedge clk);
    checks++;
    if (nbits != 0 || busy) begin failures++; $display("FAIL output before data_start"); end
    data_start = 1; @(negedge clk); data_start = 0;
    repeat (20) @(negedge clk);
    push_words(WORDS);       // second subframe arrives while the first is sent
    data_start = 1; @(negedge clk); data_start = 0;
    repeat (400) @(negedge clk);
    checks++;
    if (nbits != 2 * 32 * WORDS) begin failures++; $display("FAIL %0d bits", nbits); end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d gaps inside a subframe", gaps); end
    checks++;
    if (busy) begin failures++; $display("FAIL busy at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
