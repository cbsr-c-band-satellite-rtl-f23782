// Testbench for crc_append: blocks of random bits (the full 5984-bit size and
// a reduced 64-bit instance) must come out unchanged, one cycle later,
// followed directly by 32 CRC bits equal to the remainder of the block times
// x^32 divided by the generator polynomial (computed here by long division
// over the whole message), with first_out on the first bit only.
module tb_crc_append;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic bit_in, valid_in;
  logic [1:0] sel;
  logic [1:0] bit_out, valid_out, first_out, busy;

  crc_append dut_full (.clk, .rst, .bit_in, .valid_in(valid_in && sel[0]), .bit_out(bit_out[0]),
    .valid_out(valid_out[0]), .first_out(first_out[0]), .busy(busy[0]));
  crc_append #(.DATA_BITS_P(64)) dut_small (.clk, .rst, .bit_in, .valid_in(valid_in && sel[1]), .bit_out(bit_out[1]),
    .valid_out(valid_out[1]), .first_out(first_out[1]), .busy(busy[1]));

  // generator x^32+x^31+x^24+x^22+x^16+x^14+x^8+x^7+x^5+x^3+x+1 as 33 bits
  bit gen [33];
  initial begin
    int exps [12] = '{32, 31, 24, 22, 16, 14, 8, 7, 5, 3, 1, 0};
    foreach (gen[k]) gen[k] = 0;
    foreach (exps[k]) gen[exps[k]] = 1;
  end

  // remainder of msg(x) * x^32 mod gen(x); msg[0] is the highest power
  function automatic void long_div(input bit msg [$], output bit rem [32]);
    bit w [$];
    w = msg;
    for (int k = 0; k < 32; k++) w.push_back(0);
    for (int k = 0; k < msg.size(); k++)
      if (w[k]) for (int j = 0; j <= 32; j++) w[k + j] ^= gen[32 - j];
    for (int j = 0; j < 32; j++) rem[j] = w[msg.size() + j];
  endfunction

  task automatic run_block(input int idx, input int nbits);
    bit msg [$];
    bit rem [32];
    bit got [$];
    int firsts;
    for (int k = 0; k < nbits; k++) msg.push_back(1'($urandom));
    long_div(msg, rem);
    firsts = 0;
    fork
      begin
        for (int k = 0; k < nbits; k++) begin
          @(negedge clk); valid_in = 1; bit_in = msg[k];
        end
        @(negedge clk); valid_in = 0;
      end
      begin
        while (got.size() < nbits + 32) begin
          @(posedge clk); #1;
          if (valid_out[idx]) begin
            got.push_back(bit_out[idx]);
            if (first_out[idx]) firsts++;
          end
        end
      end
    join
    for (int k = 0; k < nbits; k++) begin
      checks++;
      if (got[k] != msg[k]) begin failures++; $display("FAIL data bit %0d", k); end
    end
    for (int j = 0; j < 32; j++) begin
      checks++;
      if (got[nbits + j] != rem[j]) begin failures++; $display("FAIL crc bit %0d", j); end
    end
    checks++;
    if (firsts != 1) begin failures++; $display("FAIL first_out count %0d", firsts); end
    @(posedge clk); #1;
    checks++;
    if (valid_out[idx] || busy[idx]) begin failures++; $display("FAIL not idle after block"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid_in = 0; bit_in = 0; sel = 2'b01;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    run_block(0, 5984);
    repeat (5) @(posedge clk);
    run_block(0, 5984);
    repeat (3) @(posedge clk);
    sel = 2'b10;
    for (int b = 0; b < 5; b++) begin
      run_block(1, 64);
      repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
