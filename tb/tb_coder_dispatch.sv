// Testbench for coder_dispatch with two behavioural turbo-coder stand-ins of
// different latency. Four blocks with different coding rates are sent as
// soon as ready allows; the merged output must be each block's codeword, of
// the length its rate implies, in the order the blocks went in, with no
// overlap, while out_ready toggles randomly (backpressure). The CRI pushes
// must follow the same order.
module tb_coder_dispatch;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int BLK = 6016;
  logic bit_in, valid_in, first_in;
  logic [2:0] cri_in;
  logic [1:0] tc_in_bit, tc_in_valid, tc_in_first, tc_out_bit, tc_out_valid, tc_out_ready, tc_busy;
  logic [1:0][2:0] tc_in_cri;
  logic out_ready, bit_out, valid_out, ready, push_cri;
  logic [2:0] cri_out;

  coder_dispatch dut (.clk, .rst, .bit_in, .valid_in, .first_in, .cri_in, .tc_in_bit, .tc_in_valid,
    .tc_in_first, .tc_in_cri, .tc_out_bit, .tc_out_valid, .tc_out_ready, .out_ready, .bit_out,
    .valid_out, .ready, .push_cri, .cri_out);

  turbo_coder_model #(.BLOCK(BLK), .LATENCY(3000)) c0 (.clk, .in_bit(tc_in_bit[0]), .in_valid(tc_in_valid[0]),
    .in_first(tc_in_first[0]), .in_cri(tc_in_cri[0]), .out_bit(tc_out_bit[0]), .out_valid(tc_out_valid[0]),
    .out_ready(tc_out_ready[0]), .busy(tc_busy[0]));
  turbo_coder_model #(.BLOCK(BLK), .LATENCY(10)) c1 (.clk, .in_bit(tc_in_bit[1]), .in_valid(tc_in_valid[1]),
    .in_first(tc_in_first[1]), .in_cri(tc_in_cri[1]), .out_bit(tc_out_bit[1]), .out_valid(tc_out_valid[1]),
    .out_ready(tc_out_ready[1]), .busy(tc_busy[1]));

  localparam int NB = 4;
  logic [2:0] cris [NB] = '{3'd0, 3'd3, 3'd1, 3'd6};
  bit blocks [NB][$];
  bit got [$];
  logic [2:0] pushed [$];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (!rst && valid_out) got.push_back(bit_out);
    if (!rst && push_cri) pushed.push_back(cri_out);
  end

  initial begin
    int expected_len;
    valid_in = 0; bit_in = 0; first_in = 0; cri_in = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < BLK; k++) blocks[b].push_back(1'($urandom));
      @(negedge clk);
      while (!ready) @(negedge clk);
      for (int k = 0; k < BLK; k++) begin
        valid_in = 1; first_in = (k == 0); bit_in = blocks[b][k]; cri_in = (k == 0) ? cris[b] : 3'($urandom);
        @(negedge clk);
      end
      valid_in = 0; first_in = 0;
      repeat (40) @(negedge clk);
    end
    expected_len = 0;
    for (int b = 0; b < NB; b++) expected_len += cw_len(cris[b]);
    while (got.size() < expected_len) @(posedge clk);
    repeat (100) @(posedge clk);
    checks++;
    if (got.size() != expected_len) begin failures++; $display("FAIL total %0d vs %0d", got.size(), expected_len); end
    begin
      int pos;
      pos = 0;
      for (int b = 0; b < NB; b++) begin
        int L, bad;
        L = cw_len(cris[b]);
        bad = 0;
        for (int k = 0; k < L; k++) begin
          int r;
          bit e;
          r = k % (2 * BLK);
          e = (r < BLK) ? blocks[b][r] : !blocks[b][r - BLK];
          if (got[pos + k] != e) bad++;
        end
        checks++;
        if (bad != 0) begin failures++; $display("FAIL block %0d: %0d wrong bits", b, bad); end
        pos += L;
      end
    end
    checks++;
    if (pushed.size() != NB) begin failures++; $display("FAIL %0d cri pushes", pushed.size()); end
    for (int b = 0; b < NB && b < pushed.size(); b++) begin
      checks++;
      if (pushed[b] != cris[b]) begin failures++; $display("FAIL cri order %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
