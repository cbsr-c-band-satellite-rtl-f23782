// Testbench for fake_data_ctrl: with 3 subframes per frame, each subframe
// must start with one sample_cri pulse, carry (num_phase_midamble-1) x 660
// bits equal to the reference PN table repeated per PCWORD, pause while
// fifo_ready is low, end with one inc_subframe_cnt pulse, and a frame that
// has begun must be completed even if tx_enable drops in its middle.
module tb_fake_data_ctrl;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic tx_enable, fifo_ready, inc, data_en, data_bit, sample_cri;
  logic [5:0] nmid;
  logic [7:0] nsub;

  fake_data_ctrl dut (.clk, .rst, .tx_enable, .num_phase_midamble(nmid), .num_subframes(nsub),
    .fifo_ready, .inc_subframe_cnt(inc), .data_en, .data_bit, .sample_cri);

  bit lut [660];
  initial begin
    bit r [20];
    for (int k = 0; k < 20; k++) r[k] = (k == 0);
    for (int n = 0; n < 660; n++) begin
      bit fb;
      lut[n] = r[19];
      fb = r[19] ^ r[16];
      for (int k = 19; k > 0; k--) r[k] = r[k-1];
      r[0] = fb;
    end
  end

  int bits_in_sf, cri_pulses, incs, bad_bits, paused_bits;
  int sf_bits [$];
  always @(posedge clk) begin
    if (!rst) begin
      fifo_ready <= ($urandom_range(0, 4) != 0);
      if (sample_cri) begin cri_pulses++; bits_in_sf = 0; end
      if (data_en) begin
        if (data_bit != lut[bits_in_sf % 660]) bad_bits++;
        if (!fifo_ready) paused_bits++;
        bits_in_sf++;
      end
      if (inc) begin incs++; sf_bits.push_back(bits_in_sf); end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_enable = 0; nmid = 6'd11; nsub = 8'd3; fifo_ready = 1;
    bits_in_sf = 0; cri_pulses = 0; incs = 0; bad_bits = 0; paused_bits = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (cri_pulses != 0) begin failures++; $display("FAIL started while disabled"); end
    tx_enable = 1;
    wait (incs == 1);
    tx_enable = 0;            // drop in the middle of the frame
    wait (incs == 3);
    repeat (2000) @(posedge clk);
    checks++;
    if (incs != 3 || cri_pulses != 3) begin failures++; $display("FAIL frame not completed/stopped: %0d %0d", incs, cri_pulses); end
    foreach (sf_bits[k]) begin
      checks++;
      if (sf_bits[k] != 10 * 660) begin failures++; $display("FAIL subframe %0d has %0d bits", k, sf_bits[k]); end
    end
    checks++;
    if (bad_bits != 0) begin failures++; $display("FAIL %0d wrong bits", bad_bits); end
    checks++;
    if (paused_bits != 0) begin failures++; $display("FAIL %0d bits while fifo not ready", paused_bits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
