// Testbench for tx_status_cont_tamb (3 repeats): per block the FSM must send
// 256 G_AMB reads, then 3 x 512 T_AMB reads with loop_t high in all but the
// last copy, repeat while enabled, and finish the current block and stop
// when disabled in its middle.
module tb_tx_status_cont_tamb;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic step, tx_enable, tx_end, g_en, t_en, loop_t;
  tx_sel_e sel;
  tx_status_cont_tamb dut (.clk, .rst, .step, .tx_enable, .tx_end, .num_repeats(8'd3),
    .tx_select(sel), .g_amb_en(g_en), .t_amb_en(t_en), .loop_t);

  // run-length record of (G or T, loop_t at the last read of the run)
  int runs_len [$];
  bit runs_t [$];
  bit runs_loop [$];
  int cur_len; bit cur_t; bit last_loop; bit in_run;

  always @(posedge clk) begin
    if (rst) step <= 0; else step <= !step;
    if (!rst && (g_en || t_en)) begin
      checks++;
      if (sel != SEL_PRE) begin failures++; $display("FAIL tx_select"); end
      if (in_run && cur_t == t_en && !(t_en && cur_len == 512)) cur_len++;
      else begin
        if (in_run) begin runs_len.push_back(cur_len); runs_t.push_back(cur_t); runs_loop.push_back(last_loop); end
        in_run = 1; cur_len = 1; cur_t = t_en;
      end
      last_loop = loop_t;
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
    tx_enable = 0; tx_end = 0; in_run = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (g_en || t_en) begin failures++; $display("FAIL active while disabled"); end
    @(negedge clk); tx_enable = 1;
    // one full block (256 + 1536 reads = 3584 clocks) plus part of the next
    repeat (3584 + 1000) @(negedge clk);
    tx_enable = 0; tx_end = 1; @(negedge clk); tx_end = 0;
    repeat (8000) @(negedge clk);
    if (in_run) begin runs_len.push_back(cur_len); runs_t.push_back(cur_t); runs_loop.push_back(last_loop); end
    checks++;
    if (runs_len.size() != 8) begin failures++; $display("FAIL %0d runs", runs_len.size()); end
    for (int r = 0; r < runs_len.size() && r < 8; r++) begin
      bit et; int el; bit eloop;
      et = (r % 4) != 0;
      el = et ? 512 : 256;
      eloop = (r % 4 == 1) || (r % 4 == 2);
      checks++;
      if (runs_t[r] != et || runs_len[r] != el || (et && runs_loop[r] != eloop)) begin
        failures++; $display("FAIL run %0d: t=%0d len=%0d loop=%0d", r, runs_t[r], runs_len[r], runs_loop[r]);
      end
    end
    checks++;
    if (sel != SEL_NONE) begin failures++; $display("FAIL not idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
