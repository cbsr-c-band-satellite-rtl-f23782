// Testbench for tx_status: two radio frames of 2 subframes each (CRIs 0, 5,
// 2, 1), the last subframe queued late so the FSM must wait for it, random
// gaps in the sample buffer inside PCWORDs, then transmission disabled. The
// produced sample sequence (frame part and midamble CRI per sample) must be
// PRE(768) FAMB(544) {PAMB (DATA(660) PAMB) x n} per subframe, frame after
// frame, ending with one EOT midamble (CRI 7); subframe counts and CRI pops
// must match.
module tb_tx_status;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic step, tx_enable, tx_end, sample_available;
  logic [2:0] q_cri [$];
  tx_sel_e sel;
  logic out_valid, pre_en, data_en, famb_en, pamb_en, pop_cri, inc, eot;
  logic [2:0] mid_cri, ostate;

  tx_status dut (.clk, .rst, .step, .tx_enable, .tx_end, .data_available(q_cri.size() != 0),
    .sample_available, .freq_midamble_len(12'd544), .cri(q_cri.size() != 0 ? q_cri[0] : 3'd0),
    .num_subframes(8'd2), .tx_select(sel), .out_valid, .preamble_en(pre_en), .data_en,
    .freq_midamble_en(famb_en), .phase_midamble_en(pamb_en), .pop_cri, .inc_subframe_cnt(inc),
    .eot_flag_out(eot), .mid_cri, .ostate);

  typedef struct { tx_sel_e s; logic [2:0] c; } item_t;
  item_t exp_q [$];
  int nsamp, bad, stalls, incs, pops;

  task automatic add(input tx_sel_e s, input int n, input logic [2:0] c);
    item_t it;
    it.s = s; it.c = c;
    repeat (n) exp_q.push_back(it);
  endtask
  task automatic add_sf(input logic [2:0] c);
    add(SEL_PAMB, P_LEN, c);
    for (int k = 0; k < n_pcwords(c); k++) begin
      add(SEL_DATA, PCWORD_LEN, c);
      add(SEL_PAMB, P_LEN, c);
    end
  endtask

  always @(posedge clk) begin
    if (rst) step <= 0; else step <= !step;
    sample_available <= ($urandom_range(0, 9) != 0);
    if (!rst) begin
      if (out_valid) begin
        if (nsamp < exp_q.size()) begin
          if (sel != exp_q[nsamp].s) bad++;
          else if (sel == SEL_PAMB && mid_cri != exp_q[nsamp].c) bad++;
          if (bad == 1 && (sel != exp_q[nsamp].s || (sel == SEL_PAMB && mid_cri != exp_q[nsamp].c))) $display("first mismatch at sample %0d: %0d/%0d", nsamp, sel, mid_cri);
        end
        nsamp++;
      end
      if (step && sel == SEL_DATA && !sample_available) stalls++;
      if (data_en != (out_valid && sel == SEL_DATA)) bad++;
      if (inc) incs++;
      if (pop_cri) begin pops++; void'(q_cri.pop_front()); end
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
    tx_enable = 1; tx_end = 0; nsamp = 0; bad = 0; stalls = 0; incs = 0; pops = 0;
    add(SEL_PRE, PRE_LEN, 0); add(SEL_FAMB, 544, 0); add_sf(3'd0); add_sf(3'd5);
    add(SEL_PRE, PRE_LEN, 0); add(SEL_FAMB, 544, 0); add_sf(3'd2); add_sf(3'd1);
    add(SEL_PAMB, P_LEN, CRI_EOT);
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nsamp != 0) begin failures++; $display("FAIL output with empty queue"); end
    q_cri.push_back(3'd0); q_cri.push_back(3'd5); q_cri.push_back(3'd2);
    // queue the last subframe only after the second frame has begun its wait
    wait (pops == 3);
    wait (ostate == 3'd3);     // waiting for the second subframe of frame 2
    repeat (500) @(posedge clk);
    checks++;
    if (ostate != 3'd3 || out_valid) begin failures++; $display("FAIL did not hold in the wait state"); end
    q_cri.push_back(3'd1);
    @(negedge clk); tx_enable = 0; tx_end = 1; @(negedge clk); tx_end = 0;
    wait (nsamp == exp_q.size());
    repeat (200) @(posedge clk);
    checks++;
    if (nsamp != exp_q.size()) begin failures++; $display("FAIL %0d samples, expected %0d", nsamp, exp_q.size()); end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d wrong samples", bad); end
    checks++;
    if (incs != 4 || pops != 4) begin failures++; $display("FAIL incs %0d pops %0d", incs, pops); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no buffer stall exercised"); end
    checks++;
    if (ostate != 3'd0 || eot) begin failures++; $display("FAIL not idle at end"); end
    $display("samples %0d stalls %0d", nsamp, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
