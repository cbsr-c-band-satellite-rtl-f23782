// End-to-end testbench of cbsr_tx_top at its default sizes, with two
// behavioural turbo-coder stand-ins and a software data source that answers
// every request after a few cycles. Six scenarios run one after the other:
//   A  coded data from software, 2 subframes per frame, CRI changed between
//      subframes, transmit enable dropped in the middle of loading a frame
//      (the frame must still be completed), roll-off 0.22, F_AMB 544
//   B  coded data from the internal generator, CRI 4, F_AMB 2080, roll-off 0.35
//   C  uncoded repeatable data, CRI 2, F_AMB 1056
//   D  continuous preamble, G_AMB + 2 x T_AMB
//   E  software mode with inject_fake (internal data used)
//   F  internal data, 3 subframes per frame at CRI 3, 5 and 6
// Checks: every 6016-bit block handed to a coder equals the scrambled words
// (software words or the reference PN words) plus the CRC computed here by
// long division; every output sample equals a reference RRC filter applied
// to the frame that should be sent (reference preamble tables, Zadoff-Chu
// midambles, OQPSK samples of the codewords), including the EOT midamble;
// the number of subframes loaded and transmitted, and its register copy.
// All configuration is written over the AXI4-Lite port. Each mechanism (both
// coders, coder backpressure, frame-aligned stop, EOT, every mode, both
// roll-offs) is counted and must have happened at least once.
module tb_cbsr_tx_top;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [31:0] input_words;
  logic words_valid, tx_load_req, tx_enable, alpha_sel, inject_fake;
  logic [2:0] cri_sel;
  logic [1:0] tx_mode, flen_sel;
  logic [7:0] num_subframes;
  logic [1:0] tc_in_bit, tc_in_valid, tc_in_first, tc_out_bit, tc_out_valid, tc_out_ready, tc_busy;
  logic [1:0][2:0] tc_in_cri;
  logic signed [15:0] tx_out_i, tx_out_q;
  logic valid_out, eot;
  logic [31:0] subframe_count;

  // AXI4-Lite master side
  logic [15:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [1:0] bresp, rresp;

  cbsr_tx_top dut (.clk, .rst, .input_words, .words_valid, .tx_load_req,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready), .s_axi_wdata(wdata),
    .s_axi_wvalid(wvalid), .s_axi_wready(wready), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready), .tc_in_bit, .tc_in_valid, .tc_in_first,
    .tc_in_cri, .tc_out_bit, .tc_out_valid, .tc_out_ready, .tx_out_i, .tx_out_q, .valid_out,
    .subframe_count, .eot);

  localparam int BLK = 6016;
  for (genvar c = 0; c < 2; c++) begin : g_tc
    turbo_coder_model #(.BLOCK(BLK), .LATENCY(100 + 50 * c)) u_tc (.clk, .in_bit(tc_in_bit[c]),
      .in_valid(tc_in_valid[c]), .in_first(tc_in_first[c]), .in_cri(tc_in_cri[c]), .out_bit(tc_out_bit[c]),
      .out_valid(tc_out_valid[c]), .out_ready(tc_out_ready[c]), .busy(tc_busy[c]));
  end

  // ------------------------------------------------------------ references
  bit pn_ref [$];            // x^20+x^17+1 from state 1
  function automatic void pn_seq(input int seed, input int n, ref bit out [$]);
    bit r [20];
    out.delete();
    for (int k = 0; k < 20; k++) r[k] = seed[k];
    for (int i = 0; i < n; i++) begin
      bit fb;
      out.push_back(r[19]);
      fb = r[19] ^ r[16];
      for (int k = 19; k > 0; k--) r[k] = r[k-1];
      r[0] = fb;
    end
  endfunction

  bit gen [33];
  function automatic void add_crc(ref bit msg [$]);
    bit w [$];
    int n;
    n = msg.size();
    w = msg;
    for (int k = 0; k < 32; k++) w.push_back(0);
    for (int k = 0; k < n; k++)
      if (w[k]) for (int j = 0; j <= 32; j++) w[k + j] ^= gen[32 - j];
    for (int j = 0; j < 32; j++) msg.push_back(w[n + j]);
  endfunction

  int pre_i [768], pre_q [768], famb_i [2080], famb_q [2080];
  function automatic void pn_table(input int seed, input int n, output int ti [], output int tq []);
    bit b [$];
    pn_seq(seed, n, b);
    ti = new[n]; tq = new[n];
    for (int k = 0; k < n; k++) begin
      ti[k] = (k % 2 == 0) ? (b[k] ? -16384 : 16384) : 0;
      tq[k] = (k % 2 == 1) ? (b[k] ? -16384 : 16384) : 0;
    end
  endfunction

  function automatic void zc(input int cri, input int e, output real ri, output real rq);
    int n;
    real ph;
    n = (e / 2 + 10 * cri) % 83;
    ph = 3.141592653589793 * real'(n * (n + 1)) / 83.0;
    ri = (e % 2 == 0) ? $floor(16384.0 * $cos(ph) + 0.5) : 0.0;
    rq = (e % 2 == 0) ? $floor(-16384.0 * $sin(ph) + 0.5) : 0.0;
  endfunction

  real taps [2][17];         // [alpha_sel]
  function automatic real hrrc(input real t, input real b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / 3.141592653589793;
    return ($sin(3.141592653589793 * t * (1.0 - b)) + 4.0 * b * t * $cos(3.141592653589793 * t * (1.0 + b))) /
           (3.141592653589793 * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  // ------------------------------------------------------------ software source
  bit   sw_en;
  logic [31:0] sw_words [$];       // words delivered, in order
  logic [3:0]  req_pipe;
  always @(posedge clk) begin
    req_pipe <= rst ? '0 : {req_pipe[2:0], tx_load_req};
    words_valid <= 0;
    if (!rst && req_pipe[2]) begin
      words_valid <= 1;
      input_words <= $urandom;
    end
  end
  always @(posedge clk) if (!rst && words_valid && dut.word_valid && !dut.force_internal) sw_words.push_back(input_words);

  // ------------------------------------------------------------ coder-input monitor
  typedef struct { int cri; bit bits [$]; } sf_t;
  sf_t sf_q [$];             // subframes in the order they will be sent
  bit  cur_blk [$];
  int  cur_cri, cur_coder;
  int  blocks_sw, blocks_gen, blocks_total, coder_use [2], bp_events, blk_bad;
  bit  expect_internal;
  int  gen_word_idx;
  bit  pn_words_bits [$];

  task automatic finish_block();
    bit exp_bits [$];
    sf_t s;
    // reference: words -> LSB-first bits -> scramble -> CRC
    for (int w = 0; w < 187; w++) begin
      logic [31:0] word;
      if (expect_internal) begin
        for (int b = 0; b < 32; b++) word[b] = pn_words_bits[(w * 32 + b)];
      end else begin
        if (sw_words.size() == 0) begin word = '0; blk_bad++; end
        else word = sw_words.pop_front();
      end
      for (int b = 0; b < 32; b++) exp_bits.push_back(word[b] ^ pn_ref[w * 32 + b]);
    end
    add_crc(exp_bits);
    checks++;
    if (exp_bits != cur_blk) begin failures++; blk_bad++; $display("FAIL block %0d content", blocks_total); end
    if (expect_internal) blocks_gen++; else blocks_sw++;
    blocks_total++;
    s.cri = cur_cri;
    for (int k = 0; k < cw_len(3'(cur_cri)); k++) begin
      int r;
      r = k % (2 * BLK);
      s.bits.push_back((r < BLK) ? cur_blk[r] : !cur_blk[r - BLK]);
    end
    sf_q.push_back(s);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < 2; c++) begin
        if (tc_in_valid[c]) begin
          if (tc_in_first[c]) begin
            cur_blk.delete();
            cur_cri = int'(tc_in_cri[c]);
            cur_coder = c;
            coder_use[c]++;
          end
          cur_blk.push_back(tc_in_bit[c]);
          if (cur_blk.size() == BLK) finish_block();
        end
        if (tc_out_valid[c] && !tc_out_ready[c]) bp_events++;
      end
    end
  end

  // Uncoded subframes: one per CRI entry queued by the repeatable-data source.
  always @(posedge clk) begin
    if (!rst && dut.fake_sample_cri) begin
      sf_t s;
      s.cri = int'(dut.cri_sel);
      for (int k = 0; k < cw_len(dut.cri_sel); k++) s.bits.push_back(pn_ref[k % 660]);
      sf_q.push_back(s);
      uncoded_sf++;
    end
  end

  // ------------------------------------------------------------ expected frame stream
  typedef struct { real i; real q; bit eot; } smp_t;
  smp_t exp_q [$];
  int   nsub_cfg, mode_cfg, sf_in_frame, cont_phase;
  int   uncoded_sf, cont_blocks, eot_seen, eot_expected;

  task automatic push_s(input real i, input real q, input bit e);
    smp_t s;
    s.i = i; s.q = q; s.eot = e;
    exp_q.push_back(s);
  endtask
  task automatic push_subframe(input int cri, input bit bits [$]);
    real zi, zq;
    int n;
    n = int'(n_pcwords(3'(cri)));
    for (int p = 0; p <= n; p++) begin
      for (int e = 0; e < 166; e++) begin zc(cri, e, zi, zq); push_s(zi, zq, 0); end
      if (p < n)
        for (int m = 0; m < 330; m++) begin
          push_s(bits[p * 660 + 2 * m] ? -16384.0 : 16384.0, 0.0, 0);
          push_s(0.0, bits[p * 660 + 2 * m + 1] ? -16384.0 : 16384.0, 0);
        end
    end
  endtask

  // Extend the expected stream by one frame part when it runs dry.
  task automatic refill();
    real zi, zq;
    if (mode_cfg == 3) begin
      if (cont_phase == 0) for (int k = 0; k < 256; k++) push_s(pre_i[k], pre_q[k], 0);
      else for (int k = 256; k < 768; k++) push_s(pre_i[k], pre_q[k], 0);
      cont_phase = (cont_phase + 1) % (nsub_cfg + 1);
      if (cont_phase == 0) cont_blocks++;
      return;
    end
    if (sf_in_frame == 0 && sf_q.size() == 0) begin
      for (int e = 0; e < 166; e++) begin zc(7, e, zi, zq); push_s(zi, zq, 1); end
      eot_expected = 1;
      return;
    end
    if (sf_in_frame == 0) begin
      for (int k = 0; k < 768; k++) push_s(pre_i[k], pre_q[k], 0);
      for (int k = 0; k < famb_len(flen_sel); k++) push_s(famb_i[k], famb_q[k], 0);
    end
    if (sf_q.size() != 0) begin
      sf_t s;
      s = sf_q.pop_front();
      push_subframe(s.cri, s.bits);
      sf_in_frame = (sf_in_frame + 1) % nsub_cfg;
    end
  endtask

  // ------------------------------------------------------------ output checker
  logic stepm;
  real  hist_i [17], hist_q [17];
  int   out_samples, out_bad, alpha_used [2];
  always @(posedge clk) begin
    stepm <= rst ? 1'b0 : !stepm;
  end
  always @(posedge clk) begin
    if (!rst && stepm) begin
      #1;
      for (int k = 16; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
      if (valid_out) begin
        smp_t s;
        real yi, yq;
        if (exp_q.size() == 0) refill();
        if (exp_q.size() == 0) begin out_bad++; s.i = 0; s.q = 0; s.eot = 0; end
        else s = exp_q.pop_front();
        hist_i[0] = s.i; hist_q[0] = s.q;
        yi = 0.0; yq = 0.0;
        for (int k = 0; k < 17; k++) begin
          yi += taps[alpha_sel][k] * hist_i[k];
          yq += taps[alpha_sel][k] * hist_q[k];
        end
        yi = yi / 16384.0; yq = yq / 16384.0;
        out_samples++;
        alpha_used[alpha_sel]++;
        if (s.eot) eot_seen++;
        if (yi - real'(tx_out_i) > 3.0 || real'(tx_out_i) - yi > 3.0 ||
            yq - real'(tx_out_q) > 3.0 || real'(tx_out_q) - yq > 3.0) begin
          out_bad++;
          if (out_bad < 5) $display("FAIL output sample %0d: %0d,%0d expected %f,%f", out_samples, tx_out_i, tx_out_q, yi, yq);
        end
      end else begin
        hist_i[0] = 0.0; hist_q[0] = 0.0;
      end
    end
  end

  // ------------------------------------------------------------ register access
  int axi_writes, soft_resets = 0;
  always @(posedge clk) if (!rst && dut.soft_rst) soft_resets++;
  task automatic reg_wr(input int a, input logic [31:0] d);
    @(negedge clk);
    awaddr = 16'(a); wdata = d; awvalid = 1; wvalid = 1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    axi_writes++;
  endtask
  task automatic reg_rd(input int a, output logic [31:0] d);
    @(negedge clk);
    araddr = 16'(a); arvalid = 1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    rready = 1;
    @(negedge clk);
    rready = 0;
  endtask
  task automatic write_config();
    reg_wr('h148, 32'(cri_sel));
    reg_wr('h150, 32'(tx_mode));
    reg_wr('h158, 32'(flen_sel));
    reg_wr('h160, 32'(alpha_sel));
    reg_wr('h168, 32'(num_subframes));
    reg_wr('h100, {30'd0, inject_fake, tx_enable});
  endtask

  // ------------------------------------------------------------ scenarios
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    int quiet;
    quiet = 0;
    while (quiet < 3000) begin
      @(posedge clk);
      if (valid_out || tc_busy != 0 || dut.u_status.state != 0 || dut.u_cont.state != 0) quiet = 0;
      else quiet++;
    end
  endtask

  int cri_seq [$];
  int cri_sent [8];
  always @(posedge clk) if (!rst && dut.pamb_en) cri_sent[dut.mid_cri]++;
  // sample-buffer underruns inside a PCWORD (the assembler had to wait)
  int data_stalls = 0;
  always @(posedge clk) if (!rst && dut.step && dut.ts_state == 3'd5 && !dut.ts_valid) data_stalls++;

  task automatic scenario(input int mode, input int nsub, input int cri, input int flen, input bit alpha,
                         input bit inj, input int stop_after_blocks, input int stop_after_clocks);
    int b0, sf0;
    mode_cfg = mode; nsub_cfg = nsub; sf_in_frame = 0; cont_phase = 0; eot_expected = 0;
    exp_q.delete();
    expect_internal = (mode == 1) || inj;
    @(negedge clk);
    tx_mode = 2'(mode); num_subframes = 8'(nsub); cri_sel = 3'(cri); flen_sel = 2'(flen);
    alpha_sel = alpha; inject_fake = inj;
    write_config();
    b0 = blocks_total; sf0 = int'(subframe_count);
    @(negedge clk);
    tx_enable = 1;
    reg_wr('h100, {30'd0, inject_fake, tx_enable});
    if (stop_after_blocks > 0) begin
      // after each block, the next rate from cri_seq (if any) is written
      for (int k = 1; k < stop_after_blocks; k++) begin
        while (blocks_total - b0 < k) @(negedge clk);
        if (cri_seq.size() != 0) begin
          cri_sel = 3'(cri_seq.pop_front());
          reg_wr('h148, 32'(cri_sel));
        end
      end
      while (blocks_total - b0 < stop_after_blocks) @(negedge clk);
    end else begin
      repeat (stop_after_clocks) @(negedge clk);
    end
    tx_enable = 0;
    reg_wr('h100, {30'd0, inject_fake, tx_enable});
    wait_idle();
    check(exp_q.size() == 0 || mode == 3, $sformatf("scenario %0d: %0d expected samples not sent", mode, exp_q.size()));
    if (mode <= 1) begin
      check((blocks_total - b0) % nsub == 0, $sformatf("scenario %0d: %0d blocks, not whole frames", mode, blocks_total - b0));
      check(int'(subframe_count) - sf0 == blocks_total - b0, "transmitted subframes = loaded blocks");
    end
    if (mode != 3) check(eot_expected != 0 && exp_q.size() == 0, $sformatf("scenario %0d: EOT sent", mode));
    exp_q.delete();
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int exps [12] = '{32, 31, 24, 22, 16, 14, 8, 7, 5, 3, 1, 0};
    int ti [], tq [];
    foreach (gen[k]) gen[k] = 0;
    foreach (exps[k]) gen[exps[k]] = 1;
    pn_seq(1, 8000, pn_ref);
    pn_seq(1, 187 * 32, pn_words_bits);
    pn_table('h5A5A5, 256, ti, tq);
    for (int k = 0; k < 256; k++) begin pre_i[k] = ti[k]; pre_q[k] = tq[k]; end
    pn_table('h0ACE1, 512, ti, tq);
    for (int k = 0; k < 512; k++) begin pre_i[256 + k] = ti[k]; pre_q[256 + k] = tq[k]; end
    pn_table('h31337, 2080, ti, tq);
    for (int k = 0; k < 2080; k++) begin famb_i[k] = ti[k]; famb_q[k] = tq[k]; end
    for (int a = 0; a < 2; a++) begin
      real b, s;
      real v [17];
      b = (a == 1) ? 0.22 : 0.35;
      s = 0.0;
      for (int k = 0; k < 17; k++) begin
        v[k] = hrrc((real'(k) - 8.0) / 2.0, b);
        s += (v[k] < 0.0) ? -v[k] : v[k];
      end
      for (int k = 0; k < 17; k++) taps[a][k] = $floor(v[k] / s * 32767.0 + 0.5);
    end
    foreach (hist_i[k]) begin hist_i[k] = 0.0; hist_q[k] = 0.0; end
    tx_enable = 0; cri_sel = 0; tx_mode = 0; flen_sel = 0; alpha_sel = 1; num_subframes = 2;
    inject_fake = 0; input_words = 0;
    awvalid = 0; wvalid = 0; bready = 1; arvalid = 0; rready = 0; awaddr = 0; araddr = 0; wdata = 0;
    axi_writes = 0;
    blocks_sw = 0; blocks_gen = 0; blocks_total = 0; bp_events = 0; blk_bad = 0;
    coder_use = '{0, 0}; out_samples = 0; out_bad = 0; alpha_used = '{0, 0};
    uncoded_sf = 0; cont_blocks = 0; eot_seen = 0;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (20) @(posedge clk);
    reg_wr('h000, 32'd1);                  // data-path reset by register write
    $display("scenario A: software data, 2 subframes/frame");
    cri_seq = '{1};
    scenario(0, 2, 0, 0, 1'b1, 1'b0, 3, 0);
    $display("scenario B: internal generator");
    scenario(1, 1, 4, 2, 1'b0, 1'b0, 1, 0);
    $display("scenario C: uncoded");
    scenario(2, 1, 2, 1, 1'b1, 1'b0, 0, 40000);
    $display("scenario D: continuous preamble");
    scenario(3, 2, 0, 0, 1'b0, 1'b0, 0, 6000);
    $display("scenario E: software mode with inject_fake");
    scenario(0, 1, 0, 0, 1'b1, 1'b1, 1, 0);
    $display("scenario F: internal data, 3 subframes per frame at CRI 3, 5, 6");
    cri_seq = '{5, 6};
    scenario(1, 3, 3, 0, 1'b1, 1'b0, 3, 0);
    begin
      logic [31:0] d;
      reg_rd('h108, d);
      check(d == subframe_count && d != 0, $sformatf("subframe counter register %0d, output %0d", d, subframe_count));
      reg_rd('h148, d);
      check(d == 32'(cri_sel), "CRI register read back");
    end

    check(out_bad == 0, $sformatf("%0d output samples wrong of %0d", out_bad, out_samples));
    check(blk_bad == 0, "block contents");
    check(blocks_sw >= 4, $sformatf("software blocks %0d", blocks_sw));
    check(blocks_gen >= 2, $sformatf("internal-generator blocks %0d", blocks_gen));
    check(coder_use[0] > 0 && coder_use[1] > 0, "both turbo coders used");
    check(bp_events > 0, "coder output backpressure happened");
    check(eot_seen >= 4 * 166, $sformatf("EOT midamble samples %0d", eot_seen));
    check(uncoded_sf > 0, "uncoded subframes sent");
    check(cont_blocks > 0, "continuous preamble blocks sent");
    check(alpha_used[0] > 0 && alpha_used[1] > 0, "both roll-off settings used");
    for (int c = 0; c < 8; c++)
      check(cri_sent[c] > 0, $sformatf("phase midambles sent with CRI %0d: %0d", c, cri_sent[c]));
    check(soft_resets == 1, $sformatf("register-write resets %0d", soft_resets));
    check(axi_writes > 20, $sformatf("register writes %0d", axi_writes));
    check(data_stalls == 0, $sformatf("sample-buffer underruns inside PCWORDs: %0d", data_stalls));
    $display("blocks sw %0d gen %0d, coders %0d/%0d, backpressure %0d, eot samples %0d, uncoded sf %0d, cont blocks %0d, samples %0d",
             blocks_sw, blocks_gen, coder_use[0], coder_use[1], bp_events, eot_seen, uncoded_sf, cont_blocks, out_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
