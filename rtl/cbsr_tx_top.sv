// CBSR C-band satellite transmitter core (programmable-logic part).
//
// Turns 32-bit data words into a shaped OQPSK baseband signal organised in
// radio frames. Data path, all in one clock domain (clk = the transceiver
// clock):
//   words (software or internal PN generator, 187 per subframe)
//   -> word buffer + unpacker (1 bit/clock) -> scrambler -> CRC-32 append
//   -> ping-pong dispatch to two external turbo coders -> in-order merge
//   -> OQPSK mapper (2 samples/symbol) -> sample buffer
//   -> frame assembler (preamble, F_AMB, midambles, PCWORDs, EOT)
//   -> RRC filter -> 16-bit I/Q, each sample held 2 clocks.
// The uncoded mode replaces everything before the OQPSK mapper by a
// repeatable test-bit source; the continuous-preamble mode replaces the
// frame assembler by a G_AMB + n x T_AMB loop. tx_mode: 0 coded data from
// software, 1 coded data from the internal generator, 2 uncoded internal
// data, 3 continuous preamble (this numbering is this design's choice).
// Software requests: tx_load_req asks for one word; the word may arrive with
// any latency and is taken when words_valid is high. Turbo coders: each gets
// a 6016-bit block (tc_in_*; tc_in_first marks the first bit, tc_in_cri its
// rate) and must return the codeword bit by bit (tc_out_bit/tc_out_valid),
// holding a bit while tc_out_ready is low. The turbo coders themselves are
// outside this core. Configuration (tx_enable, cri_sel, tx_mode, flen_sel,
// alpha_sel, num_subframes, inject_fake) is written by the processor over
// the AXI4-Lite port into axi_regs, which also reads back the number of
// transmitted subframes; its two test registers are stored and read back
// only, so their outputs stay unused here. Reset is synchronous, active
// high: the rst input resets everything, a write of 1 to register 0x000
// resets the data path only. Buffer depths are this design's choices.
module cbsr_tx_top
  import cbsr_pkg::*;
#(
  parameter int unsigned WORD_FIFO_DEPTH = 256,
  parameter int unsigned SYM_FIFO_DEPTH  = 4096,
  parameter int unsigned CRI_FIFO_DEPTH  = 4
) (
  input  logic              clk,
  input  logic              rst,
  // data from software (DMA)
  input  logic [31:0]       input_words,
  input  logic              words_valid,
  output logic              tx_load_req,
  // AXI4-Lite control/status bus (see axi_regs for the register map)
  input  logic [15:0]       s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [15:0]       s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // two external turbo coders
  output logic [1:0]        tc_in_bit,
  output logic [1:0]        tc_in_valid,
  output logic [1:0]        tc_in_first,
  output logic [1:0][2:0]   tc_in_cri,
  input  logic [1:0]        tc_out_bit,
  input  logic [1:0]        tc_out_valid,
  output logic [1:0]        tc_out_ready,
  // DAC samples and status
  output logic signed [15:0] tx_out_i,
  output logic signed [15:0] tx_out_q,
  output logic              valid_out,
  output logic [31:0]       subframe_count,
  output logic              eot
);
  localparam int unsigned SAW = $clog2(SYM_FIFO_DEPTH);
  localparam int unsigned CAW = $clog2(CRI_FIFO_DEPTH);

  // ------------------------------------------------------------ registers
  logic        soft_rst, core_rst;
  logic        tx_enable, inject_fake, alpha_sel;
  logic [2:0]  cri_sel;
  logic [1:0]  tx_mode, flen_sel;
  logic [7:0]  num_subframes;
  logic [31:0] test_bit_mask, test_fixed_point;

  axi_regs #(.ADDR_W(16)) u_regs (
    .clk, .rst,
    .s_awaddr(s_axi_awaddr), .s_awvalid(s_axi_awvalid), .s_awready(s_axi_awready),
    .s_wdata(s_axi_wdata), .s_wvalid(s_axi_wvalid), .s_wready(s_axi_wready),
    .s_bresp(s_axi_bresp), .s_bvalid(s_axi_bvalid), .s_bready(s_axi_bready),
    .s_araddr(s_axi_araddr), .s_arvalid(s_axi_arvalid), .s_arready(s_axi_arready),
    .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp), .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .soft_rst, .tx_enable, .inject_fake, .cri_sel, .tx_mode, .flen_sel, .alpha_sel, .num_subframes,
    .test_bit_mask, .test_fixed_point, .subframe_count
  );
  // The data path is reset by the reset input or by a register write.
  assign core_rst = rst || soft_rst;

  // ------------------------------------------------------------ control
  logic step;          // sample strobe: every 2nd clock
  logic tx_en_d, tx_end;
  logic coded_mode, uncoded_mode, cont_mode;

  always_ff @(posedge clk) begin
    if (core_rst) begin
      step    <= 1'b0;
      tx_en_d <= 1'b0;
    end else begin
      step    <= !step;
      tx_en_d <= tx_enable;
    end
  end
  assign tx_end       = tx_en_d && !tx_enable;
  assign coded_mode   = (tx_mode == MODE_CODED_SW) || (tx_mode == MODE_CODED_GEN);
  assign uncoded_mode = (tx_mode == MODE_UNCODED);
  assign cont_mode    = (tx_mode == MODE_CONT_PRE);

  // ------------------------------------------------------------ loading
  logic        en_frame;           // tx_enable sampled at frame boundaries
  logic [7:0]  load_sf_idx;
  logic        words_done, sh_enable, force_internal, req;
  logic [1:0]  rd_state;
  logic        gen_valid;
  logic [31:0] gen_data;
  logic        src_valid, word_valid;
  logic [31:0] word;
  logic        frame_processing_ready, fifo_ready;
  logic        unpack_busy, crc_busy, crc_busy_d, chain_busy, disp_ready;
  logic        fake_inc, fake_en, fake_bit, fake_sample_cri;

  tx_enable_sampler u_en_sampler (
    .clk, .rst(core_rst), .tx_enable_in(tx_enable), .inc_subframe(words_done || fake_inc),
    .num_subframes, .tx_enable_out(en_frame), .subframe_idx(load_sf_idx)
  );

  assign src_valid              = force_internal ? gen_valid : words_valid;
  assign frame_processing_ready = disp_ready && !chain_busy && !unpack_busy && !crc_busy;

  request_data #(.WORDS(WORDS_PER_SUBFRAME)) u_request (
    .clk, .rst(core_rst), .data_valid(src_valid), .frame_processing_ready, .fifo_ready,
    .coded_en(coded_mode), .inject_fake_check(inject_fake || tx_mode == MODE_CODED_GEN),
    .tx_enable(en_frame), .tx_load_req(req), .sh_enable,
    .force_internal_data(force_internal), .words_done, .ostate(rd_state)
  );
  assign tx_load_req = req && !force_internal;

  internal_data_gen u_gen (
    .clk, .rst(core_rst), .request_in(req && force_internal), .data_out(gen_data), .valid_out(gen_valid)
  );

  assign word       = force_internal ? gen_data : input_words;
  assign word_valid = (rd_state == 2'd1) && src_valid;

  // words_done -> CRC finished: no new subframe may be requested
  always_ff @(posedge clk) begin
    if (core_rst) begin
      chain_busy <= 1'b0;
      crc_busy_d <= 1'b0;
    end else begin
      crc_busy_d <= crc_busy;
      if (words_done)                  chain_busy <= 1'b1;
      else if (crc_busy_d && !crc_busy) chain_busy <= 1'b0;
    end
  end

  // ------------------------------------------------------------ bit chain
  logic ub_bit, ub_valid, sc_bit, sc_valid, crc_bit, crc_valid, crc_first;
  logic cod_bit, cod_valid, disp_push_cri;
  logic [2:0] disp_cri;

  word_unpacker #(.DEPTH(WORD_FIFO_DEPTH), .WORDS(WORDS_PER_SUBFRAME)) u_unpack (
    .clk, .rst(core_rst), .word_in(word), .word_valid, .data_start(words_done),
    .bit_out(ub_bit), .bit_valid(ub_valid), .busy(unpack_busy)
  );

  scrambler u_scr (
    .clk, .rst(core_rst), .bit_in(ub_bit), .valid_in(ub_valid), .bit_out(sc_bit), .valid_out(sc_valid)
  );

  crc_append u_crc (
    .clk, .rst(core_rst), .bit_in(sc_bit), .valid_in(sc_valid), .bit_out(crc_bit),
    .valid_out(crc_valid), .first_out(crc_first), .busy(crc_busy)
  );

  coder_dispatch u_disp (
    .clk, .rst(core_rst), .bit_in(crc_bit), .valid_in(crc_valid), .first_in(crc_first), .cri_in(cri_sel),
    .tc_in_bit, .tc_in_valid, .tc_in_first, .tc_in_cri, .tc_out_bit, .tc_out_valid, .tc_out_ready,
    .out_ready(fifo_ready), .bit_out(cod_bit), .valid_out(cod_valid), .ready(disp_ready),
    .push_cri(disp_push_cri), .cri_out(disp_cri)
  );

  fake_data_ctrl u_fake (
    .clk, .rst(core_rst), .tx_enable(en_frame && uncoded_mode),
    .num_phase_midamble(n_pcwords(cri_sel) + 6'd1), .num_subframes, .fifo_ready,
    .inc_subframe_cnt(fake_inc), .data_en(fake_en), .data_bit(fake_bit), .sample_cri(fake_sample_cri)
  );

  // ------------------------------------------------------------ OQPSK + buffers
  logic [3:0]   mod_sample, sym_head;
  logic         mod_valid, sym_empty, sym_full, sym_pop;
  logic [SAW:0] sym_count;
  logic [2:0]   cri_head;
  logic         cri_empty, cri_full, cri_pop;
  logic [CAW:0] cri_count;

  oqpsk_mod u_oqpsk (
    .clk, .rst(core_rst), .clr(1'b0),
    .bit_in(uncoded_mode ? fake_bit : cod_bit), .valid_in(uncoded_mode ? fake_en : cod_valid),
    .sample_out(mod_sample), .valid_out(mod_valid)
  );

  sync_fifo #(.WIDTH(4), .DEPTH(SYM_FIFO_DEPTH)) u_sym_fifo (
    .clk, .rst(core_rst), .push(mod_valid), .din(mod_sample), .pop(sym_pop),
    .dout(sym_head), .empty(sym_empty), .full(sym_full), .count(sym_count)
  );
  assign fifo_ready = (sym_count <= (SAW+1)'(SYM_FIFO_DEPTH - 8));

  sync_fifo #(.WIDTH(3), .DEPTH(CRI_FIFO_DEPTH)) u_cri_fifo (
    .clk, .rst(core_rst), .push(disp_push_cri || fake_sample_cri),
    .din(disp_push_cri ? disp_cri : cri_sel), .pop(cri_pop),
    .dout(cri_head), .empty(cri_empty), .full(cri_full), .count(cri_count)
  );

  // ------------------------------------------------------------ frame assembly
  tx_sel_e    ts_sel, ct_sel, sel;
  logic       ts_valid, pre_en, famb_en, pamb_en, ts_inc, g_en, t_en, loop_t;
  logic [2:0] mid_cri, ts_state;
  iq16_t      pre_s, famb_s, pamb_s, data_s, frame_s;
  logic       frame_valid, gen_clr;

  tx_status u_status (
    .clk, .rst(core_rst), .step, .tx_enable, .tx_end, .data_available(!cri_empty && !cont_mode),
    .sample_available(!sym_empty), .freq_midamble_len(famb_len(flen_sel)), .cri(cri_head),
    .num_subframes, .tx_select(ts_sel), .out_valid(ts_valid), .preamble_en(pre_en),
    .data_en(sym_pop), .freq_midamble_en(famb_en), .phase_midamble_en(pamb_en),
    .pop_cri(cri_pop), .inc_subframe_cnt(ts_inc), .eot_flag_out(eot), .mid_cri, .ostate(ts_state)
  );

  tx_status_cont_tamb u_cont (
    .clk, .rst(core_rst), .step, .tx_enable(tx_enable && cont_mode), .tx_end, .num_repeats(num_subframes),
    .tx_select(ct_sel), .g_amb_en(g_en), .t_amb_en(t_en), .loop_t
  );

  assign gen_clr = (ts_state == 3'd0) && (ct_sel == SEL_NONE);

  preamble_gen u_pre (.clk, .rst(core_rst), .en(pre_en || g_en || t_en), .clr(gen_clr), .loop_t, .sample(pre_s));
  famb_gen     u_famb (.clk, .rst(core_rst), .en(famb_en), .clr(gen_clr), .len(famb_len(flen_sel)), .sample(famb_s));
  pamb_gen     u_pamb (.clk, .rst(core_rst), .en(pamb_en), .clr(gen_clr), .cri(mid_cri), .sample(pamb_s));

  // OQPSK sample (-1/0/+1 per branch) to the common amplitude
  assign data_s.i = 16'(signed'(sym_head[3:2])) * 16'sd16384;
  assign data_s.q = 16'(signed'(sym_head[1:0])) * 16'sd16384;

  assign sel         = (ct_sel != SEL_NONE) ? ct_sel : ts_sel;
  assign frame_valid = (ct_sel != SEL_NONE) ? (g_en || t_en) : ts_valid;

  always_comb begin
    case (sel)
      SEL_PRE:  frame_s = pre_s;
      SEL_FAMB: frame_s = famb_s;
      SEL_PAMB: frame_s = pamb_s;
      SEL_DATA: frame_s = data_s;
      default:  frame_s = '0;
    endcase
  end

  rrc_shaper u_rrc (
    .clk, .rst(core_rst), .in_step(step), .in_valid(frame_valid), .in_sample(frame_s), .alpha_sel,
    .out_i(tx_out_i), .out_q(tx_out_q), .out_valid(valid_out)
  );

  always_ff @(posedge clk) begin
    if (core_rst)         subframe_count <= '0;
    else if (ts_inc) subframe_count <= subframe_count + 32'd1;
  end

  a_no_sym_overflow: assert property (@(posedge clk) disable iff (core_rst) !(mod_valid && sym_full));
  a_no_cri_overflow: assert property (@(posedge clk) disable iff (core_rst)
    !((disp_push_cri || fake_sample_cri) && cri_full));
endmodule
