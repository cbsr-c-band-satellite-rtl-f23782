// Radio-frame assembly FSM ("TX status").
//
// Advances once per sample strobe (step, every 2nd clock) and decides which
// part of the radio frame is sent:
//   G_AMB+T_AMB (768 entries) -> F_AMB (544/1056/2080) -> subframe x N,
// where a subframe is  P_AMB, then n times (PCWORD of 660 samples, P_AMB),
// with n set by the subframe's coding-rate index (CRI). The CRI is popped
// from the CRI queue (pop_cri) when a subframe begins and selects the
// midamble shift (mid_cri). A radio frame is begun only when a subframe is
// queued (data_available); if the next subframe of a frame is not queued yet
// the FSM waits, and inside a PCWORD it waits while the sample buffer is
// empty; while waiting no sample is produced (out_valid low). After a
// falling edge of the software enable (tx_end) the last frame is completed
// and, once nothing is queued, an end-of-transmission midamble (P_AMB with
// CRI 7, eot_flag_out high) is sent before going idle.
// Frame layout, lengths and output names follow the description; the wait
// states and the EOT content are this design's choices.
module tx_status
  import cbsr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        step,
  input  logic        tx_enable,
  input  logic        tx_end,
  input  logic        data_available,
  input  logic        sample_available,
  input  logic [11:0] freq_midamble_len,
  input  logic [2:0]  cri,
  input  logic [7:0]  num_subframes,
  output tx_sel_e     tx_select,
  output logic        out_valid,
  output logic        preamble_en,
  output logic        data_en,
  output logic        freq_midamble_en,
  output logic        phase_midamble_en,
  output logic        pop_cri,
  output logic        inc_subframe_cnt,
  output logic        eot_flag_out,
  output logic [2:0]  mid_cri,
  output logic [2:0]  ostate
);
  typedef enum logic [2:0] {
    S_IDLE = 3'd0, S_PRE = 3'd1, S_FAMB = 3'd2, S_SFWAIT = 3'd3,
    S_PAMB = 3'd4, S_DATA = 3'd5, S_EOT = 3'd6
  } state_e;

  state_e      state;
  logic [11:0] cnt;
  logic [5:0]  pc_left;     // PCWORDs left in the subframe
  logic [7:0]  sf_left;     // subframes left in the frame, current included
  logic [2:0]  cur_cri;
  logic        eot_pending;
  logic        sent;        // a frame went out since the last EOT
  logic        adv;         // this step produces a sample
  logic        part_end;
  logic        sf_start;    // a subframe begins at this step

  assign ostate = state;
  assign mid_cri = (state == S_EOT) ? CRI_EOT : cur_cri;

  always_comb begin
    tx_select = SEL_NONE;
    adv       = 1'b0;
    case (state)
      S_PRE:  begin tx_select = SEL_PRE;  adv = step; end
      S_FAMB: begin tx_select = SEL_FAMB; adv = step; end
      S_PAMB, S_EOT: begin tx_select = SEL_PAMB; adv = step; end
      S_DATA: begin tx_select = SEL_DATA; adv = step && sample_available; end
      default: ;
    endcase
  end

  always_comb begin
    case (state)
      S_PRE:         part_end = (cnt == 12'(PRE_LEN - 1));
      S_FAMB:        part_end = (cnt == freq_midamble_len - 12'd1);
      S_PAMB, S_EOT: part_end = (cnt == 12'(P_LEN - 1));
      S_DATA:        part_end = (cnt == 12'(PCWORD_LEN - 1));
      default:       part_end = 1'b0;
    endcase
  end

  assign out_valid         = adv;
  assign preamble_en       = adv && (state == S_PRE);
  assign freq_midamble_en  = adv && (state == S_FAMB);
  assign phase_midamble_en = adv && (state == S_PAMB || state == S_EOT);
  assign data_en           = adv && (state == S_DATA);
  assign eot_flag_out      = (state == S_EOT);
  assign inc_subframe_cnt  = adv && (state == S_PAMB) && part_end && (pc_left == '0);
  // A subframe starts after F_AMB, or from the wait state, when one is queued.
  assign sf_start = data_available &&
                    ((state == S_SFWAIT && step) || (adv && state == S_FAMB && part_end) ||
                     (inc_subframe_cnt && sf_left > 8'd1));
  assign pop_cri  = sf_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      cnt         <= '0;
      pc_left     <= '0;
      sf_left     <= '0;
      cur_cri     <= '0;
      eot_pending <= 1'b0;
      sent        <= 1'b0;
    end else begin
      if (tx_end) eot_pending <= 1'b1;
      if (adv) cnt <= part_end ? 12'd0 : cnt + 12'd1;
      if (sf_start) begin
        cur_cri <= cri;
        pc_left <= n_pcwords(cri);
      end
      case (state)
        S_IDLE: if (step) begin
          if (data_available) begin
            state   <= S_PRE;
            cnt     <= '0;
            sf_left <= (num_subframes == 8'd0) ? 8'd1 : num_subframes;
            sent    <= 1'b1;
          end else if (eot_pending && sent && !tx_enable) begin
            state <= S_EOT;
            cnt   <= '0;
          end
        end
        S_PRE:  if (adv && part_end) state <= S_FAMB;
        S_FAMB: if (adv && part_end) state <= sf_start ? S_PAMB : S_SFWAIT;
        S_SFWAIT: if (sf_start) state <= S_PAMB;
        S_PAMB: if (adv && part_end) begin
          if (pc_left != '0) begin
            state   <= S_DATA;
            pc_left <= pc_left - 6'd1;
          end else if (sf_left > 8'd1) begin
            sf_left <= sf_left - 8'd1;
            state   <= sf_start ? S_PAMB : S_SFWAIT;
          end else begin
            state <= S_IDLE;
          end
        end
        S_DATA: if (adv && part_end) state <= S_PAMB;
        S_EOT:  if (adv && part_end) begin
          state       <= S_IDLE;
          eot_pending <= 1'b0;
          sent        <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
