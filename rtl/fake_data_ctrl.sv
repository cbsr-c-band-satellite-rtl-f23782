// Uncoded-mode data controller: feeds repeatable test bits instead of coded
// data.
//
// At the start of each subframe it pulses sample_cri (the current CRI is
// queued for the frame assembler, which needs it to place the midambles),
// then emits (num_phase_midamble - 1) PCWORDs of 660 bits each, one bit per
// cycle with data_en, pausing whenever the sample buffer is short of room
// (fifo_ready low). The bits come from a 660-entry lookup table read once per
// PCWORD, so every PCWORD and subframe carries the same bits. At the end of a
// subframe inc_subframe_cnt pulses. tx_enable is looked at only at the start
// of a radio frame (subframe index 0 of num_subframes), so frames are never
// cut short. Ports and role follow the description; the table contents (660
// bits of the x^20+x^17+1 PN sequence from state 1) are this design's choice.
module fake_data_ctrl
  import cbsr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_enable,
  input  logic [5:0] num_phase_midamble,
  input  logic [7:0] num_subframes,
  input  logic       fifo_ready,
  output logic       inc_subframe_cnt,
  output logic       data_en,
  output logic       data_bit,
  output logic       sample_cri
);
  typedef logic [PCWORD_LEN-1:0] lut_t;

  function automatic lut_t make_lut();
    lut_t        t;
    logic [19:0] s;
    s = 20'h00001;
    for (int k = 0; k < PCWORD_LEN; k++) begin
      t[k] = s[19];
      s    = pn_step(s);
    end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic       run;
  logic [9:0] bit_idx;    // position inside the PCWORD
  logic [5:0] pcw_left;   // PCWORDs still to send in this subframe
  logic [7:0] sf_idx;     // subframe index inside the radio frame
  logic       start;
  logic       last_bit;

  assign start            = !run && ((sf_idx != 0) || tx_enable);
  assign sample_cri       = start;
  assign data_en          = run && fifo_ready;
  assign data_bit         = LUT[bit_idx];
  assign last_bit         = data_en && (bit_idx == 10'(PCWORD_LEN - 1)) && (pcw_left == 6'd1);
  assign inc_subframe_cnt = last_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      run      <= 1'b0;
      bit_idx  <= '0;
      pcw_left <= '0;
      sf_idx   <= '0;
    end else begin
      if (start) begin
        run      <= 1'b1;
        bit_idx  <= '0;
        pcw_left <= (num_phase_midamble > 6'd1) ? num_phase_midamble - 6'd1 : 6'd1;
      end else if (data_en) begin
        if (bit_idx == 10'(PCWORD_LEN - 1)) begin
          bit_idx  <= '0;
          pcw_left <= pcw_left - 1'b1;
          if (pcw_left == 6'd1) begin
            run    <= 1'b0;
            sf_idx <= (sf_idx + 8'd1 >= num_subframes) ? 8'd0 : sf_idx + 8'd1;
          end
        end else begin
          bit_idx <= bit_idx + 1'b1;
        end
      end
    end
  end
endmodule
