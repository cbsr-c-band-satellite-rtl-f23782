// Data-request FSM: fetches the 187 32-bit words of one subframe.
//
// In IDLE the FSM waits until transmission is enabled (tx_enable as sampled
// at a radio-frame boundary), coded mode is selected, the coding chain can
// take a new block (frame_processing_ready) and the symbol buffer has room
// (fifo_ready). It then pulses sh_enable, latches the data source for the
// whole subframe (force_internal_data: internal generator instead of
// software) and moves to REQUEST. There tx_load_req is raised for exactly
// WORDS cycles (one request per word; a source may answer with latency) and
// the FSM waits for WORDS valid words, then pulses words_done and returns to
// IDLE. The request/word counting and the latched source follow the
// description; the exact state set is this design's own.
module request_data #(
  parameter int unsigned WORDS = 187
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       data_valid,
  input  logic       frame_processing_ready,
  input  logic       fifo_ready,
  input  logic       coded_en,
  input  logic       inject_fake_check,
  input  logic       tx_enable,
  output logic       tx_load_req,
  output logic       sh_enable,
  output logic       force_internal_data,
  output logic       words_done,
  output logic [1:0] ostate
);
  typedef enum logic [1:0] {S_IDLE = 2'd0, S_REQUEST = 2'd1} state_e;
  localparam int unsigned CW = $clog2(WORDS + 1);

  state_e        state;
  logic [CW-1:0] req_cnt, val_cnt;
  logic          start;

  assign start       = (state == S_IDLE) && tx_enable && coded_en &&
                       frame_processing_ready && fifo_ready;
  assign sh_enable   = start;
  assign tx_load_req = (state == S_REQUEST) && (req_cnt != CW'(WORDS));
  assign words_done  = (state == S_REQUEST) && data_valid && (val_cnt == CW'(WORDS - 1));
  assign ostate      = state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state               <= S_IDLE;
      req_cnt             <= '0;
      val_cnt             <= '0;
      force_internal_data <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state               <= S_REQUEST;
          force_internal_data <= inject_fake_check;
          req_cnt             <= '0;
          val_cnt             <= '0;
        end
        default: begin
          if (tx_load_req) req_cnt <= req_cnt + 1'b1;
          if (data_valid)  val_cnt <= val_cnt + 1'b1;
          if (words_done)  state   <= S_IDLE;
        end
      endcase
    end
  end
endmodule
