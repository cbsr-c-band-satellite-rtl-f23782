// Continuous-preamble FSM (transmission mode 3).
//
// While enabled, sends G_AMB (256 entries) followed by num_repeats copies of
// T_AMB (512 entries each), and starts over. It advances once per sample
// strobe (step). g_amb_en / t_amb_en read the preamble table; loop_t tells
// the table to jump back to the start of T_AMB instead of running into the
// next G_AMB, which is what makes the repeats. A G_AMB + T_AMB^n block is
// always completed: when tx_enable is low at its end, or a falling edge of
// the enable (tx_end) was seen during it, the FSM goes idle. Lengths and
// signal names follow the description; the stop rule and num_repeats = 0
// meaning 1 are this design's choices.
module tx_status_cont_tamb
  import cbsr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       step,
  input  logic       tx_enable,
  input  logic       tx_end,
  input  logic [7:0] num_repeats,
  output tx_sel_e    tx_select,
  output logic       g_amb_en,
  output logic       t_amb_en,
  output logic       loop_t
);
  typedef enum logic [1:0] {S_IDLE = 2'd0, S_G = 2'd1, S_T = 2'd2} state_e;

  state_e     state;
  logic [9:0] cnt;
  logic [7:0] rep_left;   // T_AMB copies left, current included
  logic       stop;

  assign tx_select = (state == S_IDLE) ? SEL_NONE : SEL_PRE;
  assign g_amb_en  = step && (state == S_G);
  assign t_amb_en  = step && (state == S_T);
  assign loop_t    = (state == S_T) && (rep_left > 8'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      rep_left <= '0;
      stop     <= 1'b0;
    end else begin
      if (tx_end && state != S_IDLE) stop <= 1'b1;
      if (step) begin
        case (state)
          S_IDLE: if (tx_enable) begin
            state <= S_G;
            cnt   <= '0;
            stop  <= 1'b0;
          end
          S_G: if (cnt == 10'(G_LEN - 1)) begin
            state    <= S_T;
            cnt      <= '0;
            rep_left <= (num_repeats == 8'd0) ? 8'd1 : num_repeats;
          end else cnt <= cnt + 10'd1;
          S_T: if (cnt == 10'(T_LEN - 1)) begin
            cnt <= '0;
            if (rep_left > 8'd1) rep_left <= rep_left - 8'd1;
            else if (tx_enable && !stop && !tx_end) state <= S_G;
            else begin
              state <= S_IDLE;
              stop  <= 1'b0;
            end
          end else cnt <= cnt + 10'd1;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
