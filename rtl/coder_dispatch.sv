// Ping-pong dispatch of coder blocks to two turbo coders, with in-order merge.
//
// Turbo coding of one 6016-bit block takes longer than the block takes to
// arrive, so blocks are sent alternately to coder 0 and coder 1. A block
// begins with first_in; its coding-rate index (cri_in, sampled at the first
// bit) goes with it to the coder and is later pushed (push_cri/cri_out) into
// the CRI queue read by the frame assembler. A coder is busy from the first
// bit of its block until all bits of its codeword (length from the CRI) have
// been taken from it. Outputs are taken strictly in the order the blocks went
// in: only the coder whose turn it is sees tc_out_ready (when the sample
// buffer has room, out_ready), so two codewords never overlap. ready tells
// the data-request FSM that the coder for the next block is free. The
// alternation follows the description; the busy/turn bookkeeping and the
// coder-side handshake are this design's own (the description does not
// detail the mechanism).
module coder_dispatch
  import cbsr_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // block from the CRC stage
  input  logic       bit_in,
  input  logic       valid_in,
  input  logic       first_in,
  input  logic [2:0] cri_in,
  // to / from the two turbo coders
  output logic [1:0] tc_in_bit,
  output logic [1:0] tc_in_valid,
  output logic [1:0] tc_in_first,
  output logic [1:0][2:0] tc_in_cri,
  input  logic [1:0] tc_out_bit,
  input  logic [1:0] tc_out_valid,
  output logic [1:0] tc_out_ready,
  // merged coded stream
  input  logic       out_ready,
  output logic       bit_out,
  output logic       valid_out,
  output logic       ready,
  output logic       push_cri,
  output logic [2:0] cri_out
);
  logic        in_sel;     // coder for the next block
  logic        feed_sel;   // coder receiving the current block
  logic        route;
  logic        out_sel;    // coder whose codeword is output next
  logic [1:0]  busy;
  logic [2:0]  cri_lat [2];
  logic [14:0] out_cnt;
  logic        take;

  assign route    = first_in ? in_sel : feed_sel;
  assign ready    = !busy[in_sel];

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      tc_in_bit[c]   = bit_in;
      tc_in_valid[c] = valid_in && (route == 1'(c));
      tc_in_first[c] = valid_in && first_in && (in_sel == 1'(c));
      tc_in_cri[c]   = (valid_in && first_in && in_sel == 1'(c)) ? cri_in : cri_lat[c];
      tc_out_ready[c] = out_ready && busy[c] && (out_sel == 1'(c));
    end
  end

  assign take      = tc_out_ready[out_sel] && tc_out_valid[out_sel];
  assign bit_out   = tc_out_bit[out_sel];
  assign valid_out = take;
  assign push_cri  = take && (out_cnt == '0);
  assign cri_out   = cri_lat[out_sel];

  always_ff @(posedge clk) begin
    if (rst) begin
      in_sel   <= 1'b0;
      feed_sel <= 1'b0;
      out_sel  <= 1'b0;
      busy     <= '0;
      cri_lat  <= '{default: '0};
      out_cnt  <= '0;
    end else begin
      if (valid_in && first_in) begin
        feed_sel        <= in_sel;
        in_sel          <= !in_sel;
        busy[in_sel]    <= 1'b1;
        cri_lat[in_sel] <= cri_in;
      end
      if (take) begin
        if (32'(out_cnt) == cw_len(cri_lat[out_sel]) - 1) begin
          out_cnt       <= '0;
          busy[out_sel] <= 1'b0;
          out_sel       <= !out_sel;
        end else begin
          out_cnt <= out_cnt + 1'b1;
        end
      end
    end
  end

  a_block_to_free_coder: assert property (@(posedge clk) disable iff (rst)
    (valid_in && first_in) |-> !busy[in_sel]);
endmodule
