// Frame-aligned sampling of the software transmit enable.
//
// Software may change tx_enable at any time without knowing where the
// transmitter is in a radio frame. This block counts the subframes loaded
// into the chain (inc_subframe pulses) modulo num_subframes and copies
// tx_enable_in to tx_enable_out only while that count is 0, i.e. at a radio
// frame boundary, so data loading always stops after a whole frame. The
// behaviour follows the description; num_subframes = 0 is treated as 1.
module tx_enable_sampler (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_enable_in,
  input  logic       inc_subframe,
  input  logic [7:0] num_subframes,
  output logic       tx_enable_out,
  output logic [7:0] subframe_idx
);
  always_ff @(posedge clk) begin
    if (rst) begin
      subframe_idx  <= '0;
      tx_enable_out <= 1'b0;
    end else begin
      if (inc_subframe)
        subframe_idx <= (subframe_idx + 8'd1 >= num_subframes) ? 8'd0 : subframe_idx + 8'd1;
      if (subframe_idx == 8'd0 && !inc_subframe)
        tx_enable_out <= tx_enable_in;
    end
  end
endmodule
