// Testbench for request_data: a subframe request must start only when all
// start conditions hold, raise tx_load_req for exactly WORDS cycles, latch
// the data source, and pulse words_done on the WORDS-th valid word, also
// when the source answers each request with a delay of several cycles.
module tb_request_data;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  localparam int WORDS = 187;
  logic data_valid, fpr, fifo_ready, coded_en, inject, tx_enable;
  logic tx_load_req, sh_enable, force_internal, words_done;
  logic [1:0] ostate;
  int latency;
  logic [15:0] req_pipe;

  request_data #(.WORDS(WORDS)) dut (.clk, .rst, .data_valid, .frame_processing_ready(fpr), .fifo_ready,
    .coded_en, .inject_fake_check(inject), .tx_enable, .tx_load_req, .sh_enable,
    .force_internal_data(force_internal), .words_done, .ostate);

  // source: answers each request after 'latency' cycles
  always @(posedge clk) req_pipe <= rst ? '0 : {req_pipe[14:0], tx_load_req};
  assign data_valid = (latency == 0) ? tx_load_req : req_pipe[latency-1];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic subframe(input int lat, input logic inj);
    int reqs, cyc, done_at;
    latency = lat;
    inject = inj;
    @(negedge clk);
    fpr = 1;
    #1;
    check(sh_enable, "sh_enable pulses at start");
    @(negedge clk);
    fpr = 0;
    inject = !inj;      // must not change the latched source
    reqs = 0; done_at = -1;
    for (cyc = 0; cyc < WORDS + 40; cyc++) begin
      #1;
      if (tx_load_req) reqs++;
      if (words_done) begin
        check(done_at < 0, "single words_done");
        done_at = cyc;
      end
      check(force_internal == inj, "source latched");
      @(negedge clk);
    end
    check(reqs == WORDS, $sformatf("request count %0d", reqs));
    check(done_at == WORDS - 1 + lat, $sformatf("words_done at %0d", done_at));
    check(ostate == 2'd0 && !tx_load_req, "back in idle");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fpr = 0; fifo_ready = 1; coded_en = 1; inject = 0; tx_enable = 1; latency = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // no start while one condition is missing
    repeat (5) @(negedge clk);
    check(!tx_load_req && !sh_enable, "idle without frame_processing_ready");
    fpr = 1; coded_en = 0;
    repeat (3) @(negedge clk);
    check(!tx_load_req, "idle when not coded mode");
    coded_en = 1; tx_enable = 0;
    repeat (3) @(negedge clk);
    check(!tx_load_req, "idle when disabled");
    tx_enable = 1; fifo_ready = 0;
    repeat (3) @(negedge clk);
    check(!tx_load_req, "idle when buffer full");
    fpr = 0; fifo_ready = 1;
    subframe(0, 1'b0);
    subframe(1, 1'b1);
    subframe(7, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
