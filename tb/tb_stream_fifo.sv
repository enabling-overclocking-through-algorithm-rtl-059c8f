// tb_stream_fifo: self-checking test of the synchronous FIFO.
//
// 2000 random words are pushed with random gaps while the consumer pops with random
// back-pressure. Every word must come out once, in order. Phases with the consumer stopped
// fill the FIFO: it must then hold exactly DEPTH words (in_ready low) and never lose one.
module tb_stream_fifo;
  localparam int W = 16, DEPTH = 8, WORDS = 2000;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, full_seen = 0, popped = 0;
  logic stop_sink = 0;

  stream_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] model_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) out_ready <= rst_n && !stop_sink && ($urandom_range(0, 2) != 0);

  // The model follows the handshakes as sampled at each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      if (!in_ready) begin
        full_seen++;
        checks++;
        if (model_q.size() != DEPTH) begin
          failures++;
          $display("full with %0d words", model_q.size());
        end
      end
      if (in_valid && in_ready) model_q.push_back(in_data);
      if (out_valid && out_ready) begin
        checks++;
        popped++;
        if (model_q.size() == 0 || out_data !== model_q[0]) begin
          failures++;
          $display("pop mismatch: got %h", out_data);
        end
        if (model_q.size() != 0) void'(model_q.pop_front());
      end
    end
  end

  // consumer stops for 40 cycles out of every 300 so that the FIFO fills up
  always @(posedge clk) stop_sink <= ($time / 10) % 300 > 260;

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < WORDS; k++) begin
      logic [W-1:0] d;
      d = W'($urandom);
      while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_data = d;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (popped != WORDS || full_seen == 0) begin
      failures++;
      $display("popped %0d of %0d, full seen %0d times", popped, WORDS, full_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
