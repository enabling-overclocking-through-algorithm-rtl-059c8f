// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// The write clock has a fixed 10-unit period. The read clock starts slower (14 units) and is
// switched to faster (6 units) half-way, the way the accelerator clock is retuned at run time.
// 3000 random words are pushed with random gaps and popped with random back-pressure; each
// must come out once and in order. The FIFO must report full at some point during the slow
// phase and must never take a word while it already holds DEPTH.
module tb_async_fifo;
  localparam int W = 16, DEPTH = 8, WORDS = 3000;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0, full_seen = 0, popped = 0, pushed = 0;
  int rhalf = 7;

  async_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 wclk = ~wclk;
  always begin #(rhalf) rclk = ~rclk; end

  logic [W-1:0] model_q [$];

  initial begin
    repeat (100000) @(posedge wclk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge rclk) out_ready <= rrst_n && ($urandom_range(0, 3) != 0);

  always @(posedge wclk) begin
    if (wrst_n) begin
      if (!in_ready) full_seen++;
      if (in_valid && in_ready) begin
        model_q.push_back(in_data);
        pushed++;
        checks++;
        if (pushed - popped > DEPTH) begin
          failures++;
          $display("FIFO took a word while holding %0d", pushed - popped - 1);
        end
      end
    end
  end

  always @(posedge rclk) begin
    if (rrst_n && out_valid && out_ready) begin
      checks++;
      popped++;
      if (model_q.size() == 0 || out_data !== model_q[0]) begin
        failures++;
        $display("pop mismatch: got %h", out_data);
      end
      if (model_q.size() != 0) void'(model_q.pop_front());
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1;
    rrst_n = 1;
    for (int k = 0; k < WORDS; k++) begin
      if (k == WORDS / 2) rhalf = 3;
      while ($urandom_range(0, 4) == 0) begin @(negedge wclk); in_valid = 0; end
      @(negedge wclk);
      in_valid = 1; in_data = W'($urandom);
      #1;
      while (!in_ready) begin @(negedge wclk); #1; end
    end
    @(negedge wclk);
    in_valid = 0;
    repeat (200) @(negedge wclk);
    checks++;
    if (popped != WORDS || full_seen == 0) begin
      failures++;
      $display("popped %0d of %0d, full seen %0d times", popped, WORDS, full_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
