// tb_output_checksum: self-checking test of the output-checksum accumulator.
//
// Four tiles of WORDS=10 random words pass through with random gaps and back-pressure. The
// words must leave unchanged and in order; after each tile sigma must equal the sum of that
// tile's words modulo 2^16, and the stream must be held while sigma waits to be taken.
module tb_output_checksum;
  localparam int WORDS = 10, W = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, sigma_valid, sigma_ready;
  logic [W-1:0] in_data, out_data, sigma;
  int checks = 0, failures = 0;

  output_checksum #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] sent_q [$];
  logic [W-1:0] exp_sum;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) out_ready <= rst_n && ($urandom_range(0, 3) != 0);

  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (sent_q.size() == 0 || out_data !== sent_q[0]) begin
        failures++;
        $display("pass-through mismatch: got %h", out_data);
      end
      if (sent_q.size() != 0) void'(sent_q.pop_front());
    end
  end

  initial begin
    in_valid = 0; in_data = 0; sigma_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      exp_sum = '0;
      for (int k = 0; k < WORDS; k++) begin
        logic [W-1:0] d;
        d = W'($urandom);
        while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_data = d;
        sent_q.push_back(d);
        exp_sum += d;
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk);
      in_valid = 1; in_data = 16'h1234;   // next tile's word must wait for sigma pick-up
      repeat (3) @(negedge clk);
      checks++;
      if (!sigma_valid || sigma !== exp_sum) begin
        failures++;
        $display("tile %0d: sigma %h valid %b expected %h", t, sigma, sigma_valid, exp_sum);
      end
      checks++;
      if (in_ready) begin failures++; $display("stream accepted while sigma pending"); end
      in_valid = 0;
      sigma_ready = 1;
      @(negedge clk);
      sigma_ready = 0;
      checks++;
      if (sigma_valid) begin failures++; $display("sigma_valid not cleared"); end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("%0d words not passed", sent_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
