// tb_checksum_compare: self-checking test of the checksum comparator.
//
// Offers 200 random pairs of checksums, half of them equal, with rho and sigma arriving in
// random order and the status consumer applying random back-pressure. Each status must carry
// error = (rho != sigma) for its own pair, one status per pair, in order.
module tb_checksum_compare;
  import aled_pkg::*;
  localparam int W = 16, PAIRS = 200;

  logic clk = 0, rst_n = 0;
  logic rho_valid, rho_ready, sigma_valid, sigma_ready, status_valid, status_ready;
  logic [W-1:0] rho, sigma;
  tile_status_t status;
  int checks = 0, failures = 0, errors_seen = 0;

  checksum_compare #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  bit exp_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) status_ready <= rst_n && ($urandom_range(0, 2) != 0);

  always @(negedge clk) begin
    if (rst_n && status_valid && status_ready) begin
      checks++;
      if (exp_q.size() == 0 || status.error !== exp_q[0]) begin
        failures++;
        $display("status error=%b unexpected", status.error);
      end
      if (status.error) errors_seen++;
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    rho_valid = 0; sigma_valid = 0; rho = 0; sigma = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < PAIRS; p++) begin
      logic [W-1:0] a, b;
      a = W'($urandom);
      b = ($urandom_range(0, 1) != 0) ? a : a ^ W'(1 << $urandom_range(0, W-1));
      exp_q.push_back(a != b);
      @(negedge clk);
      if ($urandom_range(0, 1) != 0) begin
        rho_valid = 1; rho = a;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        sigma_valid = 1; sigma = b;
      end else begin
        sigma_valid = 1; sigma = b;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        rho_valid = 1; rho = a;
      end
      #1;   // let the combinational ready settle before sampling it
      while (!(rho_ready && sigma_ready)) begin @(negedge clk); #1; end
      checks++;
      if (rho_ready !== sigma_ready) begin failures++; $display("ready mismatch"); end
      @(negedge clk);
      rho_valid = 0; sigma_valid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || errors_seen == 0) begin
      failures++;
      $display("%0d statuses missing, %0d errors seen", exp_q.size(), errors_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
