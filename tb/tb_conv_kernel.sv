// tb_conv_kernel: self-checking test of the tiled convolution kernel.
//
// Uses a small tile: N=7 input channels in groups of TN=3 (so the last group is partial),
// TM=3 output channels, 5x6 outputs, 3x3 kernel; computing such a tile takes longer than
// loading one. Tiles of random weights and inputs are streamed in with random gaps, the
// outputs are drained with random back-pressure and each word is compared with a direct evaluation of the convolution sum modulo 2^16. For the first tile the
// number of cycles from the last loaded word to the first valid output word is checked against
// ceil(N/TN)*K*K*R*C compute cycles plus 5 (bank hand-over, pipeline drain). Three more tiles
// are then sent back to back without waiting for outputs: loading must overlap computation
// and draining must overlap computation (double-buffered banks).
module tb_conv_kernel;
  localparam int N = 7, TM = 3, TN = 3, R = 5, C = 6, K = 3, W = 16;
  localparam int H = R + K - 1, WD = C + K - 1;
  localparam int NG = (N + TN - 1) / TN;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, busy;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  conv_kernel #(.N(N), .TM(TM), .TN(TN), .R(R), .C(C), .K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] wt [TM][N][K][K];
  logic [W-1:0] xi [N][H][WD];
  logic [W-1:0] exp_q [$];
  int cyc = 0, t_last_in, t_first_out;
  bit  first_seen;

  always @(posedge clk) cyc <= cyc + 1;

  // overlap of the macro-pipeline stages
  int n_load_compute = 0, n_drain_compute = 0;
  always @(posedge clk) begin
    if (rst_n && dut.s1_v && in_valid && in_ready) n_load_compute++;
    if (rst_n && dut.s1_v && out_valid && out_ready) n_drain_compute++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_tile();
    for (int m = 0; m < TM; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wt[m][n][i][j] = W'($urandom);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      xi[n][p][q] = W'($urandom);
    for (int m = 0; m < TM; m++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      logic [W-1:0] acc = '0;
      for (int n = 0; n < N; n++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        acc += xi[n][r+i][c+j] * wt[m][n][i][j];
      exp_q.push_back(acc);
    end
  endtask

  // Drive on the falling edge; a word is taken on the next rising edge if in_ready is high.
  task automatic send(input logic [W-1:0] d);
    while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
    @(negedge clk);
    in_valid = 1; in_data = d;
    while (!in_ready) @(negedge clk);
    t_last_in = cyc;
  endtask

  task automatic send_tile();
    for (int m = 0; m < TM; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) send(wt[m][n][i][j]);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      send(xi[n][p][q]);
    @(negedge clk);
    in_valid = 0;
  endtask

  // output sink with random back-pressure
  always @(negedge clk) begin
    if (rst_n) begin
      out_ready = ($urandom_range(0, 3) != 0);
      if (out_valid && !first_seen) begin
        first_seen = 1;
        t_first_out = cyc;
      end
      if (out_valid && out_ready) begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (out_data !== e) begin
          failures++;
          $display("output mismatch: got %h expected %h", out_data, e);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0; first_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    first_seen = 0;
    make_tile();
    send_tile();
    wait (first_seen);
    checks++;
    if (t_first_out - t_last_in != NG * K * K * R * C + 5) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_last_in, NG * K * K * R * C + 5);
    end
    wait (exp_q.size() == 0);
    for (int t = 0; t < 3; t++) begin
      make_tile();
      send_tile();
    end
    wait (exp_q.size() == 0);
    checks++;
    if (n_load_compute == 0 || n_drain_compute == 0) begin
      failures++;
      $display("no overlap: load during compute %0d, drain during compute %0d",
               n_load_compute, n_drain_compute);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("kernel still busy after two tiles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
