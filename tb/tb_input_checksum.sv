// tb_input_checksum: self-checking test of the input-checksum unit.
//
// Tiles (N=4 channels, TM=3 output channels, 5x4 outputs, 3x3 kernel) of random weights and
// inputs are streamed through the unit back to back, with random gaps and random back-pressure
// at its output. Every word leaving the unit must equal the word that entered, in order. Each
// rho must equal the sum of all outputs of that tile's convolution, which the testbench
// computes directly from the layer equation, modulo 2^16; rhos must come in tile order.
// For the first tile the time from its last word to rho_valid is checked against N*K*K+4.
// rho of the first tile is then left untaken for a while. Its bank is free once its post phase
// is over, so the unit must accept exactly two more complete tiles (one per bank) and then
// hold the stream until rho is taken.
module tb_input_checksum;
  localparam int N = 4, TM = 3, R = 5, C = 4, K = 3, W = 16;
  localparam int H = R + K - 1, WD = C + K - 1;
  localparam int TILES = 6;
  localparam int TILE_WORDS = TM * N * K * K + N * H * WD;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, rho_valid, rho_ready;
  logic [W-1:0] in_data, out_data, rho;
  int checks = 0, failures = 0;

  input_checksum #(.N(N), .TM(TM), .R(R), .C(C), .K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] wt [TM][N][K][K];
  logic [W-1:0] xi [N][H][WD];
  logic [W-1:0] sent_q [$];
  logic [W-1:0] rho_q [$];
  int cyc = 0, t_last0, t_rho0, n_words = 0, n_rho = 0;
  bit hold_rho = 1, rho0_seen = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_tile();
    logic [W-1:0] e;
    for (int m = 0; m < TM; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wt[m][n][i][j] = W'($urandom);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      xi[n][p][q] = W'($urandom);
    e = '0;
    for (int m = 0; m < TM; m++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
      for (int n = 0; n < N; n++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        e += xi[n][r+i][c+j] * wt[m][n][i][j];
    rho_q.push_back(e);
  endtask

  task automatic send(input logic [W-1:0] d);
    while ($urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; end
    @(negedge clk);
    in_valid = 1; in_data = d;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
  endtask

  always @(posedge clk) out_ready <= rst_n && ($urandom_range(0, 3) != 0);
  always @(posedge clk) rho_ready <= rst_n && !hold_rho && ($urandom_range(0, 1) != 0);

  // monitor, sampled at the rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent_q.push_back(in_data);
        n_words++;
        if (n_words == TILE_WORDS) t_last0 = cyc;
      end
      if (out_valid && out_ready) begin
        checks++;
        if (sent_q.size() == 0 || out_data !== sent_q[0]) begin
          failures++;
          $display("pass-through mismatch: got %h", out_data);
        end
        if (sent_q.size() != 0) void'(sent_q.pop_front());
      end
      if (rho_valid && !rho0_seen) begin
        rho0_seen = 1;
        t_rho0 = cyc;
      end
      if (rho_valid && rho_ready) begin
        checks++;
        n_rho++;
        if (rho_q.size() == 0 || rho !== rho_q[0]) begin
          failures++;
          $display("rho %0d: %h expected %h", n_rho, rho, rho_q.size() ? rho_q[0] : 'x);
        end
        if (rho_q.size() != 0) void'(rho_q.pop_front());
      end
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int t = 0; t < TILES; t++) begin
        make_tile();
        for (int m = 0; m < TM; m++) for (int n = 0; n < N; n++)
          for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) send(wt[m][n][i][j]);
        for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
          send(xi[n][p][q]);
      end
      begin
        // while rho of tile 0 is withheld, the unit takes tiles 1 and 2 and then stalls
        wait (n_words >= 3 * TILE_WORDS);
        repeat (300) @(posedge clk);
        checks++;
        if (n_words != 3 * TILE_WORDS || !rho_valid) begin
          failures++;
          $display("with rho withheld %0d words were taken, expected %0d", n_words,
                   3 * TILE_WORDS);
        end
        checks++;
        if (t_rho0 - t_last0 != N * K * K + 4) begin
          failures++;
          $display("rho latency %0d, expected %0d", t_rho0 - t_last0, N * K * K + 4);
        end
        hold_rho = 0;
      end
    join
    @(negedge clk);
    in_valid = 0;
    wait (n_rho == TILES);
    repeat (5) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("%0d words not passed", sent_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
