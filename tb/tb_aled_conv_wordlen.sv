// tb_aled_conv_wordlen: runs the full AlexNet conv5 layer (N=192, M=128, 13x13 outputs, 3x3
// kernel) through the accelerator at the shorter word lengths 8, 4, 2 and 1 bits, the other
// configurations the technique was evaluated with. Only the word length W is set on the top;
// all other parameters keep their defaults.
//
// One accelerator per word length sits in a generate loop, each with its own host, clock
// manager model (period 2000/freq) and reference. The host sends the M/TM = 4 tiles back to
// back. Every output word is compared with a direct convolution computed modulo 2^W. The
// second tile has one output word corrupted inside the accelerator (bit W/2 flipped as the
// kernel hands it out): that tile must be flagged and all others must be clean. With one bit
// the checksum is a parity, and a single flip must still be caught. The test ends when every
// instance has seen all its verdicts.
module tb_aled_conv_wordlen;
  import aled_pkg::*;
  localparam int NW = 4;
  localparam int WLS [NW] = '{8, 4, 2, 1};
  localparam int N = LAYER_N, M = LAYER_M, R = LAYER_R, C = LAYER_C, K = LAYER_K;
  localparam int TM = UNROLL_TM, FW = FREQ_W;
  localparam int H = R + K - 1, WD = C + K - 1;
  localparam int NT = M / TM;
  localparam int OWORDS = TM * R * C;
  localparam int INJ_TILE = 1, INJ_WORD = 1234;

  logic sys_clk = 0, sys_rst_n = 0, acc_rst_n = 0;
  always #5 sys_clk = ~sys_clk;

  int checks = 0, failures = 0;
  bit done [NW];

  initial begin
    repeat (20000000) @(posedge sys_clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NW; g++) begin : g_wl
    localparam int W = WLS[g];

    logic acc_clk = 0;
    logic in_valid, in_ready, out_valid, out_ready;
    logic [W-1:0] in_data, out_data;
    logic tile_done, tile_error, freq_update, freq_ramping, acc_busy;
    logic [FW-1:0] freq;

    aled_conv_top #(.W(W)) dut (.*);

    int acc_half = 1000 / FREQ_START;
    always begin #(acc_half) acc_clk = ~acc_clk; end
    always @(posedge sys_clk) if (sys_rst_n && freq_update) acc_half <= 1000 / int'(freq);

    logic [W-1:0] wt [M][N][K][K];
    logic [W-1:0] xi [N][H][WD];
    logic [W-1:0] exp_y [M][R][C];
    int bad [NT];
    int n_recv = 0, k_word = 0, n_status = 0, n_drained = 0;

    always @(posedge sys_clk) out_ready <= sys_rst_n;

    always @(posedge sys_clk) begin
      if (sys_rst_n && out_valid && out_ready) begin
        if (out_data !== exp_y[n_recv * TM + k_word / (R * C)][(k_word / C) % R][k_word % C])
          bad[n_recv]++;
        if (k_word == OWORDS - 1) begin
          k_word = 0;
          n_recv++;
        end else k_word++;
      end
    end

    always @(posedge sys_clk) begin
      if (sys_rst_n && tile_done) begin
        checks++;
        if (tile_error !== (n_status == INJ_TILE)) begin
          failures++;
          $display("W=%0d tile %0d: error flag %b", W, n_status, tile_error);
        end
        n_status++;
      end
    end

    always @(negedge acc_clk) begin
      if (acc_rst_n && n_drained == INJ_TILE && dut.u_kernel.out_valid &&
          dut.u_kernel.out_cnt == INJ_WORD) begin
        logic [W-1:0] v;
        v = dut.u_kernel.out_data;
        force dut.u_kernel.out_data = v ^ (W'(1) << (W / 2));
        while (dut.u_kernel.out_valid && dut.u_kernel.out_cnt == INJ_WORD) @(negedge acc_clk);
        release dut.u_kernel.out_data;
      end
    end
    always @(posedge acc_clk) if (acc_rst_n && dut.u_kernel.out_last) n_drained++;

    task automatic send(input logic [W-1:0] d);
      @(negedge sys_clk);
      in_valid = 1; in_data = d;
      #1;
      while (!in_ready) begin @(negedge sys_clk); #1; end
    endtask

    initial begin
      in_valid = 0; in_data = 0;
      foreach (bad[t]) bad[t] = 0;
      for (int m = 0; m < M; m++) for (int n = 0; n < N; n++)
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wt[m][n][i][j] = W'($urandom);
      for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
        xi[n][p][q] = W'($urandom);
      for (int m = 0; m < M; m++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        logic [W-1:0] acc;
        acc = '0;
        for (int n = 0; n < N; n++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
          acc += W'(xi[n][r+i][c+j] * wt[m][n][i][j]);
        exp_y[m][r][c] = acc;
      end
      wait (sys_rst_n);
      for (int mt = 0; mt < NT; mt++) begin
        for (int m = mt * TM; m < (mt + 1) * TM; m++) for (int n = 0; n < N; n++)
          for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) send(wt[m][n][i][j]);
        for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
          send(xi[n][p][q]);
      end
      @(negedge sys_clk);
      in_valid = 0;
      wait (n_recv == NT && n_status == NT);
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (t != INJ_TILE && bad[t] != 0) begin
          failures++;
          $display("W=%0d tile %0d: %0d wrong output words", W, t, bad[t]);
        end
      end
      checks++;
      if (bad[INJ_TILE] != 1) begin
        failures++;
        $display("W=%0d: corrupted tile has %0d wrong words, expected 1", W, bad[INJ_TILE]);
      end
      // One clean tile ramps the target up by one step, the flagged one takes it back down
      // and ends the ramp; the two clean tiles after it are far short of the interval.
      checks++;
      if (int'(freq) != FREQ_START) begin
        failures++;
        $display("W=%0d: final frequency %0d MHz, expected %0d", W, freq, FREQ_START);
      end
      $display("W=%0d: %0d tiles, final frequency %0d MHz", W, NT, freq);
      done[g] = 1;
    end
  end

  initial begin
    repeat (4) @(posedge sys_clk);
    sys_rst_n = 1;
    acc_rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (20) @(posedge sys_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
