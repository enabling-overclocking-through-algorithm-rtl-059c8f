// tb_aled_conv_full: runs one complete convolution layer through the accelerator at its
// default size (AlexNet conv5: N=192, M=128, 13x13 outputs, 3x3 kernel, 16-bit words).
//
// The host splits the layer into M/TM = 4 tiles of 32 output channels; each tile is the tile's
// weights followed by the full 192 x 15 x 15 input. Tiles are sent back to back, so loading,
// computing and draining overlap. Every output word is compared with a direct convolution
// modulo 2^16 and every tile must be reported clean, except that one bit of one output word of
// the second tile is flipped (an emulated timing error): that tile must be reported erroneous
// and is queued again, and its re-run must be exact and clean. The clock
// manager model retunes the accelerator clock (period 2000/freq) on every request, and the
// frequency must have ramped up by one step per clean tile.
module tb_aled_conv_full;
  import aled_pkg::*;
  localparam int N = LAYER_N, M = LAYER_M, R = LAYER_R, C = LAYER_C, K = LAYER_K;
  localparam int TM = UNROLL_TM, W = WORD_W, FW = FREQ_W;
  localparam int H = R + K - 1, WD = C + K - 1;

  logic sys_clk = 0, acc_clk = 0, sys_rst_n = 0, acc_rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic tile_done, tile_error, freq_update, freq_ramping, acc_busy;
  logic [FW-1:0] freq;

  aled_conv_top dut (.*);

  int checks = 0, failures = 0, n_retune = 0, n_detected = 0;

  int acc_half = 1000 / FREQ_START;
  always #5 sys_clk = ~sys_clk;
  always begin #(acc_half) acc_clk = ~acc_clk; end
  always @(posedge sys_clk) begin
    if (sys_rst_n && freq_update) begin
      acc_half <= 1000 / int'(freq);
      n_retune++;
    end
  end

  initial begin
    repeat (20000000) @(posedge sys_clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] wt [M][N][K][K];
  logic [W-1:0] xi [N][H][WD];
  logic [W-1:0] exp_y [M][R][C];

  task automatic send(input logic [W-1:0] d);
    @(negedge sys_clk);
    in_valid = 1; in_data = d;
    #1;
    while (!in_ready) begin @(negedge sys_clk); #1; end
  endtask

  task automatic send_tile(input int mt);
    for (int m = mt * TM; m < (mt + 1) * TM; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) send(wt[m][n][i][j]);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      send(xi[n][p][q]);
  endtask

  localparam int SLOTS = 8;
  localparam int OWORDS = TM * R * C;
  int slot_tile [SLOTS];
  bit slot_inj  [SLOTS];
  int slot_bad  [SLOTS];
  int n_sent = 0, n_recv_slots = 0, n_status = 0, n_drained = 0;
  int send_q [$];

  always @(posedge sys_clk) out_ready <= sys_rst_n;

  int k_word = 0;
  always @(posedge sys_clk) begin
    if (sys_rst_n && out_valid && out_ready) begin
      automatic int mt = slot_tile[n_recv_slots];
      if (out_data !== exp_y[mt * TM + k_word / (R * C)][(k_word / C) % R][k_word % C])
        slot_bad[n_recv_slots]++;
      if (k_word == OWORDS - 1) begin
        k_word = 0;
        n_recv_slots++;
      end else k_word++;
    end
  end

  always @(posedge sys_clk) begin
    if (sys_rst_n && tile_done) begin
      checks++;
      if (tile_error !== slot_inj[n_status]) begin
        failures++;
        $display("send %0d (tile %0d): error flag %b", n_status, slot_tile[n_status], tile_error);
      end
      $display("send %0d: tile %0d verdict error=%b, freq=%0d MHz", n_status,
               slot_tile[n_status], tile_error, freq);
      if (tile_error) begin
        n_detected++;
        send_q.push_back(slot_tile[n_status]);
      end
      n_status++;
    end
  end

  always @(negedge acc_clk) begin
    if (acc_rst_n && n_drained < n_sent && slot_inj[n_drained] && dut.u_kernel.out_valid &&
        dut.u_kernel.out_cnt == 777) begin
      logic [W-1:0] v;
      v = dut.u_kernel.out_data;
      force dut.u_kernel.out_data = v ^ 16'h0400;
      while (dut.u_kernel.out_valid && dut.u_kernel.out_cnt == 777) @(negedge acc_clk);
      release dut.u_kernel.out_data;
    end
  end
  always @(posedge acc_clk) begin
    if (acc_rst_n && dut.u_kernel.out_last) n_drained++;
  end

  initial begin
    in_valid = 0; in_data = 0;
    foreach (slot_bad[k]) slot_bad[k] = 0;
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wt[m][n][i][j] = W'($urandom);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      xi[n][p][q] = W'($urandom);
    for (int m = 0; m < M; m++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      logic [W-1:0] acc;
      acc = '0;
      for (int n = 0; n < N; n++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        acc += xi[n][r+i][c+j] * wt[m][n][i][j];
      exp_y[m][r][c] = acc;
    end
    for (int mt = 0; mt < M / TM; mt++) send_q.push_back(mt);
    repeat (4) @(posedge sys_clk);
    sys_rst_n = 1;
    acc_rst_n = 1;
    while (send_q.size() != 0 || n_status != n_sent) begin
      if (send_q.size() != 0) begin
        int mt;
        mt = send_q.pop_front();
        slot_tile[n_sent] = mt;
        slot_inj[n_sent] = (n_sent == 1);
        n_sent++;
        send_tile(mt);
      end else begin
        @(negedge sys_clk);
        in_valid = 0;
      end
    end
    @(negedge sys_clk);
    in_valid = 0;
    wait (n_recv_slots == n_sent);
    repeat (20) @(posedge sys_clk);
    for (int k = 0; k < n_sent; k++) begin
      checks++;
      if (!slot_inj[k] && slot_bad[k] != 0) begin
        failures++;
        $display("send %0d (tile %0d): %0d wrong output words", k, slot_tile[k], slot_bad[k]);
      end
    end
    checks++;
    if (n_detected != 1 || n_sent != M / TM + 1 || n_retune == 0) begin
      failures++;
      $display("detected %0d, sends %0d, retunes %0d", n_detected, n_sent, n_retune);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
