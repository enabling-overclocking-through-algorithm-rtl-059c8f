// tb_aled_conv_top: end-to-end test of the error-detecting accelerator at reduced size.
//
// The testbench plays the host and the clock manager. The host streams tiles of random weights
// and inputs (N=5, TM=2, TN=2, 4x3 outputs, 3x3 kernel) into the system-side port, collects the
// outputs with random back-pressure and compares them with a direct convolution modulo 2^16.
// The clock manager model retunes the accelerator clock whenever the design asks for a new
// frequency: its period is 2000/freq time units, so a faster target gives a faster clock.
// Tiles are sent back to back, so loading, computing and draining of successive tiles overlap.
// Timing errors are emulated by forcing one bit of one kernel output word in selected tiles.
// Each such tile must be reported erroneous; every other tile must be reported clean and
// produce exact outputs. A tile reported erroneous is queued again at the end, as the host of
// an error-free run would do, and its re-run must be exact and clean.
//
// Mechanisms counted (each must happen at least once): ramp-up steps, frequency decreases on
// an error, steady-state increases after I good tiles, detected errors, re-executed tiles,
// output back-pressure, input stalls, clock retunes, loading during computation, draining
// during computation, and several rho values queued at once.
module tb_aled_conv_top;
  import aled_pkg::*;
  localparam int N = 5, TM = 2, TN = 2, R = 4, C = 3, K = 3, W = 16;
  localparam int FW = 12, F_START = 100, F_MIN = 100, F_MAX = 108, G = 1, I = 3;
  localparam int H = R + K - 1, WD = C + K - 1;
  localparam int TILES = 40;

  logic sys_clk = 0, acc_clk = 0, sys_rst_n = 0, acc_rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic tile_done, tile_error, freq_update, freq_ramping, acc_busy;
  logic [FW-1:0] freq;

  aled_conv_top #(.N(N), .TM(TM), .TN(TN), .R(R), .C(C), .K(K), .W(W), .FW(FW),
                  .F_START(F_START), .F_MIN(F_MIN), .F_MAX(F_MAX), .G(G), .I(I)) dut (.*);

  int checks = 0, failures = 0;
  int n_ramp_up = 0, n_down = 0, n_steady_up = 0, n_detected = 0, n_rerun = 0;
  int n_backpressure = 0, n_in_stall = 0, n_retune = 0, n_injected = 0;
  int n_load_compute = 0, n_drain_compute = 0, n_rho_queued = 0;

  // ---------------------------------------------------------------- clocks
  int acc_half = 1000 / F_START;
  always #5 sys_clk = ~sys_clk;
  always begin #(acc_half) acc_clk = ~acc_clk; end

  // clock manager model: retune on request
  always @(posedge sys_clk) begin
    if (sys_rst_n && freq_update) begin
      acc_half <= 1000 / int'(freq);
      n_retune++;
    end
  end

  initial begin
    repeat (400000) @(posedge sys_clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- tile data
  localparam int SLOTS = TILES + 16;
  localparam int OWORDS = TM * R * C;
  logic [W-1:0] wt [TILES][TM][N][K][K];
  logic [W-1:0] xi [TILES][N][H][WD];
  logic [W-1:0] exp_y [TILES][OWORDS];

  task automatic make_tile(input int id);
    for (int m = 0; m < TM; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wt[id][m][n][i][j] = W'($urandom);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      xi[id][n][p][q] = W'($urandom);
    for (int m = 0; m < TM; m++) for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      logic [W-1:0] acc;
      acc = '0;
      for (int n = 0; n < N; n++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++)
        acc += xi[id][n][r+i][c+j] * wt[id][m][n][i][j];
      exp_y[id][(m * R + r) * C + c] = acc;
    end
  endtask

  // Per send (slot, in send order): which tile, whether it is corrupted, wrong output words.
  int  slot_tile [SLOTS];
  bit  slot_inj  [SLOTS];
  int  slot_bad  [SLOTS];
  int  n_sent = 0, n_recv_slots = 0, n_status = 0, n_drained = 0;
  int  send_q [$];
  bit  first_try [TILES];

  task automatic send(input logic [W-1:0] d);
    while ($urandom_range(0, 5) == 0) begin @(negedge sys_clk); in_valid = 0; end
    @(negedge sys_clk);
    in_valid = 1; in_data = d;
    #1;
    while (!in_ready) begin n_in_stall++; @(negedge sys_clk); #1; end
  endtask

  task automatic send_tile(input int id);
    for (int m = 0; m < TM; m++) for (int n = 0; n < N; n++)
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) send(wt[id][m][n][i][j]);
    for (int n = 0; n < N; n++) for (int p = 0; p < H; p++) for (int q = 0; q < WD; q++)
      send(xi[id][n][p][q]);
  endtask

  always @(posedge sys_clk) out_ready <= sys_rst_n && ($urandom_range(0, 3) != 0);

  // output receiver: words arrive in send order
  int k_word = 0;
  always @(posedge sys_clk) begin
    if (sys_rst_n) begin
      if (out_valid && out_ready) begin
        if (out_data !== exp_y[slot_tile[n_recv_slots]][k_word]) slot_bad[n_recv_slots]++;
        if (k_word == OWORDS - 1) begin
          k_word = 0;
          n_recv_slots++;
        end else k_word++;
      end else if (out_valid) n_backpressure++;
    end
  end

  // verdicts: one per send, in order; a flagged tile is queued again
  always @(posedge sys_clk) begin
    if (sys_rst_n && tile_done) begin
      checks++;
      if (tile_error !== slot_inj[n_status]) begin
        failures++;
        $display("send %0d (tile %0d): error flag %b, expected %b", n_status,
                 slot_tile[n_status], tile_error, slot_inj[n_status]);
      end
      if (tile_error) begin
        n_detected++;
        n_rerun++;
        send_q.push_back(slot_tile[n_status]);
      end
      n_status++;
    end
  end

  int prev_freq = F_START;
  always @(posedge sys_clk) begin
    if (sys_rst_n) begin
      if (int'(freq) > prev_freq && freq_ramping) n_ramp_up++;
      if (int'(freq) > prev_freq && !freq_ramping) n_steady_up++;
      if (int'(freq) < prev_freq) n_down++;
      prev_freq = int'(freq);
    end
  end

  // macro-pipeline overlap and rho queueing, sampled in the accelerator domain
  always @(posedge acc_clk) begin
    if (acc_rst_n) begin
      if (dut.u_kernel.s1_v && dut.u_kernel.ld_fire) n_load_compute++;
      if (dut.u_kernel.s1_v && dut.u_kernel.out_fire) n_drain_compute++;
      if (dut.u_rho_q.wptr - dut.u_rho_q.rptr > 1) n_rho_queued++;
    end
  end

  // ---------------------------------------------------------------- timing-error emulation
  // The kernel drains tiles in send order; corrupt one word of each slot marked for it.
  int inject_idx;
  always @(negedge acc_clk) begin
    if (acc_rst_n && dut.u_kernel.out_valid) begin
      if (int'(dut.u_kernel.out_cnt) == 0) inject_idx = $urandom_range(0, OWORDS - 1);
      if (n_drained < n_sent && slot_inj[n_drained] &&
          int'(dut.u_kernel.out_cnt) == inject_idx) begin
        logic [W-1:0] v;
        v = dut.u_kernel.out_data;
        force dut.u_kernel.out_data = v ^ W'(1 << $urandom_range(0, W-1));
        while (dut.u_kernel.out_valid && int'(dut.u_kernel.out_cnt) == inject_idx)
          @(negedge acc_clk);
        release dut.u_kernel.out_data;
        n_injected++;
      end
    end
  end
  always @(posedge acc_clk) begin
    if (acc_rst_n && dut.u_kernel.out_last) n_drained++;
  end

  // ---------------------------------------------------------------- host
  initial begin
    in_valid = 0; in_data = 0;
    for (int t = 0; t < TILES; t++) begin
      make_tile(t);
      send_q.push_back(t);
      first_try[t] = 1;
    end
    foreach (slot_bad[s]) slot_bad[s] = 0;
    repeat (4) @(posedge sys_clk);
    sys_rst_n = 1;
    acc_rst_n = 1;
    while (send_q.size() != 0 || n_status != n_sent) begin
      if (send_q.size() != 0) begin
        int t;
        t = send_q.pop_front();
        slot_tile[n_sent] = t;
        slot_inj[n_sent] = first_try[t] &&
                           ((t == 12) || (t == 20) || (t == 21) || (t >= 30 && t % 4 == 2));
        first_try[t] = 0;
        n_sent++;
        send_tile(t);
      end else begin
        @(negedge sys_clk);
        in_valid = 0;
      end
    end
    @(negedge sys_clk);
    in_valid = 0;
    wait (n_recv_slots == n_sent);
    repeat (20) @(posedge sys_clk);
    for (int s = 0; s < n_sent; s++) begin
      checks++;
      if (!slot_inj[s] && slot_bad[s] != 0) begin
        failures++;
        $display("send %0d (tile %0d): %0d wrong output words", s, slot_tile[s], slot_bad[s]);
      end
    end
    checks++;
    if (n_injected != n_detected) begin
      failures++;
      $display("%0d injected errors, %0d detected", n_injected, n_detected);
    end
    $display("ramp-up %0d, down %0d, steady-up %0d, detected %0d, re-runs %0d, back-pressure %0d, input stalls %0d, retunes %0d, load||compute %0d, drain||compute %0d, rho queued %0d, final freq %0d",
             n_ramp_up, n_down, n_steady_up, n_detected, n_rerun, n_backpressure, n_in_stall,
             n_retune, n_load_compute, n_drain_compute, n_rho_queued, freq);
    checks++;
    if (n_ramp_up == 0 || n_down == 0 || n_steady_up == 0 || n_detected == 0 || n_rerun == 0 ||
        n_backpressure == 0 || n_in_stall == 0 || n_retune == 0 || n_load_compute == 0 ||
        n_drain_compute == 0 || n_rho_queued == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
