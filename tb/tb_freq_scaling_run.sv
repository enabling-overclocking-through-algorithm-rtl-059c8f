// tb_freq_scaling_run: drives the frequency scaler, at its default parameters (G = 1 MHz,
// I = 100 tiles, start 100 MHz), through a long classification run: 1000 images of one AlexNet
// conv5 layer each, 4 tiles per image, 4000 verdicts in all.
//
// Each verdict comes from a model of an overclocked kernel: a tile run at f MHz fails with
// probability 4^(f - F_WALL), capped at 1. The error rate therefore changes by six orders of
// magnitude over 10 MHz, as measured on real boards, and reaches 1 at F_WALL = 232 MHz. The
// wall's position is a property of one board and is this testbench's choice. A reference
// model of the policy checks the scaler's target after every verdict. The testbench also
// checks the shape of the run: an initial ramp of one step per tile that ends within 12 MHz
// of the wall, a steady state that never leaves the band just below the wall, step-ups every
// I clean tiles and step-downs on every error, a mean frequency close to the wall, and an
// error rate of a few tiles per thousand.
module tb_freq_scaling_run;
  import aled_pkg::*;
  localparam int IMAGES = 1000, TILES_PER_IMAGE = LAYER_M / UNROLL_TM;
  localparam int NTILES = IMAGES * TILES_PER_IMAGE;
  localparam int F_WALL = 232;
  localparam int FW = FREQ_W;

  logic clk = 0, rst_n = 0;
  logic status_valid, status_error;
  logic [FW-1:0] freq;
  logic freq_update, ramping;

  freq_scaler dut (.clk, .rst_n, .status_valid, .status_error, .freq, .freq_update, .ramping);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ramp_up = 0, n_down = 0, n_steady_up = 0, n_errors = 0, n_updates = 0;
  int ramp_end_freq = 0;
  longint freq_sum = 0;

  always @(posedge clk) if (rst_n && freq_update) n_updates++;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Tile failure model: probability 4^(f - F_WALL), as a threshold on a 24-bit random number.
  function automatic bit tile_fails(int f);
    int d;
    d = F_WALL - f;
    if (d <= 0) return 1'b1;
    if (d >= 12) return 1'b0;
    return ($urandom & 24'hFFFFFF) < (32'h1000000 >> (2 * d));
  endfunction

  initial begin
    int mf, ok, lo;
    bit mramp, err;
    status_valid = 0; status_error = 0;
    mf = FREQ_START; ok = 0; mramp = 1; lo = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTILES; t++) begin
      freq_sum += longint'(freq);
      err = tile_fails(int'(freq));
      @(negedge clk);
      status_valid = 1; status_error = err;
      @(negedge clk);
      status_valid = 0;
      // reference policy
      if (err) begin
        n_errors++;
        n_down++;
        if (mramp) ramp_end_freq = mf;
        mramp = 0; ok = 0;
        mf = (mf - FREQ_STEP < FREQ_START) ? FREQ_START : mf - FREQ_STEP;
      end else if (mramp) begin
        n_ramp_up++;
        mf = (mf + FREQ_STEP > 400) ? 400 : mf + FREQ_STEP;
      end else if (ok == FREQ_IVAL - 1) begin
        n_steady_up++;
        ok = 0;
        mf = (mf + FREQ_STEP > 400) ? 400 : mf + FREQ_STEP;
      end else ok++;
      repeat (2) @(negedge clk);
      checks++;
      if (int'(freq) != mf || ramping != mramp) begin
        failures++;
        $display("tile %0d: freq %0d ramping %b, expected %0d %b", t, freq, ramping, mf, mramp);
      end
      if (!mramp && (lo == 0 || mf < lo)) lo = mf;
    end
    $display("ramp ended at %0d MHz after %0d steps; steady state %0d..%0d MHz", ramp_end_freq,
             n_ramp_up, lo, F_WALL);
    $display("errors %0d of %0d tiles, %0d step-downs, %0d step-ups, %0d retunes, mean %0d MHz",
             n_errors, NTILES, n_down, n_steady_up, n_updates, freq_sum / NTILES);
    checks++;
    if (ramp_end_freq < F_WALL - 12 || ramp_end_freq > F_WALL || n_ramp_up != ramp_end_freq - FREQ_START) begin
      failures++;
      $display("ramp did not end near the wall");
    end
    checks++;
    if (lo < F_WALL - 12) begin
      failures++;
      $display("steady state fell to %0d MHz", lo);
    end
    checks++;
    if (n_steady_up == 0 || n_down < 2) begin
      failures++;
      $display("steady state never stepped both ways");
    end
    checks++;
    if (freq_sum / NTILES < F_WALL - 10) begin
      failures++;
      $display("mean frequency too low");
    end
    checks++;
    if (n_errors * 1000 > 20 * NTILES) begin
      failures++;
      $display("error rate too high");
    end
    checks++;
    if (n_updates != n_ramp_up + n_steady_up + n_down) begin
      failures++;
      $display("%0d freq_update pulses for %0d changes", n_updates, n_ramp_up + n_steady_up + n_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
