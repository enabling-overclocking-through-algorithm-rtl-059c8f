// tb_freq_scaler: self-checking test of the frequency-scaling controller.
//
// Uses G=1 MHz and a short interval I=5 (the evaluated setting is I=100) with limits
// 100..140 MHz. The testbench feeds per-tile verdicts: an error-free ramp of 20 tiles, then a
// random mix with about one erroneous tile in eight, then a long error-free run that reaches
// the upper limit and a burst of errors that reaches the lower limit. After every verdict the
// frequency and the update pulse are compared with an independent model of the algorithm:
// +G per tile until the first error, then -G per error and +G after I consecutive good tiles.
module tb_freq_scaler;
  localparam int FW = 12, F_START = 100, F_MIN = 100, F_MAX = 140, G = 1, I = 5;

  logic clk = 0, rst_n = 0;
  logic status_valid, status_error, freq_update, ramping;
  logic [FW-1:0] freq;
  int checks = 0, failures = 0;
  int m_freq = F_START, m_cnt = 0, n_up = 0, n_down = 0;
  bit m_ramp = 1;

  freq_scaler #(.FW(FW), .F_START(F_START), .F_MIN(F_MIN), .F_MAX(F_MAX), .G(G), .I(I)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic verdict(input bit err);
    int old = m_freq;
    if (err) begin
      m_ramp = 0;
      m_cnt = 0;
      m_freq = (m_freq - G < F_MIN) ? F_MIN : m_freq - G;
    end else if (m_ramp || m_cnt == I - 1) begin
      m_cnt = 0;
      m_freq = (m_freq + G > F_MAX) ? F_MAX : m_freq + G;
    end else begin
      m_cnt++;
    end
    @(negedge clk);
    status_valid = 1; status_error = err;
    @(negedge clk);
    status_valid = 0;
    checks++;
    if (int'(freq) != m_freq || freq_update !== (m_freq != old) || ramping !== m_ramp) begin
      failures++;
      $display("freq %0d upd %b ramp %b, expected %0d %b %b", freq, freq_update, ramping,
               m_freq, m_freq != old, m_ramp);
    end
    if (m_freq > old) n_up++;
    if (m_freq < old) n_down++;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    status_valid = 0; status_error = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (freq != FW'(F_START)) begin failures++; $display("start frequency %0d", freq); end
    for (int t = 0; t < 20; t++) verdict(0);
    for (int t = 0; t < 300; t++) verdict($urandom_range(0, 7) == 0);
    for (int t = 0; t < 300; t++) verdict(0);
    for (int t = 0; t < 60; t++) verdict(1);
    checks++;
    if (n_up == 0 || n_down == 0 || int'(freq) != F_MIN) begin
      failures++;
      $display("ups %0d downs %0d final %0d", n_up, n_down, freq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
