// freq_scaler: run-time frequency scaling driven by the per-tile error verdicts.
//
// The accelerator clock starts at F_START. In the ramp phase the target frequency rises by G
// after every tile until the first erroneous tile; that tile lowers it by G and ends the ramp.
// From then on an erroneous tile lowers the frequency by G and restarts the count, and I
// consecutive error-free tiles raise it by G. The target is clamped to [F_MIN, F_MAX].
// Every change raises freq_update for one cycle with the new value on freq, for the clock
// manager that retunes the accelerator clock. Inputs are one status per tile (status_valid
// pulse, status_error). The algorithm, G = 1 MHz, I = 100 tiles and the 100 MHz start follow
// the paper, where this algorithm runs as software on the host; here it is a hardware
// controller. The clamp limits, the frequency word and the MHz unit are this design's choices.
module freq_scaler
  import aled_pkg::*;
#(
  parameter int unsigned FW      = FREQ_W,
  parameter int unsigned F_START = FREQ_START,
  parameter int unsigned F_MIN   = FREQ_START,
  parameter int unsigned F_MAX   = 400,
  parameter int unsigned G       = FREQ_STEP,
  parameter int unsigned I       = FREQ_IVAL
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          status_valid,
  input  logic          status_error,
  output logic [FW-1:0] freq,          // target frequency, MHz
  output logic          freq_update,   // one-cycle pulse when freq changes
  output logic          ramping        // still in the initial ramp
);
  localparam int unsigned IW = $clog2(I + 1);

  logic [IW-1:0] ok_cnt;
  logic [FW:0]   up, down;

  assign up   = ({1'b0, freq} + (FW+1)'(G) > (FW+1)'(F_MAX)) ? (FW+1)'(F_MAX)
                                                              : {1'b0, freq} + (FW+1)'(G);
  assign down = ({1'b0, freq} < (FW+1)'(F_MIN + G)) ? (FW+1)'(F_MIN)
                                                    : {1'b0, freq} - (FW+1)'(G);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      freq        <= FW'(F_START);
      freq_update <= 1'b0;
      ramping     <= 1'b1;
      ok_cnt      <= '0;
    end else begin
      freq_update <= 1'b0;
      if (status_valid) begin
        if (status_error) begin
          ramping     <= 1'b0;
          ok_cnt      <= '0;
          freq        <= down[FW-1:0];
          freq_update <= down[FW-1:0] != freq;
        end else if (ramping || ok_cnt == IW'(I - 1)) begin
          ok_cnt      <= '0;
          freq        <= up[FW-1:0];
          freq_update <= up[FW-1:0] != freq;
        end else begin
          ok_cnt <= ok_cnt + 1'b1;
        end
      end
    end
  end
endmodule
