// input_checksum: computes a tile's expected output checksum directly from its inputs.
//
// The sum of all outputs of a unit-stride convolution tile can be rewritten as
//     rho = sum_{n,i,j} X[n][i][j] * Ws[n][i][j],
//     Ws[n][i][j] = sum_m w[m][n][i][j]              (weights summed over output channels)
//     X[n][i][j]  = sum_{r<R, c<C} x[n][r+i][c+j]     (input group of weight (i,j))
// so only N*K*K multiplications are needed instead of the layer's N*M*K*K*R*C. The groups
// X[n][.][.] overlap heavily: neighbouring groups differ by one row or one column, so
//     X[n][0][0] = core sum over rows 0..R-1, columns 0..C-1
//     X[n][0][j] = X[n][0][j-1] + colsum(C-1+j) - colsum(j-1)         (rows 0..R-1)
//     X[n][i][j] = X[n][i-1][j] + rowsum(R-1+i, j) - rowsum(i-1, j)   (columns j..j+C-1)
//
// Operation: (1) STREAM: the tile's word stream (weights, then inputs, in the order the
// convolution kernel takes them) passes through unchanged, with in/out valid/ready joined
// combinationally. Weight words are added into Ws. For each input channel the core sum, the K
// windowed sums of every edge row (rows 0..K-2 and R..R+K-2) and the sums of every edge column
// (columns 0..K-2 and C..C+K-2, rows 0..R-1) are accumulated in registers and written to
// per-channel storage when the channel ends. (2) POST: one (n,i,j) per cycle, X is rebuilt by
// the recurrence above, registered with Ws, multiplied and accumulated into rho (two-stage
// pipeline). (3) rho is offered on a valid/ready port. The storage is doubled: the next tile
// streams into one bank while the post phase of the previous tile reads the other, and the
// stream waits only when both banks are still in use. With an idle unit, rho is valid
// N*K*K+4 cycles after the tile's last word. All arithmetic is modulo 2^W, matching the kernel.
// Requires R >= K-1 and C >= K-1.
//
// The factorisation, the reuse recurrence and the split into group sums while streaming and the
// rest overlapped with the kernel follow the paper; the stream format, storage layout,
// pipelining and bank hand-over are this design's own choices.
module input_checksum
  import aled_pkg::*;
#(
  parameter int unsigned N  = LAYER_N,
  parameter int unsigned TM = UNROLL_TM,
  parameter int unsigned R  = LAYER_R,
  parameter int unsigned C  = LAYER_C,
  parameter int unsigned K  = LAYER_K,
  parameter int unsigned W  = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // tile stream in
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  // the same stream out, towards the kernel
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  // expected checksum of the tile
  output logic         rho_valid,
  input  logic         rho_ready,
  output logic [W-1:0] rho
);
  localparam int unsigned H   = R + K - 1;
  localparam int unsigned WD  = C + K - 1;
  localparam int unsigned KK  = K * K;
  localparam int unsigned NE  = 2 * (K - 1);          // edge rows / edge columns per channel
  localparam int unsigned NEA = (NE > 0) ? NE : 1;

  typedef enum logic [1:0] {P_IDLE, P_RUN, P_DONE} pstate_t;
  pstate_t pstate;

  // ---------------------------------------------------------------- storage (two banks)
  logic [W-1:0] wsum   [2][N * KK];
  logic [W-1:0] g_core [2][N];
  logic [W-1:0] g_row  [2][N][NEA][K];
  logic [W-1:0] g_col  [2][N][NEA];
  logic [1:0]   pending;               // bank holds a streamed tile awaiting its post phase
  logic         sb, pb;                // bank being streamed into / post-processed

  // per-channel working sums
  logic [W-1:0] a_core;
  logic [W-1:0] a_row [NEA][K];
  logic [W-1:0] a_col [NEA];
  logic [W-1:0] n_core;
  logic [W-1:0] n_row [NEA][K];
  logic [W-1:0] n_col [NEA];

  // ---------------------------------------------------------------- stream counters
  logic        in_wts;                 // current word is a weight
  int unsigned wm, wn, wk;             // weight position: m, n, i*K+j
  int unsigned xn, xp, xq;             // input position: n, row, column
  logic        fire;

  assign in_ready  = !pending[sb] && out_ready;
  assign out_valid = !pending[sb] && in_valid;
  assign out_data  = in_data;
  assign fire      = in_valid && in_ready;

  // edge-row / edge-column index of an input position (valid when *_is_e)
  function automatic int unsigned edge_idx(input int unsigned pos, input int unsigned lim);
    return (pos < K - 1) ? pos : (K - 1) + (pos - lim);
  endfunction

  logic        row_is_e, col_is_e;
  int unsigned row_e, col_e;
  assign row_is_e = (xp < K - 1) || (xp >= R);
  assign col_is_e = ((xq < K - 1) || (xq >= C)) && (xp < R);
  assign row_e    = edge_idx(xp, R);
  assign col_e    = edge_idx(xq, C);

  // next values of the working sums with the current input word added
  always_comb begin
    n_core = a_core;
    n_row  = a_row;
    n_col  = a_col;
    if (xp < R && xq < C) n_core = a_core + in_data;
    for (int e = 0; e < int'(NE); e++) begin
      if (row_is_e && row_e == e)
        for (int j = 0; j < int'(K); j++)
          if (xq >= j && xq < j + C) n_row[e][j] = a_row[e][j] + in_data;
      if (col_is_e && col_e == e) n_col[e] = a_col[e] + in_data;
    end
  end

  // ---------------------------------------------------------------- post-phase counters
  int unsigned pn, pi, pj;
  logic [W-1:0] xprev [K];             // X[n][i-1][j] for every j
  logic [W-1:0] xlast;                 // X[n][0][j-1]
  logic [W-1:0] xcur;
  logic         p1_v;
  logic [W-1:0] p1_x, p1_w;
  logic         p_last, p1_last;

  always_comb begin
    if (pi == 0 && pj == 0)
      xcur = g_core[pb][pn];
    else if (pi == 0)
      xcur = xlast + g_col[pb][pn][K - 2 + pj] - g_col[pb][pn][pj - 1];
    else
      xcur = xprev[pj] + g_row[pb][pn][K - 2 + pi][pj] - g_row[pb][pn][pi - 1][pj];
  end
  assign p_last = (pn == N - 1) && (pi == K - 1) && (pj == K - 1);

  // ---------------------------------------------------------------- datapath registers
  always_ff @(posedge clk) begin
    if (fire) begin
      if (in_wts) begin
        wsum[sb][wn * KK + wk] <= (wm == 0) ? in_data : wsum[sb][wn * KK + wk] + in_data;
      end else if (xp == H - 1 && xq == WD - 1) begin
        g_core[sb][xn] <= n_core;
        g_row[sb][xn]  <= n_row;
        g_col[sb][xn]  <= n_col;
      end
    end
    if (pstate == P_RUN && !p1_last) begin
      xprev[pj] <= xcur;
      xlast     <= xcur;
      p1_x      <= xcur;
      p1_w      <= wsum[pb][pn * KK + pi * K + pj];
    end
  end

  // ---------------------------------------------------------------- control
  logic stream_end;
  assign stream_end = fire && !in_wts && (xn == N - 1) && (xp == H - 1) && (xq == WD - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate  <= P_IDLE;
      pending <= '0;
      sb <= 1'b0; pb <= 1'b0;
      in_wts <= 1'b1;
      wm <= 0; wn <= 0; wk <= 0;
      xn <= 0; xp <= 0; xq <= 0;
      pn <= 0; pi <= 0; pj <= 0;
      p1_v <= 1'b0; p1_last <= 1'b0;
      a_core <= '0;
      a_row  <= '{default: '0};
      a_col  <= '{default: '0};
      rho       <= '0;
      rho_valid <= 1'b0;
    end else begin
      // ------------------------------------------------ stream side
      if (fire) begin
        if (in_wts) begin
          if (wk != KK - 1) wk <= wk + 1;
          else begin
            wk <= 0;
            if (wn != N - 1) wn <= wn + 1;
            else begin
              wn <= 0;
              if (wm != TM - 1) wm <= wm + 1;
              else begin
                wm <= 0;
                in_wts <= 1'b0;
              end
            end
          end
        end else begin
          if (xp == H - 1 && xq == WD - 1) begin
            a_core <= '0;
            a_row  <= '{default: '0};
            a_col  <= '{default: '0};
          end else begin
            a_core <= n_core;
            a_row  <= n_row;
            a_col  <= n_col;
          end
          if (xq != WD - 1) xq <= xq + 1;
          else begin
            xq <= 0;
            if (xp != H - 1) xp <= xp + 1;
            else begin
              xp <= 0;
              if (xn != N - 1) xn <= xn + 1;
              else begin
                xn     <= 0;
                in_wts <= 1'b1;
                sb     <= ~sb;
              end
            end
          end
        end
      end

      // ------------------------------------------------ post side
      unique case (pstate)
        P_IDLE: if (pending[pb]) begin
          pstate <= P_RUN;
          rho    <= '0;
        end
        P_RUN: begin
          p1_v    <= !p1_last;
          p1_last <= p1_last || p_last;
          if (p1_v) rho <= rho + p1_x * p1_w;
          if (!p1_last) begin
            if (pj != K - 1) pj <= pj + 1;
            else begin
              pj <= 0;
              if (pi != K - 1) pi <= pi + 1;
              else begin
                pi <= 0;
                pn <= (pn == N - 1) ? 0 : pn + 1;
              end
            end
          end else if (!p1_v) begin
            p1_last   <= 1'b0;
            rho_valid <= 1'b1;
            pb        <= ~pb;
            pstate    <= P_DONE;
          end
        end
        P_DONE: if (rho_ready) begin
          rho_valid <= 1'b0;
          pstate    <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase

      // bank flags: set when a tile has streamed in, cleared when its post phase is over
      for (int b = 0; b < 2; b++) begin
        if (stream_end && sb == 1'(b)) pending[b] <= 1'b1;
        if (pstate == P_RUN && p1_last && !p1_v && pb == 1'(b)) pending[b] <= 1'b0;
      end
    end
  end

  // The stream never writes a bank whose post phase has not finished.
  a_bank_free: assert property (@(posedge clk) disable iff (!rst_n) fire |-> !pending[sb]);
endmodule
