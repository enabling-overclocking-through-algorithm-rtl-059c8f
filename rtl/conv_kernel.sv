// conv_kernel: tiled convolution-layer kernel with TN-way unrolled, TM-way replicated MAC trees.
//
// One tile computes TM output feature maps of size R x C from all N input channels of a
// (R+K-1) x (C+K-1) input window with a K x K kernel and unit stride. The tile arrives as one
// word stream: first its weights w[m][n][i][j] (TM*N*K*K words, j fastest), then its inputs
// x[n][p][q] (N*(R+K-1)*(C+K-1) words, q fastest). The compute stage walks n in groups of TN,
// and inside a group every (i,j) and every output position (r,c). Each cycle TM adder trees
// each multiply TN inputs by TN weights and add their sum into output-buffer entry (m,r,c), so
// TM*TN multiplications issue per cycle. The datapath is a three-stage pipeline: operand fetch,
// multiply (products registered), then adder tree plus accumulate. The first contribution to
// each output overwrites the stale entry instead of adding to it. When N is not a multiple of
// TN the unused lanes of the last group multiply by zero. Outputs leave in (m, r, c) order.
//
// Input and output buffers are doubled, so loading tile t+1, computing tile t and draining
// tile t-1 overlap (macro-pipelining). A bank flag is set by the stage that fills the bank and
// cleared by the stage that empties it; a stage waits while its next bank is not ready.
//
// All arithmetic is modulo 2^W (two's-complement wrap-around). Outputs therefore equal the exact
// convolution modulo 2^W, which is what makes the checksum comparison exact. Both stream ports
// use valid/ready. Per tile: TM*N*K*K + N*(R+K-1)*(C+K-1) load cycles, ceil(N/TN)*K*K*R*C
// compute cycles, TM*R*C output cycles; with an idle kernel the first output word is valid
// ceil(N/TN)*K*K*R*C + 5 cycles after the last input word is taken. In steady state a tile
// takes the longest of the three stages.
//
// The loop order, the unrolled trees replicated per output channel, the pipelined datapath
// and the overlap of transfers with computation follow the paper; the stream order, word
// formats, buffer layout, pipeline depth and bank hand-over are this design's own choices.
module conv_kernel
  import aled_pkg::*;
#(
  parameter int unsigned N  = LAYER_N,
  parameter int unsigned TM = UNROLL_TM,
  parameter int unsigned TN = UNROLL_TN,
  parameter int unsigned R  = LAYER_R,
  parameter int unsigned C  = LAYER_C,
  parameter int unsigned K  = LAYER_K,
  parameter int unsigned W  = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         busy       // high from the first loaded word to the last output word
);
  localparam int unsigned H     = R + K - 1;
  localparam int unsigned WD    = C + K - 1;
  localparam int unsigned NG    = (N + TN - 1) / TN;
  localparam int unsigned WSIZE = TM * N * K * K;
  localparam int unsigned XSIZE = N * H * WD;
  localparam int unsigned OSIZE = TM * R * C;
  localparam int unsigned LDW   = $clog2(WSIZE + XSIZE + 1);
  localparam int unsigned OW    = $clog2(OSIZE + 1);
  localparam int unsigned WAW   = $clog2(WSIZE);
  localparam int unsigned XAW   = $clog2(XSIZE);
  localparam int unsigned GW    = $clog2(NG + 1);
  localparam int unsigned KW    = $clog2(K + 1);
  localparam int unsigned RW    = $clog2(R + 1);
  localparam int unsigned CW    = $clog2(C + 1);

  // Two banks of weight/input buffers and two of output buffers form a three-stage macro
  // pipeline: load tile t+1 | compute tile t | drain tile t-1.
  logic [W-1:0] w_buf [2][WSIZE];
  logic [W-1:0] x_buf [2][XSIZE];
  logic [W-1:0] o_buf [2][OSIZE];

  logic [1:0] in_full;            // input bank holds a complete tile not yet computed
  logic [1:0] o_full;             // output bank holds a computed tile not yet drained
  logic       lb, cb, ob, db;     // bank being loaded / computed from / computed into / drained

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_FLUSH} cstate_t;
  cstate_t cstate;

  logic [LDW-1:0] ld_cnt;
  logic [OW-1:0]  out_cnt;
  logic [GW-1:0]  g;
  logic [KW-1:0]  ki, kj;
  logic [RW-1:0]  r;
  logic [CW-1:0]  c;
  logic           last_pos, ld_fire, ld_last, c_start, out_fire, out_last;

  // ---------------------------------------------------------------- load
  assign in_ready = !in_full[lb];
  assign ld_fire  = in_valid && in_ready;
  assign ld_last  = ld_fire && (ld_cnt == LDW'(WSIZE + XSIZE - 1));

  always_ff @(posedge clk) begin
    if (ld_fire) begin
      if (ld_cnt < LDW'(WSIZE)) w_buf[lb][WAW'(ld_cnt)] <= in_data;
      else                      x_buf[lb][XAW'(ld_cnt - LDW'(WSIZE))] <= in_data;
    end
  end

  // ---------------------------------------------------------------- loop nest
  assign c_start  = (cstate == C_IDLE) && in_full[cb] && !o_full[ob];
  assign last_pos = (g == GW'(NG-1)) && (ki == KW'(K-1)) && (kj == KW'(K-1)) &&
                    (r == RW'(R-1)) && (c == CW'(C-1));

  // Pipeline stage 1: fetched operands
  logic          s1_v, s1_first;
  logic [OW-1:0] s1_pos;
  logic [W-1:0]  s1_x [TN];
  logic [W-1:0]  s1_w [TM][TN];
  // Pipeline stage 2: products
  logic          s2_v, s2_first;
  logic [OW-1:0] s2_pos;
  logic [W-1:0]  s2_p [TM][TN];

  always_ff @(posedge clk) begin
    for (int tn = 0; tn < int'(TN); tn++) begin
      automatic int n = int'(g) * int'(TN) + tn;
      if (n < int'(N)) begin
        s1_x[tn] <= x_buf[cb][(n * int'(H) + int'(r) + int'(ki)) * int'(WD) + int'(c) + int'(kj)];
        for (int tm = 0; tm < int'(TM); tm++)
          s1_w[tm][tn] <= w_buf[cb][((tm * int'(N) + n) * int'(K) + int'(ki)) * int'(K) + int'(kj)];
      end else begin
        s1_x[tn] <= '0;
        for (int tm = 0; tm < int'(TM); tm++) s1_w[tm][tn] <= '0;
      end
    end
    s1_pos   <= OW'(int'(r) * int'(C) + int'(c));
    s1_first <= (g == '0) && (ki == '0) && (kj == '0);

    for (int tm = 0; tm < int'(TM); tm++)
      for (int tn = 0; tn < int'(TN); tn++)
        s2_p[tm][tn] <= s1_x[tn] * s1_w[tm][tn];
    s2_pos   <= s1_pos;
    s2_first <= s1_first;
  end

  // Stage 3: adder trees and accumulation into the output buffer
  logic [W-1:0] tree [TM];
  always_comb begin
    for (int tm = 0; tm < int'(TM); tm++) begin
      tree[tm] = '0;
      for (int tn = 0; tn < int'(TN); tn++) tree[tm] = tree[tm] + s2_p[tm][tn];
    end
  end

  always_ff @(posedge clk) begin
    if (s2_v) begin
      for (int tm = 0; tm < int'(TM); tm++) begin
        automatic logic [OW-1:0] a = OW'(tm * int'(R) * int'(C)) + s2_pos;
        o_buf[ob][a] <= s2_first ? tree[tm] : o_buf[ob][a] + tree[tm];
      end
    end
  end

  // ---------------------------------------------------------------- output
  assign out_valid = o_full[db];
  assign out_data  = o_buf[db][out_cnt];
  assign out_fire  = out_valid && out_ready;
  assign out_last  = out_fire && (out_cnt == OW'(OSIZE - 1));
  assign busy      = (ld_cnt != '0) || (in_full != '0) || (cstate != C_IDLE) || (o_full != '0);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate  <= C_IDLE;
      in_full <= '0;
      o_full  <= '0;
      lb <= 1'b0; cb <= 1'b0; ob <= 1'b0; db <= 1'b0;
      ld_cnt  <= '0;
      out_cnt <= '0;
      g  <= '0; ki <= '0; kj <= '0; r <= '0; c <= '0;
      s1_v <= 1'b0;
      s2_v <= 1'b0;
    end else begin
      s1_v <= (cstate == C_RUN);
      s2_v <= s1_v;

      // loader
      if (ld_fire) ld_cnt <= ld_last ? '0 : ld_cnt + 1'b1;
      if (ld_last) lb <= ~lb;

      // drain
      if (out_fire) out_cnt <= out_last ? '0 : out_cnt + 1'b1;
      if (out_last) db <= ~db;

      // bank flags: set by the producer, cleared by the consumer (never the same bank at once)
      for (int b = 0; b < 2; b++) begin
        if (ld_last && lb == 1'(b))                           in_full[b] <= 1'b1;
        if (cstate == C_RUN && last_pos && cb == 1'(b))        in_full[b] <= 1'b0;
        if (cstate == C_FLUSH && !s1_v && !s2_v && ob == 1'(b)) o_full[b] <= 1'b1;
        if (out_last && db == 1'(b))                          o_full[b] <= 1'b0;
      end

      // compute
      unique case (cstate)
        C_IDLE: if (c_start) cstate <= C_RUN;
        C_RUN: begin
          if (last_pos) begin
            cstate <= C_FLUSH;
            cb     <= ~cb;
          end
          if (c != CW'(C-1)) c <= c + 1'b1;
          else begin
            c <= '0;
            if (r != RW'(R-1)) r <= r + 1'b1;
            else begin
              r <= '0;
              if (kj != KW'(K-1)) kj <= kj + 1'b1;
              else begin
                kj <= '0;
                if (ki != KW'(K-1)) ki <= ki + 1'b1;
                else begin
                  ki <= '0;
                  g  <= (g == GW'(NG-1)) ? '0 : g + 1'b1;
                end
              end
            end
          end
        end
        C_FLUSH: if (!s1_v && !s2_v) begin
          cstate <= C_IDLE;
          ob     <= ~ob;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // A bank is never written while it is full, and never computed from while empty.
  a_load_free: assert property (@(posedge clk) disable iff (!rst_n) ld_fire |-> !in_full[lb]);
  a_run_full:  assert property (@(posedge clk) disable iff (!rst_n)
                                (cstate == C_RUN) |-> in_full[cb]);
endmodule
