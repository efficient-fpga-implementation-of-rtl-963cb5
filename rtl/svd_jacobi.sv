// svd_jacobi: singular value decomposition of the B x B covariance matrix by
// cyclic one-sided (Hestenes) Jacobi rotations, in single-precision floating
// point.
//
// The covariance matrix C is symmetric and positive semi-definite, so its
// singular values are its eigenvalues and its right singular vectors are its
// eigenvectors (the principal components). The module keeps two working
// matrices, A (starting as C) and V (starting as the identity), both stored by
// columns. For every column pair (p, q), p < q, of a sweep it
//   1. DOT: forms alpha = |a_p|^2, beta = |a_q|^2 and the off-diagonal term
//      gamma = a_p . a_q, UNROLL rows per cycle;
//   2. ROT: if gamma^2 > EPS2 * alpha * beta, computes the rotation
//      zeta = (beta - alpha) / (2 gamma), t = sign(zeta) / (|zeta| + sqrt(1 + zeta^2)),
//      c = 1 / sqrt(1 + t^2), s = c t (one floating-point step per cycle);
//   3. UPD: replaces a_p, a_q by c a_p - s a_q and s a_p + c a_q, and the same
//      for the columns of V, UNROLL rows per cycle.
// Sweeps repeat until one applies no rotation or MAX_SWEEPS is reached; then
// NORM computes sigma_i = |a_i|, the singular values, UNROLL rows per cycle.
// The pair loop being the off-diagonal loop, UNROLL = 8 is the unroll factor
// chosen for it. The choice of the one-sided Jacobi form, the convergence
// test and the sweep limit are this design's own.
//
// Interface: start (one cycle) begins by loading the matrix from the
// covariance BRAM (one LANES-value line per cycle, one cycle read latency);
// done pulses when sigma[] holds the singular values, in column order. V is
// then readable through the combinational port v_col / v_chunk / v_data,
// which returns rows v_chunk*RD_LANES .. +RD_LANES-1 of column v_col.
// Cycle count: B*B/LANES + 1 to load, per pair B/UNROLL (+1) to form the
// products, up to 8 to build the rotation, B/UNROLL to rotate, and
// B*B/UNROLL at the end.
module svd_jacobi
  import fp32_pkg::*;
#(
  parameter int unsigned B          = 224,
  parameter int unsigned LANES      = 16,
  parameter int unsigned UNROLL     = 8,
  parameter int unsigned RD_LANES   = 56,
  parameter int unsigned MAX_SWEEPS = 16,
  parameter fp32_t       EPS2       = 32'h2B8C_BCCC,  // 1e-12
  localparam int unsigned LINES = B * B / LANES,
  localparam int unsigned LAW   = $clog2(LINES),
  localparam int unsigned IW    = $clog2(B)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                bram_en,
  output logic [LAW-1:0]      bram_addr,
  input  logic [LANES*32-1:0] bram_data,
  output logic                done,
  output logic                busy,
  output fp32_t               sigma [B],
  output logic [7:0]          sweeps,
  input  logic [IW-1:0]       v_col,
  input  logic [$clog2(B/RD_LANES+1)-1:0] v_chunk,
  output fp32_t               v_data [RD_LANES]
);
  localparam int unsigned CHUNKS = B / UNROLL;
  localparam int unsigned TS     = 1 << $clog2(UNROLL);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_DOT, S_R0, S_R1, S_R2, S_R3, S_R4, S_R5, S_R6, S_UPD,
    S_NEXT, S_NORM, S_DONE
  } state_t;
  state_t state;

  fp32_t a_m [B][B];  // [column][row]
  fp32_t v_m [B][B];  // [column][row]

  logic [LAW:0]                  line;
  logic                          rd_pending;
  logic [LAW-1:0]                rd_line;
  logic [IW-1:0]                 p, q;
  logic [$clog2(CHUNKS+1)-1:0]   k;
  fp32_t alpha, beta, gamma;
  fp32_t g2, ab, diff, twog, thr, zeta, rt, t, cc, ss;
  logic  rotated;

  // ---- per-cycle lane arithmetic -----------------------------------------
  fp32_t sum_aa, sum_bb, sum_ab;
  fp32_t ap_new [UNROLL], aq_new [UNROLL], vp_new [UNROLL], vq_new [UNROLL];

  always_comb begin
    fp32_t taa [TS];
    fp32_t tbb [TS];
    fp32_t tab [TS];
    int unsigned r;
    for (int u = 0; u < TS; u++) begin
      taa[u] = FP_ZERO;
      tbb[u] = FP_ZERO;
      tab[u] = FP_ZERO;
    end
    for (int u = 0; u < UNROLL; u++) begin
      r = k * UNROLL + u;
      if (r >= B) r = 0;
      taa[u] = fp_mul(a_m[p][r], a_m[p][r]);
      tbb[u] = fp_mul(a_m[q][r], a_m[q][r]);
      tab[u] = fp_mul(a_m[p][r], a_m[q][r]);
      ap_new[u] = fp_sub(fp_mul(cc, a_m[p][r]), fp_mul(ss, a_m[q][r]));
      aq_new[u] = fp_add(fp_mul(ss, a_m[p][r]), fp_mul(cc, a_m[q][r]));
      vp_new[u] = fp_sub(fp_mul(cc, v_m[p][r]), fp_mul(ss, v_m[q][r]));
      vq_new[u] = fp_add(fp_mul(ss, v_m[p][r]), fp_mul(cc, v_m[q][r]));
    end
    for (int w = TS / 2; w >= 1; w = w / 2) begin
      for (int i = 0; i < w; i++) begin
        taa[i] = fp_add(taa[2*i], taa[2*i+1]);
        tbb[i] = fp_add(tbb[2*i], tbb[2*i+1]);
        tab[i] = fp_add(tab[2*i], tab[2*i+1]);
      end
    end
    sum_aa = taa[0];
    sum_bb = tbb[0];
    sum_ab = tab[0];
  end

  // V read port
  always_comb begin
    int unsigned r;
    for (int i = 0; i < RD_LANES; i++) begin
      r = v_chunk * RD_LANES + i;
      v_data[i] = (r < B) ? v_m[v_col][r] : FP_ZERO;
    end
  end

  assign busy = state != S_IDLE;
  assign bram_addr = line[LAW-1:0];

  // ---- control and storage -----------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      line       <= '0;
      rd_pending <= 1'b0;
      rd_line    <= '0;
      bram_en    <= 1'b0;
      p          <= '0;
      q          <= '0;
      k          <= '0;
      alpha      <= FP_ZERO;
      beta       <= FP_ZERO;
      gamma      <= FP_ZERO;
      {g2, ab, diff, twog, thr, zeta, rt, t} <= '0;
      cc         <= FP_ONE;
      ss         <= FP_ZERO;
      rotated    <= 1'b0;
      sweeps     <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          line    <= '0;
          bram_en <= 1'b1;
          sweeps  <= '0;
        end
        S_LOAD: begin
          // line issued this cycle is rd_line next cycle
          rd_pending <= bram_en;
          rd_line    <= line[LAW-1:0];
          if (bram_en) begin
            if (int'(line) == int'(LINES) - 1) bram_en <= 1'b0;
            line <= line + 1'b1;
          end
          if (rd_pending) begin
            for (int i = 0; i < LANES; i++) begin
              int unsigned flat, col, row;
              flat = rd_line * LANES + i;
              col  = flat / B;
              row  = flat % B;
              a_m[col][row] <= bram_data[32*i +: 32];
              v_m[col][row] <= (col == row) ? FP_ONE : FP_ZERO;
            end
            if (int'(rd_line) == int'(LINES) - 1) begin
              state   <= S_DOT;
              p       <= '0;
              q       <= IW'(1);
              k       <= '0;
              alpha   <= FP_ZERO;
              beta    <= FP_ZERO;
              gamma   <= FP_ZERO;
              rotated <= 1'b0;
            end
          end
        end
        S_DOT: begin
          alpha <= fp_add(alpha, sum_aa);
          beta  <= fp_add(beta, sum_bb);
          gamma <= fp_add(gamma, sum_ab);
          if (int'(k) == int'(CHUNKS) - 1) begin
            k     <= '0;
            state <= S_R0;
          end else k <= k + 1'b1;
        end
        S_R0: begin
          g2    <= fp_mul(gamma, gamma);
          ab    <= fp_mul(alpha, beta);
          diff  <= fp_sub(beta, alpha);
          twog  <= fp_mul(FP_TWO, gamma);
          state <= S_R1;
        end
        S_R1: begin
          thr   <= fp_mul(ab, EPS2);
          zeta  <= fp_div(diff, twog);
          state <= S_R2;
        end
        S_R2: begin
          if (fp_is_zero(gamma) || !fp_lt(thr, g2)) state <= S_NEXT;  // already orthogonal
          else                                       state <= S_R3;
        end
        S_R3: begin
          // sqrt(1 + zeta^2), or |zeta| where zeta^2 would overflow
          if (zeta[30:23] >= 8'd190) rt <= fp_abs(zeta);
          else                       rt <= fp_sqrt(fp_add(FP_ONE, fp_mul(zeta, zeta)));
          state <= S_R4;
        end
        S_R4: begin
          t     <= fp_div(zeta[31] ? fp_neg(FP_ONE) : FP_ONE, fp_add(fp_abs(zeta), rt));
          state <= S_R5;
        end
        S_R5: begin
          cc    <= fp_div(FP_ONE, fp_sqrt(fp_add(FP_ONE, fp_mul(t, t))));
          state <= S_R6;
        end
        S_R6: begin
          ss      <= fp_mul(cc, t);
          rotated <= 1'b1;
          state   <= S_UPD;
        end
        S_UPD: begin
          for (int u = 0; u < UNROLL; u++) begin
            a_m[p][int'(k) * UNROLL + u] <= ap_new[u];
            a_m[q][int'(k) * UNROLL + u] <= aq_new[u];
            v_m[p][int'(k) * UNROLL + u] <= vp_new[u];
            v_m[q][int'(k) * UNROLL + u] <= vq_new[u];
          end
          if (int'(k) == int'(CHUNKS) - 1) begin
            k     <= '0;
            state <= S_NEXT;
          end else k <= k + 1'b1;
        end
        S_NEXT: begin
          alpha <= FP_ZERO;
          beta  <= FP_ZERO;
          gamma <= FP_ZERO;
          k     <= '0;
          if (int'(q) == int'(B) - 1) begin
            if (int'(p) == int'(B) - 2) begin
              // end of a sweep
              sweeps  <= sweeps + 1'b1;
              rotated <= 1'b0;
              if (!rotated || int'(sweeps) + 1 >= int'(MAX_SWEEPS)) begin
                state <= S_NORM;
                p     <= '0;
                q     <= '0;
              end else begin
                state <= S_DOT;
                p     <= '0;
                q     <= IW'(1);
              end
            end else begin
              state <= S_DOT;
              p     <= p + 1'b1;
              q     <= p + IW'(2);
            end
          end else begin
            state <= S_DOT;
            q     <= q + 1'b1;
          end
        end
        S_NORM: begin
          // p = q = column i: sum_aa accumulates |a_i|^2
          if (int'(k) == int'(CHUNKS) - 1) begin
            sigma[p] <= fp_sqrt(fp_add(alpha, sum_aa));
            alpha    <= FP_ZERO;
            k        <= '0;
            if (int'(p) == int'(B) - 1) state <= S_DONE;
            else begin
              p <= p + 1'b1;
              q <= q + 1'b1;
            end
          end else begin
            alpha <= fp_add(alpha, sum_aa);
            k     <= k + 1'b1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (B % UNROLL == 0 && (B * B) % LANES == 0 && B % RD_LANES == 0 && B >= 2)
      else $error("svd_jacobi: B must be a multiple of UNROLL and RD_LANES");
  end
endmodule
