// pca_block: the PCA engine proper, in the PCA clock domain: SVD of the
// covariance matrix, sorting and selection of the principal components, and
// projection of the pixels onto them.
//
// Sequence of one operation, started by a rising edge of cov_ready (the
// covariance matrix is complete in the BRAM):
//   1. svd_jacobi loads the matrix from the BRAM and computes its singular
//      values and vectors;
//   2. sort_select orders the singular values and finds L <= LMAX;
//   3. the component matrix E is copied into the projection unit: column c of
//      E is singular vector idx[c] for c < L and zero otherwise,
//      B/NFIFO rows-chunks per column, one chunk per cycle;
//   4. projection_unit projects the n_pixels pixels it reads from the FIFOs.
// Pixels keep arriving in the FIFOs during steps 1-3, so their transfer
// overlaps the SVD. cov_ready comes from the other clock domain: it is
// synchronised here by two flip-flops.
//
// Interface: the BRAM read port, the FIFO read side, the output stream of the
// projection unit, num_pc (L), sorted singular values, done (one cycle after
// the last output value is accepted) and phase, the step being executed
// (0 idle, 1 SVD, 2 sort, 3 load E, 4 project).
module pca_block
  import fp32_pkg::*;
#(
  parameter int unsigned B          = 224,
  parameter int unsigned LANES      = 16,
  parameter int unsigned NFIFO      = 56,
  parameter int unsigned LMAX       = 24,
  parameter int unsigned UNROLL     = 8,
  parameter int unsigned MAX_SWEEPS = 16,
  parameter fp32_t       THETA      = 32'h42C4_0000,
  parameter fp32_t       EPS2       = 32'h2B8C_BCCC,
  localparam int unsigned LINES = B * B / LANES,
  localparam int unsigned LAW   = $clog2(LINES),
  localparam int unsigned NCH   = B / NFIFO,
  localparam int unsigned CW    = $clog2(NCH + 1),
  localparam int unsigned LW    = $clog2(LMAX + 1),
  localparam int unsigned IW    = $clog2(B)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cov_ready,   // from the dispatcher clock domain
  input  logic [31:0]         n_pixels,
  output logic                bram_en,
  output logic [LAW-1:0]      bram_addr,
  input  logic [LANES*32-1:0] bram_data,
  input  fp32_t               fifo_data [NFIFO],
  input  logic [NFIFO-1:0]    fifo_empty,
  output logic [NFIFO-1:0]    fifo_rd_en,
  output logic                y_valid,
  input  logic                y_ready,
  output fp32_t               y_data,
  output logic [LW-1:0]       y_comp,
  output logic [31:0]         y_pixel,
  output logic                y_last,
  output logic [LW-1:0]       num_pc,
  output fp32_t               sorted [LMAX],
  output logic [7:0]          sweeps,
  output logic [2:0]          phase,
  output logic                done
);
  typedef enum logic [2:0] {P_IDLE = 3'd0, P_SVD = 3'd1, P_SORT = 3'd2, P_LOADE = 3'd3, P_PROJ = 3'd4} phase_t;
  phase_t st;

  logic cr_s1, cr_s2, cr_s3;
  logic go;
  logic svd_start, svd_done, svd_busy;
  logic ss_start, ss_done, ss_busy;
  logic pu_start, pu_done, pu_busy;
  fp32_t sigma [B];
  logic [IW-1:0] idx [LMAX];
  logic [LW-1:0] ec;
  logic [CW-1:0] ek;
  logic [IW-1:0] v_col;
  fp32_t v_data [NFIFO];
  fp32_t pc_data [NFIFO];
  logic pc_we;

  // two-flop synchroniser and edge detector for cov_ready
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {cr_s1, cr_s2, cr_s3} <= '0;
    else        {cr_s3, cr_s2, cr_s1} <= {cr_s2, cr_s1, cov_ready};
  end
  assign go = cr_s2 && !cr_s3;

  svd_jacobi #(.B(B), .LANES(LANES), .UNROLL(UNROLL), .RD_LANES(NFIFO),
               .MAX_SWEEPS(MAX_SWEEPS), .EPS2(EPS2)) u_svd (
    .clk, .rst_n, .start(svd_start), .bram_en, .bram_addr, .bram_data,
    .done(svd_done), .busy(svd_busy), .sigma, .sweeps,
    .v_col, .v_chunk(ek), .v_data
  );

  sort_select #(.B(B), .LMAX(LMAX), .THETA(THETA)) u_sort (
    .clk, .rst_n, .start(ss_start), .sigma, .done(ss_done), .busy(ss_busy),
    .idx, .sorted, .num_pc
  );

  assign v_col = idx[ec];
  always_comb begin
    for (int f = 0; f < NFIFO; f++) pc_data[f] = (ec < num_pc) ? v_data[f] : FP_ZERO;
  end
  assign pc_we = st == P_LOADE;

  projection_unit #(.B(B), .NFIFO(NFIFO), .LMAX(LMAX)) u_pu (
    .clk, .rst_n, .pc_we, .pc_col(ec), .pc_chunk(ek), .pc_data,
    .start(pu_start), .n_pixels, .busy(pu_busy), .done(pu_done),
    .fifo_data, .fifo_empty, .fifo_rd_en,
    .y_valid, .y_ready, .y_data, .y_comp, .y_pixel, .y_last
  );

  assign phase = st;

  // the three stages run one after the other, never together
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({svd_busy, ss_busy, pu_busy}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= P_IDLE;
      svd_start <= 1'b0;
      ss_start  <= 1'b0;
      pu_start  <= 1'b0;
      ec        <= '0;
      ek        <= '0;
      done      <= 1'b0;
    end else begin
      svd_start <= 1'b0;
      ss_start  <= 1'b0;
      pu_start  <= 1'b0;
      done      <= 1'b0;
      case (st)
        P_IDLE: if (go) begin
          st        <= P_SVD;
          svd_start <= 1'b1;
        end
        P_SVD: if (svd_done) begin
          st       <= P_SORT;
          ss_start <= 1'b1;
        end
        P_SORT: if (ss_done) begin
          st <= P_LOADE;
          ec <= '0;
          ek <= '0;
        end
        P_LOADE: begin
          if (int'(ek) == int'(NCH) - 1) begin
            ek <= '0;
            if (int'(ec) == int'(LMAX) - 1) begin
              st       <= P_PROJ;
              pu_start <= 1'b1;
            end else ec <= ec + 1'b1;
          end else ek <= ek + 1'b1;
        end
        P_PROJ: if (pu_done) begin
          st   <= P_IDLE;
          done <= 1'b1;
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
