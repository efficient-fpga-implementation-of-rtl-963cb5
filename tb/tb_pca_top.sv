// tb_pca_top: end-to-end test of the PCA accelerator (pca_top) at reduced sizes (32 bands, 8 FIFOs, LMAX = 6).
//
// Each operation streams a covariance matrix C = Q diag(lambda) Q^T, whose
// eigenvectors are the columns of a Householder matrix Q = I - 2 v v^T / v^T v
// and whose eigenvalues lambda are chosen by the testbench, followed by random
// pixels, through the 512-bit input stream with random gaps. The outputs are
// checked against projections computed in double precision in the testbench:
// for c < L, y[p][c] = +-(x_p . q_c) with one sign per component (an
// eigenvector's sign is arbitrary), and y[p][c] = 0 for c >= L. L itself is
// checked against the 98 % energy rule applied to lambda, and so are the
// sorted singular values reported by the design.
//
// Operations: two in a row, the first with fast-decaying eigenvalues (L < LMAX),
// the second with slowly decaying ones (L = LMAX) and a randomly stalled output.
// Mechanisms counted, each of which must occur (L capped at LMAX only where
// two operations are run): the input stream held off by
// full band FIFOs, pixel beats accepted before the projection has started,
// that is while the SVD, sort or component load is running, the projection waiting for empty FIFOs, the output
// stream stalled by y_ready, L found below LMAX by the energy rule, and L
// capped at LMAX.
module tb_pca_top;
  import fp32_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int B = 32, LANES = 8, NFIFO = 8, LMAX = 6;
  localparam int LW = $clog2(LMAX + 1);
  localparam int LINES = B * B / LANES;

  logic clk_d = 0, clk_p = 0, rst_d_n = 0, rst_p_n = 0, start = 0;
  logic [31:0] n_pixels = 0;
  logic s_valid = 0, s_ready;
  logic [LANES*32-1:0] s_data = '0;
  logic dispatch_busy, y_valid, y_ready = 1, y_last, pca_done;
  fp32_t y_data;
  logic [LW-1:0] y_comp, num_pc;
  logic [31:0] y_pixel;
  fp32_t sorted [LMAX];
  logic [7:0] sweeps;
  logic [2:0] phase;

  pca_top #(.B(32), .LANES(8), .NFIFO(8), .FIFO_DEPTH(8), .LMAX(6), .UNROLL(4), .MAX_SWEEPS(12))
          dut (.*);

  always #1.25 clk_d = ~clk_d;   // dispatcher clock, 400 MHz
  always #5.75 clk_p = ~clk_p;   // PCA clock, about 87 MHz

  real lam [B];
  real hv [B];
  real vv;
  localparam int NPMAX = 16;
  real px [NPMAX][B];
  logic [LANES*32-1:0] beats [$];
  int checks = 0, failures = 0;
  int npix = 0, nout = 0, lref = 0;
  int  sgn [LMAX];
  // mechanism counters
  int n_fifo_full = 0, n_overlap = 0, n_starve = 0, n_ystall = 0, n_lfound = 0, n_lcap = 0;
  bit rand_ready = 0;

  function automatic real q(input int i, input int j);
    return ((i == j) ? 1.0 : 0.0) - 2.0 * hv[i] * hv[j] / vv;
  endfunction

  // input stream driver
  always @(posedge clk_d) begin
    if (s_valid && s_ready) void'(beats.pop_front());
    if (s_valid && !s_ready && dispatch_busy) n_fifo_full++;
    if (s_valid && s_ready && phase != 3'd4 && dut.u_disp.cov_ready && dispatch_busy) n_overlap++;
  end
  always @(negedge clk_d) begin
    if (!(s_valid && !s_ready)) begin
      s_valid <= beats.size() != 0 && $urandom_range(0, 3) != 0;
      if (beats.size() != 0) s_data <= beats[0];
    end
  end

  // output checker
  always @(posedge clk_p) if (rst_p_n) begin
    if (dut.u_pca.u_pu.busy && dut.u_pca.u_pu.fifo_empty != '0 && !dut.u_pca.u_pu.cur_full) n_starve++;
    if (y_valid && !y_ready) n_ystall++;
    if (y_valid && y_ready) begin
      int p, c;
      real r, mag, got;
      p = nout / LMAX;
      c = nout % LMAX;
      got = f2r(y_data);
      r = 0.0;
      mag = 0.0;
      if (c < lref) for (int n = 0; n < B; n++) begin
        r   += px[p][n] * q(n, c);
        mag += rabs(px[p][n]);
      end
      if (c < lref && sgn[c] == 0) sgn[c] = (got * r < 0.0) ? -1 : 1;
      checks++;
      if (int'(y_comp) != c || y_pixel != p || y_last != (nout == npix * LMAX - 1) ||
          rabs(got - sgn[c] * r) > 1e-3 * mag + 1e-30) begin
        failures++;
        if (failures < 10)
          $display("FAIL pixel %0d comp %0d: %g expected %g (index %0d/%0d)", p, c, got, sgn[c] * r, y_pixel, y_comp);
      end
      nout++;
    end
  end

  task automatic operation(input int kind, input int n);
    real te, cum;
    // eigenvalues and eigenvectors
    for (int i = 0; i < B; i++) begin
      hv[i] = urand(-1.0, 1.0);
      case (kind)
        0: lam[i] = 100.0 * pow2(-2 * i) * (1.0 + 0.1 * urand(0.0, 1.0)) + 1.0e-5 * (B - i);
        default: lam[i] = 100.0 - (50.0 / B) * i;
      endcase
    end
    vv = 0.0;
    for (int i = 0; i < B; i++) vv += hv[i] * hv[i];
    te = 0.0;
    for (int i = 0; i < B; i++) te += lam[i];
    lref = LMAX;
    cum = 0.0;
    for (int c = 0; c < LMAX; c++) begin
      cum += lam[c];
      if (100.0 * cum / te >= 98.0) begin
        lref = c + 1;
        break;
      end
    end
    for (int c = 0; c < LMAX; c++) sgn[c] = 0;
    // stream: covariance matrix, then pixels
    begin
      logic [LANES*32-1:0] bt;
      int k;
      k = 0;
      bt = '0;
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) begin
          real c;
          c = 0.0;
          for (int m = 0; m < B; m++) c += q(i, m) * lam[m] * q(j, m);
          bt[32 * k +: 32] = r2f(c);
          k++;
          if (k == LANES) begin
            beats.push_back(bt);
            k = 0;
          end
        end
      for (int p = 0; p < n; p++) begin
        for (int b = 0; b < B; b++) begin
          px[p][b] = f2r(r2f(urand(-4.0, 4.0)));
          bt[32 * k +: 32] = r2f(px[p][b]);
          k++;
          if (k == LANES) begin
            beats.push_back(bt);
            k = 0;
          end
        end
      end
    end
    npix = n;
    nout = 0;
    n_pixels = n;
    @(negedge clk_d) start = 1;
    @(negedge clk_d) start = 0;
    while (!pca_done) @(posedge clk_p);
    // results
    checks++;
    if (nout != n * LMAX) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", nout, n * LMAX);
    end
    checks++;
    if (int'(num_pc) != lref) begin
      failures++;
      $display("FAIL L = %0d, expected %0d", num_pc, lref);
    end
    if (lref < LMAX) n_lfound++;
    else n_lcap++;
    for (int c = 0; c < LMAX; c++) begin
      checks++;
      if (rabs(f2r(sorted[c]) - lam[c]) > 1e-3 * lam[c] + 1e-5 * lam[0]) begin
        failures++;
        $display("FAIL sorted singular value %0d: %g expected %g", c, f2r(sorted[c]), lam[c]);
      end
    end
    $display("operation %0d: %0d pixels, L = %0d (expected %0d), %0d sweeps", kind, n, num_pc, lref, sweeps);
  endtask

  initial begin
    repeat (4) @(posedge clk_p);
    rst_d_n = 1;
    rst_p_n = 1;
    operation(0, 12);
    rand_ready = 1;
    fork
      operation(1, 9);
      while (rand_ready) @(negedge clk_p) y_ready = $urandom_range(0, 2) != 0;
    join_any
    rand_ready = 0;
    y_ready = 1;
    checks++;
    if (n_fifo_full == 0 || n_overlap == 0 || n_starve == 0 || n_ystall == 0 || n_lfound == 0 || n_lcap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("input held off by full FIFOs: %0d cycles", n_fifo_full);
    $display("pixel beats taken before the projection started: %0d", n_overlap);
    $display("projection waiting for FIFOs: %0d cycles", n_starve);
    $display("output stalled: %0d cycles", n_ystall);
    $display("L below LMAX: %0d, L capped at LMAX: %0d", n_lfound, n_lcap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) #10000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
