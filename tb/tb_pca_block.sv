// tb_pca_block: tests the PCA block alone at reduced sizes (16 bands, 4 FIFOs,
// LMAX = 4, unroll 4), with a behavioural BRAM and behavioural FIFOs in the
// testbench. The covariance matrix is C = Q diag(lambda) Q^T with Q a
// Householder matrix, so its eigenvectors (columns of Q) and eigenvalues are
// known; the eigenvalues fall fast enough that L = 3 < LMAX, so component 3
// must come out as zero. Raising cov_ready must start the sequence SVD, sort, component load,
// projection (checked through phase, with the component load lasting
// LMAX * B/NFIFO cycles); the reported L and sorted singular values and every
// projected value are compared with double-precision references (each
// component up to one sign).
module tb_pca_block;
  import fp32_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int B = 16, LANES = 16, NF = 4, LMAX = 4, NPIX = 6;
  localparam int LINES = B * B / LANES, LW = $clog2(LMAX + 1);

  logic clk = 0, rst_n = 0, cov_ready = 0;
  logic [31:0] n_pixels = NPIX;
  logic bram_en;
  logic [$clog2(LINES)-1:0] bram_addr;
  logic [LANES*32-1:0] bram_data;
  fp32_t fifo_data [NF];
  logic [NF-1:0] fifo_empty, fifo_rd_en;
  logic y_valid, y_ready = 1, y_last, done;
  fp32_t y_data;
  logic [LW-1:0] y_comp, num_pc;
  logic [31:0] y_pixel;
  fp32_t sorted [LMAX];
  logic [7:0] sweeps;
  logic [2:0] phase;

  pca_block #(.B(B), .LANES(LANES), .NFIFO(NF), .LMAX(LMAX), .UNROLL(4), .MAX_SWEEPS(12)) dut (.*);
  always #1 clk = ~clk;

  logic [LANES*32-1:0] mem [LINES];
  always_ff @(posedge clk) if (bram_en) bram_data <= mem[bram_addr];
  fp32_t fq [NF][$];
  always_comb for (int f = 0; f < NF; f++) begin
    fifo_empty[f] = fq[f].size() == 0;
    fifo_data[f]  = fifo_empty[f] ? FP_ZERO : fq[f][0];
  end

  real lam [B], hv [B], px [NPIX][B];
  real vv;
  int  checks = 0, failures = 0, nout = 0, lref, loade = 0;
  int  sgn [LMAX];
  logic [2:0] seq [$];

  function automatic real q(input int i, input int j);
    return ((i == j) ? 1.0 : 0.0) - 2.0 * hv[i] * hv[j] / vv;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < NF; f++) if (fifo_rd_en[f] && fq[f].size() != 0) void'(fq[f].pop_front());
    if (seq.size() == 0 || seq[$] != phase) seq.push_back(phase);
    if (phase == 3'd3) loade++;
    if (y_valid && y_ready) begin
      int p, c;
      real r, got;
      p = nout / LMAX;
      c = nout % LMAX;
      got = f2r(y_data);
      r = 0.0;
      if (c < lref) for (int n = 0; n < B; n++) r += px[p][n] * q(n, c);
      if (c < lref && sgn[c] == 0) sgn[c] = (got * r < 0.0) ? -1 : 1;
      checks++;
      if (int'(y_comp) != c || y_pixel != p || y_last != (nout == NPIX * LMAX - 1) ||
          rabs(got - sgn[c] * r) > 1e-3 * 4.0 * B) begin
        failures++;
        $display("FAIL pixel %0d comp %0d: %g expected %g", p, c, got, sgn[c] * r);
      end
      nout++;
    end
  end

  initial begin
    real te, cum;
    for (int i = 0; i < B; i++) begin
      hv[i]  = urand(-1.0, 1.0);
      lam[i] = 50.0 * pow2(-2 * i) + 1.0e-4 * (B - i);
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
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        real c;
        c = 0.0;
        for (int k = 0; k < B; k++) c += q(i, k) * lam[k] * q(j, k);
        mem[(i * B + j) / LANES][32 * ((i * B + j) % LANES) +: 32] = r2f(c);
      end
    for (int p = 0; p < NPIX; p++)
      for (int b = 0; b < B; b++) begin
        px[p][b] = f2r(r2f(urand(-4.0, 4.0)));
        fq[b % NF].push_back(r2f(px[p][b]));
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    cov_ready = 1;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (seq.size() != 6 || seq[0] != 0 || seq[1] != 1 || seq[2] != 2 || seq[3] != 3 || seq[4] != 4 || seq[5] != 0) begin
      failures++;
      $display("FAIL phase sequence, %0d phases", seq.size());
    end
    checks++;
    if (loade != LMAX * B / NF) begin
      failures++;
      $display("FAIL component load took %0d cycles", loade);
    end
    checks++;
    if (lref >= LMAX) begin
      failures++;
      $display("FAIL test setup: L is not below LMAX");
    end
    checks++;
    if (int'(num_pc) != lref || nout != NPIX * LMAX) begin
      failures++;
      $display("FAIL L = %0d expected %0d, %0d outputs", num_pc, lref, nout);
    end
    for (int c = 0; c < LMAX; c++) begin
      checks++;
      if (rabs(f2r(sorted[c]) - lam[c]) > 1e-3 * lam[c] + 1e-5 * lam[0]) begin
        failures++;
        $display("FAIL sorted %0d: %g expected %g", c, f2r(sorted[c]), lam[c]);
      end
    end
    $display("L = %0d, %0d sweeps", num_pc, sweeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
