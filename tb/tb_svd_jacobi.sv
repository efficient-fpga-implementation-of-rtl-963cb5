// tb_svd_jacobi: builds a symmetric positive definite matrix with known
// eigen-decomposition, C = Q diag(lambda) Q^T with Q a Householder matrix,
// stores it in a behavioural BRAM (one cycle read latency) and runs the
// Jacobi SVD on it at a reduced size (B = 16, 4 lanes). Checks that the
// singular values match lambda (as a set, relative error 1e-4) and that the
// singular vector of each value is the matching column of Q up to sign
// (|v . q| within 1e-3 of 1). Also checks that the sweep count stops before
// the limit (the convergence test fired) and that the load reads each of the
// B*B/LANES BRAM lines in one cycle.
module tb_svd_jacobi;
  import fp32_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int B = 16, LANES = 16, UNROLL = 4, RD = 8, SW = 12;
  localparam int LINES = B * B / LANES;

  logic clk = 0, rst_n = 0, start = 0, done, busy, bram_en;
  logic [$clog2(LINES)-1:0] bram_addr;
  logic [LANES*32-1:0] bram_data;
  fp32_t sigma [B];
  logic [7:0] sweeps;
  logic [$clog2(B)-1:0] v_col = '0;
  logic [$clog2(B/RD+1)-1:0] v_chunk = '0;
  fp32_t v_data [RD];
  int checks = 0, failures = 0;

  svd_jacobi #(.B(B), .LANES(LANES), .UNROLL(UNROLL), .RD_LANES(RD), .MAX_SWEEPS(SW)) dut (.*);
  always #1 clk = ~clk;

  logic [LANES*32-1:0] mem [LINES];
  always_ff @(posedge clk) if (bram_en) bram_data <= mem[bram_addr];

  int load_cycles = 0;
  always @(posedge clk) if (bram_en) load_cycles++;

  real lam [B];
  real qm [B][B];
  real hv [B];

  initial begin
    int cycles;
    for (int i = 0; i < B; i++) hv[i] = urand(-1.0, 1.0);
    for (int i = 0; i < B; i++) lam[i] = 100.0 * pow2(-i) * urand(0.6, 1.0) + 0.01 * i;
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        real vv;
        vv = 0.0;
        for (int k = 0; k < B; k++) vv += hv[k] * hv[k];
        qm[i][j] = ((i == j) ? 1.0 : 0.0) - 2.0 * hv[i] * hv[j] / vv;
      end
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        real c;
        c = 0.0;
        for (int k = 0; k < B; k++) c += qm[i][k] * lam[k] * qm[j][k];
        mem[(i * B + j) / LANES][32 * ((i * B + j) % LANES) +: 32] = r2f(c);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    $display("SVD done after %0d cycles, %0d sweeps", cycles, sweeps);
    checks++;
    if (load_cycles != LINES) begin
      failures++;
      $display("FAIL load took %0d cycles", load_cycles);
    end
    checks++;
    if (int'(sweeps) >= SW) begin
      failures++;
      $display("FAIL did not converge in %0d sweeps", SW);
    end
    for (int i = 0; i < B; i++) begin
      int best;
      real err, dot;
      best = 0;
      for (int j = 1; j < B; j++)
        if (rabs(f2r(sigma[j]) - lam[i]) < rabs(f2r(sigma[best]) - lam[i])) best = j;
      err = rabs(f2r(sigma[best]) - lam[i]) / lam[i];
      checks++;
      if (err > 1e-4) begin
        failures++;
        $display("FAIL lambda %g: closest sigma %g", lam[i], f2r(sigma[best]));
      end
      // singular vector of that value against column i of Q
      dot = 0.0;
      v_col = $clog2(B)'(best);
      for (int ch = 0; ch < B / RD; ch++) begin
        v_chunk = ($clog2(B/RD+1))'(ch);
        @(posedge clk);
        for (int r = 0; r < RD; r++) dot += f2r(v_data[r]) * qm[ch * RD + r][i];
      end
      checks++;
      if (rabs(rabs(dot) - 1.0) > 1e-3) begin
        failures++;
        $display("FAIL vector %0d: |v.q| = %g", i, dot);
      end
    end
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
