// tb_projection_unit: runs the projection unit at its default sizes (B = 224
// bands, 56 FIFOs, LMAX = 24 components) with behavioural FIFOs in the
// testbench. Loads a random component matrix, of which the last four columns
// are zero, and projects random pixels. Every output value is compared with
// the dot product computed in double precision (relative tolerance 1e-5 of
// the sum of the magnitudes of the terms), its component and pixel indices are
// checked, and so is y_last. Run 1 keeps the FIFOs full and the output ready:
// the outputs must come exactly B/56 = 4 cycles apart (II = 4, 96 cycles per
// pixel). Run 2 starves the FIFOs and stalls the output at random, and counts
// both events.
module tb_projection_unit;
  import fp32_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int B = 224, NF = 56, LMAX = 24, NCH = B / NF, LZERO = 4;
  localparam int CW = $clog2(NCH + 1), LW = $clog2(LMAX + 1);

  logic clk = 0, rst_n = 0;
  logic pc_we = 0;
  logic [LW-1:0] pc_col = '0;
  logic [CW-1:0] pc_chunk = '0;
  fp32_t pc_data [NF];
  logic start = 0, busy, done;
  logic [31:0] n_pixels = 0;
  fp32_t fifo_data [NF];
  logic [NF-1:0] fifo_empty, fifo_rd_en;
  logic y_valid, y_ready = 1, y_last;
  fp32_t y_data;
  logic [LW-1:0] y_comp;
  logic [31:0] y_pixel;

  projection_unit #(.B(B), .NFIFO(NF), .LMAX(LMAX)) dut (.*);
  always #1 clk = ~clk;

  real   pc_r [B][LMAX];
  fp32_t px_f [$];           // all band values of all pixels, in order
  fp32_t fq [NF][$];
  bit    starve = 0, stall = 0;
  int    checks = 0, failures = 0, nout = 0, npix_run = 0, base_pix = 0;
  int    starved = 0, stalled = 0, last_t = -1, bad_ii = 0;
  longint cyc = 0;

  always_comb for (int f = 0; f < NF; f++) begin
    fifo_empty[f] = fq[f].size() == 0;
    fifo_data[f]  = fifo_empty[f] ? FP_ZERO : fq[f][0];
  end

  always @(posedge clk) begin
    cyc++;
    for (int f = 0; f < NF; f++) if (fifo_rd_en[f] && fq[f].size() != 0) void'(fq[f].pop_front());
    if (busy && fifo_empty != '0) starved++;
    if (y_valid && !y_ready) stalled++;
    if (rst_n && y_valid && y_ready) begin
      int p, c;
      real r, mag;
      p = nout / LMAX;
      c = nout % LMAX;
      r = 0.0;
      mag = 0.0;
      for (int n = 0; n < B; n++) begin
        r   += f2r(px_f[(base_pix + p) * B + n]) * pc_r[n][c];
        mag += rabs(f2r(px_f[(base_pix + p) * B + n]) * pc_r[n][c]);
      end
      checks++;
      if (rabs(f2r(y_data) - r) > 1e-5 * mag || int'(y_comp) != c || y_pixel != p ||
          y_last != (nout == npix_run * LMAX - 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL out %0d (pixel %0d comp %0d): %g expected %g", nout, y_pixel, y_comp, f2r(y_data), r);
      end
      if (!starve && !stall && last_t >= 0 && cyc - last_t != NCH) bad_ii++;
      last_t = int'(cyc);
      nout++;
    end
  end

  // stream pixels into the FIFOs: band n of a pixel goes to FIFO n mod NF
  task automatic push_pixels(input int n);
    for (int p = 0; p < n; p++)
      for (int b = 0; b < B; b++) begin
        fp32_t v;
        v = r2f(urand(-10.0, 10.0));
        px_f.push_back(v);
        fq[b % NF].push_back(v);
      end
  endtask

  task automatic run(input int n);
    npix_run = n;
    nout = 0;
    last_t = -1;
    n_pixels = n;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (nout != n * LMAX) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", nout, n * LMAX);
    end
    base_pix += n;
  endtask

  initial begin
    for (int n = 0; n < B; n++)
      for (int c = 0; c < LMAX; c++)
        pc_r[n][c] = (c >= LMAX - LZERO) ? 0.0 : f2r(r2f(urand(-1.0, 1.0)));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < LMAX; c++)
      for (int ch = 0; ch < NCH; ch++) begin
        @(negedge clk);
        pc_we = 1; pc_col = LW'(c); pc_chunk = CW'(ch);
        for (int f = 0; f < NF; f++) pc_data[f] = r2f(pc_r[ch * NF + f][c]);
      end
    @(negedge clk) pc_we = 0;
    // run 1: full rate
    push_pixels(6);
    run(6);
    checks++;
    if (bad_ii != 0) begin
      failures++;
      $display("FAIL %0d outputs not %0d cycles apart", bad_ii, NCH);
    end
    // run 2: starved FIFOs and stalled output
    starve = 1;
    stall = 1;
    fork
      run(5);
      begin
        for (int p = 0; p < 5; p++) begin
          repeat ($urandom_range(20, 150)) @(negedge clk);
          push_pixels(1);
        end
      end
      begin
        while (stall) begin
          @(negedge clk) y_ready = $urandom_range(0, 2) != 0;
        end
      end
    join_any
    stall = 0;
    wait fork;
    y_ready = 1;
    checks++;
    if (starved == 0 || stalled == 0) begin
      failures++;
      $display("FAIL starved=%0d stalled=%0d", starved, stalled);
    end
    $display("starved cycles %0d, stalled cycles %0d", starved, stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
