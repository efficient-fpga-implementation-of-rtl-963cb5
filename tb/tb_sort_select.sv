// tb_sort_select: feeds random singular values to the sort-and-select block
// at its default sizes (B = 224, LMAX = 24, threshold 98 %) and compares with
// a reference sort and energy selection done in double precision in the
// testbench. Three cases: values decaying fast (L found below LMAX), values
// almost flat (L capped at LMAX), and random values. Also checks the latency,
// B + LMAX*(B+1) + 1 cycles from start to done.
module tb_sort_select;
  import fp32_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int B = 224, LMAX = 24;

  logic clk = 0, rst_n = 0, start = 0, done, busy;
  fp32_t sigma [B];
  logic [$clog2(B)-1:0] idx [LMAX];
  fp32_t sorted [LMAX];
  logic [$clog2(LMAX+1)-1:0] num_pc;
  int checks = 0, failures = 0;

  sort_select #(.B(B), .LMAX(LMAX)) dut (.*);
  always #1 clk = ~clk;

  task automatic run_case(input int kind);
    real v [B];
    int  ord [B];
    real te, cum;
    int  lref, cycles;
    bit  used [B];
    for (int i = 0; i < B; i++) begin
      case (kind)
        0: v[i] = 1000.0 * pow2(-(i / 2)) * urand(0.8, 1.0);
        1: v[i] = urand(1.0, 1.01);
        default: v[i] = urand(0.0, 100.0);
      endcase
      sigma[i] = r2f(v[i]);
      v[i]     = f2r(sigma[i]);
      used[i]  = 0;
    end
    // reference: descending order, ties by lower index
    te = 0.0;
    for (int i = 0; i < B; i++) te += v[i];
    for (int c = 0; c < B; c++) begin
      int best;
      best = -1;
      for (int i = 0; i < B; i++)
        if (!used[i] && (best < 0 || v[i] > v[best])) best = i;
      ord[c] = best;
      used[best] = 1;
    end
    lref = LMAX;
    cum  = 0.0;
    for (int c = 0; c < LMAX; c++) begin
      cum += v[ord[c]];
      if (100.0 * cum / te >= 98.0) begin
        lref = c + 1;
        break;
      end
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    for (int c = 0; c < LMAX; c++) begin
      checks++;
      if (int'(idx[c]) != ord[c] || sorted[c] != sigma[ord[c]]) begin
        failures++;
        $display("FAIL case %0d rank %0d: idx %0d expected %0d", kind, c, idx[c], ord[c]);
      end
    end
    checks++;
    if (int'(num_pc) != lref) begin
      failures++;
      $display("FAIL case %0d: L = %0d expected %0d", kind, num_pc, lref);
    end
    checks++;
    if (cycles != B + LMAX * (B + 1) + 1) begin
      failures++;
      $display("FAIL case %0d: %0d cycles, expected %0d", kind, cycles, B + LMAX * (B + 1) + 1);
    end
    $display("case %0d: L = %0d (reference %0d), %0d cycles", kind, num_pc, lref, cycles);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(0);
    run_case(1);
    run_case(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
