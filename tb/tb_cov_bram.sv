// tb_cov_bram: writes random lines through port A (clock A) and reads them back
// through port B (clock B, one cycle latency), checking every line against a
// copy kept in the testbench. Also checks that a read with en_b low keeps the
// previous output.
module tb_cov_bram;
  localparam int LINES = 64, W = 64;
  logic clk_a = 0, clk_b = 0, we_a = 0, en_b = 0;
  logic [5:0] addr_a = 0, addr_b = 0;
  logic [W-1:0] wr_data_a = 0, rd_data_b;
  logic [W-1:0] ref_m [LINES];
  int checks = 0, failures = 0;

  cov_bram #(.WIDTH(W), .LINES(LINES)) dut (.*);

  always #2 clk_a = ~clk_a;
  always #5 clk_b = ~clk_b;

  initial begin
    for (int i = 0; i < LINES; i++) begin
      @(negedge clk_a);
      we_a = 1; addr_a = 6'(i); wr_data_a = {$urandom, $urandom};
      ref_m[i] = wr_data_a;
    end
    @(negedge clk_a) we_a = 0;
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(0, LINES - 1);
      @(negedge clk_b);
      en_b = 1; addr_b = 6'(a);
      @(negedge clk_b);
      en_b = 0; addr_b = addr_b + 1;
      checks++;
      if (rd_data_b !== ref_m[a]) begin
        failures++;
        $display("FAIL line %0d: %h vs %h", a, rd_data_b, ref_m[a]);
      end
      @(negedge clk_b);
      checks++;
      if (rd_data_b !== ref_m[a]) begin
        failures++;
        $display("FAIL hold line %0d", a);
      end
    end
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
