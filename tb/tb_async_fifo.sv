// tb_async_fifo: drives the dual-clock FIFO from a 2.5 ns write clock and an
// 11.5 ns read clock (the ratio of the dispatcher and PCA clocks), with random
// write and read requests. A queue in the testbench is the reference: every
// word read must be the oldest word written. Also checks that the FIFO
// reports full after DEPTH writes with no reads, and that empty is high when
// everything has been read.
module tb_async_fifo;
  localparam int DEPTH = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [31:0] q [$];
  int checks = 0, failures = 0, nwr = 0, nrd = 0, full_seen = 0;
  bit phase2 = 0;

  async_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #1.25 wclk = ~wclk;
  always #5.75 rclk = ~rclk;

  // writer
  always @(posedge wclk) begin
    if (wrst_n) begin
      if (wr_en && !full) begin
        q.push_back(wr_data);
        nwr++;
      end
      if (full) full_seen++;
      wr_en   <= (nwr < 400) && ($urandom_range(0, 3) != 0);
      wr_data <= $urandom;
    end
  end

  // reader
  always @(posedge rclk) begin
    if (rrst_n) begin
      if (rd_en && !empty) begin
        checks++;
        if (q.size() == 0 || rd_data != q[0]) begin
          failures++;
          $display("FAIL read %h expected %h", rd_data, q.size() ? q[0] : 0);
        end
        if (q.size() != 0) void'(q.pop_front());
        nrd++;
      end
      rd_en <= phase2 && ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1;
    rrst_n = 1;
    // phase 1: only writes until the FIFO is full
    wait (full_seen > 20);
    checks++;
    if (q.size() != DEPTH) begin
      failures++;
      $display("FAIL full after %0d words, expected %0d", q.size(), DEPTH);
    end
    phase2 = 1;
    wait (nwr >= 400 && q.size() == 0);
    repeat (6) @(posedge rclk);
    checks++;
    if (!empty) begin
      failures++;
      $display("FAIL empty low after draining");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
