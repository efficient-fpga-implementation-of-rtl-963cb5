// tb_data_dispatcher: sends a covariance matrix and NPIX pixels through the
// dispatcher at its default sizes (B = 224, 16 values per beat, 56 FIFOs),
// with a randomly stalling stream and randomly full FIFOs. Checks every BRAM
// line written against the stream, every value pushed into each FIFO against
// the expected band order (FIFO f gets bands f, f+56, ... of each pixel),
// that no value goes to a full FIFO, that cov_ready rises only after the
// whole matrix, and that the stream was stalled by full FIFOs at least once.
module tb_data_dispatcher;
  import fp32_pkg::*;
  localparam int B = 224, LANES = 16, NFIFO = 56, NPIX = 4;
  localparam int LINES = B * B / LANES;

  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] n_pixels = NPIX;
  logic s_valid = 0, s_ready;
  logic [LANES*32-1:0] s_data = '0;
  logic bram_we;
  logic [$clog2(LINES)-1:0] bram_addr;
  logic [LANES*32-1:0] bram_data;
  logic [NFIFO-1:0] fifo_wr_en, fifo_full = '0;
  fp32_t fifo_wr_data [NFIFO];
  logic cov_ready, busy;

  data_dispatcher #(.B(B), .LANES(LANES), .NFIFO(NFIFO)) dut (.*);

  always #1 clk = ~clk;

  // value of element (line, lane) of the stream: its position, tagged
  function automatic logic [31:0] val(input int beat, input int lane);
    return 32'(beat * LANES + lane) ^ 32'hA500_0000;
  endfunction

  int checks = 0, failures = 0, beat = 0, lines_seen = 0, stalls = 0;
  int fifo_cnt [NFIFO];

  initial for (int f = 0; f < NFIFO; f++) fifo_cnt[f] = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (cov_ready != (lines_seen == LINES)) begin
      failures++;
      $display("FAIL cov_ready=%b after %0d lines", cov_ready, lines_seen);
    end
    // stream side
    if (s_valid && s_ready) beat++;
    if (s_valid && !s_ready && busy && cov_ready) stalls++;
    if (bram_we) begin
      checks++;
      if (int'(bram_addr) != lines_seen || bram_data != s_data) begin
        failures++;
        $display("FAIL bram line %0d addr %0d", lines_seen, bram_addr);
      end
      lines_seen++;
    end
    for (int f = 0; f < NFIFO; f++) begin
      if (fifo_wr_en[f]) begin
        int pix, j, band, gbeat;
        checks++;
        if (fifo_full[f]) begin
          failures++;
          $display("FAIL write to full FIFO %0d", f);
        end
        pix   = fifo_cnt[f] / (B / NFIFO);
        j     = fifo_cnt[f] % (B / NFIFO);
        band  = j * NFIFO + f;
        gbeat = LINES + pix * (B / LANES) + band / LANES;
        if (fifo_wr_data[f] != val(gbeat, band % LANES)) begin
          failures++;
          $display("FAIL FIFO %0d item %0d: %h", f, fifo_cnt[f], fifo_wr_data[f]);
        end
        fifo_cnt[f]++;
      end
    end
    fifo_full <= {$urandom, $urandom} & {$urandom, $urandom} & {NFIFO{$urandom_range(0, 1) == 1}};
  end

  always @(negedge clk) begin
    if (!(s_valid && !s_ready)) begin
      s_valid <= (beat < LINES + NPIX * B / LANES) && $urandom_range(0, 4) != 0;
    end
    s_data <= '0;
    for (int i = 0; i < LANES; i++) s_data[32*i +: 32] <= val(beat, i);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (beat == LINES + NPIX * B / LANES);
    repeat (3) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after last beat"); end
    for (int f = 0; f < NFIFO; f++) begin
      checks++;
      if (fifo_cnt[f] != NPIX * B / NFIFO) begin
        failures++;
        $display("FAIL FIFO %0d got %0d values", f, fifo_cnt[f]);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall by full FIFO seen"); end
    $display("stalls by full FIFOs: %0d", stalls);
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
