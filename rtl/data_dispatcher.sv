// data_dispatcher: front end of the PCA engine, in the fast memory clock
// domain.
//
// One operation is a single input stream of 512-bit beats, each carrying
// LANES = 16 single-precision values. The stream holds first the B x B
// covariance matrix, which the dispatcher writes line by line into the
// covariance BRAM, and then the N input pixels, each as B consecutive band
// values. The dispatcher spreads the bands of every pixel over NFIFO FIFOs:
// band n goes to FIFO n mod NFIFO. With B = 224 and NFIFO = 56 each FIFO thus
// holds bands f, f+56, f+112, f+168 of every pixel, in that order, which is
// what lets the projection unit read 56 bands per cycle in 4 cycles per pixel.
// The order of the stream and the cyclic band-to-FIFO mapping are this
// design's own reading of "receives first the covariance matrix ... then the
// input pixels ... and sends them to the FIFOs".
//
// Handshake: a beat is taken when s_valid and s_ready are both high. During
// the pixel phase s_ready is low whenever any of the 16 FIFOs a beat would
// write to is full, so a full FIFO stalls the stream (backpressure).
// start (one cycle) latches n_pixels and begins an operation; cov_ready goes
// high once the whole matrix is in the BRAM and stays high until the next
// start; busy is low again after the last pixel beat.
module data_dispatcher
  import fp32_pkg::*;
#(
  parameter int unsigned B     = 224,
  parameter int unsigned LANES = 16,
  parameter int unsigned NFIFO = 56,
  localparam int unsigned LINES = B * B / LANES,
  localparam int unsigned LAW   = $clog2(LINES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [31:0]            n_pixels,
  input  logic                   s_valid,
  output logic                   s_ready,
  input  logic [LANES*32-1:0]    s_data,
  // covariance BRAM write port
  output logic                   bram_we,
  output logic [LAW-1:0]         bram_addr,
  output logic [LANES*32-1:0]    bram_data,
  // band FIFOs
  output logic [NFIFO-1:0]       fifo_wr_en,
  output fp32_t                  fifo_wr_data [NFIFO],
  input  logic [NFIFO-1:0]       fifo_full,
  output logic                   cov_ready,
  output logic                   busy
);
  localparam int unsigned BEATS_PER_PIX = B / LANES;

  typedef enum logic [1:0] {S_IDLE, S_COV, S_PIX} state_t;
  state_t state;

  logic [LAW-1:0]                        line;
  logic [$clog2(BEATS_PER_PIX+1)-1:0]    beat;
  logic [31:0]                           pix, npix;
  logic [$clog2(NFIFO)-1:0]              fbase;   // FIFO of the beat's first band
  logic [NFIFO-1:0]                      target;  // FIFOs this beat writes
  logic [$clog2(NFIFO)-1:0]              lane_fifo [LANES];
  logic                                  take;

  always_comb begin
    target = '0;
    for (int i = 0; i < LANES; i++) begin
      if (int'(fbase) + i >= int'(NFIFO)) lane_fifo[i] = ($clog2(NFIFO))'(int'(fbase) + i - int'(NFIFO));
      else                                lane_fifo[i] = ($clog2(NFIFO))'(int'(fbase) + i);
      target[lane_fifo[i]] = 1'b1;
    end
  end

  always_comb begin
    case (state)
      S_COV:   s_ready = 1'b1;
      S_PIX:   s_ready = (target & fifo_full) == '0;
      default: s_ready = 1'b0;
    endcase
  end
  assign take = s_valid && s_ready;

  // BRAM write: the beat goes straight through
  assign bram_we   = take && state == S_COV;
  assign bram_addr = line;
  assign bram_data = s_data;

  always_comb begin
    fifo_wr_en = '0;
    for (int f = 0; f < NFIFO; f++) fifo_wr_data[f] = FP_ZERO;
    if (take && state == S_PIX) begin
      for (int i = 0; i < LANES; i++) begin
        fifo_wr_en[lane_fifo[i]]   = 1'b1;
        fifo_wr_data[lane_fifo[i]] = s_data[32*i +: 32];
      end
    end
  end

  assign busy = state != S_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      line      <= '0;
      beat      <= '0;
      pix       <= '0;
      npix      <= '0;
      fbase     <= '0;
      cov_ready <= 1'b0;
    end else begin
      if (start) begin
        state     <= S_COV;
        line      <= '0;
        beat      <= '0;
        pix       <= '0;
        npix      <= n_pixels;
        fbase     <= '0;
        cov_ready <= 1'b0;
      end else if (take) begin
        if (state == S_COV) begin
          line <= line + 1'b1;
          if (int'(line) == int'(LINES) - 1) begin
            cov_ready <= 1'b1;
            state     <= (npix == 0) ? S_IDLE : S_PIX;
          end
        end else begin
          if (int'(fbase) + int'(LANES) >= int'(NFIFO))
            fbase <= ($clog2(NFIFO))'(int'(fbase) + int'(LANES) - int'(NFIFO));
          else
            fbase <= ($clog2(NFIFO))'(int'(fbase) + int'(LANES));
          if (int'(beat) == int'(BEATS_PER_PIX) - 1) begin
            beat <= '0;
            pix  <= pix + 1;
            if (pix == npix - 1) state <= S_IDLE;
          end else begin
            beat <= beat + 1'b1;
          end
        end
      end
    end
  end

  initial begin
    assert (B % LANES == 0 && B % NFIFO == 0 && NFIFO >= LANES && (B * B) % LANES == 0)
      else $error("data_dispatcher: B must be a multiple of LANES and NFIFO, NFIFO >= LANES");
  end
  // a FIFO is never written while full
  assert property (@(posedge clk) disable iff (!rst_n) (fifo_wr_en & fifo_full) == '0);
endmodule
