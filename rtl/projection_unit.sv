// projection_unit: projects every input pixel onto the principal components,
// Y = X x E, in single-precision floating point.
//
// A pixel is a vector of B band values, delivered by NFIFO FIFOs: FIFO f holds
// bands f, f+NFIFO, f+2*NFIFO, ... of each pixel. The unit pops all FIFOs at
// once, so a pixel arrives in B/NFIFO reads into the "next" pixel buffer,
// while the "current" buffer is being used (double buffering). For each of
// the LMAX components c it multiplies NFIFO bands by column c of the
// component matrix E per cycle, sums the products in an adder tree and
// accumulates over B/NFIFO cycles. One output value is therefore produced
// every B/NFIFO cycles (II = 4 with B = 224 and NFIFO = 56), LMAX*B/NFIFO
// cycles per pixel (96), as long as the FIFOs keep up and the output is
// accepted. Columns of E beyond the selected number of components are zero, so
// every pixel yields LMAX values, the unused ones zero (this design's choice:
// the loop bound is LMAX, not L).
//
// Interface: pc_we / pc_col / pc_chunk / pc_data load rows
// pc_chunk*NFIFO .. +NFIFO-1 of column pc_col of E, before start. start (one
// cycle) latches n_pixels. Outputs use a valid/ready handshake: y_data is
// component y_comp of pixel y_pixel; y_last marks the last value of the
// operation. When y_valid is high and y_ready low the datapath stalls.
// done pulses after the last value has been accepted.
module projection_unit
  import fp32_pkg::*;
#(
  parameter int unsigned B     = 224,
  parameter int unsigned NFIFO = 56,
  parameter int unsigned LMAX  = 24,
  localparam int unsigned NCH  = B / NFIFO,
  localparam int unsigned CW   = $clog2(NCH + 1),
  localparam int unsigned LW   = $clog2(LMAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // component matrix load
  input  logic              pc_we,
  input  logic [LW-1:0]     pc_col,
  input  logic [CW-1:0]     pc_chunk,
  input  fp32_t             pc_data [NFIFO],
  // control
  input  logic              start,
  input  logic [31:0]       n_pixels,
  output logic              busy,
  output logic              done,
  // band FIFOs (first-word-fall-through)
  input  fp32_t             fifo_data [NFIFO],
  input  logic [NFIFO-1:0]  fifo_empty,
  output logic [NFIFO-1:0]  fifo_rd_en,
  // output stream
  output logic              y_valid,
  input  logic              y_ready,
  output fp32_t             y_data,
  output logic [LW-1:0]     y_comp,
  output logic [31:0]       y_pixel,
  output logic              y_last
);
  localparam int unsigned TS = 1 << $clog2(NFIFO);

  fp32_t pc_m  [LMAX][B];
  fp32_t cur_px [B];
  fp32_t nxt_px [B];

  logic          running;
  logic [31:0]   npix, fetched, pix;
  logic [CW-1:0] nfill;       // chunks of the next pixel received
  logic          cur_full;    // current buffer holds a pixel being projected
  logic [LW-1:0] comp;
  logic [CW-1:0] ch;
  fp32_t         acc, partial;
  logic          fetch, advance, last_ch, last_comp, swap;

  // products of one chunk and their sum
  always_comb begin
    fp32_t tr [TS];
    for (int f = 0; f < TS; f++) tr[f] = FP_ZERO;
    for (int f = 0; f < NFIFO; f++)
      tr[f] = fp_mul(cur_px[int'(ch) * NFIFO + f], pc_m[comp][int'(ch) * NFIFO + f]);
    for (int w = TS / 2; w >= 1; w = w / 2)
      for (int i = 0; i < w; i++) tr[i] = fp_add(tr[2*i], tr[2*i+1]);
    partial = tr[0];
  end

  assign fetch      = running && fetched != npix && int'(nfill) != int'(NCH) && fifo_empty == '0;
  assign fifo_rd_en = fetch ? '1 : '0;
  // the datapath moves unless a finished value is waiting at the output
  assign last_ch    = int'(ch) == int'(NCH) - 1;
  assign last_comp  = int'(comp) == int'(LMAX) - 1;
  assign advance    = cur_full && !(last_ch && y_valid && !y_ready);
  assign swap       = int'(nfill) == int'(NCH) && (!cur_full || (advance && last_ch && last_comp));
  assign busy       = running;

  always_ff @(posedge clk) begin
    if (pc_we)
      for (int f = 0; f < NFIFO; f++) pc_m[pc_col][int'(pc_chunk) * NFIFO + f] <= pc_data[f];
    if (fetch)
      for (int f = 0; f < NFIFO; f++) nxt_px[int'(nfill) * NFIFO + f] <= fifo_data[f];
    if (swap) cur_px <= nxt_px;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      npix     <= '0;
      fetched  <= '0;
      pix      <= '0;
      nfill    <= '0;
      cur_full <= 1'b0;
      comp     <= '0;
      ch       <= '0;
      acc      <= FP_ZERO;
      y_valid  <= 1'b0;
      y_data   <= FP_ZERO;
      y_comp   <= '0;
      y_pixel  <= '0;
      y_last   <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (y_valid && y_ready) begin
        y_valid <= 1'b0;
        if (y_last) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
      if (start && !running) begin
        running  <= n_pixels != 0;
        done     <= n_pixels == 0;
        npix     <= n_pixels;
        fetched  <= '0;
        pix      <= '0;
        nfill    <= '0;
        cur_full <= 1'b0;
        comp     <= '0;
        ch       <= '0;
      end else begin
        // fill and hand over the next pixel
        if (swap) begin
          nfill    <= fetch ? CW'(1) : '0;
          cur_full <= 1'b1;
        end else if (fetch) begin
          nfill <= nfill + 1'b1;
        end
        if (fetch && int'(nfill) == int'(NCH) - 1) fetched <= fetched + 1;
        // multiply-accumulate over the chunks of one component
        if (advance) begin
          if (last_ch) begin
            y_valid <= 1'b1;
            y_data  <= (NCH == 1) ? partial : fp_add(acc, partial);
            y_comp  <= comp;
            y_pixel <= pix;
            y_last  <= last_comp && pix == npix - 1;
            ch      <= '0;
            if (last_comp) begin
              comp <= '0;
              pix  <= pix + 1;
              if (!swap) cur_full <= 1'b0;
            end else comp <= comp + 1'b1;
          end else begin
            acc <= (ch == '0) ? partial : fp_add(acc, partial);
            ch  <= ch + 1'b1;
          end
        end
      end
    end
  end

  initial begin
    assert (B % NFIFO == 0) else $error("projection_unit: B must be a multiple of NFIFO");
  end
  assert property (@(posedge clk) disable iff (!rst_n) y_valid && !y_ready |=> y_valid && $stable(y_data));
endmodule
