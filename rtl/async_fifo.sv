// async_fifo: dual-clock FIFO carrying one band partition of the pixel stream
// from the data dispatcher's clock domain to the PCA block's clock domain.
//
// The engine uses one such FIFO per band partition (56 by default), so that the
// projection unit can read 56 bands of a pixel in one cycle while the
// dispatcher, on a faster clock, keeps them filled. The two clocks being
// independent is what lets the dispatcher run faster than the PCA block.
//
// How it works: a dual-ported array of DEPTH words, binary read and write
// pointers one bit wider than the address, and their Gray-coded copies passed
// to the other clock domain through two-flop synchronisers. Full and empty
// are computed from the synchronised Gray pointers, so both flags are
// conservative: full may stay high, and empty may stay high, for up to three
// cycles of the other clock after the condition has cleared.
//
// Interface: write side (wclk, wrst_n, wr_en, wr_data, full), read side
// (rclk, rrst_n, rd_en, rd_data, empty). rd_data is first-word-fall-through:
// it shows the oldest word whenever empty is low, and rd_en pops it. A write
// while full and a read while empty are ignored. DEPTH is this design's own
// choice; it must be a power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer in the read domain
  logic [AW:0] wbin_nxt, rbin_nxt;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_nxt = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end
  // full: the Gray pointers differ only in their two top bits
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  assign rbin_nxt = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");
endmodule
