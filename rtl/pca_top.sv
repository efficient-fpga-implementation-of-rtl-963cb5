// pca_top: FPGA part of the PCA accelerator for large hyperspectral or
// microwave images: data dispatcher, covariance BRAM, band FIFOs and PCA block.
//
// Two clock domains. The dispatcher side (clk_d, 400 MHz in the reference
// implementation) takes the memory stream, one 512-bit beat (16 values) at a
// time: first the B x B covariance matrix, written into the dual-clock
// covariance BRAM, then the N pixels of B bands, spread over NFIFO dual-clock
// FIFOs. The PCA side (clk_p, 87 MHz there) computes the SVD of the matrix
// from the BRAM, selects the principal components and projects the pixels as
// they come out of the FIFOs. Pixel transfer overlaps the SVD; once the FIFOs
// are full the stream is held off until the projection starts draining them.
//
// The memory controller, its PLL, the AXI interconnect and the DDR are not
// part of this RTL: their stream, clocks and resets are the ports here.
// s_* is the input stream (clk_d), y_* the output stream (clk_p), with
// valid/ready handshakes. start (clk_d, one cycle) begins an operation with
// n_pixels pixels; n_pixels must stay stable until pca_done (clk_p).
// num_pc is the number of selected components L; each pixel still gives LMAX
// output values, those of components L..LMAX-1 being zero.
module pca_top
  import fp32_pkg::*;
#(
  parameter int unsigned B          = 224,
  parameter int unsigned LANES      = 16,
  parameter int unsigned NFIFO      = 56,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned LMAX       = 24,
  parameter int unsigned UNROLL     = 8,
  parameter int unsigned MAX_SWEEPS = 16,
  parameter fp32_t       THETA      = 32'h42C4_0000,  // 98 %
  parameter fp32_t       EPS2       = 32'h2B8C_BCCC,  // 1e-12
  localparam int unsigned LW        = $clog2(LMAX + 1)
) (
  input  logic                clk_d,
  input  logic                rst_d_n,
  input  logic                clk_p,
  input  logic                rst_p_n,
  input  logic                start,
  input  logic [31:0]         n_pixels,
  input  logic                s_valid,
  output logic                s_ready,
  input  logic [LANES*32-1:0] s_data,
  output logic                dispatch_busy,
  output logic                y_valid,
  input  logic                y_ready,
  output fp32_t               y_data,
  output logic [LW-1:0]       y_comp,
  output logic [31:0]         y_pixel,
  output logic                y_last,
  output logic [LW-1:0]       num_pc,
  output fp32_t               sorted [LMAX],
  output logic [7:0]          sweeps,
  output logic [2:0]          phase,
  output logic                pca_done
);
  localparam int unsigned LINES = B * B / LANES;
  localparam int unsigned LAW   = $clog2(LINES);

  logic                 bram_we, bram_en;
  logic [LAW-1:0]       bram_waddr, bram_raddr;
  logic [LANES*32-1:0]  bram_wdata, bram_rdata;
  logic [NFIFO-1:0]     fifo_wr_en, fifo_full, fifo_rd_en, fifo_empty;
  fp32_t                fifo_wr_data [NFIFO];
  fp32_t                fifo_rd_data [NFIFO];
  logic                 cov_ready;

  data_dispatcher #(.B(B), .LANES(LANES), .NFIFO(NFIFO)) u_disp (
    .clk(clk_d), .rst_n(rst_d_n), .start, .n_pixels,
    .s_valid, .s_ready, .s_data,
    .bram_we, .bram_addr(bram_waddr), .bram_data(bram_wdata),
    .fifo_wr_en, .fifo_wr_data, .fifo_full,
    .cov_ready, .busy(dispatch_busy)
  );

  cov_bram #(.WIDTH(LANES * 32), .LINES(LINES)) u_bram (
    .clk_a(clk_d), .we_a(bram_we), .addr_a(bram_waddr), .wr_data_a(bram_wdata),
    .clk_b(clk_p), .en_b(bram_en), .addr_b(bram_raddr), .rd_data_b(bram_rdata)
  );

  for (genvar f = 0; f < NFIFO; f++) begin : g_fifo
    async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk(clk_d), .wrst_n(rst_d_n), .wr_en(fifo_wr_en[f]), .wr_data(fifo_wr_data[f]),
      .full(fifo_full[f]),
      .rclk(clk_p), .rrst_n(rst_p_n), .rd_en(fifo_rd_en[f]), .rd_data(fifo_rd_data[f]),
      .empty(fifo_empty[f])
    );
  end

  pca_block #(.B(B), .LANES(LANES), .NFIFO(NFIFO), .LMAX(LMAX), .UNROLL(UNROLL),
              .MAX_SWEEPS(MAX_SWEEPS), .THETA(THETA), .EPS2(EPS2)) u_pca (
    .clk(clk_p), .rst_n(rst_p_n), .cov_ready, .n_pixels,
    .bram_en, .bram_addr(bram_raddr), .bram_data(bram_rdata),
    .fifo_data(fifo_rd_data), .fifo_empty, .fifo_rd_en,
    .y_valid, .y_ready, .y_data, .y_comp, .y_pixel, .y_last,
    .num_pc, .sorted, .sweeps, .phase, .done(pca_done)
  );
endmodule
