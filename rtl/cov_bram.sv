// cov_bram: dual-port, dual-clock block RAM holding the covariance matrix.
//
// Port A belongs to the data dispatcher's clock domain and only writes; port B
// belongs to the PCA block's clock domain and only reads. Having one port per
// clock lets the dispatcher store the matrix at its own (higher) rate while the
// PCA block reads it at its own rate.
//
// A word holds WORDS_PER_LINE single-precision values (16 by default, one
// 512-bit memory-bus beat), so the matrix of B x B values needs
// B*B/WORDS_PER_LINE lines. The word width matching the bus beat is this
// design's own choice.
//
// Timing: port A writes on the rising edge of clk_a when we_a is high. Port B
// is a registered read: rd_data_b shows line addr_b one clk_b cycle after
// en_b was high, as in a block RAM.
module cov_bram #(
  parameter int unsigned WIDTH = 512,
  parameter int unsigned LINES = 3136
) (
  input  logic                     clk_a,
  input  logic                     we_a,
  input  logic [$clog2(LINES)-1:0] addr_a,
  input  logic [WIDTH-1:0]         wr_data_a,
  input  logic                     clk_b,
  input  logic                     en_b,
  input  logic [$clog2(LINES)-1:0] addr_b,
  output logic [WIDTH-1:0]         rd_data_b
);
  logic [WIDTH-1:0] mem [LINES];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= wr_data_a;
  end

  always_ff @(posedge clk_b) begin
    if (en_b) rd_data_b <= mem[addr_b];
  end
endmodule
