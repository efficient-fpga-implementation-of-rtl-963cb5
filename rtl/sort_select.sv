// sort_select: orders the singular values and picks the principal components
// by their share of the total energy.
//
// Step 1 (B cycles) adds all singular values into the total energy TE.
// Step 2 repeats LMAX times: scan the B values (one per cycle, plus one
// cycle to record the pick) for the largest
// one not yet taken, record its index and value, and add it to the running
// sum S. The first time 100 * S >= THETA * TE, the number of components L is
// the count taken so far; if that never happens within LMAX components, L is
// LMAX. Only the LMAX largest values are ever used downstream, so the sort
// stops after them (a partial selection sort); equal values keep index order.
// The energy criterion, THETA = 98 % and LMAX = 24 follow the design; the
// sequential selection sort is this design's own, simplest choice.
//
// Interface: start (one cycle) with sigma[] stable until done; done pulses
// with idx[c] and sorted[c] (c < LMAX, descending) and num_pc = L valid until
// the next start. Latency B + LMAX*(B+1) + 1 cycles.
module sort_select
  import fp32_pkg::*;
#(
  parameter int unsigned B     = 224,
  parameter int unsigned LMAX  = 24,
  parameter fp32_t       THETA = 32'h42C4_0000,  // 98.0 (percent)
  localparam int unsigned IW   = $clog2(B),
  localparam int unsigned LW   = $clog2(LMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp32_t         sigma [B],
  output logic          done,
  output logic          busy,
  output logic [IW-1:0] idx [LMAX],
  output fp32_t         sorted [LMAX],
  output logic [LW-1:0] num_pc
);
  typedef enum logic [1:0] {S_IDLE, S_TOTAL, S_SCAN, S_PICK} state_t;
  state_t state;

  logic [IW-1:0]  i;
  logic [LW-1:0]  c;
  logic [B-1:0]   taken;
  fp32_t          te, te_theta, cum, best;
  logic [IW-1:0]  best_i;
  logic           have_best, l_found;
  fp32_t          cum_next;

  assign busy     = state != S_IDLE;
  assign cum_next = fp_add(cum, best);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      i         <= '0;
      c         <= '0;
      taken     <= '0;
      te        <= FP_ZERO;
      te_theta  <= FP_ZERO;
      cum       <= FP_ZERO;
      best      <= FP_ZERO;
      best_i    <= '0;
      have_best <= 1'b0;
      l_found   <= 1'b0;
      num_pc    <= '0;
      done      <= 1'b0;
      for (int n = 0; n < LMAX; n++) begin
        idx[n]    <= '0;
        sorted[n] <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state   <= S_TOTAL;
          i       <= '0;
          c       <= '0;
          taken   <= '0;
          te      <= FP_ZERO;
          cum     <= FP_ZERO;
          l_found <= 1'b0;
          num_pc  <= LW'(LMAX);
        end
        S_TOTAL: begin
          te <= fp_add(te, sigma[i]);   // eq. (1)
          if (int'(i) == int'(B) - 1) begin
            i         <= '0;
            have_best <= 1'b0;
            state     <= S_SCAN;
          end else i <= i + 1'b1;
        end
        S_SCAN: begin
          if (int'(i) == 0) te_theta <= fp_mul(te, THETA);
          if (!taken[i] && (!have_best || fp_lt(best, sigma[i]))) begin
            best      <= sigma[i];
            best_i    <= i;
            have_best <= 1'b1;
          end
          if (int'(i) == int'(B) - 1) state <= S_PICK;
          else i <= i + 1'b1;
        end
        S_PICK: begin
          idx[c]        <= best_i;
          sorted[c]     <= best;
          taken[best_i] <= 1'b1;
          cum           <= cum_next;
          // eq. (2): 100 * sum_{1..L} sigma / TE >= THETA
          if (!l_found && !fp_lt(fp_mul(FP_HUND, cum_next), te_theta)) begin
            l_found <= 1'b1;
            num_pc  <= c + 1'b1;
          end
          i         <= '0;
          have_best <= 1'b0;
          if (int'(c) == int'(LMAX) - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            c     <= c + 1'b1;
            state <= S_SCAN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (LMAX >= 1 && LMAX <= B) else $error("sort_select: need 1 <= LMAX <= B");
  end
endmodule
