// mad_unit: the 64-lane multiply-add unit of one inference core.
//
// Each lane multiplies a Q8.8 activation by a 16-bit weight (a Q16.16
// product). The products are used in two ways, chosen by the caller:
//   * per lane (layer 1): lane k keeps its own accumulator,
//       acc[k] <= (lane_clr ? 0 : acc[k]) + p[k]       when lane_en;
//   * fused (layer 2): a 64-input adder tree sums the products and one
//     accumulator adds that sum,
//       facc   <= (fused_clr ? 0 : facc) + sum(p)      when fused_en.
// `lane_next` and `fused_next` are the values the accumulators would
// take this cycle, so a caller can use a finished sum without waiting a
// clock. The original design gives 64 multiply-adds per clock and the
// "MAD (64-fused)" block; the two accumulation modes are this design's
// way of serving both layers with the same 64 multipliers.
//
// Timing: all combinational from operands to *_next; accumulators update
// on the rising clock edge. Active-low synchronous reset clears them.
module mad_unit
  import ocr_pkg::*;
#(
  parameter int unsigned N = LANES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  q88_t              a [N],        // activations
  input  q88_t              w [N],        // weights
  input  logic              lane_en,
  input  logic              lane_clr,
  input  logic              fused_en,
  input  logic              fused_clr,
  output acc_t              lane_acc  [N],
  output acc_t              lane_next [N],
  output acc_t              fused_acc,
  output acc_t              fused_next
);

  acc_t prod [N];
  acc_t tree_sum;

  always_comb begin
    tree_sum = '0;
    for (int k = 0; k < N; k++) begin
      prod[k]      = acc_t'(a[k]) * acc_t'(w[k]);
      lane_next[k] = (lane_clr ? acc_t'(0) : lane_acc[k]) + prod[k];
      tree_sum     = tree_sum + prod[k];
    end
    fused_next = (fused_clr ? acc_t'(0) : fused_acc) + tree_sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) lane_acc[k] <= '0;
      fused_acc <= '0;
    end else begin
      if (lane_en)
        for (int k = 0; k < N; k++) lane_acc[k] <= lane_next[k];
      if (fused_en) fused_acc <= fused_next;
    end
  end

endmodule
