// inference_core: one of the eight parallel OCR cores. It classifies one
// 28x28 one-bit glyph tile with the 784-128-36 network.
//
// Inside, as in the original design's core diagram: an input neuron register
// (784 bits, the tile), hidden neuron registers (128 x Q8.8), output
// neuron registers (36 x Q8.8), an operand mux and the 64-lane
// multiply-add unit. The core has no schedule of its own; it follows the
// step descriptors of the shared inference_sequencer and the weight-ROM
// word that comes with each step.
//   Layer 1 step (group g, pixel i): the mux broadcasts pixel i as Q8.8
//     1.0 or 0 to all lanes; lane k accumulates into hidden neuron
//     g*64+k (cleared at i = 0). At i = 783 the 64 finished sums go
//     through ReLU and Q8.8 saturation into the hidden registers.
//   Layer 2 step (output j, chunk c): the mux feeds hidden values
//     c*64..c*64+63 to the lanes; the fused adder tree sums the products.
//     At c = 1 the finished sum, saturated to Q8.8, is output j's score.
//   A running arg-max follows the scores as they appear; ties keep the
//   lower class. `class_idx` is valid from the clock after the last step.
// ReLU, the absence of biases, truncating rounding and saturation are
// this design's choices; the original design gives only the layer sizes and the
// Q8.8 format.
//
// Tile loading: while no run is in progress, `pix_we` writes `pix_byte`
// into tile bytes `pix_byte_idx` (0..97): bit 7 of byte b is pixel 8b,
// bit 0 pixel 8b+7, pixels numbered row by row.
module inference_core
  import ocr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // tile load
  input  logic       pix_we,
  input  logic [6:0] pix_byte_idx,
  input  logic [7:0] pix_byte,
  // schedule
  input  step_t      step,
  input  rom_word_t  weights,
  // results
  output q88_t       scores [N_OUT],
  output logic [5:0] class_idx
);

  logic [N_IN-1:0] in_reg;            // input neuron register
  q88_t            hid_reg [N_HID];   // hidden neuron registers
  q88_t            best_score;

  q88_t mux_a [LANES];
  q88_t w     [LANES];
  acc_t lane_acc  [LANES];
  acc_t lane_next [LANES];
  acc_t fused_acc, fused_next;
  q88_t cur_score;

  logic l1, l2, last_pix;
  assign l1       = step.valid && !step.layer2;
  assign l2       = step.valid &&  step.layer2;
  assign last_pix = (step.in_idx == 10'(N_IN - 1));

  // operand mux: input neuron register or hidden neuron registers
  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      w[k] = q88_t'(weights[k]);
      if (step.layer2)
        mux_a[k] = hid_reg[{step.chunk, 6'(k)}];
      else
        mux_a[k] = in_reg[N_IN - 1 - int'(step.in_idx)] ? Q88_ONE : q88_t'(0);
    end
  end

  mad_unit #(.N(LANES)) u_mad (
    .clk       (clk),
    .rst_n     (rst_n),
    .a         (mux_a),
    .w         (w),
    .lane_en   (l1),
    .lane_clr  (step.in_idx == '0),
    .fused_en  (l2),
    .fused_clr (!step.chunk),
    .lane_acc  (lane_acc),
    .lane_next (lane_next),
    .fused_acc (fused_acc),
    .fused_next(fused_next)
  );

  assign cur_score = sat_q88(fused_next);

  // tile register: byte b covers vector bits [783-8b -: 8]
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_reg <= '0;
    end else if (pix_we && !step.valid && pix_byte_idx < 7'(TILE_BYTES)) begin
      in_reg[N_IN - 1 - 8*int'(pix_byte_idx) -: 8] <= pix_byte;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int h = 0; h < N_HID; h++) hid_reg[h] <= '0;
      for (int j = 0; j < N_OUT; j++) scores[j] <= '0;
      best_score <= '0;
      class_idx  <= '0;
    end else begin
      if (l1 && last_pix)
        for (int k = 0; k < LANES; k++)
          hid_reg[{step.group, 6'(k)}] <= relu_q88(lane_next[k]);
      if (l2 && step.chunk) begin
        scores[step.out_idx] <= cur_score;
        if (step.out_idx == '0 || cur_score > best_score) begin
          best_score <= cur_score;
          class_idx  <= step.out_idx;
        end
      end
    end
  end

endmodule
