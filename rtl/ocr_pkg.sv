// ocr_pkg: types and constants shared by the license-plate OCR engine.
//
// The engine classifies 28x28 one-bit glyph tiles with a 784-128-36
// feed-forward network. Weights are 16-bit signed fixed point and
// activations are Q8.8. A 64-lane multiply-add unit covers the network
// in 1640 steps:
//   layer 1: 2 groups of 64 hidden neurons x 784 inputs = 1568 steps,
//            one input pixel per step, one neuron per lane;
//   layer 2: 36 outputs x 2 chunks of 64 hidden values  =   72 steps,
//            64 products summed by a fused adder tree per step.
// Step n reads weight-ROM word n, so the ROM is 1640 words of 64 weights.
// The layer sizes, number formats, lane count, core count and the
// 1640-cycle latency are the original design's; the step ordering above is
// this design's: a schedule that uses every lane in every step and so
// reproduces that latency exactly.
//
// When no trained weight file is given, the ROM is filled from
// weight_hash(): a fixed integer hash of (word, lane) mapped to a weight
// in [-0.5, +0.5). It only gives the hardware a deterministic, testable
// content; trained weights replace it through the ROM's INIT_FILE.
package ocr_pkg;

  localparam int unsigned N_IN      = 784;   // 28 x 28 pixels
  localparam int unsigned N_HID     = 128;
  localparam int unsigned N_OUT     = 36;    // digits 0-9, letters A-Z
  localparam int unsigned LANES     = 64;
  localparam int unsigned N_CORES   = 8;     // characters per plate
  localparam int unsigned DATA_W    = 16;    // Q8.8 / 16-bit weights
  localparam int unsigned FRAC_W    = 8;
  localparam int unsigned ACC_W     = 40;    // accumulator width

  localparam int unsigned HID_GROUPS = N_HID / LANES;                 // 2
  localparam int unsigned L1_STEPS   = HID_GROUPS * N_IN;             // 1568
  localparam int unsigned L2_CHUNKS  = N_HID / LANES;                 // 2
  localparam int unsigned L2_STEPS   = N_OUT * L2_CHUNKS;             // 72
  localparam int unsigned N_STEPS    = L1_STEPS + L2_STEPS;           // 1640
  localparam int unsigned ADDR_W     = $clog2(N_STEPS);               // 11

  localparam int unsigned TILE_BYTES   = N_IN / 8;                    // 98
  localparam int unsigned PACKET_BYTES = N_CORES * TILE_BYTES;        // 784

  typedef logic signed [DATA_W-1:0] q88_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [LANES-1:0][DATA_W-1:0] rom_word_t;

  localparam q88_t Q88_ONE = q88_t'(1 << FRAC_W);

  // One step of the schedule, presented to the cores together with the
  // weight-ROM word it belongs to.
  typedef struct packed {
    logic       valid;
    logic       layer2;    // 0: input->hidden, 1: hidden->output
    logic [9:0] in_idx;    // layer 1: input pixel 0..783
    logic       group;     // layer 1: hidden neurons 0..63 or 64..127
    logic [5:0] out_idx;   // layer 2: output neuron 0..35
    logic       chunk;     // layer 2: hidden values 0..63 or 64..127
  } step_t;

  // Deterministic stand-in weight for ROM word `word`, lane `lane`.
  function automatic q88_t weight_hash(input int unsigned word,
                                       input int unsigned lane);
    logic [31:0] h;
    h = word * 32'd64 + lane + 32'd1;
    h = h * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return q88_t'($signed(h[31:24]));   // -128..127 -> -0.5..+0.496
  endfunction

  // Class index to ASCII: 0-9 are the digits, 10-35 the letters A-Z.
  function automatic logic [7:0] class_to_ascii(input logic [5:0] cls);
    if (cls < 6'd10) return 8'h30 + 8'(cls);
    else if (cls < 6'd36) return 8'h41 + 8'(cls - 6'd10);
    else return 8'h3F;  // '?'
  endfunction

  // Q16.16 accumulator to Q8.8 with saturation.
  function automatic q88_t sat_q88(input acc_t a);
    acc_t s;
    s = a >>> FRAC_W;
    if (s > acc_t'(32767)) return q88_t'(32767);
    if (s < -acc_t'(32768)) return q88_t'(-32768);
    return q88_t'(s);
  endfunction

  // Hidden-layer activation: ReLU, then saturate to Q8.8.
  function automatic q88_t relu_q88(input acc_t a);
    if (a < 0) return '0;
    return sat_q88(a);
  endfunction

endpackage
