// weights_rom: on-chip weight store of the OCR engine, shared by all cores.
//
// One word per schedule step: word n holds the 64 signed 16-bit weights
// that the 64 multiply-add lanes use in step n (see ocr_pkg for the
// ordering). Words 0..1567 are the 784x128 input-to-hidden weights,
// word g*784+i lane k being the weight from pixel i to hidden neuron
// g*64+k. Words 1568..1639 are the 128x36 hidden-to-output weights,
// word 1568+2*j+c lane k being the weight from hidden value c*64+k to
// output j. Lane k occupies bits [16k+15:16k].
//
// The original design keeps the 16-bit weights in block RAM and feeds one
// weights ROM to all eight cores; the word layout is this design's.
// Contents: INIT_FILE (hex, one 1024-bit word per line) when given,
// otherwise the deterministic stand-in from ocr_pkg::weight_hash().
//
// Interface and timing: synchronous read, `rdata` holds word `addr` one
// clock after `en` is high with that address; it keeps its value while
// `en` is low.
module weights_rom
  import ocr_pkg::*;
#(
  parameter int unsigned DEPTH     = N_STEPS,
  parameter string       INIT_FILE = ""
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output rom_word_t                rdata
);

  rom_word_t mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int unsigned n = 0; n < DEPTH; n++)
        for (int unsigned k = 0; k < LANES; k++)
          mem[n][k] = weight_hash(n, k);
    end
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= mem[addr];
  end

endmodule
