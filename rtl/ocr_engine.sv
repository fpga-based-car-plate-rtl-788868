// ocr_engine: FPGA OCR inference engine for license-plate characters.
//
// The host sends one plate as a 784-byte packet: eight 28x28 one-bit
// glyph tiles. The engine classifies the eight glyphs at once, one per
// inference core, with a 784-128-36 feed-forward network (16-bit weights,
// Q8.8 activations), and answers with the eight recognised characters.
//
// Structure, following the original design's engine diagram:
//   io_handler           state machine: packet in, start, string out;
//   inference_sequencer  1640-step schedule of the network;
//   weights_rom          one weight store shared by all cores;
//   inference_core x8    input/hidden/output neuron registers, operand
//                        mux and a 64-lane multiply-add unit each.
// The cores run in lockstep on the same ROM word, each on its own tile.
//
// Ports: the two host byte streams (valid/ready); on the board they come
// from jtag_uart_bridge (see ocr_system); `plate`/`plate_valid` give the string in
// parallel as well, and `busy` is high from the first byte of a packet
// until the reply is sent. Timing: 784 byte transfers, 1 start clock,
// 1641 clocks of inference (1640 steps plus the ROM read), 1 clock to
// latch the result, then 8 byte transfers. Synchronous active-low reset.
module ocr_engine
  import ocr_pkg::*;
#(
  parameter string WEIGHTS_FILE = ""   // trained weights; "" = stand-in
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       rx_ready,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  input  logic       tx_ready,
  output logic [7:0] plate [N_CORES],
  output logic       plate_valid,
  output logic       busy
);

  logic              pix_we;
  logic [2:0]        pix_tile;
  logic [6:0]        pix_byte_idx;
  logic [7:0]        pix_byte;
  logic              infer_start, infer_done, seq_busy;
  logic              rom_en;
  logic [ADDR_W-1:0] rom_addr;
  rom_word_t         rom_data;
  step_t             step;
  logic [5:0]        class_idx [N_CORES];
  q88_t              scores [N_CORES][N_OUT];

  io_handler u_io (
    .clk, .rst_n,
    .rx_valid, .rx_data, .rx_ready,
    .tx_valid, .tx_data, .tx_ready,
    .pix_we, .pix_tile, .pix_byte_idx, .pix_byte,
    .infer_start, .infer_done, .class_idx,
    .plate, .plate_valid, .busy
  );

  inference_sequencer u_seq (
    .clk, .rst_n,
    .start    (infer_start),
    .busy     (seq_busy),
    .rom_en   (rom_en),
    .rom_addr (rom_addr),
    .step     (step),
    .done     (infer_done)
  );

  weights_rom #(.DEPTH(N_STEPS), .INIT_FILE(WEIGHTS_FILE)) u_rom (
    .clk,
    .en    (rom_en),
    .addr  (rom_addr),
    .rdata (rom_data)
  );

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    inference_core u_core (
      .clk, .rst_n,
      .pix_we       (pix_we && pix_tile == 3'(c)),
      .pix_byte_idx (pix_byte_idx),
      .pix_byte     (pix_byte),
      .step         (step),
      .weights      (rom_data),
      .scores       (scores[c]),
      .class_idx    (class_idx[c])
    );
  end

  // the sequencer is only ever started by the I/O handler when idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    infer_start |-> !seq_busy);

endmodule
