// io_handler: the engine's I/O handler, the controlling state machine of
// the OCR engine.
//
// It talks to the host through a byte stream in each direction, the data
// path of the host link (on the board, a JTAG UART core). One exchange:
//   RECV   accept PACKET_BYTES = 784 bytes: the eight tiles of one plate,
//          98 bytes (784 one-bit pixels) each, tile 0 first. Byte n goes
//          to core n / 98 as its tile byte n % 98.
//   START  pulse `infer_start` to the inference sequencer;
//   INFER  wait for `infer_done`, then latch the eight class indices as
//          ASCII characters ('0'-'9', 'A'-'Z'), core 0 first;
//   SEND   send the eight characters, then return to RECV.
// Packet size, eight characters per plate and the 8-byte string reply are
// the original design's; the byte layout inside the packet, the character code
// and the absence of any header or framing are this design's choices.
//
// Streams are valid/ready: a byte moves on a clock edge where both are
// high. `rx_ready` is low outside RECV, so a host that sends the next
// plate early is held off until the reply has gone out. `tx_valid` stays
// high, with `tx_data` stable, until the byte is taken.
module io_handler
  import ocr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host byte streams
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  output logic       rx_ready,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  input  logic       tx_ready,
  // tile loading into the cores
  output logic       pix_we,
  output logic [2:0] pix_tile,
  output logic [6:0] pix_byte_idx,
  output logic [7:0] pix_byte,
  // inference control
  output logic       infer_start,
  input  logic       infer_done,
  input  logic [5:0] class_idx [N_CORES],
  // result
  output logic [7:0] plate [N_CORES],
  output logic       plate_valid,
  output logic       busy
);

  typedef enum logic [1:0] {S_RECV, S_START, S_INFER, S_SEND} state_t;
  state_t state;

  logic [2:0] tile_q;
  logic [6:0] bidx_q;
  logic [2:0] tx_idx;

  assign rx_ready     = (state == S_RECV);
  assign pix_we       = rx_valid && rx_ready;
  assign pix_tile     = tile_q;
  assign pix_byte_idx = bidx_q;
  assign pix_byte     = rx_data;
  assign infer_start  = (state == S_START);
  assign tx_valid     = (state == S_SEND);
  assign tx_data      = plate[tx_idx];
  assign busy         = (state != S_RECV) || tile_q != '0 || bidx_q != '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_RECV;
      tile_q      <= '0;
      bidx_q      <= '0;
      tx_idx      <= '0;
      plate_valid <= 1'b0;
      for (int c = 0; c < N_CORES; c++) plate[c] <= 8'h20;
    end else begin
      plate_valid <= 1'b0;
      unique case (state)
        S_RECV: if (pix_we) begin
          if (bidx_q == 7'(TILE_BYTES - 1)) begin
            bidx_q <= '0;
            tile_q <= tile_q + 1'b1;
            if (tile_q == 3'(N_CORES - 1)) state <= S_START;
          end else begin
            bidx_q <= bidx_q + 1'b1;
          end
        end
        S_START: state <= S_INFER;
        S_INFER: if (infer_done) begin
          for (int c = 0; c < N_CORES; c++) plate[c] <= class_to_ascii(class_idx[c]);
          plate_valid <= 1'b1;
          tx_idx      <= '0;
          state       <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          tx_idx <= tx_idx + 1'b1;
          if (tx_idx == 3'(N_CORES - 1)) state <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end

  // a byte offered to the host stays offered, unchanged, until taken
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
