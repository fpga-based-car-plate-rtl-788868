// ocr_system: the FPGA side of the plate reader as built on the board.
//
// The OCR engine (ocr_engine: I/O state machine, 1640-step sequencer,
// shared weight ROM, eight inference cores) plus the bridge that polls
// the Intel JTAG UART core through which the host PC sends 784-byte tile
// packets and receives 8-character plate strings. The JTAG UART core is
// vendor IP and stays outside: its Avalon-MM slave port is connected to
// the av_* ports here (word address 0 = data, 1 = control).
//
// Timing: per plate, 784 polled reads of the data register (each at
// least two clocks), 1643 clocks from the last byte to the first reply
// byte, then a control read and a data write per reply byte.
// `plate`/`plate_valid` show the string in parallel; `busy` spans one
// plate from its first byte to its last reply byte and can be brought to
// a pin to time the engine. Single clock, synchronous active-low reset.
module ocr_system
  import ocr_pkg::*;
#(
  parameter string WEIGHTS_FILE = ""   // trained weights; "" = stand-in
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        av_chipselect,
  output logic        av_address,
  output logic        av_read_n,
  output logic        av_write_n,
  output logic [31:0] av_writedata,
  input  logic [31:0] av_readdata,
  input  logic        av_waitrequest,
  output logic [7:0]  plate [N_CORES],
  output logic        plate_valid,
  output logic        busy
);

  logic       rx_valid, rx_ready, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  jtag_uart_bridge u_bridge (
    .clk, .rst_n,
    .av_chipselect, .av_address, .av_read_n, .av_write_n,
    .av_writedata, .av_readdata, .av_waitrequest,
    .rx_valid, .rx_data, .rx_ready,
    .tx_valid, .tx_data, .tx_ready
  );

  ocr_engine #(.WEIGHTS_FILE(WEIGHTS_FILE)) u_engine (
    .clk, .rst_n,
    .rx_valid, .rx_data, .rx_ready,
    .tx_valid, .tx_data, .tx_ready,
    .plate, .plate_valid, .busy
  );

endmodule
