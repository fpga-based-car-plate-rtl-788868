// jtag_uart_bridge: connects the OCR engine's byte streams to an Intel
// JTAG UART core, the on-chip end of the USB-Blaster link to the host.
//
// The bridge is an Avalon-MM master that polls the core's two 32-bit
// registers (word addresses):
//   0  data:    [7:0] character, [15] RVALID, [31:16] RAVAIL;
//               a read pops one received character, a write sends one.
//   1  control: [31:16] WSPACE, free places in the transmit FIFO.
// Receive: while the engine can take a byte and none is held, read the
// data register; a character with RVALID set is held on rx_* until the
// engine takes it. Transmit: when the engine offers a byte, read the
// control register, and once WSPACE is non-zero write the byte to the
// data register, then acknowledge it with tx_ready. Transmit goes first
// when both are possible. Only one access is in flight.
//
// The JTAG UART core and the link are the original system's; the register
// map is the core's published one. This polling bridge is this design's
// own: the original names only the core and the state machine that talks
// to it. Avalon timing: read_n/write_n, address and writedata stay
// asserted until waitrequest is low; readdata is taken in that cycle
// (no read latency, as for the JTAG UART core).
module jtag_uart_bridge (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM master to the JTAG UART core's slave port
  output logic        av_chipselect,
  output logic        av_address,
  output logic        av_read_n,
  output logic        av_write_n,
  output logic [31:0] av_writedata,
  input  logic [31:0] av_readdata,
  input  logic        av_waitrequest,
  // byte streams to the engine
  output logic        rx_valid,
  output logic [7:0]  rx_data,
  input  logic        rx_ready,
  input  logic        tx_valid,
  input  logic [7:0]  tx_data,
  output logic        tx_ready
);

  typedef enum logic [1:0] {B_IDLE, B_RD_DATA, B_RD_CTRL, B_WR_DATA} bstate_t;
  bstate_t state;

  localparam logic ADDR_DATA = 1'b0;
  localparam logic ADDR_CTRL = 1'b1;

  logic done_acc;   // the access in flight completes this cycle
  assign done_acc = (state != B_IDLE) && !av_waitrequest;

  assign av_chipselect = (state != B_IDLE);
  assign av_address    = (state == B_RD_CTRL) ? ADDR_CTRL : ADDR_DATA;
  assign av_read_n     = !(state == B_RD_DATA || state == B_RD_CTRL);
  assign av_write_n    = !(state == B_WR_DATA);
  assign av_writedata  = {24'd0, tx_data};
  assign tx_ready      = (state == B_WR_DATA) && done_acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= B_IDLE;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      if (rx_valid && rx_ready) rx_valid <= 1'b0;
      unique case (state)
        B_IDLE: begin
          if (tx_valid)
            state <= B_RD_CTRL;
          else if (!rx_valid && rx_ready)
            state <= B_RD_DATA;
        end
        B_RD_DATA: if (done_acc) begin
          if (av_readdata[15]) begin
            rx_valid <= 1'b1;
            rx_data  <= av_readdata[7:0];
          end
          state <= B_IDLE;
        end
        B_RD_CTRL: if (done_acc) begin
          state <= (av_readdata[31:16] != 16'd0) ? B_WR_DATA : B_IDLE;
        end
        B_WR_DATA: if (done_acc) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  // Avalon: a request is held unchanged while the slave stalls it
  a_av_hold: assert property (@(posedge clk) disable iff (!rst_n)
    av_chipselect && av_waitrequest |=>
      av_chipselect && $stable(av_address) && $stable(av_read_n) && $stable(av_write_n)
      && (av_write_n || $stable(av_writedata)));

endmodule
