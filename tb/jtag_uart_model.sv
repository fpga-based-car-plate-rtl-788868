// jtag_uart_model: behavioural model of the Intel JTAG UART core for
// simulation (not synthesizable logic of the design).
//
// Avalon-MM slave with the core's register map: word 0 data ([7:0]
// character, [15] RVALID, [31:16] RAVAIL; a read pops the receive FIFO,
// a write pushes the transmit FIFO), word 1 control ([31:16] WSPACE).
// The host side is two byte FIFOs: host_* pushes characters that the
// FPGA will read, and characters the FPGA writes are popped with out_*.
// waitrequest is held high for a random 0..WAIT_MAX clocks on each
// access. The transmit FIFO is TX_DEPTH deep so that a slow host fills it.
module jtag_uart_model #(
  parameter int RX_DEPTH = 64,
  parameter int TX_DEPTH = 4,
  parameter int WAIT_MAX = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        av_chipselect,
  input  logic        av_address,
  input  logic        av_read_n,
  input  logic        av_write_n,
  input  logic [31:0] av_writedata,
  output logic [31:0] av_readdata,
  output logic        av_waitrequest,
  // host side
  input  logic        host_push,
  input  logic [7:0]  host_data,
  output logic        host_full,
  input  logic        out_pop,
  output logic        out_valid,
  output logic [7:0]  out_data,
  // statistics
  output int          n_empty_reads,
  output int          n_full_polls,
  output int          n_waits
);

  byte unsigned rxq[$];
  byte unsigned txq[$];
  int wait_left;
  logic in_access;

  assign host_full = (rxq.size() >= RX_DEPTH);
  assign out_valid = (txq.size() != 0);
  assign out_data  = (txq.size() != 0) ? txq[0] : 8'h00;

  // Register contents as seen by the bus: a snapshot of the FIFOs taken
  // on the falling edge, so that what the master samples on a rising edge
  // and what the model acts on at that edge are the same.
  int          snap_rx_n, snap_tx_space;
  byte unsigned snap_rx_head;
  always @(negedge clk) begin
    snap_rx_n     = rxq.size();
    snap_rx_head  = (rxq.size() != 0) ? rxq[0] : 8'h00;
    snap_tx_space = TX_DEPTH - txq.size();
  end

  always_comb begin
    av_waitrequest = av_chipselect && (!in_access || wait_left != 0);
    av_readdata = '0;
    if (av_address == 1'b0) begin
      av_readdata[15]    = (snap_rx_n != 0);
      av_readdata[7:0]   = snap_rx_head;
      av_readdata[31:16] = 16'(snap_rx_n);
    end else begin
      av_readdata[31:16] = 16'(snap_tx_space);
    end
  end

  initial begin
    n_empty_reads = 0; n_full_polls = 0; n_waits = 0;
    snap_rx_n = 0; snap_rx_head = 0; snap_tx_space = TX_DEPTH;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      rxq.delete(); txq.delete();
      in_access <= 1'b0;
      wait_left <= 0;
    end else begin
      if (av_chipselect && !in_access) begin
        in_access <= 1'b1;
        wait_left <= $urandom % (WAIT_MAX + 1);
      end else if (av_chipselect && wait_left != 0) begin
        wait_left <= wait_left - 1;
        n_waits++;
      end else if (av_chipselect) begin
        // access completes this clock
        in_access <= 1'b0;
        if (!av_read_n && av_address == 1'b0) begin
          if (snap_rx_n != 0) void'(rxq.pop_front());
          else n_empty_reads++;
        end
        if (!av_read_n && av_address == 1'b1 && snap_tx_space == 0) n_full_polls++;
        if (!av_write_n && av_address == 1'b0) begin
          if (snap_tx_space != 0) txq.push_back(av_writedata[7:0]);
          else $display("jtag_uart_model: write to a full transmit FIFO");
        end
      end
      // host side, after the bus access
      if (host_push && !host_full) rxq.push_back(host_data);
      if (out_pop && out_valid) void'(txq.pop_front());
    end
  end

endmodule
