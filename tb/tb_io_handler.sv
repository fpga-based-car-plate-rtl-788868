// tb_io_handler: the I/O state machine on its own. The testbench sends
// 784-byte packets with random gaps, checks that each byte is routed to
// the right core and tile byte, that inference is started once after the
// last byte, that nothing is accepted while a plate is in progress, and
// that after `infer_done` the eight class indices come back as their
// ASCII characters, in core order, also under a stalling receiver.
module tb_io_handler;
  import ocr_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       rx_valid = 0, rx_ready;
  logic [7:0] rx_data = '0;
  logic       tx_valid, tx_ready = 0;
  logic [7:0] tx_data;
  logic       pix_we;
  logic [2:0] pix_tile;
  logic [6:0] pix_byte_idx;
  logic [7:0] pix_byte;
  logic       infer_start, infer_done = 0;
  logic [5:0] class_idx [N_CORES];
  logic [7:0] plate [N_CORES];
  logic       plate_valid, busy;
  int checks = 0, failures = 0;
  int starts = 0, held_off = 0, stalls = 0;

  io_handler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, msg);
    end
  endtask

  function automatic byte unsigned pkt_byte(int p, int n);
    return byte'((n * 7 + p * 13 + (n >> 3)) & 8'hFF);
  endfunction

  // watch the tile-write port and the start pulse
  int wr_count = 0;
  int cur_plate = 0;
  always @(posedge clk) if (rst_n) begin
    if (pix_we) begin
      check(int'(pix_tile) == wr_count / 98 && int'(pix_byte_idx) == wr_count % 98,
            $sformatf("byte %0d routed to tile %0d byte %0d", wr_count, pix_tile, pix_byte_idx));
      check(pix_byte == pkt_byte(cur_plate, wr_count), "byte value");
      wr_count++;
    end
    if (infer_start) begin
      starts++;
      check(wr_count == 784, $sformatf("start after %0d bytes", wr_count));
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      automatic int n = 0;
      automatic int got = 0;
      automatic int starts0 = starts;
      cur_plate = p;
      wr_count = 0;
      for (int c = 0; c < N_CORES; c++) class_idx[c] = 6'((p * 11 + c * 5) % 36);
      // send the packet
      while (n < 784) begin
        rx_valid = ($urandom % 3) != 0;
        rx_data  = pkt_byte(p, n);
        @(posedge clk);
        if (rx_valid && rx_ready) n++;
        @(negedge clk);
      end
      // keep offering bytes of the next plate: they must be held off
      rx_valid = 1; rx_data = 8'hEE;
      repeat (30) begin
        @(negedge clk);
        check(!rx_ready, "rx_ready low while busy");
        if (!rx_ready) held_off++;
      end
      check(starts == starts0 + 1, "one start per packet");
      infer_done = 1;
      @(negedge clk);
      infer_done = 0;
      rx_valid = 0;
      // collect the reply under a stalling receiver
      while (got < 8) begin
        tx_ready = ($urandom % 2) != 0;
        if (tx_valid && !tx_ready) stalls++;
        @(posedge clk);
        if (tx_valid && tx_ready) begin
          check(tx_data == class_to_ascii(class_idx[got]),
                $sformatf("char %0d: %h", got, tx_data));
          got++;
        end
        @(negedge clk);
      end
      tx_ready = 0;
      check(plate[0] == class_to_ascii(class_idx[0]) && plate[7] == class_to_ascii(class_idx[7]),
            "plate register");
      @(negedge clk);
      check(rx_ready && !tx_valid && !busy, "ready for the next plate");
    end
    // fixed points of the character code
    check(class_to_ascii(6'd0) == "0" && class_to_ascii(6'd9) == "9" &&
          class_to_ascii(6'd10) == "A" && class_to_ascii(6'd35) == "Z", "character code");
    check(held_off > 0 && stalls > 0, "backpressure and stalls exercised");
    $display("held off %0d, tx stalls %0d", held_off, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
