// tb_ocr_system: the complete FPGA side, at its default size, against a
// behavioural JTAG UART core. A host process pushes N_PLATES 784-byte
// packets into the core's receive FIFO as fast as it has room (so the
// next plate waits in the FIFO while the engine is busy) and drains the
// 8-byte replies slowly (so the bridge finds the transmit FIFO full).
// Every character is compared with the integer reference network.
// Counted mechanisms, each of which must occur: empty-FIFO polls, full
// transmit-FIFO polls, Avalon wait states, engine holding the next packet
// off, layer-1 to layer-2 switch (once per plate).
module tb_ocr_system;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  localparam int N_PLATES = 6;

  logic        clk = 0, rst_n = 0;
  logic        av_chipselect, av_address, av_read_n, av_write_n, av_waitrequest;
  logic [31:0] av_writedata, av_readdata;
  logic [7:0]  plate [N_CORES];
  logic        plate_valid, busy;
  logic        host_push = 0, host_full, out_pop = 0, out_valid;
  logic [7:0]  host_data = '0, out_data;
  int          n_empty_reads, n_full_polls, n_waits;
  int checks = 0, failures = 0;
  int n_held = 0, n_switch = 0, n_plate_valid = 0;

  ocr_system dut (.*);
  jtag_uart_model #(.RX_DEPTH(64), .TX_DEPTH(4), .WAIT_MAX(1)) u_uart (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (N_PLATES * 12000 + 10000) @(posedge clk);
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

  byte unsigned pkt [N_PLATES * 784];
  byte unsigned exp_chars [N_PLATES * 8];
  int n_in = 0, n_out = 0;

  // host: push packet bytes whenever the FIFO has room; drain replies slowly
  // decisions are made, and data sampled, on the falling edge; the model
  // acts on the rising edge
  always @(negedge clk) if (rst_n) begin
    host_push = (n_in < N_PLATES * 784) && !host_full;
    host_data = pkt[n_in];
    if (host_push) n_in++;
    out_pop   = ($urandom % 8 == 0) && out_valid;
    if (out_pop) begin
      check(out_data == exp_chars[n_out], $sformatf("char %0d: %c, expected %c",
                                                    n_out, out_data, exp_chars[n_out]));
      n_out++;
    end
  end
  logic prev_l2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_engine.rx_ready && u_uart.rxq.size() != 0) n_held++;
    if (dut.u_engine.step.valid && dut.u_engine.step.layer2 && !prev_l2) n_switch++;
    prev_l2 <= dut.u_engine.step.valid && dut.u_engine.step.layer2;
    if (plate_valid) n_plate_valid++;
  end

  initial begin
    byte unsigned tile [98];
    int sc [36];
    int cls;
    ref_init();
    for (int p = 0; p < N_PLATES; p++)
      for (int c = 0; c < 8; c++) begin
        automatic int dens = 15 + $urandom % 70;
        for (int b = 0; b < 98; b++) tile[b] = 0;
        for (int i = 0; i < 784; i++)
          if ((i / 28) >= 2 && (i / 28) < 26 && ($urandom % 100) < dens)
            tile[i / 8][7 - i % 8] = 1'b1;
        for (int b = 0; b < 98; b++) pkt[p * 784 + c * 98 + b] = tile[b];
        ref_classify(tile, sc, cls);
        exp_chars[p * 8 + c] = ref_ascii(cls);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_out == N_PLATES * 8);
    repeat (5) @(negedge clk);
    $display("plates %0d, empty polls %0d, full polls %0d, wait states %0d, held off %0d, layer switches %0d",
             n_plate_valid, n_empty_reads, n_full_polls, n_waits, n_held, n_switch);
    check(n_plate_valid == N_PLATES, "one result per plate");
    check(n_empty_reads > 0, "empty receive FIFO polled");
    check(n_full_polls > 0, "full transmit FIFO polled");
    check(n_waits > 0, "Avalon wait states");
    check(n_held > 0, "next packet held off while busy");
    check(n_switch == N_PLATES, "one layer switch per plate");
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
