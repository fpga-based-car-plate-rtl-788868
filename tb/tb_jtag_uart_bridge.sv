// tb_jtag_uart_bridge: the polling bridge between a behavioural JTAG UART
// core and a stream sink/source standing in for the engine. Random bytes
// from the host must reach the sink in order and unchanged, under a sink
// that is often not ready; bytes from the source must reach the host in
// order, under a host that drains the transmit FIFO slowly. Counts the
// empty polls, full-FIFO polls and Avalon wait states; each must occur.
module tb_jtag_uart_bridge;

  logic        clk = 0, rst_n = 0;
  logic        av_chipselect, av_address, av_read_n, av_write_n, av_waitrequest;
  logic [31:0] av_writedata, av_readdata;
  logic        rx_valid, rx_ready = 0, tx_valid = 0, tx_ready;
  logic [7:0]  rx_data, tx_data = '0;
  logic        host_push = 0, host_full, out_pop = 0, out_valid;
  logic [7:0]  host_data = '0, out_data;
  int          n_empty_reads, n_full_polls, n_waits;
  int checks = 0, failures = 0;

  jtag_uart_bridge dut (.*);
  jtag_uart_model #(.TX_DEPTH(4), .WAIT_MAX(2)) u_uart (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  localparam int N = 600;
  byte unsigned sent [N];
  byte unsigned back [N];
  int n_in = 0, n_rx = 0, n_tx = 0, n_out = 0;

  // host pushes N bytes at random moments, in bursts with pauses between
  int cyc = 0;
  logic burst;
  assign burst = (cyc % 500) < 100;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    host_push = (n_in < N) && burst && ($urandom % 3 == 0) && !host_full;
    host_data = sent[n_in];
    if (host_push) n_in++;
    out_pop   = ($urandom % 10 == 0) && out_valid;
    if (out_pop) begin
      check(out_data == back[n_out], $sformatf("host got %h, expected %h", out_data, back[n_out]));
      n_out++;
    end
  end

  // engine side: random-ready sink, then a source
  always @(negedge clk) if (rst_n) rx_ready = (n_rx < N) && ($urandom % 2 == 0);
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_ready) begin
      check(rx_data == sent[n_rx], $sformatf("engine got %h, expected %h", rx_data, sent[n_rx]));
      n_rx++;
    end
    if (tx_valid && tx_ready) n_tx++;
  end
  always @(negedge clk) if (rst_n) begin
    tx_valid = (n_rx == N) && (n_tx < N);
    tx_data  = back[n_tx];
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      sent[i] = byte'($urandom);
      back[i] = byte'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_out == N);
    repeat (5) @(negedge clk);
    check(n_rx == N && n_tx == N, $sformatf("moved %0d in, %0d out", n_rx, n_tx));
    check(n_empty_reads > 0, "polls of an empty receive FIFO");
    check(n_full_polls > 0, "polls of a full transmit FIFO");
    check(n_waits > 0, "Avalon wait states");
    $display("empty polls %0d, full polls %0d, wait states %0d", n_empty_reads, n_full_polls, n_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
