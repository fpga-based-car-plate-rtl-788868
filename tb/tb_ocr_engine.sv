// tb_ocr_engine: end-to-end test of the OCR engine at its default size.
//
// Sends N_PLATES plates (default 46, i.e. 368 glyph tiles) as 784-byte
// packets, with random gaps on the input stream and random stalls on the
// output stream, and compares every returned character with the integer
// reference network. Per plate it checks that inference takes the
// expected 1643 clocks from the last packet byte to the first reply byte
// (start, 1640 steps, ROM read, result latch) and that exactly 1640
// weight words are read. It counts how often each mechanism occurred:
// host held off while busy, reply stalled, layer-1 to layer-2 switch,
// 8 cores answering in parallel; one that never occurs is a failure.
module tb_ocr_engine;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  localparam int N_PLATES = 46;
  localparam int EXPECT_LAT = 1643;

  logic       clk = 0, rst_n = 0;
  logic       rx_valid = 0, rx_ready;
  logic [7:0] rx_data = '0;
  logic       tx_valid, tx_ready = 0;
  logic [7:0] tx_data;
  logic [7:0] plate [N_CORES];
  logic       plate_valid, busy;
  int checks = 0, failures = 0;
  int n_held = 0, n_stall = 0, n_switch = 0, n_rom_reads = 0, n_plates = 0;
  int n_mixed = 0;

  ocr_engine dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (N_PLATES * 6000 + 10000) @(posedge clk);
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

  // internal activity: layer switches and weight-word reads
  logic prev_l2 = 0;
  always @(posedge clk) begin
    if (dut.step.valid && dut.step.layer2 && !prev_l2) n_switch++;
    prev_l2 <= dut.step.valid && dut.step.layer2;
    if (dut.rom_en) n_rom_reads++;
  end

  initial begin
    byte unsigned tiles [N_CORES][98];
    byte unsigned exp_str [N_CORES];
    int sc [36];
    int cls, lat, reads0;
    bit first_tx;
    string got_s, exp_s;
    ref_init();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N_PLATES; p++) begin
      automatic int n = 0;
      automatic int got = 0;
      // glyph-like tiles: a random box of ink strokes of varying density
      for (int c = 0; c < N_CORES; c++) begin
        automatic int x0 = 4 + $urandom % 6, x1 = 18 + $urandom % 6;
        automatic int dens = 20 + $urandom % 60;
        for (int b = 0; b < 98; b++) tiles[c][b] = 0;
        for (int i = 0; i < 784; i++) begin
          automatic int r = i / 28, col = i % 28;
          if (r >= 3 && r < 25 && col >= x0 && col < x1 && ($urandom % 100) < dens)
            tiles[c][i / 8][7 - i % 8] = 1'b1;
        end
        ref_classify(tiles[c], sc, cls);
        exp_str[c] = ref_ascii(cls);
      end
      reads0 = n_rom_reads;
      // send the packet: tile 0 first, 98 bytes per tile
      while (n < 784) begin
        rx_valid = ($urandom % 4) != 0;
        rx_data  = tiles[n / 98][n % 98];
        @(posedge clk);
        if (rx_valid && rx_ready) n++;
        @(negedge clk);
      end
      // the host tries to send on; time the inference meanwhile
      rx_valid = 1; rx_data = 8'h00;
      lat = 0;
      while (!tx_valid && lat < 5000) begin
        if (!rx_ready) n_held++;
        @(negedge clk);
        lat++;
      end
      rx_valid = 0;
      check(lat == EXPECT_LAT, $sformatf("plate %0d: inference took %0d clocks", p, lat));
      check(n_rom_reads - reads0 == N_STEPS, $sformatf("%0d weight words read", n_rom_reads - reads0));
      // receive the reply
      got_s = ""; exp_s = "";
      while (got < 8) begin
        tx_ready = ($urandom % 3) != 0;
        if (tx_valid && !tx_ready) n_stall++;
        @(posedge clk);
        if (tx_valid && tx_ready) begin
          check(tx_data == exp_str[got], $sformatf("plate %0d char %0d: %c, expected %c",
                                                   p, got, tx_data, exp_str[got]));
          got_s = {got_s, string'(tx_data)};
          exp_s = {exp_s, string'(exp_str[got])};
          got++;
        end
        @(negedge clk);
      end
      tx_ready = 0;
      for (int c = 1; c < N_CORES; c++)
        if (exp_str[c] != exp_str[0]) begin n_mixed++; break; end
      n_plates++;
      if (p < 5) $display("plate %0d: \"%s\" (reference \"%s\")", p, got_s, exp_s);
    end
    $display("plates %0d, host held off %0d clocks, reply stalls %0d, layer switches %0d, plates with differing characters %0d",
             n_plates, n_held, n_stall, n_switch, n_mixed);
    check(n_plates == N_PLATES, "all plates answered");
    check(n_held > 0, "host was held off");
    check(n_stall > 0, "reply was stalled");
    check(n_switch == N_PLATES, "one layer switch per plate");
    check(n_mixed > 0, "cores answered with different characters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
