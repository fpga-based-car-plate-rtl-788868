// tb_weights_rom: reads every word of the weight ROM in a shuffled order
// and compares all 64 lanes with the reference weight function. Also
// checks the one-clock read latency and that the output holds while the
// read enable is low.
module tb_weights_rom;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  logic              clk = 0;
  logic              en = 0;
  logic [ADDR_W-1:0] addr = '0;
  rom_word_t         rdata;
  int checks = 0, failures = 0;

  weights_rom dut (.clk, .en, .addr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(int n);
    int bad = 0;
    for (int k = 0; k < 64; k++)
      if ($signed(rdata[k]) !== ref_weight(n, k)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 5) $display("word %0d: %0d lanes differ", n, bad);
    end
  endtask

  initial begin
    int order [N_STEPS];
    for (int n = 0; n < N_STEPS; n++) order[n] = n;
    order.shuffle();
    @(negedge clk);
    foreach (order[m]) begin
      en = 1; addr = ADDR_W'(order[m]);
      @(negedge clk);               // one clock later the word is out
      check_word(order[m]);
    end
    // hold: enable low, address moves, data must not change
    en = 1; addr = ADDR_W'(5);
    @(negedge clk);
    en = 0; addr = ADDR_W'(1639);
    repeat (3) @(negedge clk);
    check_word(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
