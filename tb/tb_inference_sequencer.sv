// tb_inference_sequencer: runs the 1640-step schedule three times and
// checks, for every step, that the descriptor presented one clock after
// the ROM address matches that address (layer, pixel, group, output,
// chunk), that addresses run 0..1639 once each, that `done` comes
// exactly 1641 clocks after `start`, and that a start during a run is
// ignored.
module tb_inference_sequencer;
  import ocr_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, rom_en, done;
  logic [ADDR_W-1:0] rom_addr;
  step_t step;
  int checks = 0, failures = 0;

  inference_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic one_run(bit poke_start);
    int cyc = 0, nsteps = 0, prev_addr = -1, expect_n = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 5000) begin
      if (step.valid) begin
        automatic int n = prev_addr;
        check(n == expect_n, $sformatf("step for address %0d, expected %0d", n, expect_n));
        if (n < 1568) begin
          check(!step.layer2, "layer 1 flag");
          check(int'(step.in_idx) == n % 784, "pixel index");
          check(int'(step.group) == n / 784, "group");
        end else begin
          check(step.layer2, "layer 2 flag");
          check(int'(step.out_idx) == (n - 1568) / 2, "output index");
          check(int'(step.chunk) == (n - 1568) % 2, "chunk");
        end
        nsteps++;
        expect_n++;
      end
      prev_addr = rom_en ? int'(rom_addr) : -1;
      if (poke_start && cyc == 700) start = 1;
      @(negedge clk);
      start = 0;
      cyc++;
    end
    check(nsteps == N_STEPS, $sformatf("%0d steps", nsteps));
    check(cyc == N_STEPS + 1, $sformatf("done %0d clocks after the start edge", cyc));
    @(negedge clk);
    check(!busy && !rom_en && !step.valid, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_run(0);
    one_run(1);
    repeat (5) @(negedge clk);
    check(!busy, "stays idle");
    one_run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
