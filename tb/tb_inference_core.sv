// tb_inference_core: one inference core driven directly with the 1640
// step descriptors and weight words of the network schedule (generated
// here from the reference weights, in the order given in weights_rom). For random
// tiles of different ink densities, the 36 output scores and the class
// are compared with the integer reference model. A tile write attempted
// during a run must be ignored.
module tb_inference_core;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  localparam int N_TILES = 8;

  logic       clk = 0, rst_n = 0;
  logic       pix_we = 0;
  logic [6:0] pix_byte_idx = '0;
  logic [7:0] pix_byte = '0;
  step_t      step;
  rom_word_t  weights;
  q88_t       scores [N_OUT];
  logic [5:0] class_idx;
  int checks = 0, failures = 0;

  inference_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_tile(input byte unsigned tile[98]);
    for (int b = 0; b < 98; b++) begin
      pix_we = 1; pix_byte_idx = 7'(b); pix_byte = tile[b];
      @(negedge clk);
    end
    pix_we = 0;
  endtask

  task automatic run_network(bit poke);
    for (int n = 0; n < 1640; n++) begin
      step = '0;
      step.valid = 1;
      if (n < 1568) begin
        step.in_idx = 10'(n % 784);
        step.group  = 1'(n / 784);
      end else begin
        step.layer2  = 1;
        step.out_idx = 6'((n - 1568) / 2);
        step.chunk   = 1'((n - 1568) % 2);
      end
      for (int k = 0; k < 64; k++) weights[k] = 16'(ref_w[n][k]);
      // a stray tile write in mid-run
      pix_we = poke && (n == 100);
      pix_byte_idx = 7'd3; pix_byte = 8'hA5;
      @(negedge clk);
    end
    step = '0;
    pix_we = 0;
    @(negedge clk);
  endtask

  initial begin
    byte unsigned tile [98];
    int exp_scores [36];
    int exp_cls, bad;
    ref_init();
    step = '0;
    weights = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < N_TILES; t++) begin
      automatic int density = 10 + 12 * t;      // percent of ink pixels
      for (int b = 0; b < 98; b++) begin
        automatic byte unsigned v = 0;
        for (int i = 0; i < 8; i++) v = (v << 1) | byte'(($urandom % 100) < density);
        tile[b] = v;
      end
      if (t == 0) tile[3] = 8'h00;
      load_tile(tile);
      run_network(t == 0);
      ref_classify(tile, exp_scores, exp_cls);
      bad = 0;
      for (int j = 0; j < 36; j++) if (int'(scores[j]) != exp_scores[j]) bad++;
      checks++;
      if (bad) begin
        failures++;
        $display("tile %0d: %0d scores differ (e.g. out0 %0d vs %0d)", t, bad, scores[0], exp_scores[0]);
      end
      checks++;
      if (int'(class_idx) != exp_cls) begin
        failures++;
        $display("tile %0d: class %0d, expected %0d", t, class_idx, exp_cls);
      end
      $display("tile %0d density %0d%%: class %0d score %0d", t, density, class_idx, scores[class_idx]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
