// tb_mad_unit: random operands through the 64-lane multiply-add unit.
// Per-lane mode: runs of random length with clear on the first operand,
// compared with a software running sum per lane. Fused mode: pairs of
// steps (clear, accumulate), compared with the software sum of all 128
// products. Holds (enable low) are mixed in.
module tb_mad_unit;
  import ocr_pkg::*;

  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  q88_t a [N], w [N];
  logic lane_en = 0, lane_clr = 0, fused_en = 0, fused_clr = 0;
  acc_t lane_acc [N], lane_next [N], fused_acc, fused_next;
  int checks = 0, failures = 0;

  mad_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model_lane [N];
  longint model_fused;

  task automatic randomize_ops();
    for (int k = 0; k < N; k++) begin
      a[k] = q88_t'($urandom);
      w[k] = q88_t'($urandom);
    end
  endtask

  task automatic compare();
    int bad = 0;
    for (int k = 0; k < N; k++)
      if (longint'(lane_acc[k]) != model_lane[k]) bad++;
    checks++;
    if (bad) begin failures++; $display("lane mismatch at %0t: %0d lanes", $time, bad); end
    checks++;
    if (longint'(fused_acc) != model_fused) begin
      failures++;
      $display("fused mismatch at %0t: %0d vs %0d", $time, fused_acc, model_fused);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin a[k] = '0; w[k] = '0; model_lane[k] = 0; end
    model_fused = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      automatic longint fsum = 0;
      randomize_ops();
      lane_en   = ($urandom % 4) != 0;
      lane_clr  = ($urandom % 8) == 0;
      fused_en  = ($urandom % 4) != 0;
      fused_clr = ($urandom % 2) == 0;
      for (int k = 0; k < N; k++) begin
        automatic longint p = longint'(a[k]) * longint'(w[k]);
        fsum += p;
        if (lane_en) model_lane[k] = (lane_clr ? 0 : model_lane[k]) + p;
      end
      if (fused_en) model_fused = (fused_clr ? 0 : model_fused) + fsum;
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
