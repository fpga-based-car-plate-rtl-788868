// inference_sequencer: steps the eight inference cores through one
// classification of the 784-128-36 network.
//
// A `start` pulse launches a run of N_STEPS = 1640 steps, one per clock
// (the original design's pipeline latency of 1,640 cycles). In every step the
// sequencer drives the weight-ROM address, and one clock later, aligned
// with the ROM's read data, it presents the step descriptor (ocr_pkg::
// step_t) telling the cores which layer, input pixel, hidden group,
// output neuron and chunk the ROM word belongs to:
//   steps    0..1567: layer 1, group = n / 784, pixel = n % 784;
//   steps 1568..1639: layer 2, output = (n-1568) / 2, chunk = (n-1568) % 2.
// `done` pulses one clock after the last step has been presented, when
// the cores' results are registered. A run therefore takes 1641 clocks
// from `start` to `done`: the 1640 steps plus the ROM read. `start` is
// ignored while a run is in progress (`busy`).
module inference_sequencer
  import ocr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              rom_en,
  output logic [ADDR_W-1:0] rom_addr,
  output step_t             step,
  output logic              done
);

  logic              active;
  logic [ADDR_W-1:0] n;          // step whose ROM word is being read
  logic [9:0]        pix;        // layer-1 pixel of step n
  logic              grp;        // layer-1 group of step n
  logic [5:0]        outj;       // layer-2 output of step n
  logic              chk;        // layer-2 chunk of step n
  logic              last_q;

  assign rom_en   = active;
  assign rom_addr = n;
  assign busy     = active || step.valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      n      <= '0;
      pix    <= '0;
      grp    <= 1'b0;
      outj   <= '0;
      chk    <= 1'b0;
      step   <= '0;
      last_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      // descriptor of the step whose ROM word arrives next clock
      step.valid   <= active;
      step.layer2  <= (n >= ADDR_W'(L1_STEPS));
      step.in_idx  <= pix;
      step.group   <= grp;
      step.out_idx <= outj;
      step.chunk   <= chk;
      last_q       <= active && (n == ADDR_W'(N_STEPS - 1));
      done         <= last_q;

      if (!active) begin
        if (start) begin
          active <= 1'b1;
          n      <= '0;
          pix    <= '0;
          grp    <= 1'b0;
          outj   <= '0;
          chk    <= 1'b0;
        end
      end else begin
        if (n == ADDR_W'(N_STEPS - 1)) begin
          active <= 1'b0;
        end
        n <= n + 1'b1;
        if (n < ADDR_W'(L1_STEPS)) begin
          if (pix == 10'(N_IN - 1)) begin
            pix <= '0;
            grp <= 1'b1;
          end else begin
            pix <= pix + 1'b1;
          end
        end
        if (n >= ADDR_W'(L1_STEPS)) begin
          chk <= ~chk;
          if (chk) outj <= outj + 1'b1;
        end
      end
    end
  end

endmodule
