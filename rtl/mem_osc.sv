// mem_osc: behavioural model of the memory module's local clock source.
//
// Behavioural model, not synthesizable: it stands for a digitally tuned ring
// oscillator built from standard cells (tri-state buffers in parallel with an
// inverter per stage) and a mutual-exclusion element that pauses the clock.
// It keeps the real part's interface:
//   osc_enable  runs the ring oscillator
//   freq        frequency word; the model's half period is
//               MIN_HALF_PS * 256 / (freq + 1), so 0xFF gives the fastest clock
//               (900 ps half period, about 555 MHz)
//   ext_sel     selects ext_clk instead of the oscillator
//   pause_req   the module is idle and asks for the clock to stop
//   wake        asynchronous restart (an input FIFO is no longer empty)
// The clock stops only while pause_req is high and wake is low. The run
// condition is latched while the selected clock is low, so clk never carries
// a shortened pulse. The model gates the clock instead of stopping the ring;
// the frequency law is this model's own.
module mem_osc #(
  parameter int unsigned MIN_HALF_PS = 900
) (
  input  logic       osc_enable,
  input  logic [7:0] freq,
  input  logic       ext_clk,
  input  logic       ext_sel,
  input  logic       pause_req,
  input  logic       wake,
  output logic       clk
);

  timeunit 1ns;
  timeprecision 1ps;

  logic ring = 1'b0;
  logic src;
  logic run;
  real  half_ns;

  assign half_ns = real'(MIN_HALF_PS) * 256.0 / (real'(freq) + 1.0) / 1000.0;

  always begin
    if (osc_enable) begin
      #(half_ns);
      ring = ~ring;
    end else begin
      ring = 1'b0;
      @(posedge osc_enable);
    end
  end

  assign src = ext_sel ? ext_clk : ring;

  always_latch begin
    if (!src) run = !pause_req || wake;
  end

  assign clk = src & run;

endmodule
