// sram_sp: single-port synchronous SRAM, the memory core of the module.
//
// One access per cycle: when 'en' is high the address is sampled at the clock
// edge; a write stores wdata, a read returns the word on rdata after that edge
// (one cycle read latency). rdata holds its value when the SRAM is idle. The
// depth defaults to 8K 16-bit words, the largest single generated macro; the
// module's 16-bit addresses reach 64K words and the address bits above the
// depth are ignored here. Written as an array so that synthesis maps it to a
// memory; a real implementation would use a generated SRAM macro with the same
// ports. Contents are not initialised.
//
// The 8K x 16 size and the single port follow the described memory core; the
// behavioural array in place of a macro is this design's own choice.
module sram_sp #(
  parameter int unsigned WORDS = 8192,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
