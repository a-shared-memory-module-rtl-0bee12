// addr_gen: variable-stride modular address generator with burst counter.
//
// Three 16-bit configuration registers, written through cfg_we/cfg_addr:
// offset (address 0, writing it also clears the count), block size (1) and
// stride (2). The generator presents addr = count + offset. On each 'step' the
// count moves to (count + stride) mod block size: the sum and the sum minus the
// block size are both formed, and the sign bit (bit 15) of the difference picks
// the sum when it is still below the block size. The wrap is exact as long as
// stride <= block size and both are below 2^15.
//
// An 8-bit burst counter is loaded with the burst length by 'burst_load' and
// decremented by every 'step'. burst_last is high while the count is one or
// less, so the port issuing the burst knows the current access is the last.
//
// Timing: addr is combinational from the count register; step, load and
// configuration writes take effect at the clock edge.
//
// The register set, address = count + offset and the sign-bit wrap follow the
// described generator; the stride <= block size limit, and clearing the burst
// counter on an offset write, are this design's own choices.
module addr_gen #(
  parameter int unsigned AW = 16,
  parameter int unsigned BW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          srst,
  input  logic          cfg_we,
  input  logic [7:0]    cfg_addr,
  input  logic [AW-1:0] cfg_data,
  input  logic          step,
  input  logic          burst_load,
  input  logic [BW-1:0] burst_len,
  output logic [AW-1:0] addr,
  output logic [BW-1:0] burst_cnt,
  output logic          burst_last
);

  logic [AW-1:0] offset, block_size, stride, count;
  logic [AW-1:0] sum, diff, next_count;

  assign sum        = count + stride;
  assign diff       = sum - block_size;
  assign next_count = diff[AW-1] ? sum : diff;
  assign addr       = count + offset;
  assign burst_last = (burst_cnt <= BW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset <= '0; block_size <= '0; stride <= '0; count <= '0; burst_cnt <= '0;
    end else if (srst) begin
      offset <= '0; block_size <= '0; stride <= '0; count <= '0; burst_cnt <= '0;
    end else begin
      if (cfg_we && cfg_addr == 8'd0) begin
        offset <= cfg_data;
        count  <= '0;
      end else if (step) begin
        count <= next_count;
      end
      if (cfg_we && cfg_addr == 8'd1) block_size <= cfg_data;
      if (cfg_we && cfg_addr == 8'd2) stride     <= cfg_data;
      if (burst_load)                 burst_cnt  <= burst_len;
      else if (step && burst_cnt != '0) burst_cnt <= burst_cnt - BW'(1);
    end
  end

endmodule
