// cfg_block: static configuration registers of the memory module.
//
// The module is a slave on the array's global configuration bus. A bus write
// carries an extended address {node, register} and a data word; when 'node'
// matches NODE_ID the register at 'register' is written. The registers and
// their bit positions are the module's static configuration space:
//   0x00 [0] halt (kept, no effect)   [1] clk_enable   [2] stall_disable
//        [3] reset (synchronous, module blocks)        [6] reset_fifo (input FIFOs)
//   0x01 [7:0] oscillator frequency word
//   0x04 [0] clk_ext (use the external clock)
//   0x10..0x13 [2:0] connect_in0..3    0x14..0x17 [2:0] connect_out0..3
//   0x18 [4:0] input FIFO reserve      0x19 [4:0] output FIFO reserve
// The registers are written in the bus clock domain; the memory module
// synchronizes what it needs. The bus handshake (a single-cycle write strobe)
// and the 8-bit node/8-bit register split are this design's choice, as are the
// reset values, which let the module run without any configuration.
module cfg_block #(
  parameter logic [7:0] NODE_ID = 8'h80,
  parameter int unsigned NPORTS = 4
) (
  input  logic        cfg_clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,     // {node, register}
  input  logic [15:0] cfg_data,
  output logic        cfg_halt,
  output logic        cfg_clk_enable,
  output logic        cfg_stall_disable,
  output logic        cfg_reset,
  output logic        cfg_reset_fifo,
  output logic [7:0]  cfg_freq,
  output logic        cfg_clk_ext,
  output logic [NPORTS-1:0][2:0] cfg_connect_in,
  output logic [NPORTS-1:0][2:0] cfg_connect_out,
  output logic [4:0]  cfg_fifo_rsrv_in,
  output logic [4:0]  cfg_fifo_rsrv_out
);

  logic       hit;
  logic [7:0] reg_addr;

  assign hit      = cfg_we && (cfg_addr[15:8] == NODE_ID);
  assign reg_addr = cfg_addr[7:0];

  always_ff @(posedge cfg_clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_halt          <= 1'b0;
      cfg_clk_enable    <= 1'b1;
      cfg_stall_disable <= 1'b0;
      cfg_reset         <= 1'b0;
      cfg_reset_fifo    <= 1'b0;
      cfg_freq          <= 8'hFF;
      cfg_clk_ext       <= 1'b0;
      for (int i = 0; i < int'(NPORTS); i++) begin
        cfg_connect_in[i]  <= 3'(i);
        cfg_connect_out[i] <= 3'(i);
      end
      cfg_fifo_rsrv_in  <= 5'd2;
      cfg_fifo_rsrv_out <= 5'd6;
    end else if (hit) begin
      unique case (reg_addr) inside
        8'h00: begin
          cfg_halt          <= cfg_data[0];
          cfg_clk_enable    <= cfg_data[1];
          cfg_stall_disable <= cfg_data[2];
          cfg_reset         <= cfg_data[3];
          cfg_reset_fifo    <= cfg_data[6];
        end
        8'h01: cfg_freq    <= cfg_data[7:0];
        8'h04: cfg_clk_ext <= cfg_data[0];
        [8'h10:8'h17]: begin
          for (int i = 0; i < int'(NPORTS); i++) begin
            if (reg_addr == 8'h10 + 8'(i)) cfg_connect_in[i]  <= cfg_data[2:0];
            if (reg_addr == 8'h14 + 8'(i)) cfg_connect_out[i] <= cfg_data[2:0];
          end
        end
        8'h18: cfg_fifo_rsrv_in  <= cfg_data[4:0];
        8'h19: cfg_fifo_rsrv_out <= cfg_data[4:0];
        default: ;
      endcase
    end
  end

endmodule
