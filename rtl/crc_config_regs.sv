// crc_config_regs: processor interface and CRC variable registers.
//
// A processor writes the CRC variables over a simple synchronous bus: when
// up_wr is high the register at up_addr (crc_pkg::reg_addr_e) takes
// up_wdata at the rising edge. A write to REG_START produces a one-cycle
// cfg_start pulse in the following cycle, which starts the configuration
// circuitry. Reads are combinational; REG_STATUS returns {done, busy}.
// Reset values: CRC-32 polynomial 04C11DB7, r = N, W = N, initial value 0.
// The processor interface is only named by the architecture; the register
// set, map, reset values and protocol are this design's choices.
module crc_config_regs
  import crc_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned PB = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          up_wr,
  input  reg_addr_e     up_addr,
  input  logic [N-1:0]  up_wdata,
  output logic [N-1:0]  up_rdata,
  input  logic          cfg_busy,
  input  logic          cfg_done,
  output logic [N-1:0]  poly,
  output logic [PB-1:0] crc_size,
  output logic [PB-1:0] port_size,
  output logic [N-1:0]  init_value,
  output logic          cfg_start
);

  // CRC-32 (IEEE 802.3) generator polynomial, the reset value of poly.
  localparam logic [N-1:0] CRC32_POLY = N'(64'h04C1_1DB7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poly       <= CRC32_POLY;
      crc_size   <= PB'(N);
      port_size  <= PB'(N);
      init_value <= '0;
      cfg_start  <= 1'b0;
    end else begin
      cfg_start <= up_wr && (up_addr == REG_START);
      if (up_wr) begin
        unique case (up_addr)
          REG_POLY:      poly       <= up_wdata;
          REG_CRC_SIZE:  crc_size   <= up_wdata[PB-1:0];
          REG_PORT_SIZE: port_size  <= up_wdata[PB-1:0];
          REG_INIT:      init_value <= up_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    up_rdata = '0;
    unique case (up_addr)
      REG_POLY:      up_rdata = poly;
      REG_CRC_SIZE:  up_rdata = N'(crc_size);
      REG_PORT_SIZE: up_rdata = N'(port_size);
      REG_INIT:      up_rdata = init_value;
      REG_STATUS:    up_rdata = N'({cfg_done, cfg_busy});
      default: ;
    endcase
  end

endmodule
