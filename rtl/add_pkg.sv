// add_pkg: widths, constants and the CPU register map shared by the
// absolute delay differentiation circuit.
//
// Time is counted in ticks of the 12.5 MHz byte clock (one byte of a
// 100 Mb/s Ethernet stream per tick). The bus widths follow the block
// diagram of the circuit: 32-bit arrival/prediction counts and FIFO words,
// a 12-bit FIFO fill count, 31-bit delay results and an 8-bit CPU data bus
// with a 3-bit address. The register map is this design's own choice.
package add_pkg;

  localparam int unsigned TS_W       = 32;  // time stamp / FIFO word width
  localparam int unsigned COUNT_W    = 32;  // measured and predicted counts
  localparam int unsigned FIFO_CNT_W = 12;  // FIFO fill count width
  localparam int unsigned DLY_W      = 31;  // DELAY_SUM / DELAY_CNT width
  localparam int unsigned RATE_W     = 32;  // service rate in units per slot

  // CPU register addresses (3-bit address bus, 8-bit data)
  typedef enum logic [2:0] {
    REG_CTRL   = 3'd0,  // bit0 T (start), bit1 P (stop)
    REG_TARGET = 3'd1,  // target delay D* in microseconds
    REG_SEL    = 3'd2,  // bit0: 0 = results show DELAY_SUM, 1 = DELAY_CNT
    REG_STATUS = 3'd3,  // bit0 running, bit1 FIFO overflow seen
    REG_RES0   = 3'd4,  // selected result, bits 7:0
    REG_RES1   = 3'd5,  // bits 15:8
    REG_RES2   = 3'd6,  // bits 23:16
    REG_RES3   = 3'd7   // bits 30:24
  } reg_addr_e;

  localparam int unsigned CTRL_T = 0;
  localparam int unsigned CTRL_P = 1;

endpackage
