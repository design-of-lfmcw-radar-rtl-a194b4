// sopc_pkg: types and constants shared by the radar level-gauge SOPC.
//
// The address map and interrupt numbers below are those of the Nios II system
// of the level gauge (slave name, base, last address, IRQ).  The bus request and
// response structs are this design's own way of carrying a simple Avalon-MM
// transfer (address, read, write, byteenable, writedata / readdata,
// waitrequest) between the interconnect and each slave: a master holds its
// request until waitrequest is low, and in that cycle readdata is valid.
package sopc_pkg;

  // System clock of the SOPC (50 MHz, external clock source "clk").
  localparam int unsigned CLK_HZ = 50_000_000;

  // Simple Avalon-MM transfer, byte address relative to the slave's base.
  typedef struct packed {
    logic [31:0] address;
    logic        read;
    logic        write;
    logic [3:0]  byteenable;
    logic [31:0] writedata;
  } av_req_t;

  typedef struct packed {
    logic [31:0] readdata;
    logic        waitrequest;
  } av_rsp_t;

  // Slaves of the data master, in decode order.
  typedef enum logic [3:0] {
    S_FLASH   = 4'd0,   // ext_flash  0x000000 - 0x1FFFFF
    S_ERAM    = 4'd1,   // ext_ram    0x200000 - 0x2FFFFF
    S_ORAM    = 4'd2,   // onchip_RAM 0x300000 - 0x300FFF
    S_CPUDBG  = 4'd3,   // cpu        0x301000 - 0x3017FF (CPU debug slave)
    S_UART1   = 4'd4,   // uart1      0x301800 - 0x30181F  IRQ 0
    S_TIMER1  = 4'd5,   // Timer1     0x301820 - 0x30183F  IRQ 1
    S_UART485 = 4'd6,   // uart_rs485 0x301840 - 0x30185F  IRQ 4
    S_KEY     = 4'd7,   // key_pio    0x301860 - 0x30186F  IRQ 2
    S_LCD     = 4'd8,   // lcd_pio    0x301870 - 0x30187F  IRQ 3
    S_AD      = 4'd9,   // ad_pio     0x301880 - 0x30188F  IRQ 5
    S_DA      = 4'd10,  // da_pio     0x301890 - 0x30189F  IRQ 6
    S_SYSID   = 4'd11,  // sysid      0x3018A0 - 0x3018A7
    S_OROM    = 4'd12   // onchip_ROM 0x303000 - 0x303FFF
  } slave_e;

  localparam int unsigned NSLAVE = 13;

  typedef struct packed {
    logic [31:0] base;
    logic [31:0] last;
  } addr_range_t;

  function automatic addr_range_t slave_range(slave_e s);
    case (s)
      S_FLASH:   return '{32'h0000_0000, 32'h001F_FFFF};
      S_ERAM:    return '{32'h0020_0000, 32'h002F_FFFF};
      S_ORAM:    return '{32'h0030_0000, 32'h0030_0FFF};
      S_CPUDBG:  return '{32'h0030_1000, 32'h0030_17FF};
      S_UART1:   return '{32'h0030_1800, 32'h0030_181F};
      S_TIMER1:  return '{32'h0030_1820, 32'h0030_183F};
      S_UART485: return '{32'h0030_1840, 32'h0030_185F};
      S_KEY:     return '{32'h0030_1860, 32'h0030_186F};
      S_LCD:     return '{32'h0030_1870, 32'h0030_187F};
      S_AD:      return '{32'h0030_1880, 32'h0030_188F};
      S_DA:      return '{32'h0030_1890, 32'h0030_189F};
      S_SYSID:   return '{32'h0030_18A0, 32'h0030_18A7};
      default:   return '{32'h0030_3000, 32'h0030_3FFF};  // S_OROM
    endcase
  endfunction

  // Interrupt numbers of the Nios II IRQ inputs.
  localparam int unsigned IRQ_UART1   = 0;
  localparam int unsigned IRQ_TIMER1  = 1;
  localparam int unsigned IRQ_KEY     = 2;
  localparam int unsigned IRQ_LCD     = 3;
  localparam int unsigned IRQ_UART485 = 4;
  localparam int unsigned IRQ_AD      = 5;
  localparam int unsigned IRQ_DA      = 6;

  // Register word offsets of the PIO.
  localparam logic [1:0] PIO_DATA = 2'd0, PIO_DIR = 2'd1, PIO_IRQMASK = 2'd2, PIO_EDGE = 2'd3;
  // Register word offsets of the interval timer.
  localparam logic [2:0] TMR_STATUS = 3'd0, TMR_CONTROL = 3'd1, TMR_PERIODL = 3'd2, TMR_PERIODH = 3'd3;
  // Register word offsets of the UART.
  localparam logic [2:0] UART_RXDATA = 3'd0, UART_TXDATA = 3'd1, UART_STATUS = 3'd2,
                         UART_CONTROL = 3'd3, UART_DIVISOR = 3'd4;
  // UART status / control bit positions.
  localparam int unsigned UST_FE = 1, UST_ROE = 3, UST_TMT = 5, UST_TRDY = 6, UST_RRDY = 7;

  // Bit fields of the da_pio output word that feeds the D/A conversion module.
  localparam int unsigned DA_SAMPLE_LSB = 0;   // [11:0]  table entry value
  localparam int unsigned DA_ADDR_LSB   = 16;  // [23:16] table entry address
  localparam int unsigned DA_WR_BIT     = 24;  // rising edge writes the entry
  localparam int unsigned DA_RUN_BIT    = 25;  // 1 = play the sweep

  // Bit fields of ad_pio.
  localparam int unsigned AD_START_BIT  = 12;  // output: START of the A/D control module
  localparam int unsigned AD_SWEEP_BIT  = 15;  // input: sweep start flag from the D/A module

endpackage
