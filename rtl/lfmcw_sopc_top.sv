// lfmcw_sopc_top: FPGA top level of the LFMCW radar level gauge.
//
// The FPGA holds a Nios II system and two converter paths.  The A/D path takes
// the digitised radar beat (IF) signal from an AD9226 through the A/D control
// module (ad9226_ctl) into ad_pio; the D/A path plays the linearity-corrected
// sawtooth that sweeps the VCO (da_conv, loaded through da_pio).  The CPU
// reaches every peripheral through the Avalon interconnect (avalon_fabric):
// on-chip RAM and boot ROM, the tristate bridge to the external SRAM and
// flash, uart1 (debug), uart_rs485 (field bus), Timer1 (system tick), key_pio
// (4x4 keypad and the sound alarm) and lcd_pio (128x64 graphic LCD).
//
// The Nios II core itself is not part of this RTL: its data master comes in on
// the cpu_* ports and its interrupt request lines go out on cpu_irq (IRQ
// numbers as in sopc_pkg).  The slaves that belong to the core or to the
// system-ID peripheral are brought out as cpu_dbg_* and sysid_* port pairs.
//
// Pin use of the PIOs (this design's choice):
//   key_pio  (5 bits)  in[3:0] keypad columns; out[3:0] keypad rows, out[4] alarm
//   lcd_pio  (14 bits) [7:0] data bus (bidirectional), out[8] RS, out[9] RW,
//                      out[10] E, out[11] CS1, out[12] CS2, out[13] RST_n
//   ad_pio   (16 bits) in[11:0] captured sample, in[15] sweep-start flag from
//                      the D/A module (its edge interrupts the CPU once per
//                      sweep), out[12] START of the A/D control module
//   da_pio   (32 bits) out word that loads and runs the D/A module (da_conv)
// BOOT_IMAGE names a $readmemh image for the 4 KB boot ROM; without one the ROM
// reads zeros, as the boot program itself is not part of this design.
// The AD9226 is clocked with the 50 MHz system clock; the A/D control module
// takes each sample on its falling edge, half a clock before ad_pio's input
// flip-flops take it.
module lfmcw_sopc_top
  import sopc_pkg::*;
#(
  parameter string BOOT_IMAGE = ""   // $readmemh image of the boot ROM, none by default
) (
  input  logic        clk,
  input  logic        rst_n,
  // Nios II data master and interrupts
  input  av_req_t     cpu_req,
  output av_rsp_t     cpu_rsp,
  output logic [31:0] cpu_irq,
  output logic        decode_error,
  // slaves that belong to the Nios II core and the system-ID peripheral
  output av_req_t     cpu_dbg_req,
  input  av_rsp_t     cpu_dbg_rsp,
  output av_req_t     sysid_req,
  input  av_rsp_t     sysid_rsp,
  // AD9226
  input  logic [11:0] adc_data,
  output logic        adc_clk,
  // D/A converter of the VCO sweep
  output logic [11:0] dac_data,
  output logic        dac_wr,
  // external SRAM and flash
  output logic [19:0] ext_addr,
  output logic [15:0] ext_dq_out,
  output logic        ext_dq_oe,
  input  logic [15:0] ext_dq_in,
  output logic [1:0]  ext_be_n,
  output logic        flash_cs_n,
  output logic        ram_cs_n,
  output logic        ext_oe_n,
  output logic        ext_we_n,
  // serial ports
  input  logic        uart1_rxd,
  output logic        uart1_txd,
  input  logic        rs485_rxd,
  output logic        rs485_txd,
  output logic        rs485_de,
  // keypad and alarm
  input  logic [3:0]  key_col,
  output logic [3:0]  key_row,
  output logic        alarm,
  // LCD
  input  logic [7:0]  lcd_data_in,
  output logic [7:0]  lcd_data_out,
  output logic        lcd_data_oe,
  output logic        lcd_rs,
  output logic        lcd_rw,
  output logic        lcd_e,
  output logic        lcd_cs1,
  output logic        lcd_cs2,
  output logic        lcd_rst_n
);

  av_req_t s_req [NSLAVE];
  av_rsp_t s_rsp [NSLAVE];

  logic irq_uart1, irq_timer, irq_uart485, irq_key, irq_lcd, irq_ad, irq_da;

  avalon_fabric u_fabric (
    .m_req(cpu_req), .m_rsp(cpu_rsp), .s_req(s_req), .s_rsp(s_rsp),
    .decode_error(decode_error)
  );

  assign cpu_dbg_req      = s_req[S_CPUDBG];
  assign s_rsp[S_CPUDBG]  = cpu_dbg_rsp;
  assign sysid_req        = s_req[S_SYSID];
  assign s_rsp[S_SYSID]   = sysid_rsp;

  // ---- memories ----
  onchip_mem #(.BYTES(4096), .WRITABLE(1'b1)) u_onchip_ram (
    .clk, .rst_n, .req(s_req[S_ORAM]), .rsp(s_rsp[S_ORAM])
  );
  onchip_mem #(.BYTES(4096), .WRITABLE(1'b0), .INIT_FILE(BOOT_IMAGE)) u_onchip_rom (
    .clk, .rst_n, .req(s_req[S_OROM]), .rsp(s_rsp[S_OROM])
  );
  tristate_bridge u_ext_bus (
    .clk, .rst_n,
    .flash_req(s_req[S_FLASH]), .flash_rsp(s_rsp[S_FLASH]),
    .ram_req(s_req[S_ERAM]),    .ram_rsp(s_rsp[S_ERAM]),
    .ext_addr, .ext_dq_out, .ext_dq_oe, .ext_dq_in, .ext_be_n,
    .flash_cs_n, .ram_cs_n, .ext_oe_n, .ext_we_n
  );

  // ---- serial ports and timer ----
  logic uart1_txen_unused;
  avalon_uart u_uart1 (
    .clk, .rst_n, .req(s_req[S_UART1]), .rsp(s_rsp[S_UART1]),
    .rxd(uart1_rxd), .txd(uart1_txd), .tx_en(uart1_txen_unused), .irq(irq_uart1)
  );
  avalon_uart u_uart_rs485 (
    .clk, .rst_n, .req(s_req[S_UART485]), .rsp(s_rsp[S_UART485]),
    .rxd(rs485_rxd), .txd(rs485_txd), .tx_en(rs485_de), .irq(irq_uart485)
  );
  interval_timer u_timer1 (
    .clk, .rst_n, .req(s_req[S_TIMER1]), .rsp(s_rsp[S_TIMER1]), .irq(irq_timer)
  );

  // ---- keypad and alarm ----
  logic [4:0] key_out, key_oe_unused;
  avalon_pio #(.WIDTH(5)) u_key_pio (
    .clk, .rst_n, .req(s_req[S_KEY]), .rsp(s_rsp[S_KEY]),
    .in_port({1'b0, key_col}), .out_port(key_out), .out_oe(key_oe_unused), .irq(irq_key)
  );
  assign key_row = key_out[3:0];
  assign alarm   = key_out[4];

  // ---- LCD ----
  logic [13:0] lcd_out, lcd_oe;
  avalon_pio #(.WIDTH(14)) u_lcd_pio (
    .clk, .rst_n, .req(s_req[S_LCD]), .rsp(s_rsp[S_LCD]),
    .in_port({6'b0, lcd_data_in}), .out_port(lcd_out), .out_oe(lcd_oe), .irq(irq_lcd)
  );
  assign lcd_data_out = lcd_out[7:0];
  assign lcd_data_oe  = &lcd_oe[7:0];
  assign {lcd_rst_n, lcd_cs2, lcd_cs1, lcd_e, lcd_rw, lcd_rs} = lcd_out[13:8];

  // ---- A/D path ----
  logic [11:0] ad_q;
  logic [3:0]  ad_phase_unused;
  logic [15:0] ad_out, ad_oe_unused;
  logic        sweep_start, sweep_flag;

  ad9226_ctl u_ad9226_ctl (
    .data_of_ad(adc_data), .clk_state(clk), .start(ad_out[AD_START_BIT]),
    .clk(adc_clk), .q(ad_q), .sample_phase(ad_phase_unused)
  );

  // Stretch the one-clock sweep-start pulse so that ad_pio's synchroniser
  // cannot miss it: the flag is high for the first STEP of each sweep.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           sweep_flag <= 1'b0;
    else if (sweep_start) sweep_flag <= 1'b1;
    else if (dac_wr)      sweep_flag <= 1'b0;
  end

  avalon_pio #(.WIDTH(16)) u_ad_pio (
    .clk, .rst_n, .req(s_req[S_AD]), .rsp(s_rsp[S_AD]),
    .in_port({sweep_flag, 3'b0, ad_q}), .out_port(ad_out), .out_oe(ad_oe_unused), .irq(irq_ad)
  );

  // ---- D/A path ----
  logic [31:0] da_out, da_oe_unused;
  avalon_pio #(.WIDTH(32)) u_da_pio (
    .clk, .rst_n, .req(s_req[S_DA]), .rsp(s_rsp[S_DA]),
    .in_port('0), .out_port(da_out), .out_oe(da_oe_unused), .irq(irq_da)
  );
  da_conv u_da_conv (
    .clk, .rst_n, .ctrl(da_out), .dac_data, .dac_wr, .sweep_start
  );

  always_comb begin
    cpu_irq              = '0;
    cpu_irq[IRQ_UART1]   = irq_uart1;
    cpu_irq[IRQ_TIMER1]  = irq_timer;
    cpu_irq[IRQ_KEY]     = irq_key;
    cpu_irq[IRQ_LCD]     = irq_lcd;
    cpu_irq[IRQ_UART485] = irq_uart485;
    cpu_irq[IRQ_AD]      = irq_ad;
    cpu_irq[IRQ_DA]      = irq_da;
  end

endmodule
