// avalon_uart: serial port on the Avalon-MM data bus (8 data bits, no parity,
// one stop bit).
//
// Two of these sit in the system: uart1 for debugging and uart_rs485, whose
// txd/rxd go to an RS485 line transceiver and whose tx_en drives the
// transceiver's driver enable, so the half-duplex line is driven only while a
// character is being sent.  One bit lasts divisor+1 clocks.  Word offsets:
//   0 rxdata   [7:0] last received character; reading it clears RRDY
//   1 txdata   [7:0] writing it starts a character when TRDY is set
//   2 status   [1] FE framing error, [3] ROE receive overrun, [5] TMT
//              transmitter empty, [6] TRDY txdata free, [7] RRDY character
//              received; writing status clears FE and ROE
//   3 control  [3] IROE, [6] ITRDY, [7] IRRDY interrupt enables
//   4 divisor  [15:0] clocks per bit minus one
// irq = (RRDY & IRRDY) | (TRDY & ITRDY) | (ROE & IROE).  The receiver takes rxd
// through two flip-flops, finds the start bit on a falling edge, checks it at
// mid-bit and samples each further bit at its middle.  Accesses take one clock.
// The UARTs and their use are the system's; the frame, the register set and
// the 115200 baud default are this design's choice.
module avalon_uart
  import sopc_pkg::*;
#(
  parameter int unsigned BAUD = 115_200
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t req,
  output av_rsp_t rsp,
  input  logic    rxd,
  output logic    txd,
  output logic    tx_en,   // driver enable for an RS485 transceiver
  output logic    irq
);

  localparam logic [15:0] DEFAULT_DIV = 16'(CLK_HZ / BAUD - 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  logic [15:0] divisor;
  logic        ie_roe, ie_trdy, ie_rrdy;
  wire  [2:0]  reg_sel = req.address[4:2];

  // Transmitter.
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;     // bits still to send, 0 = idle
  logic [15:0] tx_cnt;
  logic [7:0]  tx_hold;
  logic        tx_full;     // txdata holds a character not yet started

  // Receiver.
  rx_state_e   rx_state;
  logic        rx_s1, rx_s2;
  logic [15:0] rx_cnt;
  logic [2:0]  rx_bit;
  logic [7:0]  rx_shift, rx_data;
  logic        rrdy, roe, fe;

  wire rd_rxdata = req.read  && reg_sel == UART_RXDATA;
  wire wr_txdata = req.write && reg_sel == UART_TXDATA;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divisor <= DEFAULT_DIV;
      {ie_roe, ie_trdy, ie_rrdy} <= '0;
      tx_shift <= '1; tx_bits <= '0; tx_cnt <= '0; tx_hold <= '0; tx_full <= 1'b0;
      rx_state <= RX_IDLE; rx_s1 <= 1'b1; rx_s2 <= 1'b1; rx_cnt <= '0; rx_bit <= '0;
      rx_shift <= '0; rx_data <= '0; rrdy <= 1'b0; roe <= 1'b0; fe <= 1'b0;
    end else begin
      // ---- register writes ----
      if (req.write) begin
        case (reg_sel)
          UART_STATUS:  begin roe <= 1'b0; fe <= 1'b0; end
          UART_CONTROL: begin
            ie_roe  <= req.writedata[3];
            ie_trdy <= req.writedata[6];
            ie_rrdy <= req.writedata[7];
          end
          UART_DIVISOR: divisor <= req.writedata[15:0];
          default: ;
        endcase
      end
      if (wr_txdata && !tx_full) begin
        tx_hold <= req.writedata[7:0];
        tx_full <= 1'b1;
      end
      // ---- transmitter ----
      if (tx_bits != 0) begin
        if (tx_cnt == 0) begin
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 1'b1;
          tx_cnt   <= divisor;
        end else begin
          tx_cnt <= tx_cnt - 1'b1;
        end
      end else if (tx_full) begin
        tx_shift <= {1'b1, tx_hold, 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= divisor;
        tx_full  <= 1'b0;
      end
      // ---- receiver ----
      rx_s1 <= rxd;
      rx_s2 <= rx_s1;
      if (rd_rxdata) rrdy <= 1'b0;
      case (rx_state)
        RX_IDLE: if (!rx_s2) begin
          rx_state <= RX_START;
          rx_cnt   <= {1'b0, divisor[15:1]};
        end
        RX_START: if (rx_cnt == 0) begin
          if (rx_s2) rx_state <= RX_IDLE;       // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_cnt   <= divisor;
            rx_bit   <= '0;
          end
        end else rx_cnt <= rx_cnt - 1'b1;
        RX_DATA: if (rx_cnt == 0) begin
          rx_shift <= {rx_s2, rx_shift[7:1]};
          rx_cnt   <= divisor;
          rx_bit   <= rx_bit + 1'b1;
          if (rx_bit == 3'd7) rx_state <= RX_STOP;
        end else rx_cnt <= rx_cnt - 1'b1;
        default: if (rx_cnt == 0) begin        // RX_STOP
          rx_state <= RX_IDLE;
          rx_data  <= rx_shift;
          if (!rx_s2) fe <= 1'b1;
          if (rrdy && !rd_rxdata) roe <= 1'b1;
          rrdy     <= 1'b1;
        end else rx_cnt <= rx_cnt - 1'b1;
      endcase
    end
  end

  wire tmt  = (tx_bits == 0) && !tx_full;
  wire trdy = !tx_full;

  always_comb begin
    rsp = '0;
    case (reg_sel)
      UART_RXDATA:  rsp.readdata[7:0] = rx_data;
      UART_TXDATA:  rsp.readdata[7:0] = tx_hold;
      UART_STATUS: begin
        rsp.readdata[UST_FE]   = fe;
        rsp.readdata[UST_ROE]  = roe;
        rsp.readdata[UST_TMT]  = tmt;
        rsp.readdata[UST_TRDY] = trdy;
        rsp.readdata[UST_RRDY] = rrdy;
      end
      UART_CONTROL: begin
        rsp.readdata[3] = ie_roe;
        rsp.readdata[6] = ie_trdy;
        rsp.readdata[7] = ie_rrdy;
      end
      UART_DIVISOR: rsp.readdata[15:0] = divisor;
      default: ;
    endcase
  end

  assign txd   = tx_shift[0];
  assign tx_en = (tx_bits != 0);
  assign irq   = (rrdy & ie_rrdy) | (trdy & ie_trdy) | (roe & ie_roe);

endmodule
