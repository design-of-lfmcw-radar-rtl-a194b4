// tb_avalon_uart: self-checking test of the UART.
//
// With the divisor set to 15 (16 clocks per bit) the test sends random
// characters: the serial model in this file samples txd in the middle of each
// bit and must see a start bit, the 8 data bits LSB first and a stop bit, each
// 16 clocks long, with tx_en high over the whole frame and low after it.  It
// also sends random frames on rxd: RRDY and irq (IRRDY set) must rise and
// rxdata must hold the character; two characters without a read must give ROE;
// a frame with a zero stop bit must give FE; writing status clears both.
module tb_avalon_uart;
  import sopc_pkg::*;
  localparam int DIV = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  av_req_t req = '0;
  av_rsp_t rsp;
  logic rxd = 1'b1, txd, tx_en, irq;

  int checks = 0, failures = 0;

  avalon_uart dut (.*);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic bus_write(logic [2:0] r, logic [31:0] d);
    @(negedge clk);
    req = '0; req.address = {27'b0, r, 2'b0}; req.write = 1'b1; req.writedata = d; req.byteenable = '1;
    @(posedge clk); while (rsp.waitrequest) @(posedge clk);
    #1 req = '0;
  endtask

  task automatic bus_read(logic [2:0] r, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.address = {27'b0, r, 2'b0}; req.read = 1'b1; req.byteenable = '1;
    @(posedge clk); while (rsp.waitrequest) @(posedge clk);
    d = rsp.readdata;
    #1 req = '0;
  endtask

  // Receive one frame from txd and check its shape.
  task automatic expect_tx(logic [7:0] c);
    logic [7:0] got;
    @(negedge txd);
    #1 check(tx_en, "tx_en high at start bit");
    repeat (DIV / 2 + 1) @(posedge clk);
    check(txd == 1'b0, "start bit");
    for (int i = 0; i < 8; i++) begin
      repeat (DIV + 1) @(posedge clk);
      got[i] = txd;
      check(tx_en, "tx_en high in frame");
    end
    repeat (DIV + 1) @(posedge clk);
    check(txd == 1'b1, "stop bit");
    check(got == c, $sformatf("tx char %h exp %h", got, c));
    repeat (DIV / 2 + 2) @(posedge clk);
    check(!tx_en, "tx_en low after frame");
  endtask

  // Send one frame on rxd.
  task automatic send_rx(logic [7:0] c, bit stop = 1'b1);
    logic [9:0] f;
    f = {stop, c, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (DIV + 1) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (DIV + 1) @(posedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] c, c2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    bus_read(UART_DIVISOR, d);
    check(d[15:0] == 16'(CLK_HZ / 115200 - 1), "reset divisor for 115200 baud");
    bus_write(UART_DIVISOR, DIV);
    bus_write(UART_CONTROL, 32'h80);             // IRRDY
    bus_read(UART_STATUS, d);
    check(d[UST_TMT] && d[UST_TRDY] && !d[UST_RRDY], "idle status");
    for (int k = 0; k < 6; k++) begin
      c = 8'($urandom);
      fork
        bus_write(UART_TXDATA, 32'(c));
        expect_tx(c);
      join
      bus_read(UART_STATUS, d);
      check(d[UST_TMT], "transmitter empty after frame");
    end
    for (int k = 0; k < 6; k++) begin
      c = 8'($urandom);
      send_rx(c);
      check(irq, "irq on RRDY");
      bus_read(UART_STATUS, d);
      check(d[UST_RRDY] && !d[UST_ROE] && !d[UST_FE], "RRDY set, no error");
      bus_read(UART_RXDATA, d);
      check(d[7:0] == c, $sformatf("rx char %h exp %h", d[7:0], c));
      check(!irq, "irq falls after rxdata read");
    end
    // overrun
    c = 8'($urandom); c2 = 8'($urandom);
    send_rx(c); send_rx(c2);
    bus_read(UART_STATUS, d);
    check(d[UST_ROE] && d[UST_RRDY], "ROE after two unread characters");
    bus_read(UART_RXDATA, d);
    check(d[7:0] == c2, "newest character kept");
    bus_write(UART_STATUS, 0);
    // framing error
    send_rx(8'h5A, 1'b0);
    bus_read(UART_STATUS, d);
    check(d[UST_FE] && !d[UST_ROE], "FE on zero stop bit");
    bus_write(UART_STATUS, 0);
    bus_read(UART_STATUS, d);
    check(!d[UST_FE], "FE cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
