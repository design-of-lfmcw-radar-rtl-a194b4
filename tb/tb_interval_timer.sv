// tb_interval_timer: self-checking test of the interval timer.
//
// Checks the reset period (1 ms at 50 MHz reads back from periodl/periodh),
// then programs short periods and checks in continuous mode that timeouts
// come exactly period+1 clocks apart, that irq is raised only with ITO set and
// falls when TO is cleared, that one-shot mode times out once and stops
// (RUN drops), and that STOP halts a running timer.
module tb_interval_timer;
  import sopc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  av_req_t req = '0;
  av_rsp_t rsp;
  logic irq;

  int checks = 0, failures = 0;
  int cyc = 0;

  interval_timer dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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

  // Wait for TO to be set; return the clock count at that moment.
  task automatic wait_to(output int at);
    logic [31:0] d;
    do bus_read(TMR_STATUS, d); while (!d[0]);
    at = cyc;
  endtask

  initial begin
    logic [31:0] d;
    int t0, t1, first;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    bus_read(TMR_PERIODL, d); check(d[15:0] == 16'(CLK_HZ/1000 - 1), "reset periodl");
    bus_read(TMR_PERIODH, d); check(d[15:0] == 16'((CLK_HZ/1000 - 1) >> 16), "reset periodh");

    for (int p = 20; p <= 60; p += 20) begin
      bus_write(TMR_PERIODL, p);
      bus_write(TMR_PERIODH, 0);
      bus_write(TMR_CONTROL, 32'b0111);          // ITO, CONT, START
      // time successive timeouts with irq as the marker
      @(posedge irq); t0 = cyc;
      bus_write(TMR_STATUS, 0);
      check(!irq, "irq falls when TO is cleared");
      @(posedge irq); t1 = cyc;
      check(t1 - t0 == p + 1, $sformatf("timeout spacing %0d exp %0d", t1 - t0, p + 1));
      bus_write(TMR_STATUS, 0);
      @(posedge irq); t0 = cyc;
      check(t0 - t1 == p + 1, $sformatf("timeout spacing %0d exp %0d", t0 - t1, p + 1));
      bus_write(TMR_CONTROL, 32'b1000);          // STOP
      bus_write(TMR_STATUS, 0);
      bus_read(TMR_STATUS, d);
      check(d[1:0] == 2'b00, "stopped, TO clear");
      repeat (2 * p + 4) @(negedge clk);
      bus_read(TMR_STATUS, d);
      check(d[1:0] == 2'b00, "no timeout after STOP");
    end
    // one-shot without interrupt enable
    bus_write(TMR_PERIODL, 30);
    bus_write(TMR_CONTROL, 32'b0100);            // START only
    first = cyc;
    wait_to(t0);
    check(!irq, "no irq with ITO clear");
    bus_read(TMR_STATUS, d);
    check(d[1] == 1'b0, "one-shot stops");
    check(t0 - first >= 31 && t0 - first <= 40, $sformatf("one-shot time %0d", t0 - first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
