// tb_avalon_pio: self-checking test of the Avalon parallel I/O port.
//
// Drives the four registers through bus writes and reads, as the CPU does:
// the output latch must reach out_port and the direction register out_oe; a
// read of data must return the input pins two clocks after they change; a
// rising edge on an input must set its edgecapture bit (a falling edge must
// not), irq must follow edgecapture & irqmask, and writing 1 to an
// edgecapture bit must clear only that bit.  Random values, 20 rounds.
module tb_avalon_pio;
  import sopc_pkg::*;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  av_req_t req = '0;
  av_rsp_t rsp;
  logic [W-1:0] in_port = '0, out_port, out_oe;
  logic irq;

  int checks = 0, failures = 0;

  avalon_pio #(.WIDTH(W)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic bus_write(logic [1:0] r, logic [31:0] d);
    @(negedge clk);
    req = '0; req.address = {28'b0, r, 2'b0}; req.write = 1'b1; req.writedata = d; req.byteenable = '1;
    @(posedge clk); while (rsp.waitrequest) @(posedge clk);
    #1 req = '0;
  endtask

  task automatic bus_read(logic [1:0] r, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.address = {28'b0, r, 2'b0}; req.read = 1'b1; req.byteenable = '1;
    @(posedge clk); while (rsp.waitrequest) @(posedge clk);
    d = rsp.readdata;
    #1 req = '0;
  endtask

  initial begin
    logic [31:0] d;
    logic [W-1:0] v, m, prev_in, exp_edges;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_edges = '0;
    for (int round = 0; round < 20; round++) begin
      v = W'($urandom);
      bus_write(PIO_DATA, 32'(v));
      check(out_port == v, "out_port follows data write");
      v = W'($urandom);
      bus_write(PIO_DIR, 32'(v));
      check(out_oe == v, "out_oe follows direction write");
      bus_read(PIO_DIR, d);
      check(d[W-1:0] == v, "direction reads back");
      m = W'($urandom);
      bus_write(PIO_IRQMASK, 32'(m));
      // change the inputs
      prev_in = in_port;
      @(negedge clk) in_port = W'($urandom);
      exp_edges |= in_port & ~prev_in;
      repeat (4) @(negedge clk);
      bus_read(PIO_DATA, d);
      check(d[W-1:0] == in_port, $sformatf("data reads pins %h exp %h", d[W-1:0], in_port));
      bus_read(PIO_EDGE, d);
      check(d[W-1:0] == exp_edges, $sformatf("edgecapture %h exp %h", d[W-1:0], exp_edges));
      check(irq == |(exp_edges & m), "irq = |(edges & mask)");
      // clear some edge bits
      v = W'($urandom);
      bus_write(PIO_EDGE, 32'(v));
      exp_edges &= ~v;
      bus_read(PIO_EDGE, d);
      check(d[W-1:0] == exp_edges, "edgecapture after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
