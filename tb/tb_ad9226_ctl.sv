// tb_ad9226_ctl: self-checking test of the AD9226 control module.
//
// A converter model changes data_of_ad 1 ns after every rising clock edge
// (steps of 0x011, as a ramp is easy to follow).  A reference model keeps the
// expected q and sample phase: on each falling edge with start high, q takes
// the bus value and the phase advances modulo 9.  After every falling edge the
// outputs are compared; start is low at first, then high, then low and high
// again, so both capture and hold are checked, and the phase is checked to
// wrap after 9 samples.  clk must follow clk_state at all times.
module tb_ad9226_ctl;
  logic [11:0] data_of_ad;
  logic        clk_state = 1'b0;
  logic        start = 1'b0;
  logic        clk;
  logic [11:0] q;
  logic [3:0]  sample_phase;

  int checks = 0, failures = 0;
  int cycles = 0;
  int wraps  = 0;
  logic [11:0] exp_q = '0;
  int          exp_phase = 0;

  ad9226_ctl dut (.*);

  always #5 clk_state = ~clk_state;

  initial data_of_ad = '0;
  always @(posedge clk_state) begin
    cycles <= cycles + 1;
    #1 data_of_ad <= data_of_ad + 12'h011;
  end

  always @(negedge clk_state) begin
    if (start) begin
      exp_q     = data_of_ad;
      exp_phase = (exp_phase + 1) % 9;
      if (exp_phase == 0) wraps++;
    end
    #1;
    checks++;
    if (q !== exp_q || int'(sample_phase) != exp_phase) begin
      failures++;
      $display("FAIL t=%0t q=%h exp %h phase=%0d exp %0d", $time, q, exp_q, sample_phase, exp_phase);
    end
  end

  always @(clk_state) begin
    #0.1;
    checks++;
    if (clk !== clk_state) begin
      failures++;
      $display("FAIL clk does not follow clk_state");
    end
  end

  initial begin
    repeat (5) @(posedge clk_state);
    #2 start = 1'b1;
    repeat (23) @(posedge clk_state);
    #2 start = 1'b0;
    repeat (6) @(posedge clk_state);
    #2 start = 1'b1;
    repeat (12) @(posedge clk_state);
    #2 start = 1'b0;
    repeat (3) @(posedge clk_state);
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("FAIL the phase wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
