// tb_da_conv: self-checking test of the D/A conversion module.
//
// Loads an 8-entry sweep table (random 12-bit values) through the control word
// exactly as the CPU would through da_pio (value, address, then a rising edge
// of the write bit), starts the sweep and follows three sweeps: every DAC write
// must carry the next table entry, come STEP_DIV clocks after the previous one,
// and sweep_start must mark exactly the writes of entry 0.  The first write
// must come one clock after run rises.  After run drops no write may follow;
// a restart must begin again at entry 0.
module tb_da_conv;
  import sopc_pkg::*;
  localparam int DEPTH = 8, STEP_DIV = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] ctrl = '0;
  logic [11:0] dac_data;
  logic        dac_wr, sweep_start;

  int checks = 0, failures = 0;
  logic [11:0] tbl [DEPTH];
  int exp_idx = 0, writes = 0, last_wr = -1, cyc = 0, run_cyc = 0, sweeps = 0;
  bit first = 1'b1;

  da_conv #(.DAC_W(12), .DEPTH(DEPTH), .STEP_DIV(STEP_DIV)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Scoreboard of the DAC writes.
  always @(posedge clk) if (rst_n && dac_wr) begin
    check(dac_data == tbl[exp_idx], $sformatf("entry %0d: dac_data %h exp %h", exp_idx, dac_data, tbl[exp_idx]));
    check(sweep_start == (exp_idx == 0), "sweep_start marks entry 0");
    if (first) check(cyc - run_cyc == 1, $sformatf("first write %0d clocks after run", cyc - run_cyc));
    else       check(cyc - last_wr == STEP_DIV, $sformatf("write spacing %0d", cyc - last_wr));
    if (exp_idx == 0) sweeps++;
    first   = 1'b0;
    last_wr = cyc;
    exp_idx = (exp_idx + 1) % DEPTH;
    writes++;
  end

  task automatic load(int a, logic [11:0] v);
    @(negedge clk) ctrl = '0;
    ctrl[DA_ADDR_LSB +: 8] = 8'(a);
    ctrl[11:0] = v;
    @(negedge clk) ctrl[DA_WR_BIT] = 1'b1;
    @(negedge clk) ctrl[DA_WR_BIT] = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      tbl[i] = 12'($urandom);
      load(i, tbl[i]);
    end
    check(writes == 0, "no DAC write while stopped");
    @(negedge clk) begin ctrl[DA_RUN_BIT] = 1'b1; run_cyc = cyc; end
    wait (sweeps == 3 && exp_idx == 3);
    @(negedge clk) ctrl[DA_RUN_BIT] = 1'b0;
    begin
      int w;
      w = writes;
      repeat (4 * STEP_DIV) @(negedge clk);
      check(writes == w, "no DAC write after run drops");
    end
    // restart: must begin at entry 0 again
    exp_idx = 0; first = 1'b1;
    @(negedge clk) begin ctrl[DA_RUN_BIT] = 1'b1; run_cyc = cyc; end
    wait (sweeps == 5);
    repeat (2) @(negedge clk);
    check(writes >= 3 * DEPTH, "enough writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
