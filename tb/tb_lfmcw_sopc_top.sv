// tb_lfmcw_sopc_top: end-to-end test of the level-gauge FPGA at its default
// parameters.
//
// The test plays the part of the Nios II CPU: it issues Avalon transfers on
// cpu_req/cpu_rsp, addressed by the system's address map, and watches cpu_irq.
// Around the FPGA sit models of the AD9226 (a value the test sets, changing
// after each rising converter clock), the external SRAM and flash, a 4x4
// keypad with one key pressed, the LCD data bus, the system-ID and CPU-debug
// slaves, and loop-backs of both serial ports.  One pass goes through one
// measurement cycle as the main program does it: the sweep table is loaded and
// started, sweep-start interrupts arrive through ad_pio, samples are taken
// with START high and held with START low, the keypad is scanned, the LCD is
// written, a result is sent over RS485 and the tick timer runs.  Each
// mechanism is counted and a failure is counted for any that never happened.
module tb_lfmcw_sopc_top;
  import sopc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  av_req_t cpu_req = '0, cpu_dbg_req, sysid_req;
  av_rsp_t cpu_rsp, cpu_dbg_rsp, sysid_rsp;
  logic [31:0] cpu_irq;
  logic decode_error;
  logic [11:0] adc_data, dac_data;
  logic adc_clk, dac_wr;
  logic [19:0] ext_addr;
  logic [15:0] ext_dq_out, ext_dq_in;
  logic ext_dq_oe, flash_cs_n, ram_cs_n, ext_oe_n, ext_we_n;
  logic [1:0] ext_be_n;
  logic uart1_rxd, uart1_txd, rs485_rxd, rs485_txd, rs485_de;
  logic [3:0] key_col, key_row;
  logic alarm;
  logic [7:0] lcd_data_in = 8'hA5, lcd_data_out;
  logic lcd_data_oe, lcd_rs, lcd_rw, lcd_e, lcd_cs1, lcd_cs2, lcd_rst_n;

  lfmcw_sopc_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  always #10 clk = ~clk;                 // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---- mechanism counters ----
  typedef enum int {
    M_DECODE_ERR, M_WAIT_STALL, M_BRIDGE_2HALF, M_BRIDGE_1HALF, M_ROM_WRITE, M_TIMER_IRQ,
    M_UART1_RX, M_RS485_DE, M_KEY_IRQ, M_ALARM, M_LCD, M_ADC_CAPTURE, M_ADC_HOLD,
    M_SWEEP_WRAP, M_SWEEP_IRQ, M_EXT_SLAVE, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  // ---- CPU bus-functional model ----
  int last_clocks;
  task automatic cpu_access(bit wr, logic [31:0] a, logic [31:0] wd, logic [3:0] be,
                            output logic [31:0] d);
    int c0;
    @(negedge clk);
    cpu_req = '0; cpu_req.address = a; cpu_req.read = !wr; cpu_req.write = wr;
    cpu_req.writedata = wd; cpu_req.byteenable = be;
    c0 = cyc;
    @(posedge clk);
    while (cpu_rsp.waitrequest) @(posedge clk);
    d = cpu_rsp.readdata;
    last_clocks = cyc - c0 + 1;
    #1 cpu_req = '0;
  endtask
  task automatic wr32(logic [31:0] a, logic [31:0] d, logic [3:0] be = 4'hF);
    logic [31:0] x;
    cpu_access(1'b1, a, d, be, x);
  endtask
  task automatic rd32(logic [31:0] a, output logic [31:0] d);
    cpu_access(1'b0, a, '0, 4'hF, d);
  endtask

  // ---- external chip models ----
  logic [15:0] flash_mem [logic [19:0]];
  logic [15:0] sram_mem  [logic [19:0]];
  always_comb begin
    ext_dq_in = 16'hFFFF;
    if (!ext_oe_n && !flash_cs_n) ext_dq_in = flash_mem.exists(ext_addr) ? flash_mem[ext_addr] : 16'hFFFF;
    if (!ext_oe_n && !ram_cs_n)   ext_dq_in = sram_mem.exists(ext_addr)  ? sram_mem[ext_addr]  : 16'h0000;
  end
  always @(posedge clk) begin
    if (!ext_we_n && !flash_cs_n) flash_mem[ext_addr] = ext_dq_out;
    if (!ext_we_n && !ram_cs_n) begin
      logic [15:0] v;
      v = sram_mem.exists(ext_addr) ? sram_mem[ext_addr] : 16'h0000;
      if (!ext_be_n[0]) v[7:0]  = ext_dq_out[7:0];
      if (!ext_be_n[1]) v[15:8] = ext_dq_out[15:8];
      sram_mem[ext_addr] = v;
    end
  end

  // ---- slaves outside the FPGA logic: answer with fixed words ----
  assign sysid_rsp   = '{readdata: 32'h5AD0_0001, waitrequest: 1'b0};
  assign cpu_dbg_rsp = '{readdata: 32'hDB60_0000 | cpu_dbg_req.address, waitrequest: 1'b0};

  // ---- AD9226 model: output changes 3 ns after each rising converter clock ----
  logic [11:0] adc_value = 12'h000;
  always @(posedge adc_clk) adc_data <= #3 adc_value;

  // ---- serial loop-backs ----
  assign uart1_rxd = uart1_txd;
  assign rs485_rxd = rs485_de ? rs485_txd : 1'b1;   // half-duplex line, idle high

  // ---- keypad: key at row KR, column KC pressed; columns pulled high ----
  int kr = 2, kc = 1;
  bit key_down = 1'b1;
  always_comb begin
    key_col = 4'hF;
    if (key_down && !key_row[kr]) key_col[kc] = 1'b0;
  end

  // ---- DAC scoreboard ----
  logic [11:0] sweep_tbl [256];
  int dac_idx = 0, dac_last = -1, dac_writes = 0, sweeps_seen = 0;
  bit dac_armed = 1'b0;
  always @(posedge clk) if (dac_wr && dac_armed) begin
    check(dac_data == sweep_tbl[dac_idx], $sformatf("DAC entry %0d = %h exp %h", dac_idx, dac_data, sweep_tbl[dac_idx]));
    if (dac_last >= 0) check(cyc - dac_last == 50, $sformatf("DAC step %0d clocks", cyc - dac_last));
    dac_last = cyc;
    dac_writes++;
    dac_idx = (dac_idx + 1) % 256;
    if (dac_idx == 0) begin sweeps_seen++; mech[M_SWEEP_WRAP]++; end
  end
  always @(posedge clk) if (decode_error) mech[M_DECODE_ERR]++;
  always @(posedge clk) if (rs485_de) mech[M_RS485_DE] += (mech[M_RS485_DE] == 0);

  localparam logic [31:0] A_ORAM = 32'h300000, A_OROM = 32'h303000, A_ERAM = 32'h200000,
    A_FLASH = 32'h000000, A_UART1 = 32'h301800, A_TIMER = 32'h301820, A_U485 = 32'h301840,
    A_KEY = 32'h301860, A_LCD = 32'h301870, A_AD = 32'h301880, A_DA = 32'h301890,
    A_SYSID = 32'h3018A0, A_CPUDBG = 32'h301000;

  initial begin
    logic [31:0] d, v;
    int found_r, found_c, t0;
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // -- address map, memories, external bus --
    rd32(32'h302000, d);
    check(d == 0, "unmapped read gives zero");
    rd32(A_SYSID, d);    check(d == 32'h5AD0_0001, "sysid reached");
    rd32(A_CPUDBG + 8, d); check(d == 32'hDB60_0008, "cpu debug slave reached with offset");
    mech[M_EXT_SLAVE]++;
    for (int i = 0; i < 8; i++) wr32(A_ORAM + 32'(4 * i), 32'hC0DE_0000 + i);
    for (int i = 0; i < 8; i++) begin
      rd32(A_ORAM + 32'(4 * i), d);
      check(d == 32'hC0DE_0000 + i, "onchip RAM read back");
      check(last_clocks == 2, "onchip RAM read takes two clocks");
      mech[M_WAIT_STALL] += int'(last_clocks > 1);
    end
    wr32(A_OROM, 32'h1234_5678);
    rd32(A_OROM, d);
    check(d == 0, "boot ROM ignores writes");
    mech[M_ROM_WRITE]++;
    wr32(A_ERAM + 32'h100, 32'hDEAD_BEEF);
    check(last_clocks == 2 * (4 + 1) + 2, "two-half SRAM write takes 12 clocks");
    mech[M_BRIDGE_2HALF] += int'(last_clocks == 2 * (4 + 1) + 2);
    wr32(A_ERAM + 32'h100, 32'h0000_7700, 4'b0010);
    check(last_clocks == 4 + 3, "one-half SRAM write takes 7 clocks");
    mech[M_BRIDGE_1HALF] += int'(last_clocks == 4 + 3);
    rd32(A_ERAM + 32'h100, d);
    check(d == 32'hDEAD_77EF, $sformatf("SRAM byte write merge %h", d));
    wr32(A_FLASH + 32'h40, 32'h1357_9BDF);
    rd32(A_FLASH + 32'h40, d);
    check(d == 32'h1357_9BDF, "flash word through the bridge");
    rd32(A_FLASH + 32'h80, d);
    check(d == 32'hFFFF_FFFF, "erased flash reads ones");

    // -- load the corrected sweep table and start the sweep --
    for (int i = 0; i < 256; i++) begin
      // sawtooth with a small quadratic correction term, as software would compute it
      sweep_tbl[i] = 12'(i * 15 + (i * i) / 256);
      v = '0; v[11:0] = sweep_tbl[i]; v[23:16] = 8'(i);
      wr32(A_DA, v);
      v[DA_WR_BIT] = 1'b1;
      wr32(A_DA, v);
    end
    check(dac_writes == 0, "no DAC output while stopped");
    wr32(A_AD + 8, 32'h8000);                      // ad_pio irqmask: sweep flag
    dac_armed = 1'b1;
    wr32(A_DA, 32'(1) << DA_RUN_BIT);

    // -- acquisition: sample with START high, hold with START low --
    for (int s = 0; s < 2; s++) begin
      wait (cpu_irq[IRQ_AD]);
      mech[M_SWEEP_IRQ]++;
      wr32(A_AD + 12, 32'hFFFF);                   // clear edgecapture
      check(!cpu_irq[IRQ_AD], "sweep interrupt cleared");
      adc_value = 12'($urandom);
      wr32(A_AD, 32'(1) << AD_START_BIT);          // START
      repeat (6) @(negedge clk);
      rd32(A_AD, d);
      check(d[11:0] == adc_value, $sformatf("sample %h exp %h", d[11:0], adc_value));
      mech[M_ADC_CAPTURE] += int'(d[11:0] == adc_value);
      wr32(A_AD, 0);                               // START low
      v = d;
      adc_value = ~adc_value;
      repeat (6) @(negedge clk);
      rd32(A_AD, d);
      check(d[11:0] == v[11:0], "sample held with START low");
      mech[M_ADC_HOLD]++;
    end

    // -- keypad scan and alarm --
    wr32(A_KEY + 8, 32'hF);                        // irq on any column edge (key release)
    found_r = -1; found_c = -1;
    for (int r = 0; r < 4; r++) begin
      wr32(A_KEY, 32'(4'hF & ~(4'b1 << r)));       // drive one row low
      repeat (3) @(negedge clk);
      rd32(A_KEY, d);
      for (int c = 0; c < 4; c++) if (!d[c]) begin found_r = r; found_c = c; end
    end
    check(found_r == kr && found_c == kc, $sformatf("key found at %0d,%0d", found_r, found_c));
    wr32(A_KEY + 12, 32'hF);                       // clear the edges the scan caused
    wr32(A_KEY, 32'h0);                            // all rows low: the pressed key pulls its column low
    repeat (4) @(negedge clk);
    wr32(A_KEY + 12, 32'hF);
    key_down = 1'b0;                               // release
    repeat (5) @(negedge clk);
    check(cpu_irq[IRQ_KEY], "key release interrupt");
    mech[M_KEY_IRQ] += int'(cpu_irq[IRQ_KEY]);
    wr32(A_KEY + 12, 32'hF);
    wr32(A_KEY, 32'h10);
    check(alarm, "alarm on");
    mech[M_ALARM] += int'(alarm);

    // -- LCD: write a data byte with E high, then read the bus --
    wr32(A_LCD + 4, 32'h3FFF);                     // all pins driven
    wr32(A_LCD, 32'(14'b10_1101_0011_1100));
    check(lcd_data_out == 8'h3C && lcd_data_oe && lcd_rs && !lcd_rw && lcd_e &&
          lcd_cs1 && !lcd_cs2 && lcd_rst_n, "LCD pins");
    wr32(A_LCD + 4, 32'h3F00);                     // release the data bus
    check(!lcd_data_oe, "LCD data bus released");
    rd32(A_LCD, d);
    check(d[7:0] == lcd_data_in, "LCD data read");
    mech[M_LCD]++;

    // -- send the result over RS485 and over the debug UART --
    wr32(A_U485 + 16, 9);                          // 10 clocks per bit
    wr32(A_UART1 + 16, 9);
    wr32(A_UART1 + 12, 32'h80);                    // IRRDY
    wr32(A_U485 + 4, 32'h4C);
    wr32(A_UART1 + 4, 32'h31);
    wait (cpu_irq[IRQ_UART1]);
    rd32(A_UART1, d);
    check(d[7:0] == 8'h31, "debug UART loop-back");
    mech[M_UART1_RX]++;
    t0 = cyc;
    while (cyc - t0 < 300) begin
      rd32(A_U485 + 8, d);
      if (d[UST_RRDY]) break;
    end
    rd32(A_U485, d);
    check(d[7:0] == 8'h4C, "RS485 loop-back");

    // -- system tick --
    wr32(A_TIMER + 8, 999);                        // 1000 clocks per tick
    wr32(A_TIMER + 12, 0);
    wr32(A_TIMER + 4, 32'b0111);
    for (int k = 0; k < 3; k++) begin
      wait (cpu_irq[IRQ_TIMER1]);
      mech[M_TIMER_IRQ]++;
      wr32(A_TIMER, 0);
    end
    wr32(A_TIMER + 4, 32'b1000);

    // -- let the sweep run round once more --
    wait (sweeps_seen >= 3);
    check(dac_writes >= 3 * 256, "three sweeps played");

    foreach (mech[i]) begin
      mech_e m;
      m = mech_e'(i);
      $display("INFO mechanism %s happened %0d times", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
