// tb_tristate_bridge: self-checking test of the tristate bridge to the
// external SRAM and flash.
//
// A model of the two chips sits on the shared 16-bit bus: each answers a read
// while its chip select and OE are low and takes a write while its chip select
// and WE are low (the SRAM by byte lane, the flash whole half-words).  The
// test makes 300 random 32-bit reads and writes with random byte enables to
// both chips, checks read data against a reference copy of each chip, checks
// that each transfer takes 2*(WAIT_CYCLES+1)+2 clocks for a read or for a
// write of both halves and WAIT_CYCLES+3 for a one-half write, and checks that
// the two chip selects are never low together and OE and WE never together.
module tb_tristate_bridge;
  import sopc_pkg::*;
  localparam int WAITC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  av_req_t flash_req = '0, ram_req = '0;
  av_rsp_t flash_rsp, ram_rsp;
  logic [19:0] ext_addr;
  logic [15:0] ext_dq_out, ext_dq_in;
  logic ext_dq_oe, flash_cs_n, ram_cs_n, ext_oe_n, ext_we_n;
  logic [1:0] ext_be_n;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [15:0] flash_mem [logic [19:0]];
  logic [15:0] sram_mem  [logic [19:0]];
  logic [15:0] flash_ref [logic [19:0]];
  logic [15:0] sram_ref  [logic [19:0]];

  tristate_bridge #(.WAIT_CYCLES(WAITC)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // ---- chip models ----
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
    if (rst_n) begin
      checks++;
      if (!flash_cs_n && !ram_cs_n) begin failures++; $display("FAIL both chip selects"); end
      checks++;
      if (!ext_oe_n && !ext_we_n) begin failures++; $display("FAIL OE and WE together"); end
      checks++;
      if (!ext_we_n && !ext_dq_oe) begin failures++; $display("FAIL WE without data drive"); end
    end
  end

  function automatic logic [15:0] ref_rd(bit fl, logic [19:0] a);
    if (fl) return flash_ref.exists(a) ? flash_ref[a] : 16'hFFFF;
    return sram_ref.exists(a) ? sram_ref[a] : 16'h0000;
  endfunction

  task automatic access(bit fl, bit wr, logic [31:0] a, logic [31:0] wd, logic [3:0] be,
                        output logic [31:0] d, output int n);
    int c0;
    av_req_t r;
    @(negedge clk);
    r = '0; r.address = a; r.read = !wr; r.write = wr; r.writedata = wd; r.byteenable = be;
    if (fl) flash_req = r; else ram_req = r;
    c0 = cyc;
    @(posedge clk);
    while (fl ? flash_rsp.waitrequest : ram_rsp.waitrequest) @(posedge clk);
    d = fl ? flash_rsp.readdata : ram_rsp.readdata;
    n = cyc - c0 + 1;
    #1 begin flash_req = '0; ram_req = '0; end
  endtask

  initial begin
    logic [31:0] d, wd, a;
    logic [3:0] be;
    logic [19:0] h;
    bit fl;
    int n, halves, expn;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      fl = 1'($urandom);
      a  = {$urandom_range(0, 31), 2'b00};
      if (k % 40 == 0) a = fl ? {$urandom_range(0, 32'h7FFFF), 2'b00} : {$urandom_range(0, 32'h3FFFF), 2'b00};
      h  = a[20:1];
      if ($urandom_range(0, 2) != 0) begin
        wd = $urandom; be = 4'($urandom);
        access(fl, 1'b1, a, wd, be, d, n);
        halves = int'(|be[1:0]) + int'(|be[3:2]);
        for (int x = 0; x < 2; x++) begin
          logic [15:0] v;
          logic [1:0] b2;
          b2 = x ? be[3:2] : be[1:0];
          if (b2 == 0) continue;
          v = ref_rd(fl, h + 20'(x));
          if (fl) v = wd[16*x +: 16];
          else begin
            if (b2[0]) v[7:0]  = wd[16*x +: 8];
            if (b2[1]) v[15:8] = wd[16*x + 8 +: 8];
          end
          if (fl) flash_ref[h + 20'(x)] = v; else sram_ref[h + 20'(x)] = v;
        end
        expn = halves * (WAITC + 1) + 2;
        check(n == expn, $sformatf("write (be %b) took %0d clocks, exp %0d", be, n, expn));
      end else begin
        access(fl, 1'b0, a, '0, 4'hF, d, n);
        check(d == {ref_rd(fl, h + 20'd1), ref_rd(fl, h)},
              $sformatf("%s read @%h = %h exp %h", fl ? "flash" : "sram", a, d, {ref_rd(fl, h + 20'd1), ref_rd(fl, h)}));
        check(n == 2 * (WAITC + 1) + 2, $sformatf("read took %0d clocks", n));
      end
    end
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
