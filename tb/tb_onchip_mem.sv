// tb_onchip_mem: self-checking test of the on-chip RAM and boot ROM.
//
// RAM (4 KB, writable): 400 random accesses, writes with random byte enables,
// reads compared with a model array; every read must take exactly two clocks
// (one with waitrequest high) and every write one.  ROM (64 bytes, not
// writable, image tb/tb_onchip_rom.hex): every word must read as the image,
// before and after writes to it, which must change nothing.
module tb_onchip_mem;
  import sopc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  av_req_t req = '0, rreq = '0;
  av_rsp_t rsp, rrsp;

  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] model [1024];
  logic [31:0] image [16];

  onchip_mem #(.BYTES(4096), .WRITABLE(1'b1)) ram (.clk, .rst_n, .req(req), .rsp(rsp));
  onchip_mem #(.BYTES(64), .WRITABLE(1'b0), .INIT_FILE("tb/tb_onchip_rom.hex"))
    rom (.clk, .rst_n, .req(rreq), .rsp(rrsp));

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Bus access on the RAM (sel=0) or the ROM (sel=1); returns data and clocks taken.
  task automatic access(bit sel, bit wr, logic [31:0] a, logic [31:0] wd, logic [3:0] be,
                        output logic [31:0] d, output int n);
    int c0;
    av_req_t r;
    @(negedge clk);
    r = '0; r.address = a; r.write = wr; r.read = !wr; r.writedata = wd; r.byteenable = be;
    if (sel) rreq = r; else req = r;
    c0 = cyc;
    @(posedge clk);
    while (sel ? rrsp.waitrequest : rsp.waitrequest) @(posedge clk);
    d = sel ? rrsp.readdata : rsp.readdata;
    n = cyc - c0 + 1;
    #1 begin req = '0; rreq = '0; end
  endtask

  initial begin
    logic [31:0] d, wd;
    logic [3:0] be;
    int n, w;
    $readmemh("tb/tb_onchip_rom.hex", image);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1024; i++) model[i] = 32'h0;   // RAM starts zeroed
    for (int k = 0; k < 400; k++) begin
      w  = $urandom_range(0, 63);          // keep to a few words so reads hit written data
      if (k % 50 == 0) w = $urandom_range(0, 1023);
      if ($urandom_range(0, 1)) begin
        wd = $urandom; be = 4'($urandom);
        access(1'b0, 1'b1, 32'(w * 4), wd, be, d, n);
        for (int b = 0; b < 4; b++) if (be[b]) model[w][8*b +: 8] = wd[8*b +: 8];
        check(n == 1, $sformatf("write took %0d clocks", n));
      end else begin
        access(1'b0, 1'b0, 32'(w * 4), '0, 4'hF, d, n);
        check(d == model[w], $sformatf("RAM word %0d = %h exp %h", w, d, model[w]));
        check(n == 2, $sformatf("read took %0d clocks", n));
      end
    end
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 16; i++) begin
        access(1'b1, 1'b0, 32'(i * 4), '0, 4'hF, d, n);
        check(d == image[i], $sformatf("ROM word %0d = %h exp %h", i, d, image[i]));
      end
      for (int i = 0; i < 16; i++) access(1'b1, 1'b1, 32'(i * 4), $urandom, 4'hF, d, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
