// tb_avalon_fabric: self-checking test of the Avalon interconnect.
//
// The slave ranges are written out here a second time, from the system's
// address map, so the decode is checked against an independent copy.  For
// 2000 random addresses (first and last byte of each range included) the test
// checks that exactly the owning slave sees read or write, with the address
// made relative to its base, that the master gets back that slave's readdata
// and waitrequest, and that an address outside every range raises
// decode_error and completes at once with zero data.
module tb_avalon_fabric;
  import sopc_pkg::*;

  av_req_t m_req = '0;
  av_rsp_t m_rsp;
  av_req_t s_req [NSLAVE];
  av_rsp_t s_rsp [NSLAVE];
  logic decode_error;

  int checks = 0, failures = 0;
  int hits [NSLAVE + 1];

  localparam logic [31:0] BASE [NSLAVE] = '{
    32'h000000, 32'h200000, 32'h300000, 32'h301000, 32'h301800, 32'h301820, 32'h301840,
    32'h301860, 32'h301870, 32'h301880, 32'h301890, 32'h3018A0, 32'h303000};
  localparam logic [31:0] LAST [NSLAVE] = '{
    32'h1FFFFF, 32'h2FFFFF, 32'h300FFF, 32'h3017FF, 32'h30181F, 32'h30183F, 32'h30185F,
    32'h30186F, 32'h30187F, 32'h30188F, 32'h30189F, 32'h3018A7, 32'h303FFF};

  avalon_fabric dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int owner(logic [31:0] a);
    for (int i = 0; i < NSLAVE; i++) if (a >= BASE[i] && a <= LAST[i]) return i;
    return -1;
  endfunction

  initial begin
    logic [31:0] a;
    int o;
    bit wr;
    foreach (hits[i]) hits[i] = 0;
    for (int k = 0; k < 2000; k++) begin
      case (k % 4)
        0: a = BASE[$urandom_range(0, NSLAVE - 1)];
        1: a = LAST[$urandom_range(0, NSLAVE - 1)] & ~32'h3;
        2: a = $urandom_range(32'h2FF000, 32'h304100) & ~32'h3;
        default: a = $urandom_range(0, 32'h00400000) & ~32'h3;
      endcase
      wr = 1'($urandom);
      for (int i = 0; i < NSLAVE; i++) begin
        s_rsp[i].readdata    = $urandom;
        s_rsp[i].waitrequest = 1'($urandom);
      end
      m_req.address = a; m_req.read = !wr; m_req.write = wr;
      m_req.writedata = $urandom; m_req.byteenable = 4'($urandom);
      #1;
      o = owner(a);
      hits[o < 0 ? NSLAVE : o]++;
      for (int i = 0; i < NSLAVE; i++) begin
        check((s_req[i].read | s_req[i].write) == (i == o), $sformatf("slave %0d selected for %h", i, a));
        if (i == o) begin
          check(s_req[i].address == a - BASE[i], $sformatf("slave %0d offset %h for %h", i, s_req[i].address, a));
          check(s_req[i].write == wr && s_req[i].writedata == m_req.writedata &&
                s_req[i].byteenable == m_req.byteenable, "request passed on");
        end
      end
      if (o >= 0) begin
        check(m_rsp == s_rsp[o] && !decode_error, $sformatf("response of slave %0d", o));
      end else begin
        check(m_rsp.readdata == 0 && !m_rsp.waitrequest && decode_error, $sformatf("unmapped %h", a));
      end
      m_req.read = 1'b0; m_req.write = 1'b0;
      #1 check(!decode_error, "no decode_error when idle");
    end
    foreach (hits[i]) check(hits[i] > 0, $sformatf("slave %0d never addressed", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
