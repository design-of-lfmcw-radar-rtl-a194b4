// avalon_fabric: Avalon-MM interconnect between the CPU data master and the
// slaves of the level-gauge SOPC.
//
// The master's byte address is compared with each slave's range (sopc_pkg,
// slave_range) and the request is passed on to the one slave that holds it,
// with the address made relative to that slave's base; every other slave sees
// read and write low.  The chosen slave's readdata and waitrequest go back to
// the master, all in the same clock.  An address that no slave holds completes
// at once with readdata zero; decode_error marks such an access for the clock
// it is on the bus.
// The address map is the system's; the single master and the purely
// combinational decode are this design's choice.
module avalon_fabric
  import sopc_pkg::*;
(
  input  av_req_t m_req,
  output av_rsp_t m_rsp,
  output av_req_t s_req [NSLAVE],
  input  av_rsp_t s_rsp [NSLAVE],
  output logic    decode_error
);

  logic [NSLAVE-1:0] hit;

  always_comb begin
    for (int i = 0; i < NSLAVE; i++) begin
      addr_range_t r;
      r      = slave_range(slave_e'(i));
      hit[i] = (m_req.address >= r.base) && (m_req.address <= r.last);
      s_req[i]         = m_req;
      s_req[i].address = m_req.address - r.base;
      s_req[i].read    = m_req.read  & hit[i];
      s_req[i].write   = m_req.write & hit[i];
    end
  end

  always_comb begin
    m_rsp = '0;
    for (int i = 0; i < NSLAVE; i++)
      if (hit[i]) m_rsp = s_rsp[i];
  end

  // The slave ranges must not overlap: at most one slave may claim an address.
  always_comb begin
    int unsigned n;
    n = 0;
    for (int i = 0; i < NSLAVE; i++) n += int'(hit[i]);
    if (m_req.read || m_req.write)
      assert (n <= 1) else $error("avalon_fabric: address %h claimed by %0d slaves", m_req.address, n);
  end

  assign decode_error = (m_req.read | m_req.write) & ~|hit;

endmodule
