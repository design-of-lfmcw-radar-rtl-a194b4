// onchip_mem: on-chip memory on the Avalon-MM data bus (onchip_RAM and the
// boot ROM onchip_ROM).
//
// A single-port array of 32-bit words, BYTES bytes in all, written with byte
// enables when WRITABLE is 1.  With WRITABLE at 0 it is the boot ROM: writes
// are ignored and its contents come from INIT_FILE (a $readmemh image of the
// boot program) when that is given, else it holds zeros.  The array is read
// synchronously, as an FPGA block RAM is, so a read takes two clocks: in the
// first waitrequest is high while the word is fetched, in the second the data
// is on readdata and waitrequest is low.  A write takes one clock.
// The sizes (4 KB each) come from the system's address map; the timing and the
// zero fill of a ROM without image are this design's choice.
module onchip_mem
  import sopc_pkg::*;
#(
  parameter int unsigned BYTES     = 4096,
  parameter bit          WRITABLE  = 1'b1,
  parameter string       INIT_FILE = ""
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t req,
  output av_rsp_t rsp
);

  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [31:0]   rdata;
  logic          rd_done;
  wire  [AW-1:0] waddr = req.address[AW+1:2];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
    else for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (WRITABLE && req.write) begin
      for (int b = 0; b < 4; b++)
        if (req.byteenable[b]) mem[waddr][8*b +: 8] <= req.writedata[8*b +: 8];
    end
    rdata <= mem[waddr];
  end

  // rd_done is high in the second clock of a read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_done <= 1'b0;
    else        rd_done <= req.read && !rd_done;
  end

  // Avalon rule: a read held off by waitrequest stays on the bus, at the same
  // address, until it completes.
  logic [31:0] rd_addr_q;
  always_ff @(posedge clk) begin
    rd_addr_q <= req.address;
    if (rst_n && rd_done)
      assert (req.read && req.address == rd_addr_q)
        else $error("onchip_mem: read withdrawn or changed while waitrequest was high");
  end

  assign rsp.readdata    = rdata;
  assign rsp.waitrequest = req.read && !rd_done;

endmodule
