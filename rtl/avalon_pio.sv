// avalon_pio: parallel I/O port on the Avalon-MM data bus.
//
// The keypad, the LCD, the A/D path and the D/A path of the level gauge all
// reach the CPU through ports of this kind.  Four 32-bit registers, word offsets:
//   0 data       read: the synchronised input pins; write: the output latch
//   1 direction  1 = pin is driven (out_oe), for bidirectional pins
//   2 irqmask    1 = an edge on this input raises irq
//   3 edgecapture  set by a rising edge of an input pin; writing 1 clears a bit
// irq = |(edgecapture & irqmask).  Inputs pass two flip-flops before use, so an
// input change shows in data two clocks later and in edgecapture three clocks
// later.  Accesses take one clock (waitrequest is always low).
// Only the port's name and its use are the system's; the register set is the
// usual one for a PIO and is this design's choice.
module avalon_pio
  import sopc_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  av_req_t          req,
  output av_rsp_t          rsp,
  input  logic [WIDTH-1:0] in_port,
  output logic [WIDTH-1:0] out_port,
  output logic [WIDTH-1:0] out_oe,
  output logic             irq
);

  logic [WIDTH-1:0] sync1, sync2, prev, data_out, dir, mask, edges;
  wire  [1:0]       reg_sel = req.address[3:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0; sync2 <= '0; prev <= '0;
      data_out <= '0; dir <= '0; mask <= '0; edges <= '0;
    end else begin
      sync1 <= in_port;
      sync2 <= sync1;
      prev  <= sync2;
      edges <= edges | (sync2 & ~prev);
      if (req.write) begin
        case (reg_sel)
          PIO_DATA:    data_out <= req.writedata[WIDTH-1:0];
          PIO_DIR:     dir      <= req.writedata[WIDTH-1:0];
          PIO_IRQMASK: mask     <= req.writedata[WIDTH-1:0];
          default:     edges    <= (edges | (sync2 & ~prev)) & ~req.writedata[WIDTH-1:0];
        endcase
      end
    end
  end

  always_comb begin
    rsp = '0;
    case (reg_sel)
      PIO_DATA:    rsp.readdata[WIDTH-1:0] = sync2;
      PIO_DIR:     rsp.readdata[WIDTH-1:0] = dir;
      PIO_IRQMASK: rsp.readdata[WIDTH-1:0] = mask;
      default:     rsp.readdata[WIDTH-1:0] = edges;
    endcase
  end

  assign out_port = data_out;
  assign out_oe   = dir;
  assign irq      = |(edges & mask);

endmodule
