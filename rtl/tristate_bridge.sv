// tristate_bridge: Avalon tristate bridge (ext_men_bus) from the 32-bit data
// bus to the shared 16-bit external bus of the SRAM (ext_ram) and the parallel
// flash (ext_flash).
//
// Both chips share address, data, output-enable and write-enable lines and
// have a chip select each.  A 32-bit transfer becomes up to two 16-bit chip
// cycles, low half first (half-word address = byte address / 2, then +1); a
// write skips a half whose byte enables are both zero, and the two byte
// enables of a half go out active low on ext_be_n for the SRAM.  Each chip
// cycle holds address, chip select and OE or WE for WAIT_CYCLES clocks, read
// data is taken in the last of them, and one idle clock follows so that the
// data bus turns around.  The transfer then ends with one clock of waitrequest
// low.  Counting the clock in which the request is taken, a read or a
// two-half write takes 2*(WAIT_CYCLES+1)+2 clocks, a one-half write
// WAIT_CYCLES+3.
// The external data bus is given as separate in, out and output-enable
// signals; the tristate buffers belong in the pads.
// The bridge, the two chips and their address ranges are the system's; the
// 16-bit bus and the cycle timing are this design's choice.
module tristate_bridge
  import sopc_pkg::*;
#(
  parameter int unsigned WAIT_CYCLES = 4   // clocks per chip cycle (80 ns at 50 MHz)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  av_req_t     flash_req,     // relative to 0x000000
  output av_rsp_t     flash_rsp,
  input  av_req_t     ram_req,       // relative to 0x200000
  output av_rsp_t     ram_rsp,
  output logic [19:0] ext_addr,      // half-word address
  output logic [15:0] ext_dq_out,
  output logic        ext_dq_oe,     // 1 = FPGA drives the data bus
  input  logic [15:0] ext_dq_in,
  output logic [1:0]  ext_be_n,      // byte lane enables, active low
  output logic        flash_cs_n,
  output logic        ram_cs_n,
  output logic        ext_oe_n,
  output logic        ext_we_n
);

  typedef enum logic [1:0] {B_IDLE, B_CYCLE, B_GAP, B_DONE} bstate_e;

  localparam int unsigned CW = (WAIT_CYCLES > 1) ? $clog2(WAIT_CYCLES) : 1;

  bstate_e     state;
  logic        half;          // 0 = low 16 bits, 1 = high 16 bits
  logic [CW-1:0] cnt;
  logic [31:0] rdata;
  av_req_t     cur;
  logic        sel_flash;

  wire     active_flash = flash_req.read | flash_req.write;
  wire     active_ram   = ram_req.read | ram_req.write;
  av_req_t req_in;
  assign   req_in = active_flash ? flash_req : ram_req;

  // Half h of the current transfer takes part in a chip cycle.
  function automatic logic half_needed(av_req_t r, logic h);
    return r.read || (h ? |r.byteenable[3:2] : |r.byteenable[1:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE; half <= 1'b0; cnt <= '0; rdata <= '0; cur <= '0; sel_flash <= 1'b0;
    end else begin
      case (state)
        B_IDLE: if (active_flash || active_ram) begin
          cur       <= req_in;
          sel_flash <= active_flash;
          cnt       <= CW'(WAIT_CYCLES - 1);
          if (half_needed(req_in, 1'b0)) begin
            half  <= 1'b0;
            state <= B_CYCLE;
          end else if (half_needed(req_in, 1'b1)) begin
            half  <= 1'b1;
            state <= B_CYCLE;
          end else begin
            state <= B_DONE;
          end
        end
        B_CYCLE: if (cnt == '0) begin
          if (cur.read) begin
            if (half) rdata[31:16] <= ext_dq_in;
            else      rdata[15:0]  <= ext_dq_in;
          end
          state <= B_GAP;
        end else cnt <= cnt - 1'b1;
        B_GAP: begin
          cnt <= CW'(WAIT_CYCLES - 1);
          if (!half && half_needed(cur, 1'b1)) begin
            half  <= 1'b1;
            state <= B_CYCLE;
          end else begin
            state <= B_DONE;
          end
        end
        default: state <= B_IDLE;   // B_DONE: waitrequest low for one clock
      endcase
    end
  end

  // Avalon rule: the master holds its request unchanged while waitrequest is
  // high, i.e. for the whole transfer after the bridge has taken it.
  always_ff @(posedge clk) begin
    if (rst_n && state != B_IDLE)
      assert ((sel_flash ? flash_req : ram_req) == cur)
        else $error("tristate_bridge: request changed during a transfer");
  end

  wire in_cycle = (state == B_CYCLE);

  assign ext_addr   = {cur.address[20:2], half};
  assign ext_dq_out = half ? cur.writedata[31:16] : cur.writedata[15:0];
  assign ext_dq_oe  = in_cycle && cur.write;
  assign ext_be_n   = half ? ~cur.byteenable[3:2] : ~cur.byteenable[1:0];
  assign flash_cs_n = !(in_cycle && sel_flash);
  assign ram_cs_n   = !(in_cycle && !sel_flash);
  assign ext_oe_n   = !(in_cycle && cur.read);
  assign ext_we_n   = !(in_cycle && cur.write);

  always_comb begin
    flash_rsp.readdata    = rdata;
    ram_rsp.readdata      = rdata;
    flash_rsp.waitrequest = !(state == B_DONE && sel_flash);
    ram_rsp.waitrequest   = !(state == B_DONE && !sel_flash);
  end

endmodule
