// da_conv: D/A conversion module that produces the VCO sweep voltage.
//
// The LFMCW transmitter is swept by a sawtooth voltage from a D/A converter;
// the VCO's non-linear tuning curve is compensated by correcting that
// sawtooth in software.  This module holds the corrected sawtooth as a table of
// DEPTH samples that the CPU loads through the da_pio port, and plays it out
// endlessly: every STEP_DIV clocks the next entry is put on dac_data and
// dac_wr pulses for one clock; after the last entry it wraps to entry 0 (the
// flyback of the sawtooth) and sweep_start pulses with the write of entry 0.
//
// Control word (ctrl, from da_pio):  [11:0] entry value, [23:16] entry address,
// [24] write strobe (a rising edge writes the entry), [25] run.  While run is
// low the output rests at entry 0 and the step counter is cleared, so a sweep
// always begins with entry 0 one clock after run rises.
//
// That the module exists, drives the D/A converter and produces the corrected
// sawtooth is the system's; the table, the control word, the 12-bit width, the
// 256-entry depth and the step rate are this design's choices.
module da_conv
  import sopc_pkg::*;
#(
  parameter int unsigned DAC_W    = 12,   // D/A converter width
  parameter int unsigned DEPTH    = 256,  // samples per sweep
  parameter int unsigned STEP_DIV = 50    // clocks per sample (1 us at 50 MHz)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      ctrl,        // da_pio output word
  output logic [DAC_W-1:0] dac_data,    // to the D/A converter
  output logic             dac_wr,      // one-clock write strobe to the D/A converter
  output logic             sweep_start  // one-clock pulse with the first sample of a sweep
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned DW = (STEP_DIV > 1) ? $clog2(STEP_DIV) : 1;

  logic [DAC_W-1:0] table_mem [DEPTH];
  logic             wr_q;
  logic [AW-1:0]    idx;
  logic [DW-1:0]    div;

  wire run      = ctrl[DA_RUN_BIT];
  wire wr_rise  = ctrl[DA_WR_BIT] & ~wr_q;
  wire [AW-1:0] waddr = ctrl[DA_ADDR_LSB +: AW];

  // Table write port (CPU side).
  always_ff @(posedge clk) begin
    if (wr_rise) table_mem[waddr] <= ctrl[DA_SAMPLE_LSB +: DAC_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q        <= 1'b0;
      idx         <= '0;
      div         <= '0;
      dac_data    <= '0;
      dac_wr      <= 1'b0;
      sweep_start <= 1'b0;
    end else begin
      wr_q        <= ctrl[DA_WR_BIT];
      dac_wr      <= 1'b0;
      sweep_start <= 1'b0;
      if (!run) begin
        idx <= '0;
        div <= '0;
      end else if (div == DW'(0)) begin
        dac_data    <= table_mem[idx];
        dac_wr      <= 1'b1;
        sweep_start <= (idx == '0);
        idx         <= (idx == AW'(DEPTH - 1)) ? '0 : idx + 1'b1;
        div         <= DW'(STEP_DIV - 1);
      end else begin
        div <= div - 1'b1;
      end
    end
  end

endmodule
