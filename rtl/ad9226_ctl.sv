// ad9226_ctl: control module of the AD9226 12-bit A/D converter.
//
// The converter clock clk_state is handed straight to the AD9226 as clk.  On
// every falling edge of clk_state while start is high the module takes the
// converter's output word data_of_ad into q and steps a nine-state sequence
// ST0 -> ST1 -> ... -> ST8 -> ST0; while start is low q and the sequence hold.
// So q is data_of_ad as it stood at the last falling edge: one clock behind the
// converter bus, which is settled there because the AD9226 changes its output
// after the rising edge.
//
// Ports, clocking and the nine-state sequence follow the published module.  The
// sequence does the same thing in every state; it is kept because it is part of
// that module and is exposed as sample_phase (this design's addition) so that a
// reader of q can tell consecutive samples apart.  The published module has no
// reset: state and q start from ST0 and zero by their initial values, as an
// FPGA register does at configuration.  Lint tools flag an initial value on a
// register that a process assigns; it stands here because the module has no
// reset input to use instead.
module ad9226_ctl (
  input  logic [11:0] data_of_ad,   // AD9226 output bus
  input  logic        clk_state,    // converter clock from the system
  input  logic        start,        // 1 = acquire
  output logic        clk,          // clock to the AD9226
  output logic [11:0] q,            // captured sample
  output logic [3:0]  sample_phase  // index of the current state, 0..8
);

  typedef enum logic [3:0] {
    ST0, ST1, ST2, ST3, ST4, ST5, ST6, ST7, ST8
  } state_e;

  state_e      state = ST0;
  state_e      next_state;
  logic [11:0] q_r = '0;

  assign clk = clk_state;

  always_comb begin
    case (state)
      ST0:     next_state = ST1;
      ST1:     next_state = ST2;
      ST2:     next_state = ST3;
      ST3:     next_state = ST4;
      ST4:     next_state = ST5;
      ST5:     next_state = ST6;
      ST6:     next_state = ST7;
      ST7:     next_state = ST8;
      default: next_state = ST0;
    endcase
  end

  always_ff @(negedge clk_state) begin
    if (start) begin
      state <= next_state;
      q_r   <= data_of_ad;
    end
  end

  assign q            = q_r;
  assign sample_phase = state;

endmodule
