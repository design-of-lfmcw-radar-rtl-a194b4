// interval_timer: the system tick timer (Timer1) on the Avalon-MM data bus.
//
// A 32-bit down-counter reloaded from the period register.  It counts period+1
// clocks per timeout; at each timeout the TO flag is set and, if the ITO
// control bit is set, irq is raised until software clears TO.  In continuous
// mode (CONT) it reloads and keeps running, otherwise it stops after one
// timeout.  Word offsets:
//   0 status   [0] TO (write clears), [1] RUN (read only)
//   1 control  [0] ITO, [1] CONT, [2] START (write 1 to start), [3] STOP (write 1 to stop)
//   2 periodl  period[15:0]    3 periodh  period[31:16]
// Writing either period half stops the timer and reloads the counter.  Reset
// period is DEFAULT_PERIOD, 1 ms at 50 MHz.  Accesses take one clock.
// The timer's role as the system's internal clock is the system's; the
// register set and the 1 ms default are this design's choice.
module interval_timer
  import sopc_pkg::*;
#(
  parameter logic [31:0] DEFAULT_PERIOD = 32'(CLK_HZ / 1000 - 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  av_req_t req,
  output av_rsp_t rsp,
  output logic    irq
);

  logic [31:0] period, count;
  logic        to_flag, run, ito, cont;
  wire  [2:0]  reg_sel = req.address[4:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period  <= DEFAULT_PERIOD;
      count   <= DEFAULT_PERIOD;
      to_flag <= 1'b0;
      run     <= 1'b0;
      ito     <= 1'b0;
      cont    <= 1'b0;
    end else begin
      if (run) begin
        if (count == '0) begin
          to_flag <= 1'b1;
          count   <= period;
          if (!cont) run <= 1'b0;
        end else begin
          count <= count - 1'b1;
        end
      end
      if (req.write) begin
        case (reg_sel)
          TMR_STATUS: to_flag <= 1'b0;
          TMR_CONTROL: begin
            ito  <= req.writedata[0];
            cont <= req.writedata[1];
            if (req.writedata[2]) begin
              run   <= 1'b1;
              count <= period;
            end
            if (req.writedata[3]) run <= 1'b0;
          end
          TMR_PERIODL: begin
            period[15:0] <= req.writedata[15:0];
            count        <= {period[31:16], req.writedata[15:0]};
            run          <= 1'b0;
          end
          TMR_PERIODH: begin
            period[31:16] <= req.writedata[15:0];
            count         <= {req.writedata[15:0], period[15:0]};
            run           <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp = '0;
    case (reg_sel)
      TMR_STATUS:  rsp.readdata[1:0] = {run, to_flag};
      TMR_CONTROL: rsp.readdata[1:0] = {cont, ito};
      TMR_PERIODL: rsp.readdata[15:0] = period[15:0];
      TMR_PERIODH: rsp.readdata[15:0] = period[31:16];
      default: ;
    endcase
  end

  assign irq = to_flag & ito;

endmodule
