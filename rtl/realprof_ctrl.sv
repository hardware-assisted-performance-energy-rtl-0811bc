// realprof_ctrl -- REALprof controller: control registers and control unit.
//
// Holds the five software-visible registers (Status, Sampling Period, Start
// Offset, Sampling Number, Event Mask) and sequences a profiling run:
//   * Writing 1 to Status[0] clears Sampling Number and arms the run.  After
//     Start Offset cycles (none if it is 0) En goes high.
//   * While running, EnLog pulses in the last cycle of every Sampling Period
//     cycles (a period of 0 counts as 1, one record per cycle).  On each pulse
//     every monitor logs one record at address waddr = Sampling Number, and
//     Sampling Number then increments.
//   * After DEPTH records the run ends by itself (Status DONE); writing 0 to
//     Status[0] ends it at once and the partial period is dropped.
// En is given per event number: en[e] = running AND Event Mask[e], and the
// same bit serves that event's monitor in every core.
// Register interface: reg_wr/reg_idx/reg_wdata write on the clock edge;
// reg_rdata is the combinational value of register reg_rd_idx.
// The register set, the start delay, the periodic log and the counting of
// samples follow the published design.  The Status bit layout, the per-event
// mask sharing, the reset values (mask all ones, period and offset 0), the
// stop on full memory and the period-0 rule are this design's choices.
module realprof_ctrl
  import realprof_pkg::*;
#(
  parameter int unsigned NUM_EVENTS = 17,
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned DW         = 32,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register access
  input  logic                  reg_wr,
  input  logic [2:0]            reg_idx,
  input  logic [DW-1:0]         reg_wdata,
  input  logic [2:0]            reg_rd_idx,
  output logic [DW-1:0]         reg_rdata,
  // to the monitors
  output logic [NUM_EVENTS-1:0] en,
  output logic                  enlog,
  output logic [AW-1:0]         waddr
);

  ctrl_state_e           state_q;
  logic [DW-1:0]         period_q;
  logic [DW-1:0]         offset_q;
  logic [NUM_EVENTS-1:0] mask_q;
  logic [AW:0]           sample_num_q;
  logic [DW-1:0]         delay_q;
  logic [DW-1:0]         pcnt_q;
  logic [DW-1:0]         period_eff;

  logic wr_status, start_req, stop_req;

  assign period_eff = (period_q == '0) ? DW'(1) : period_q;
  assign wr_status  = reg_wr && reg_idx == REG_STATUS;
  assign start_req  = wr_status && reg_wdata[ST_START] &&
                      (state_q == CS_IDLE || state_q == CS_DONE);
  assign stop_req   = wr_status && !reg_wdata[ST_START];

  assign enlog = (state_q == CS_RUNNING) && (pcnt_q == period_eff - 1'b1);
  assign waddr = sample_num_q[AW-1:0];

  always_comb begin
    for (int e = 0; e < int'(NUM_EVENTS); e++)
      en[e] = (state_q == CS_RUNNING) && mask_q[e];
  end

  // Configuration registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_q <= '0;
      offset_q <= '0;
      mask_q   <= '1;
    end else if (reg_wr) begin
      case (reg_idx)
        REG_PERIOD:     period_q <= reg_wdata;
        REG_OFFSET:     offset_q <= reg_wdata;
        REG_EVENT_MASK: mask_q   <= reg_wdata[NUM_EVENTS-1:0];
        default: ;
      endcase
    end
  end

  // Control unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= CS_IDLE;
      sample_num_q <= '0;
      delay_q      <= '0;
      pcnt_q       <= '0;
    end else if (start_req) begin
      sample_num_q <= '0;
      pcnt_q       <= '0;
      delay_q      <= offset_q;
      state_q      <= (offset_q == '0) ? CS_RUNNING : CS_WAITING;
    end else begin
      case (state_q)
        CS_WAITING: begin
          if (delay_q <= DW'(1)) state_q <= CS_RUNNING;
          delay_q <= delay_q - 1'b1;
        end
        CS_RUNNING: begin
          if (enlog) begin
            pcnt_q       <= '0;
            sample_num_q <= sample_num_q + 1'b1;
            if (sample_num_q == (AW+1)'(DEPTH - 1)) state_q <= CS_DONE;
          end else begin
            pcnt_q <= pcnt_q + 1'b1;
          end
        end
        default: ;
      endcase
      // A record logged in the cycle of the stop write is still counted
      if (stop_req) state_q <= CS_IDLE;
    end
  end

  // Register read
  always_comb begin
    reg_rdata = '0;
    case (reg_rd_idx)
      REG_STATUS: begin
        reg_rdata[ST_START]   = (state_q == CS_WAITING) || (state_q == CS_RUNNING);
        reg_rdata[ST_WAITING] = (state_q == CS_WAITING);
        reg_rdata[ST_RUNNING] = (state_q == CS_RUNNING);
        reg_rdata[ST_DONE]    = (state_q == CS_DONE);
      end
      REG_PERIOD:     reg_rdata = period_q;
      REG_OFFSET:     reg_rdata = offset_q;
      REG_SAMPLE_NUM: reg_rdata = DW'(sample_num_q);
      REG_EVENT_MASK: reg_rdata[NUM_EVENTS-1:0] = mask_q;
      default: ;
    endcase
  end

  // A run never logs more records than the memories hold
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    enlog |-> sample_num_q < (AW+1)'(DEPTH));

endmodule
