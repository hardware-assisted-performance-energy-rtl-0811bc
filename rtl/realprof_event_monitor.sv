// realprof_event_monitor -- one REALprof hardware event monitor.
//
// While En is high the monitor counts the cycles in which its EveAct input is
// high.  When the controller pulses EnLog at the end of a sampling period the
// monitor writes the count of that period to record waddr of its SRAM and
// restarts the count from zero, so every record holds the events of exactly
// one period (an event in the EnLog cycle itself belongs to the record being
// written).  While En is low the counter is held at zero, so a disabled
// (masked) monitor writes zero records.  The counter saturates at all ones.
// The bus reads records through raddr/rdata with one cycle of latency.
// Counting, logging and clearing follow the published design; the inclusion
// of the EnLog-cycle event, the zero hold and saturation are choices here.
module realprof_event_monitor #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          eve_act,
  input  logic          enlog,
  input  logic [AW-1:0] waddr,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] count_q;
  logic [DW-1:0] count_inc;

  // Count including this cycle's event, saturating; zero while disabled
  always_comb begin
    if (!en)                          count_inc = '0;
    else if (eve_act && count_q != '1) count_inc = count_q + 1'b1;
    else                              count_inc = count_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            count_q <= '0;
    else if (enlog)        count_q <= '0;
    else                   count_q <= count_inc;
  end

  realprof_sram #(.DEPTH(DEPTH), .DW(DW)) u_sram (
    .clk   (clk),
    .we    (enlog),
    .waddr (waddr),
    .wdata (count_inc),
    .raddr (raddr),
    .rdata (rdata)
  );

endmodule
