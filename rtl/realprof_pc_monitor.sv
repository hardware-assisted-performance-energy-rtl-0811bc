// realprof_pc_monitor -- REALprof program-counter monitor.
//
// Records where a processor is executing: each EnLog pulse from the
// controller writes the processor's program counter of that cycle to record
// waddr of the monitor's SRAM, so every sample of the event monitors can be
// matched to the code that produced it.  When En is low (the program-counter
// monitor is masked) the record written is zero.  The bus reads records
// through raddr/rdata with one cycle of latency.  Sampling the PC on EnLog
// follows the published design; the zero record when masked is a choice here.
module realprof_pc_monitor #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [DW-1:0] pc,
  input  logic          enlog,
  input  logic [AW-1:0] waddr,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] sample;
  assign sample = en ? pc : '0;

  realprof_sram #(.DEPTH(DEPTH), .DW(DW)) u_sram (
    .clk   (clk),
    .we    (enlog),
    .waddr (waddr),
    .wdata (sample),
    .raddr (raddr),
    .rdata (rdata)
  );

endmodule
