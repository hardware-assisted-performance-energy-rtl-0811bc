// realprof_sram -- sample memory of one REALprof monitor.
//
// A simple dual-port memory of DEPTH words of DW bits: the monitor writes one
// record per sampling period through the write port, and the bus reads
// records back through the read port.  The read is registered: rdata shows
// the word at raddr one clock after raddr is presented, which lets an AHB
// slave answer in its data phase without wait states.  A write and a read of
// the same word in one cycle return the old word.  256 x 32 bits per monitor
// is the size of the embedded memory block each monitor uses; the dual-port
// organisation and registered read are this design's choice.  The contents
// are not reset.
module realprof_sram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
