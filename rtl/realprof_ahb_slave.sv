// realprof_ahb_slave -- AMBA 2.0 AHB slave front end of REALprof.
//
// Maps the profiler into the system address space.  Offsets 0x00-0x10 are
// the controller's registers; offsets with bit 17 set form the record
// window, where record r of monitor m sits at 0x20000 + m*0x400 + r*4.
// Every transfer completes with zero wait states and an OKAY response.
// Timing: the address phase (hsel & hready & htrans NONSEQ/SEQ) is captured
// on the clock edge.  For a write, the data phase presents hwdata to the
// controller as reg_wr/reg_idx/reg_wdata, taken on the next edge.  For a
// read, the record index goes to every monitor's memory combinationally
// during the address phase, so the registered memory output is ready in the
// data phase; hrdata then selects the addressed monitor's word or the
// register value.  Writes to the record window or unmapped offsets are
// ignored and unmapped reads return zero.  Only 32-bit transfers are
// supported.  Being an AHB slave with memory-mapped registers follows the
// published design; the record window layout and the access rules are this
// design's choices.
module realprof_ahb_slave
  import realprof_pkg::*;
#(
  parameter int unsigned NUM_MON = 68,
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned DW      = 32,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // AHB slave
  input  logic                      hsel,
  input  logic [31:0]               haddr,
  input  logic                      hwrite,
  input  logic [1:0]                htrans,
  input  logic [2:0]                hsize,
  input  logic [31:0]               hwdata,
  input  logic                      hready,
  output logic [31:0]               hrdata,
  output logic                      hreadyout,
  output logic [1:0]                hresp,
  // controller registers
  output logic                      reg_wr,
  output logic [2:0]                reg_idx,
  output logic [DW-1:0]             reg_wdata,
  output logic [2:0]                reg_rd_idx,
  input  logic [DW-1:0]             reg_rdata,
  // monitor memories
  output logic [AW-1:0]             rec_raddr,
  input  logic [NUM_MON-1:0][DW-1:0] mon_rdata
);

  logic                 acc;
  logic                 dp_valid_q, dp_write_q, dp_rec_q, dp_reg_q;
  logic [2:0]           dp_idx_q;
  logic [MON_IDX_W-1:0] dp_mon_q;

  assign acc = hsel && hready && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid_q <= 1'b0;
      dp_write_q <= 1'b0;
      dp_rec_q   <= 1'b0;
      dp_reg_q   <= 1'b0;
      dp_idx_q   <= '0;
      dp_mon_q   <= '0;
    end else if (hready) begin
      dp_valid_q <= acc;
      dp_write_q <= hwrite;
      dp_rec_q   <= haddr[REC_WINDOW_BIT];
      dp_reg_q   <= !haddr[REC_WINDOW_BIT] && haddr[16:5] == '0 && haddr[4:2] <= 3'(REG_EVENT_MASK);
      dp_idx_q   <= haddr[4:2];
      dp_mon_q   <= haddr[MON_IDX_LSB +: MON_IDX_W];
    end
  end

  // Record index straight from the address phase
  assign rec_raddr = haddr[REC_IDX_LSB +: AW];

  assign reg_wr     = dp_valid_q && dp_write_q && dp_reg_q;
  assign reg_idx    = dp_idx_q;
  assign reg_wdata  = hwdata[DW-1:0];
  assign reg_rd_idx = dp_idx_q;

  always_comb begin
    hrdata = '0;
    if (dp_valid_q && !dp_write_q) begin
      if (dp_rec_q) begin
        if (32'(dp_mon_q) < NUM_MON) hrdata = 32'(mon_rdata[dp_mon_q]);
      end else if (dp_reg_q) begin
        hrdata = 32'(reg_rdata);
      end
    end
  end

  assign hreadyout = 1'b1;
  assign hresp     = HRESP_OKAY;

  a_word_only: assert property (@(posedge clk) disable iff (!rst_n)
    acc |-> hsize == 3'b010);

endmodule
