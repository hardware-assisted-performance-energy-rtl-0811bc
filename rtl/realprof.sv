// realprof -- REALprof hardware profiler for a multi-core processor system.
//
// Samples the hardware activity of every processor at a fixed period without
// any software on the processors taking part.  Per core there is one
// program-counter monitor (event 0) and NUM_EVENTS-1 event monitors (events
// 1..16: cache-miss stalls, multiply, divide, cache hits and misses, cache
// flush, TLB misses, power-down cycles, single and double register-file
// accesses).  Monitor m = core*NUM_EVENTS + event.  The controller starts a
// run after a programmable offset and pulses EnLog every Sampling Period
// cycles; on each pulse every event monitor stores the number of active
// cycles of its event during that period and clears its counter, and every
// program-counter monitor stores the current PC, at record Sampling Number of
// its memory.  After a run, software reads the records over AHB.
// Interface: an AMBA 2.0 AHB slave port (32-bit, zero wait states), one
// 32-bit PC and NUM_EVENTS-1 event-active lines per core, sampled on clk.
// Defaults: 4 cores x 17 monitors = 68 monitors of 256 x 32-bit records,
// which is the configuration of the published quad-core platform.  See
// realprof_ahb_slave for the address map and realprof_ctrl for the registers.
module realprof
  import realprof_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 4,
  parameter int unsigned NUM_EVENTS = 17,
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned DW         = 32,
  localparam int unsigned NUM_MON   = NUM_CORES * NUM_EVENTS,
  localparam int unsigned AW        = $clog2(DEPTH)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // AHB slave port
  input  logic                                   hsel,
  input  logic [31:0]                            haddr,
  input  logic                                   hwrite,
  input  logic [1:0]                             htrans,
  input  logic [2:0]                             hsize,
  input  logic [2:0]                             hburst,
  input  logic [31:0]                            hwdata,
  input  logic                                   hready,
  output logic [31:0]                            hrdata,
  output logic                                   hreadyout,
  output logic [1:0]                             hresp,
  // processor probes
  input  logic [NUM_CORES-1:0][DW-1:0]           pc,
  input  logic [NUM_CORES-1:0][NUM_EVENTS-2:0]   evt
);

  logic                      reg_wr;
  logic [2:0]                reg_idx, reg_rd_idx;
  logic [DW-1:0]             reg_wdata, reg_rdata;
  logic [NUM_EVENTS-1:0]     en;
  logic                      enlog;
  logic [AW-1:0]             waddr, raddr;
  logic [NUM_MON-1:0][DW-1:0] mon_rdata;

  // Bursts are plain sequences of word transfers to this slave
  logic unused_hburst;
  assign unused_hburst = ^hburst;

  realprof_ahb_slave #(.NUM_MON(NUM_MON), .DEPTH(DEPTH), .DW(DW)) u_ahb (
    .clk, .rst_n,
    .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp,
    .reg_wr, .reg_idx, .reg_wdata, .reg_rd_idx, .reg_rdata,
    .rec_raddr (raddr),
    .mon_rdata
  );

  realprof_ctrl #(.NUM_EVENTS(NUM_EVENTS), .DEPTH(DEPTH), .DW(DW)) u_ctrl (
    .clk, .rst_n,
    .reg_wr, .reg_idx, .reg_wdata, .reg_rd_idx, .reg_rdata,
    .en, .enlog, .waddr
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    realprof_pc_monitor #(.DEPTH(DEPTH), .DW(DW)) u_pc_mon (
      .clk,
      .en    (en[0]),
      .pc    (pc[c]),
      .enlog,
      .waddr,
      .raddr,
      .rdata (mon_rdata[c*NUM_EVENTS])
    );
    for (genvar e = 1; e < NUM_EVENTS; e++) begin : g_evt
      realprof_event_monitor #(.DEPTH(DEPTH), .DW(DW)) u_evt_mon (
        .clk, .rst_n,
        .en      (en[e]),
        .eve_act (evt[c][e-1]),
        .enlog,
        .waddr,
        .raddr,
        .rdata   (mon_rdata[c*NUM_EVENTS + e])
      );
    end
  end

endmodule
