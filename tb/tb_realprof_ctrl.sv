// tb_realprof_ctrl -- self-checking test of the REALprof controller.
// Uses an 8-record depth to keep runs short.  Checks reset values, then
//   run 1: start offset 7, period 5, event 6 masked -> En rises exactly 7
//          cycles after the start write, EnLog every 5 cycles with record
//          addresses 0..7, DONE after 8 records and En low afterwards;
//   run 2: period 0 (a record per cycle), stopped by software;
//   run 3: a second start write while running does not restart the run.
// Expected cycle positions are computed from the register values written.
module tb_realprof_ctrl;
  import realprof_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned NEV   = 17;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset
  logic reg_wr;
  logic [2:0] reg_idx, reg_rd_idx;
  logic [31:0] reg_wdata, reg_rdata;
  logic [NEV-1:0] en;
  logic enlog;
  logic [2:0] waddr;
  int checks = 0, failures = 0;

  realprof_ctrl #(.NUM_EVENTS(NEV), .DEPTH(DEPTH), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // observed activity
  int log_cyc[$];
  int log_addr[$];
  int first_en;
  int en_cycles;
  int masked_seen;
  always @(negedge clk) if (rst_n) begin
    if (en[0]) begin
      if (first_en < 0) first_en = cyc;
      en_cycles++;
    end
    if (en[6]) masked_seen++;
    if (enlog) begin
      log_cyc.push_back(cyc);
      log_addr.push_back(int'(waddr));
    end
  end

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // write a register; returns the cycle number of the first cycle after
  // the capturing clock edge
  task automatic wr(input reg_idx_e idx, input logic [31:0] data, output int e);
    reg_wr = 1; reg_idx = idx; reg_wdata = data;
    e = cyc + 1;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic clear_obs();
    log_cyc.delete(); log_addr.delete(); first_en = -1; en_cycles = 0; masked_seen = 0;
  endtask

  int e, n, p;

  initial begin
    reg_wr = 0; reg_idx = 0; reg_wdata = 0; reg_rd_idx = 0;
    clear_obs();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    reg_rd_idx = REG_STATUS;     #1 check(int'(reg_rdata), 0, "reset status");
    reg_rd_idx = REG_EVENT_MASK; #1 check(int'(reg_rdata), 32'h1FFFF, "reset mask");
    reg_rd_idx = REG_PERIOD;     #1 check(int'(reg_rdata), 0, "reset period");
    reg_rd_idx = REG_SAMPLE_NUM; #1 check(int'(reg_rdata), 0, "reset sample number");

    // ---- run 1 ----
    n = 7; p = 5;
    wr(REG_PERIOD, p, e);
    wr(REG_OFFSET, n, e);
    wr(REG_EVENT_MASK, 32'h1FFFF & ~(32'h1 << 6), e);
    reg_rd_idx = REG_EVENT_MASK; #1 check(int'(reg_rdata), 32'h1FFBF, "mask readback");
    clear_obs();
    wr(REG_STATUS, 32'h1, e);
    reg_rd_idx = REG_STATUS; #1 check(int'(reg_rdata), 32'h3, "status waiting");
    repeat (n + DEPTH*p + 4) @(negedge clk);
    check(first_en, e + n, "first En cycle after offset");
    check(log_cyc.size(), DEPTH, "records in run 1");
    for (int k = 0; k < log_cyc.size(); k++) begin
      check(log_cyc[k], e + n + k*p + p - 1, $sformatf("EnLog %0d cycle", k));
      check(log_addr[k], k, $sformatf("EnLog %0d address", k));
    end
    check(en_cycles, DEPTH*p, "En cycles in run 1");
    check(masked_seen, 0, "masked event never enabled");
    reg_rd_idx = REG_STATUS;     #1 check(int'(reg_rdata), 32'h8, "status done");
    reg_rd_idx = REG_SAMPLE_NUM; #1 check(int'(reg_rdata), DEPTH, "sample number full");

    // ---- run 2: period 0, software stop ----
    wr(REG_PERIOD, 0, e);
    wr(REG_OFFSET, 0, e);
    clear_obs();
    wr(REG_STATUS, 32'h1, e);
    reg_rd_idx = REG_STATUS; #1 check(int'(reg_rdata), 32'h5, "status running");
    repeat (4) @(negedge clk);
    wr(REG_STATUS, 32'h0, n);
    @(negedge clk);
    check(first_en, e, "run 2 En with zero offset");
    check(log_cyc.size(), n - e, "run 2 one record per cycle");
    reg_rd_idx = REG_SAMPLE_NUM; #1 check(int'(reg_rdata), n - e, "run 2 sample number");
    reg_rd_idx = REG_STATUS;     #1 check(int'(reg_rdata), 0, "status idle after stop");

    // ---- run 3: start while running is ignored ----
    p = 4;
    wr(REG_PERIOD, p, e);
    clear_obs();
    wr(REG_STATUS, 32'h1, e);
    repeat (5) @(negedge clk);
    wr(REG_STATUS, 32'h1, n);
    repeat (12) @(negedge clk);
    wr(REG_STATUS, 32'h0, n);
    @(negedge clk);
    check(log_cyc.size(), (n - e) / p, "run 3 records");
    for (int k = 0; k < log_cyc.size(); k++)
      check(log_cyc[k], e + k*p + p - 1, $sformatf("run 3 EnLog %0d", k));
    reg_rd_idx = REG_SAMPLE_NUM; #1 check(int'(reg_rdata), (n - e) / p, "run 3 sample number");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
