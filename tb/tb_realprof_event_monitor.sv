// tb_realprof_event_monitor -- self-checking test of one event monitor.
// Drives random En and EveAct activity with EnLog pulses at varying
// intervals, keeps its own per-period event count, and reads every record
// back through the read port.  A second monitor with a 3-bit counter checks
// that the count saturates instead of wrapping.  A watchdog ends a hung run.
module tb_realprof_event_monitor;
  localparam int unsigned DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset
  logic en, eve_act, enlog;
  logic [7:0] waddr, raddr;
  logic [31:0] rdata;
  logic [2:0]  rdata_s;
  logic [31:0] exp_rec [DEPTH];
  int checks = 0, failures = 0;

  realprof_event_monitor #(.DEPTH(DEPTH), .DW(32)) dut (.*);
  realprof_event_monitor #(.DEPTH(DEPTH), .DW(3)) dut_sat (
    .clk, .rst_n, .en, .eve_act, .enlog, .waddr, .raddr, .rdata(rdata_s));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference count of the current period
  int unsigned cnt;

  initial begin
    en = 0; eve_act = 0; enlog = 0; waddr = 0; raddr = 0; cnt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // events with En low are not counted
    eve_act = 1;
    repeat (5) @(negedge clk);
    for (int rec = 0; rec < int'(DEPTH); rec++) begin
      automatic int len = (rec < 8) ? rec + 1 : $urandom_range(1, 40);
      automatic int p_act = $urandom_range(0, 100);
      cnt = 0;
      for (int c = 0; c < len; c++) begin
        en      = (rec % 16 == 5) ? 1'b0 : ($urandom_range(99) < 90);
        eve_act = ($urandom_range(99) < p_act);
        enlog   = (c == len - 1);
        waddr   = 8'(rec);
        if (!en) cnt = 0;
        else if (eve_act) cnt++;
        @(negedge clk);
      end
      exp_rec[rec] = cnt;
    end
    enlog = 0; en = 0;
    for (int rec = 0; rec < int'(DEPTH); rec++) begin
      raddr = 8'(rec);
      @(negedge clk);
      check(rdata, exp_rec[rec], $sformatf("record %0d", rec));
    end
    // saturation: 20 events in one period into a 3-bit counter
    en = 1; eve_act = 1; waddr = 8'd3;
    repeat (19) @(negedge clk);
    enlog = 1;
    @(negedge clk);
    enlog = 0; en = 0; eve_act = 0; raddr = 8'd3;
    @(negedge clk);
    check(32'(rdata_s), 32'd7, "saturated count");
    check(rdata, 32'd20, "wide count of 20");
    // counter restarts from zero after a log
    en = 1; eve_act = 1; waddr = 8'd4;
    repeat (2) @(negedge clk);
    enlog = 1;
    @(negedge clk);
    enlog = 0; en = 0; raddr = 8'd4;
    @(negedge clk);
    check(rdata, 32'd3, "count after log restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
