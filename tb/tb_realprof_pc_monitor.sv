// tb_realprof_pc_monitor -- self-checking test of the program-counter monitor.
// Runs a fake program counter, pulses EnLog at random intervals, remembers
// the PC of each EnLog cycle (zero when En is low), and reads every record
// back.  A watchdog ends a hung run.
module tb_realprof_pc_monitor;
  localparam int unsigned DEPTH = 256;

  logic clk = 1'b0;
  logic en, enlog;
  logic [31:0] pc;
  logic [7:0] waddr, raddr;
  logic [31:0] rdata;
  logic [31:0] exp_rec [DEPTH];
  int checks = 0, failures = 0;

  realprof_pc_monitor #(.DEPTH(DEPTH), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    en = 0; enlog = 0; waddr = 0; raddr = 0; pc = 32'h4000_0000;
    @(negedge clk);
    for (int rec = 0; rec < int'(DEPTH); rec++) begin
      automatic int len = $urandom_range(1, 12);
      for (int c = 0; c < len; c++) begin
        pc    = ($urandom_range(9) == 0) ? {$urandom, 2'b00} : pc + 4;
        en    = (rec % 7 != 3);
        enlog = (c == len - 1);
        waddr = 8'(rec);
        if (enlog) exp_rec[rec] = en ? pc : 32'h0;
        @(negedge clk);
      end
    end
    enlog = 0;
    for (int rec = 0; rec < int'(DEPTH); rec++) begin
      raddr = 8'(rec);
      @(negedge clk);
      check(rdata, exp_rec[rec], $sformatf("record %0d", rec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
