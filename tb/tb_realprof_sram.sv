// tb_realprof_sram -- self-checking test of the monitor sample memory.
// Fills every word with random data, reads it all back checking the
// one-cycle read latency, then checks that a read of a word being written in
// the same cycle returns the old word.  A watchdog ends a hung run.
module tb_realprof_sram;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned DW    = 32;

  logic clk = 1'b0;
  logic we;
  logic [7:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  realprof_sram #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < int'(DEPTH); a++) begin
      we = 1; waddr = 8'(a); wdata = $urandom; ref_mem[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    // sequential read, data appears one cycle after the address
    for (int a = 0; a < int'(DEPTH); a++) begin
      raddr = 8'(a);
      @(negedge clk);
      check(rdata, ref_mem[a], $sformatf("read %0d", a));
    end
    // random reads with the previous address changed right after the edge
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(DEPTH-1);
      raddr = 8'(a);
      @(negedge clk);
      check(rdata, ref_mem[a], $sformatf("random read %0d", a));
    end
    // read during write of the same word returns the old value
    raddr = 8'd17; waddr = 8'd17; we = 1; wdata = ~ref_mem[17];
    @(negedge clk);
    check(rdata, ref_mem[17], "read-during-write old data");
    we = 0; ref_mem[17] = wdata;
    @(negedge clk);
    check(rdata, ref_mem[17], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
