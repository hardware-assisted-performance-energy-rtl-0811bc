// tb_realprof_ahb_slave -- self-checking test of the REALprof AHB slave.
// Runs pipelined back-to-back AHB transfers: register writes (checked on the
// controller side as reg_wr/reg_idx/reg_wdata), writes that must be ignored,
// register reads, record reads from stand-in monitor memories whose word
// encodes monitor and record number, reads of unmapped offsets and
// transfers that are not for this slave.  Every response must be OKAY with
// no wait state.  A watchdog ends a hung run.
module tb_realprof_ahb_slave;
  localparam int unsigned NUM_MON = 68;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset
  logic hsel, hwrite, hready, hreadyout;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp;
  logic [2:0] hsize;
  logic reg_wr;
  logic [2:0] reg_idx, reg_rd_idx;
  logic [31:0] reg_wdata, reg_rdata;
  logic [7:0] rec_raddr;
  logic [NUM_MON-1:0][31:0] mon_rdata;
  int checks = 0, failures = 0;

  realprof_ahb_slave #(.NUM_MON(NUM_MON), .DEPTH(256), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  // stand-in controller registers and monitor memories
  assign reg_rdata = 32'hA000_0000 | 32'(reg_rd_idx);
  always_ff @(posedge clk)
    for (int m = 0; m < int'(NUM_MON); m++)
      mon_rdata[m] <= {8'(m), 8'h5A, 8'h00, rec_raddr};

  int wr_idx[$];
  logic [31:0] wr_data[$];
  always @(posedge clk) if (reg_wr) begin
    wr_idx.push_back(int'(reg_idx));
    wr_data.push_back(reg_wdata);
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  typedef struct {
    logic        sel;
    logic        write;
    logic [31:0] addr;
    logic [31:0] data;   // write data, or expected read data
  } xfer_t;
  xfer_t xq[$];

  // run the queued transfers back to back
  task automatic run_xfers();
    xfer_t prev;
    logic  have_prev = 0;
    for (int i = 0; i <= xq.size(); i++) begin
      @(negedge clk);
      if (have_prev) begin
        check({30'(0), hresp}, 0, "hresp OKAY");
        check(32'(hreadyout), 1, "no wait state");
        if (prev.sel && !prev.write)
          check(hrdata, prev.data, $sformatf("read %h", prev.addr));
        hwdata = prev.write ? prev.data : 32'hDEAD_BEEF;
      end
      if (i < xq.size()) begin
        hsel = xq[i].sel; hwrite = xq[i].write; haddr = xq[i].addr;
        htrans = 2'b10; hsize = 3'b010;
        prev = xq[i]; have_prev = 1;
      end else begin
        hsel = 0; htrans = 2'b00; have_prev = 0;
      end
    end
    @(negedge clk);
    xq.delete();
  endtask

  logic [31:0] wv[5];

  initial begin
    hsel = 0; hwrite = 0; haddr = 0; htrans = 0; hsize = 3'b010; hwdata = 0; hready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // register writes
    for (int r = 0; r < 5; r++) begin
      wv[r] = $urandom;
      xq.push_back('{1'b1, 1'b1, BASE + 32'(4*r), wv[r]});
    end
    // ignored writes: unmapped offset, record window, not selected
    xq.push_back('{1'b1, 1'b1, BASE + 32'h14, 32'h1111_1111});
    xq.push_back('{1'b1, 1'b1, BASE + 32'h2_0404, 32'h2222_2222});
    xq.push_back('{1'b0, 1'b1, BASE + 32'h4, 32'h3333_3333});
    // register reads, each back to back after a write
    for (int r = 0; r < 5; r++) xq.push_back('{1'b1, 1'b0, BASE + 32'(4*r), 32'hA000_0000 | 32'(r)});
    xq.push_back('{1'b1, 1'b0, BASE + 32'h14, 32'h0});
    xq.push_back('{1'b1, 1'b0, BASE + 32'h100, 32'h0});
    // record reads
    for (int i = 0; i < 300; i++) begin
      automatic int m = (i < 68) ? i : $urandom_range(NUM_MON - 1);
      automatic int r = $urandom_range(255);
      xq.push_back('{1'b1, 1'b0, BASE + 32'h2_0000 + 32'(m*1024) + 32'(r*4),
                     {8'(m), 8'h5A, 8'h00, 8'(r)}});
    end
    // monitors beyond the last read as zero
    xq.push_back('{1'b1, 1'b0, BASE + 32'h2_0000 + 32'(70*1024), 32'h0});
    run_xfers();
    check(32'(wr_idx.size()), 5, "register write count");
    for (int r = 0; r < 5 && r < wr_idx.size(); r++) begin
      check(32'(wr_idx[r]), 32'(r), $sformatf("write %0d index", r));
      check(wr_data[r], wv[r], $sformatf("write %0d data", r));
    end
    // an address phase with hready low is not taken
    @(negedge clk);
    hsel = 1; hwrite = 1; haddr = BASE; htrans = 2'b10; hready = 0;
    @(negedge clk);
    hsel = 0; htrans = 0; hready = 1; hwdata = 32'h5555_5555;
    @(negedge clk);
    check(32'(wr_idx.size()), 5, "no write while hready low");
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
