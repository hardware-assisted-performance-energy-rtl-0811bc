// tb_realprof -- end-to-end test of the REALprof profiler at full size.
// The top runs with its default parameters: 4 cores x 17 monitors, 256
// records of 32 bits.  The testbench plays the processors (random event
// lines with a different activity per event, program counters that step and
// jump) and the software (an AHB master doing single transfers).  A
// reference model, driven only by what the testbench itself wrote to the
// registers, computes every record independently of the design.
//   run 1: offset 20, period 3, events 6 and 14 masked, runs until the
//          memories are full; every record of every monitor is read back.
//   run 2: offset 0, period 0 (a record per cycle), PC monitors masked,
//          stopped by software after 30 cycles; all records are read back.
//   run 3: period 5, a second start write while running (ignored), runs to
//          full; all records are read back.
// Each mechanism (start offset wait, periodic logging, event mask, PC
// sampling, stop on full memory, software stop, per-cycle sampling, ignored
// restart) is counted, and one that never happened counts as a failure.
module tb_realprof;
  import realprof_pkg::*;
  localparam int NC = 4, NE = 17, DEPTH = 256, NMON = NC * NE;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic hsel, hwrite, hready, hreadyout;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp;
  logic [2:0] hsize, hburst;
  logic [NC-1:0][31:0] pc;
  logic [NC-1:0][NE-2:0] evt;
  int checks = 0, failures = 0;

  realprof dut (.*);

  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- processor stand-ins ----------------
  int prob [NC][NE-1];   // percent activity of each event line
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      pc[c] <= ($urandom_range(15) == 0) ? {$urandom, 2'b00} : pc[c] + 32'd4;
      for (int i = 0; i < NE - 1; i++)
        evt[c][i] <= ($urandom_range(99) < prob[c][i]);
    end
  end

  // ---------------- reference model ----------------
  logic [31:0] exp_rec [NMON][DEPTH];
  int unsigned m_cnt [NC][NE-1];
  bit  m_run, m_start_pend, m_stop_pend;
  int  m_rel, m_nrec, m_period, m_offset;
  logic [31:0] m_mask;
  int  n_logs, n_waits_model, n_full, n_masked_logs, n_pc_logs;

  always @(posedge clk) begin
    if (m_run) begin
      if (m_rel >= 0) begin
        for (int c = 0; c < NC; c++)
          for (int i = 0; i < NE - 1; i++)
            if (m_mask[i+1] && evt[c][i]) m_cnt[c][i]++;
        if (m_rel % m_period == m_period - 1) begin
          for (int c = 0; c < NC; c++) begin
            exp_rec[c*NE][m_nrec] = m_mask[0] ? pc[c] : 32'h0;
            for (int i = 0; i < NE - 1; i++) begin
              exp_rec[c*NE + i + 1][m_nrec] = m_mask[i+1] ? m_cnt[c][i] : 32'h0;
              m_cnt[c][i] = 0;
            end
          end
          n_logs++;
          if (m_mask[0]) n_pc_logs++;
          if (m_mask[NE-1:0] != '1) n_masked_logs++;
          m_nrec++;
          if (m_nrec == DEPTH) begin
            m_run = 0;
            n_full++;
          end
        end
      end else begin
        n_waits_model++;
      end
      m_rel++;
    end
    if (m_stop_pend) m_run = 0;
    if (m_start_pend && !m_run) begin
      m_run  = 1;
      m_rel  = -m_offset;
      m_nrec = 0;
      foreach (m_cnt[c, i]) m_cnt[c][i] = 0;
    end
    m_start_pend = 0;
    m_stop_pend  = 0;
  end

  // ---------------- AHB master ----------------
  task automatic ahb_write(input logic [31:0] offs, input logic [31:0] data);
    @(negedge clk);
    hsel = 1; hwrite = 1; haddr = BASE + offs; htrans = HTRANS_NONSEQ;
    @(negedge clk);
    hsel = 0; htrans = HTRANS_IDLE; hwdata = data;
    if (offs == 32'h4)  m_period = (data == 0) ? 1 : int'(data);
    if (offs == 32'h8)  m_offset = int'(data);
    if (offs == 32'h10) m_mask   = data;
    if (offs == 32'h0) begin
      if (data[ST_START]) m_start_pend = 1;
      else                m_stop_pend  = 1;
    end
    check({30'(0), hresp}, 0, "write response");
  endtask

  task automatic ahb_read(input logic [31:0] offs, output logic [31:0] data);
    @(negedge clk);
    hsel = 1; hwrite = 0; haddr = BASE + offs; htrans = HTRANS_NONSEQ;
    @(negedge clk);
    data = hrdata;
    check(32'(hreadyout), 1, "no wait state");
    hsel = 0; htrans = HTRANS_IDLE;
  endtask

  task automatic read_check(input logic [31:0] offs, exp, input string what);
    logic [31:0] d;
    ahb_read(offs, d);
    check(d, exp, what);
  endtask

  task automatic read_all_records(input string tag);
    logic [31:0] d;
    for (int m = 0; m < NMON; m++)
      for (int r = 0; r < DEPTH; r++) begin
        ahb_read(32'h2_0000 + 32'(m*1024 + r*4), d);
        check(d, exp_rec[m][r], $sformatf("%s monitor %0d record %0d", tag, m, r));
      end
  endtask

  int n_wait_status, n_done_status, n_sw_stop, n_cycle_sampling, n_restart_ignored;

  task automatic wait_done(input int limit);
    logic [31:0] st;
    for (int i = 0; i < limit; i++) begin
      ahb_read(32'h0, st);
      if (st[ST_DONE]) break;
    end
    check(st, 32'h8, "status DONE");
    if (st == 32'h8) n_done_status++;
  endtask

  logic [31:0] st;

  initial begin
    hsel = 0; hwrite = 0; haddr = 0; htrans = HTRANS_IDLE; hsize = 3'b010; hburst = 3'b000;
    hwdata = 0; hready = 1;
    m_run = 0; m_start_pend = 0; m_stop_pend = 0; m_period = 1; m_offset = 0; m_mask = 32'h1FFFF;
    m_nrec = 0; m_rel = 0;
    n_logs = 0; n_waits_model = 0; n_full = 0; n_masked_logs = 0; n_pc_logs = 0;
    n_wait_status = 0; n_done_status = 0; n_sw_stop = 0; n_cycle_sampling = 0; n_restart_ignored = 0;
    foreach (exp_rec[m, r]) exp_rec[m][r] = 32'h0;
    foreach (prob[c, i]) prob[c][i] = ((c * 16 + i) * 37 + 11) % 101;
    prob[1][0] = 100;   // one line always active: its records equal the period
    prob[2][4] = 0;     // one line never active
    for (int c = 0; c < NC; c++) begin
      pc[c] = 32'h4000_0000 + 32'(c) * 32'h0010_0000;
      evt[c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // reset values
    read_check(32'h00, 32'h0, "reset status");
    read_check(32'h04, 32'h0, "reset period");
    read_check(32'h08, 32'h0, "reset offset");
    read_check(32'h0C, 32'h0, "reset sample number");
    read_check(32'h10, 32'h1FFFF, "reset event mask");

    // the records are not reset: fill every memory with zeros first
    ahb_write(32'h10, 32'h0);
    ahb_write(32'h0, 32'h1);
    wait_done(2000);

    // ---- run 1 ----
    ahb_write(32'h04, 32'd3);
    ahb_write(32'h08, 32'd20);
    ahb_write(32'h10, 32'h1FFFF & ~(32'h1 << 6) & ~(32'h1 << 14));
    read_check(32'h04, 32'd3, "period readback");
    read_check(32'h08, 32'd20, "offset readback");
    ahb_write(32'h0, 32'h1);
    ahb_read(32'h0, st);
    check(st, 32'h3, "status waiting");
    if (st == 32'h3) n_wait_status++;
    wait_done(2000);
    read_check(32'h0C, DEPTH, "run 1 sample number");
    read_all_records("run 1");

    // ---- run 2: per-cycle sampling, PC masked, software stop ----
    ahb_write(32'h04, 32'd0);
    ahb_write(32'h08, 32'd0);
    ahb_write(32'h10, 32'h1FFFE);
    ahb_write(32'h0, 32'h1);
    ahb_read(32'h0, st);
    check(st, 32'h5, "status running");
    repeat (30) @(negedge clk);
    ahb_write(32'h0, 32'h0);
    @(negedge clk);
    read_check(32'h0, 32'h0, "status idle after stop");
    read_check(32'h0C, 32'(m_nrec), "run 2 sample number");
    if (m_nrec > 0 && m_nrec < DEPTH && !m_run) n_sw_stop++;
    if (m_period == 1 && m_nrec > 30) n_cycle_sampling++;
    read_all_records("run 2");

    // ---- run 3: a start write while running is ignored ----
    ahb_write(32'h04, 32'd5);
    ahb_write(32'h10, 32'h1FFFF);
    ahb_write(32'h0, 32'h1);
    repeat (40) @(negedge clk);
    ahb_write(32'h0, 32'h1);
    ahb_read(32'h0C, st);
    check(st, 32'(m_nrec), "run 3 sample number after second start");
    if (st > 0 && st == 32'(m_nrec)) n_restart_ignored++;
    wait_done(3000);
    read_all_records("run 3");

    // mechanisms that must have happened
    check(32'(n_wait_status > 0 && n_waits_model >= 20), 1, "start offset wait happened");
    check(32'(n_logs >= 3 * DEPTH), 1, "periodic logging happened");
    check(32'(n_masked_logs > 0), 1, "event mask used");
    check(32'(n_pc_logs > 0), 1, "PC sampling happened");
    check(32'(n_full >= 3 && n_done_status >= 3), 1, "stop on full memory happened");
    check(32'(n_sw_stop), 1, "software stop happened");
    check(32'(n_cycle_sampling), 1, "per-cycle sampling happened");
    check(32'(n_restart_ignored), 1, "restart while running ignored");
    $display("mechanisms: offset_waits=%0d logs=%0d masked_logs=%0d pc_logs=%0d full=%0d sw_stop=%0d cycle_sampling=%0d restart_ignored=%0d",
             n_waits_model, n_logs, n_masked_logs, n_pc_logs, n_full, n_sw_stop, n_cycle_sampling, n_restart_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
