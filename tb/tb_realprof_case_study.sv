// tb_realprof_case_study -- REALprof in its microsecond profiling setup.
// Profiles four cores the way a multi-threaded application is profiled on a
// 100 MHz quad-core system: Sampling Period 100 (1 us per record at 100 MHz),
// every event enabled, started before the code section and stopped by
// software after 128 records (128 us).  The stand-in processors alternate
// between compute phases and memory-bound phases (many data-cache miss
// stalls and register-file accesses) of a few tens of microseconds, with
// each core shifted in phase.  The testbench checks every record of every
// monitor against its own model, that no record exceeds the period, that an
// always-active line records exactly 100 per microsecond, and that the
// memory-bound phases show up as higher data-cache stall counts.  Default
// top parameters; a watchdog ends a hung run.
module tb_realprof_case_study;
  import realprof_pkg::*;
  localparam int NC = 4, NE = 17, DEPTH = 256, NMON = NC * NE;
  localparam int PERIOD = 100, NREC = 128;
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
  always #5 clk = ~clk;   // 10 ns: 100 MHz

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- processor stand-ins ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit mem_phase(input int c, input int t);
    return ((t / 100 + c * 7) % 45) >= 30;   // 15 us of every 45 us
  endfunction

  function automatic int activity(input int c, input int i, input bit mp);
    case (i + 1)
      EV_DCMISS_STALL: return mp ? 75 : 8;
      EV_RF_SINGLE:    return mp ? 90 : 45;
      EV_IC_HIT:       return mp ? 15 : 60;
      EV_ICMISS_STALL: return mp ? 0 : 30;
      EV_POWER_DOWN:   return (c == 3) ? 100 : 0;  // one line always on
      EV_DIV:          return 1;
      default:         return 5 + (c * 3 + i) % 20;
    endcase
  endfunction

  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      pc[c] <= ($urandom_range(15) == 0) ? {$urandom, 2'b00} : pc[c] + 32'd4;
      for (int i = 0; i < NE - 1; i++)
        evt[c][i] <= ($urandom_range(99) < activity(c, i, mem_phase(c, cyc)));
    end
  end

  // ---------------- reference model ----------------
  logic [31:0] exp_rec [NMON][DEPTH];
  bit   exp_mp [NC][DEPTH];
  int unsigned m_cnt [NC][NE-1];
  bit  m_run, m_start_pend, m_stop_pend;
  int  m_rel, m_nrec;

  always @(posedge clk) begin
    if (m_run) begin
      for (int c = 0; c < NC; c++)
        for (int i = 0; i < NE - 1; i++)
          if (evt[c][i]) m_cnt[c][i]++;
      if (m_rel % PERIOD == PERIOD - 1) begin
        for (int c = 0; c < NC; c++) begin
          exp_rec[c*NE][m_nrec] = pc[c];
          exp_mp[c][m_nrec] = mem_phase(c, cyc);
          for (int i = 0; i < NE - 1; i++) begin
            exp_rec[c*NE + i + 1][m_nrec] = m_cnt[c][i];
            m_cnt[c][i] = 0;
          end
        end
        m_nrec++;
        if (m_nrec == DEPTH) m_run = 0;
      end
      m_rel++;
    end
    if (m_stop_pend) m_run = 0;
    if (m_start_pend && !m_run) begin
      m_run = 1; m_rel = 0; m_nrec = 0;
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
    if (offs == 32'h0) begin
      if (data[ST_START]) m_start_pend = 1;
      else                m_stop_pend  = 1;
    end
  endtask

  task automatic ahb_read(input logic [31:0] offs, output logic [31:0] data);
    @(negedge clk);
    hsel = 1; hwrite = 0; haddr = BASE + offs; htrans = HTRANS_NONSEQ;
    @(negedge clk);
    data = hrdata;
    hsel = 0; htrans = HTRANS_IDLE;
  endtask

  logic [31:0] d, nrec;
  longint stall_mem [NC], stall_cmp [NC];
  int     n_mem [NC], n_cmp [NC];

  initial begin
    hsel = 0; hwrite = 0; haddr = 0; htrans = HTRANS_IDLE; hsize = 3'b010; hburst = 3'b000;
    hwdata = 0; hready = 1;
    m_run = 0; m_start_pend = 0; m_stop_pend = 0; m_rel = 0; m_nrec = 0;
    for (int c = 0; c < NC; c++) begin
      pc[c] = 32'h4000_0000 + 32'(c) * 32'h0010_0000;
      evt[c] = '0;
      stall_mem[c] = 0; stall_cmp[c] = 0; n_mem[c] = 0; n_cmp[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    ahb_write(32'h04, PERIOD);
    ahb_write(32'h08, 0);
    ahb_write(32'h10, 32'h1FFFF);
    ahb_write(32'h00, 32'h1);
    // let the section run for 128 us, then stop
    wait (m_nrec == NREC);
    ahb_write(32'h00, 32'h0);
    ahb_read(32'h0C, nrec);
    check(nrec, m_nrec, "sample number after stop");
    check(32'(m_nrec >= NREC && m_nrec < NREC + 2), 1, "about 128 us profiled");

    for (int m = 0; m < NMON; m++)
      for (int r = 0; r < int'(nrec); r++) begin
        ahb_read(32'h2_0000 + 32'(m*1024 + r*4), d);
        check(d, exp_rec[m][r], $sformatf("monitor %0d record %0d", m, r));
        if (m % NE != 0) check(32'(d <= PERIOD), 1, "count within one period");
        if (m == 3*NE + EV_POWER_DOWN) check(d, PERIOD, "always-active line");
        if (m % NE == EV_DCMISS_STALL) begin
          if (exp_mp[m/NE][r]) begin stall_mem[m/NE] += d; n_mem[m/NE]++; end
          else                 begin stall_cmp[m/NE] += d; n_cmp[m/NE]++; end
        end
      end
    for (int c = 0; c < NC; c++) begin
      check(32'(n_mem[c] > 0 && n_cmp[c] > 0), 1, $sformatf("core %0d saw both phases", c));
      if (n_mem[c] > 0 && n_cmp[c] > 0) begin
        $display("core %0d: mean D$ miss stall cycles per us: memory-bound %0d, compute %0d",
                 c, stall_mem[c] / n_mem[c], stall_cmp[c] / n_cmp[c]);
        check(32'(stall_mem[c] / n_mem[c] > 3 * (stall_cmp[c] / n_cmp[c])), 1,
              $sformatf("core %0d memory-bound phases visible", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
