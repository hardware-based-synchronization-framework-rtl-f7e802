// tb_drs: end-to-end test of the Dynamic Resource Scheduler at its default
// size (32-entry lists, dependency window 31, four PEs).
//
// The testbench plays three roles around the scheduler:
//   host  - uploads task lists through the slave port, keeps the next list
//           in the shadow buffer while the current one runs, acknowledges the
//           RISC response and reads the status register;
//   bus   - grants the master port at once or after random wait cycles;
//   PEs   - four behavioural processing elements: a start write to a PE's
//           address makes it busy for the number of cycles in bits [15:0] of
//           the configuration word, then it pulses its response.
// The lists run are the two example lists of the scheduler description
// (four image-processing tasks plus an empty entry, and the same list with a
// bridging task for a dependency window of two), a chain of 30 dependent
// short tasks, and random full and partial lists.
//
// A scoreboard checks every start write: right PE address, right
// configuration word, task of the oldest unfinished list, not started before,
// all tasks it depends on finished, PE idle. At the end it checks that every
// task ran and every list was reported. On the 30-task chain the time from a
// PE response to the start of the task that waits for it is measured and
// held against the 10 cycles given for synchronising dependent tasks. Each
// scheduler mechanism (double-buffered upload, automatic list switch,
// dependency and resource stalls, out-of-order start, parallel PEs, bridging
// and empty entries, bus wait, RISC response) is counted and must occur.
module tb_drs;
  import drs_pkg::*;

  localparam int LIST_LEN  = 32;
  localparam int DEP_DEPTH = 31;
  localparam int NUM_PE    = 4;
  localparam int NL        = 14;          // lists run
  localparam int CHAIN     = 2;           // index of the 30-task chain
  localparam logic [31:0] PE_BASE   = 32'h1000_0000;
  localparam logic [31:0] PE_STRIDE = 32'h0100_0000;
  localparam int SYNC_CYCLES = 10;        // dependent-task synchronisation bound

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              s_we, s_re, s_rvalid, m_req, m_gnt, risc_resp;
  logic [15:0]       s_addr;
  logic [127:0]      s_wdata, s_rdata, m_wdata;
  logic [31:0]       m_addr;
  logic [NUM_PE-1:0] pe_resp;

  drs dut (
    .clk, .rst_n, .s_we, .s_re, .s_addr, .s_wdata, .s_rdata, .s_rvalid,
    .m_req, .m_addr, .m_wdata, .m_gnt, .pe_resp, .risc_resp
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------------
  // Task lists
  int            l_len [NL];
  int            l_pe  [NL][LIST_LEN];   // -1: no PE (empty or bridging)
  logic [30:0]   l_dep [NL][LIST_LEN];
  logic [127:0]  l_cfg [NL][LIST_LEN];
  bit            started [NL][LIST_LEN];
  bit            fin     [NL][LIST_LEN];
  int            cur_list = 0;           // oldest unfinished list

  function automatic logic [127:0] mk_cfg(int l, int i, int dur);
    logic [127:0] c;
    c = {$urandom, $urandom, $urandom, $urandom};
    c[127:112] = 16'(l);
    c[111:96]  = 16'(i);
    c[15:0]    = 16'(dur);
    return c;
  endfunction

  // Entry j counts as finished: its PE responded, or it has no PE and all
  // that it depends on has finished.
  function automatic bit eff_fin(int l, int j);
    if (l_pe[l][j] >= 0) return fin[l][j];
    return deps_met(l, j);
  endfunction
  function automatic bit deps_met(int l, int i);
    for (int k = 1; k <= DEP_DEPTH; k++)
      if (l_dep[l][i][k-1] && i - k >= 0)
        if (!eff_fin(l, i - k)) return 1'b0;
    return 1'b1;
  endfunction
  function automatic bit list_fin(int l);
    for (int i = 0; i < l_len[l]; i++)
      if (!eff_fin(l, i)) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    // List 0: the application example, dependency window 3.
    // hough, labeling, vehicle_detection (-1), line_detection (-3), empty.
    l_len[0] = 5;
    for (int i = 0; i < LIST_LEN; i++) begin
      for (int l = 0; l < NL; l++) begin
        l_pe[l][i] = -1; l_dep[l][i] = '0; l_cfg[l][i] = '0;
        started[l][i] = 0; fin[l][i] = 0;
      end
    end
    l_pe[0][0] = 0; l_pe[0][1] = 1; l_pe[0][2] = 2; l_pe[0][3] = 3; l_pe[0][4] = -1;
    l_dep[0][2] = 31'b001; l_dep[0][3] = 31'b100;
    l_cfg[0][0] = mk_cfg(0, 0, 60); l_cfg[0][1] = mk_cfg(0, 1, 12);
    l_cfg[0][2] = mk_cfg(0, 2, 20); l_cfg[0][3] = mk_cfg(0, 3, 15);
    l_cfg[0][4] = mk_cfg(0, 4, 0);
    // List 1: the same tasks for a dependency window of 2, with a bridging
    // task after labeling.
    l_len[1] = 5;
    l_pe[1][0] = 0; l_pe[1][1] = 1; l_pe[1][2] = -1; l_pe[1][3] = 2; l_pe[1][4] = 3;
    l_dep[1][2] = 31'b10; l_dep[1][3] = 31'b10; l_dep[1][4] = 31'b10;
    l_cfg[1][0] = mk_cfg(1, 0, 40); l_cfg[1][1] = mk_cfg(1, 1, 8);
    l_cfg[1][2] = mk_cfg(1, 2, 0);  l_cfg[1][3] = mk_cfg(1, 3, 9);
    l_cfg[1][4] = mk_cfg(1, 4, 11);
    // List 2: 30 sequentially dependent short tasks on one PE.
    l_len[CHAIN] = 30;
    for (int i = 0; i < 30; i++) begin
      l_pe[CHAIN][i]  = 2;
      l_dep[CHAIN][i] = (i == 0) ? '0 : 31'b1;
      l_cfg[CHAIN][i] = mk_cfg(CHAIN, i, 1);
    end
    // Lists 3..: random, some full length.
    for (int l = 3; l < NL; l++) begin
      l_len[l] = (l % 3 == 0) ? LIST_LEN : 1 + int'($urandom_range(LIST_LEN - 1));
      for (int i = 0; i < l_len[l]; i++) begin
        l_pe[l][i] = ($urandom_range(9) == 0) ? -1 : int'($urandom_range(NUM_PE - 1));
        for (int k = 1; k <= DEP_DEPTH; k++)
          l_dep[l][i][k-1] = ($urandom_range(99) < ((k <= 3) ? 30 : 4));
        l_cfg[l][i] = mk_cfg(l, i, 1 + int'($urandom_range(25)));
      end
    end
  end

  // ------------------------------------------------------------------
  // Bus and PE models
  int  cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // the bus grants at once while the first lists run, randomly afterwards
  always @(negedge clk) m_gnt <= (cur_list <= CHAIN) ? 1'b1 : ($urandom_range(2) == 0);

  int  pe_rem   [NUM_PE];
  int  pe_list  [NUM_PE];
  int  pe_entry [NUM_PE];
  bit  pe_on    [NUM_PE];
  int  last_resp_cyc [NUM_PE];
  int  max_sync_lat = 0, min_sync_lat = 1000, n_sync = 0;
  int  chain_first = -1, chain_last = -1;   // first start, last response of the chain

  // mechanism counters
  int n_double_buf = 0, n_auto_switch = 0, n_dep_stall = 0, n_res_stall = 0;
  int n_ooo = 0, n_parallel = 0, n_bridge = 0, n_empty = 0, n_bus_wait = 0;
  int n_risc_resp = 0;

  initial begin
    for (int p = 0; p < NUM_PE; p++) begin
      pe_rem[p] = 0; pe_on[p] = 0; pe_list[p] = 0; pe_entry[p] = 0;
      last_resp_cyc[p] = 0;
    end
    pe_resp = '0;
  end

  always @(posedge clk) begin
    int p, l, e;
    logic [NUM_PE-1:0] resp_n;
    resp_n = '0;
    // PE execution and responses
    for (int q = 0; q < NUM_PE; q++) begin
      if (pe_on[q]) begin
        if (pe_rem[q] <= 1) begin
          pe_on[q] = 0;
          fin[pe_list[q]][pe_entry[q]] = 1;
          if (pe_list[q] == CHAIN && pe_entry[q] == 29) chain_last = cyc;
          resp_n[q] = 1'b1;
          last_resp_cyc[q] = cyc;
        end else begin
          pe_rem[q]--;
        end
      end
    end
    // task start writes
    if (rst_n && m_req && !m_gnt) n_bus_wait++;
    if (rst_n && m_req && m_gnt) begin
      p = int'((m_addr - PE_BASE) / PE_STRIDE);
      l = int'(m_wdata[127:112]);
      e = int'(m_wdata[111:96]);
      check(m_addr == PE_BASE + PE_STRIDE * p && p < NUM_PE, "start write to a PE address");
      check(l == cur_list, $sformatf("start of list %0d while list %0d unfinished", l, cur_list));
      if (l < NL && e < LIST_LEN) begin
        check(e < l_len[l] && l_pe[l][e] == p, $sformatf("list %0d entry %0d sent to PE %0d", l, e, p));
        check(m_wdata == l_cfg[l][e], $sformatf("config word of list %0d entry %0d", l, e));
        check(!started[l][e], $sformatf("list %0d entry %0d started twice", l, e));
        check(deps_met(l, e), $sformatf("list %0d entry %0d started before its dependencies", l, e));
        check(!pe_on[p] && !resp_n[p], $sformatf("PE %0d started while busy", p));
        for (int j = 0; j < e; j++)
          if (l_pe[l][j] >= 0 && !started[l][j]) begin n_ooo++; break; end
        if (l == CHAIN && e > 0) begin
          int lat;
          lat = cyc - last_resp_cyc[p];
          n_sync++;
          if (lat > max_sync_lat) max_sync_lat = lat;
          if (lat < min_sync_lat) min_sync_lat = lat;
        end
        if (l == CHAIN && e == 0) chain_first = cyc;
        started[l][e] = 1;
        pe_on[p] = 1; pe_list[p] = l; pe_entry[p] = e;
        pe_rem[p] = int'(m_wdata[15:0]);
      end
    end
    pe_resp <= resp_n;
    // stalls, seen from the scoreboard of the current list
    if (cur_list < NL) begin
      for (int i = 0; i < l_len[cur_list]; i++) begin
        if (l_pe[cur_list][i] >= 0 && !started[cur_list][i]) begin
          if (!deps_met(cur_list, i) && !pe_on[l_pe[cur_list][i]]) n_dep_stall++;
          if (deps_met(cur_list, i) && pe_on[l_pe[cur_list][i]]) n_res_stall++;
        end
      end
    end
    begin
      int busy = 0;
      for (int q = 0; q < NUM_PE; q++) busy += pe_on[q];
      if (busy >= 2) n_parallel++;
    end
    // list completion seen by the scoreboard
    while (cur_list < NL && list_fin(cur_list)) cur_list++;
    // automatic switch to the shadow list
    if (dut.u_task_list.act && dut.u_regfile.lists_done != 0) n_auto_switch++;
  end

  // ------------------------------------------------------------------
  // Host
  task automatic bus_write(input logic [15:0] a, input logic [127:0] d);
    @(negedge clk);
    s_we = 1'b1; s_addr = a; s_wdata = d;
    @(negedge clk);
    s_we = 1'b0;
  endtask

  task automatic bus_read(input logic [15:0] a, output logic [127:0] d);
    @(negedge clk);
    s_re = 1'b1; s_addr = a;
    @(negedge clk);
    s_re = 1'b0;
    check(s_rvalid, "read data valid one cycle after the read");
    d = s_rdata;
  endtask

  logic [127:0] st;
  int           risc_seen = 0;

  task automatic poll_status();
    bus_read({RGN_CTRL, REG_STATUS}, st);
    if (st[2]) begin
      check(risc_resp, "status bit 2 mirrors the RISC response");
      n_risc_resp++;
      bus_write({RGN_CTRL, REG_RESP_ACK}, '0);
    end
  endtask

  task automatic upload(input int l);
    logic [127:0] d;
    for (int i = 0; i < l_len[l]; i++) begin
      d = '0;
      if (l_pe[l][i] >= 0) d[l_pe[l][i]] = 1'b1;
      d[DESC_DEP_LSB +: DEP_DEPTH] = l_dep[l][i];
      if (l_pe[l][i] < 0 && l_dep[l][i] != 0) n_bridge++;
      if (l_pe[l][i] < 0 && l_dep[l][i] == 0) n_empty++;
      bus_write({RGN_DESC, 12'(i)}, d);
      bus_write({RGN_CFG, 12'(i)}, l_cfg[l][i]);
    end
    poll_status();
    if (st[0]) n_double_buf++;
    bus_write({RGN_CTRL, REG_COMMIT}, 128'(l_len[l]));
  endtask

  initial begin
    logic [127:0] d;
    s_we = 0; s_re = 0; s_addr = '0; s_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bus_write({RGN_CTRL, REG_RESP_CFG}, 128'd1);
    bus_read({RGN_CTRL, REG_RESP_CFG}, d);
    check(d[0] == 1'b1, "response configuration reads back");
    for (int l = 0; l < NL; l++) begin
      // wait until the shadow buffer is free
      do poll_status(); while (st[1]);
      upload(l);
    end
    // wait for all lists
    do begin
      poll_status();
      repeat (5) @(posedge clk);
    end while (st[63:32] != 32'(NL));
    repeat (20) @(posedge clk);
    poll_status();
    check(st[63:32] == 32'(NL), "status counts all lists");
    check(st[0] == 1'b0 && st[1] == 1'b0, "scheduler idle at the end");
    check(st[16 +: NUM_PE] == '0, "all PEs idle at the end");
    for (int i = 0; i < LIST_LEN; i++) begin
      bus_read({RGN_TSTA, 12'(i)}, d);
      check(d[1:0] == ((i < l_len[NL-1]) ? 2'(TS_DONE) : 2'(TS_NONE)),
            $sformatf("entry %0d state of the last list", i));
    end
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < l_len[l]; i++)
        check(l_pe[l][i] < 0 || (started[l][i] && fin[l][i]),
              $sformatf("list %0d entry %0d ran", l, i));
    check(cur_list == NL, "scoreboard saw every list finish");
    check(n_sync == 29, $sformatf("29 dependent starts measured in the chain (%0d)", n_sync));
    check(max_sync_lat <= SYNC_CYCLES,
          $sformatf("dependent task synchronisation takes %0d..%0d cycles (bound %0d)",
                    min_sync_lat, max_sync_lat, SYNC_CYCLES));
    // 30 dependent one-cycle tasks: each costs its run time plus the
    // synchronisation time, so the chain must end within 30 * (1 + 10) cycles
    $display("chain of 30 short tasks: %0d cycles, %0d.%0d cycles per task",
             chain_last - chain_first, (chain_last - chain_first) / 30,
             ((chain_last - chain_first) % 30) * 10 / 30);
    check(chain_first >= 0 && chain_last > chain_first &&
          chain_last - chain_first <= 30 * (1 + SYNC_CYCLES),
          "30-task chain within the synchronisation bound");
    $display("sync latency %0d..%0d cycles; double_buf=%0d auto_switch=%0d dep_stall=%0d res_stall=%0d ooo=%0d parallel=%0d bridge=%0d empty=%0d bus_wait=%0d risc_resp=%0d",
             min_sync_lat, max_sync_lat, n_double_buf, n_auto_switch, n_dep_stall,
             n_res_stall, n_ooo, n_parallel, n_bridge, n_empty, n_bus_wait, n_risc_resp);
    check(n_double_buf  > 0, "list uploaded into the shadow buffer while one runs");
    check(n_auto_switch > 0, "shadow list activated automatically");
    check(n_dep_stall   > 0, "dependency stall");
    check(n_res_stall   > 0, "resource stall");
    check(n_ooo         > 0, "out-of-order start");
    check(n_parallel    > 0, "parallel PEs");
    check(n_bridge      > 0, "bridging task");
    check(n_empty       > 0, "empty entry");
    check(n_bus_wait    > 0, "bus wait");
    check(n_risc_resp   > 0, "RISC response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
