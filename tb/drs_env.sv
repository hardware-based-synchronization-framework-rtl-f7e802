// drs_env: reusable test harness around one scheduler of a given size.
//
// Holds a drs instance with the given LIST_LEN, DEP_DEPTH and NUM_PE, a host
// that uploads NL random task lists (random one-hot PEs, entries without PE,
// dependency bits over the whole window) through the slave port with double
// buffering, a bus that grants after random waits, and behavioural PEs that
// run for the cycle count in bits [15:0] of the configuration word and pulse
// their response. A scoreboard checks every start write (PE, word, order of
// lists, single start, dependencies finished, PE idle) and, at the end, that
// all tasks ran and the status register counts all lists. done rises when
// the run is over; checks and failures hold the counts.
module drs_env #(
  parameter int LIST_LEN  = 16,
  parameter int DEP_DEPTH = 15,
  parameter int NUM_PE    = 4,
  parameter int NL        = 6
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import drs_pkg::*;
  localparam logic [31:0] PE_BASE   = 32'h1000_0000;
  localparam logic [31:0] PE_STRIDE = 32'h0100_0000;

  logic              rst_n = 1'b0;
  logic              s_we, s_re, s_rvalid, m_req, m_gnt, risc_resp;
  logic [15:0]       s_addr;
  logic [127:0]      s_wdata, s_rdata, m_wdata;
  logic [31:0]       m_addr;
  logic [NUM_PE-1:0] pe_resp;

  drs #(.LIST_LEN(LIST_LEN), .DEP_DEPTH(DEP_DEPTH), .NUM_PE(NUM_PE)) dut (
    .clk, .rst_n, .s_we, .s_re, .s_addr, .s_wdata, .s_rdata, .s_rvalid,
    .m_req, .m_addr, .m_wdata, .m_gnt, .pe_resp, .risc_resp
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [list size %0d] t=%0t: %s", LIST_LEN, $time, what);
    end
  endtask

  int                   l_len [NL];
  int                   l_pe  [NL][LIST_LEN];
  logic [DEP_DEPTH-1:0] l_dep [NL][LIST_LEN];
  logic [127:0]         l_cfg [NL][LIST_LEN];
  bit                   started [NL][LIST_LEN];
  bit                   fin     [NL][LIST_LEN];
  bit                   eff     [NL][LIST_LEN];
  int                   cur_list = 0;
  int                   n_ooo = 0, n_parallel = 0;

  // eff[l][j]: entry j counts as finished; computed in list order because
  // dependencies only point upwards.
  function automatic bit deps_met(int l, int i);
    for (int k = 1; k <= DEP_DEPTH; k++)
      if (l_dep[l][i][k-1] && i - k >= 0 && !eff[l][i-k]) return 1'b0;
    return 1'b1;
  endfunction
  function automatic void update_eff(int l);
    for (int j = 0; j < LIST_LEN; j++)
      eff[l][j] = (l_pe[l][j] >= 0) ? fin[l][j] : deps_met(l, j);
  endfunction
  function automatic bit list_fin(int l);
    for (int i = 0; i < l_len[l]; i++) if (!eff[l][i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    for (int l = 0; l < NL; l++) begin
      l_len[l] = (l % 2 == 0) ? LIST_LEN : 1 + int'($urandom_range(LIST_LEN - 1));
      for (int i = 0; i < LIST_LEN; i++) begin
        started[l][i] = 0; fin[l][i] = 0; eff[l][i] = 0;
        l_pe[l][i]  = ($urandom_range(9) == 0) ? -1 : int'($urandom_range(NUM_PE - 1));
        for (int k = 1; k <= DEP_DEPTH; k++)
          l_dep[l][i][k-1] = ($urandom_range(999) < ((k <= 3) ? 250 : 1200 / DEP_DEPTH));
        l_cfg[l][i] = {$urandom, $urandom, $urandom, $urandom};
        l_cfg[l][i][127:112] = 16'(l);
        l_cfg[l][i][111:96]  = 16'(i);
        l_cfg[l][i][15:0]    = 16'(1 + $urandom_range(20));
      end
    end
  end

  always @(negedge clk) m_gnt <= ($urandom_range(3) != 0);

  int pe_rem [NUM_PE];
  int pe_list [NUM_PE];
  int pe_entry [NUM_PE];
  bit pe_on [NUM_PE];
  initial begin
    for (int p = 0; p < NUM_PE; p++) begin pe_rem[p] = 0; pe_on[p] = 0; pe_list[p] = 0; pe_entry[p] = 0; end
    pe_resp = '0;
  end

  always @(posedge clk) begin
    int p, l, e, busy;
    logic [NUM_PE-1:0] resp_n;
    resp_n = '0;
    for (int q = 0; q < NUM_PE; q++)
      if (pe_on[q]) begin
        if (pe_rem[q] <= 1) begin
          pe_on[q] = 0; fin[pe_list[q]][pe_entry[q]] = 1; resp_n[q] = 1'b1;
          update_eff(pe_list[q]);
        end else pe_rem[q]--;
      end
    if (rst_n && m_req && m_gnt) begin
      p = int'((m_addr - PE_BASE) / PE_STRIDE);
      l = int'(m_wdata[127:112]);
      e = int'(m_wdata[111:96]);
      check(p < NUM_PE && l == cur_list, "start write of the current list to a PE");
      if (l < NL && e < LIST_LEN) begin
        check(e < l_len[l] && l_pe[l][e] == p && m_wdata == l_cfg[l][e], "task sent to its PE with its word");
        check(!started[l][e], "task started once");
        check(deps_met(l, e), "dependencies finished before the start");
        check(!pe_on[p] && !resp_n[p], "PE idle at the start");
        for (int j = 0; j < e; j++)
          if (l_pe[l][j] >= 0 && !started[l][j]) begin n_ooo++; break; end
        started[l][e] = 1;
        pe_on[p] = 1; pe_list[p] = l; pe_entry[p] = e; pe_rem[p] = int'(m_wdata[15:0]);
      end
    end
    pe_resp <= resp_n;
    busy = 0;
    for (int q = 0; q < NUM_PE; q++) busy += pe_on[q];
    if (busy >= 2) n_parallel++;
    if (cur_list < NL) update_eff(cur_list);
    while (cur_list < NL && list_fin(cur_list)) begin
      cur_list++;
      if (cur_list < NL) update_eff(cur_list);
    end
  end

  task automatic bus_write(input logic [15:0] a, input logic [127:0] d);
    @(negedge clk); s_we = 1'b1; s_addr = a; s_wdata = d;
    @(negedge clk); s_we = 1'b0;
  endtask
  task automatic bus_read(input logic [15:0] a, output logic [127:0] d);
    @(negedge clk); s_re = 1'b1; s_addr = a;
    @(negedge clk); s_re = 1'b0; d = s_rdata;
  endtask

  initial begin
    logic [127:0] st, d;
    s_we = 0; s_re = 0; s_addr = '0; s_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < NL; l++) begin
      do bus_read({RGN_CTRL, REG_STATUS}, st); while (st[1]);
      for (int i = 0; i < l_len[l]; i++) begin
        d = '0;
        if (l_pe[l][i] >= 0) d[l_pe[l][i]] = 1'b1;
        d[DESC_DEP_LSB +: DEP_DEPTH] = l_dep[l][i];
        bus_write({RGN_DESC, 12'(i)}, d);
        bus_write({RGN_CFG, 12'(i)}, l_cfg[l][i]);
      end
      bus_write({RGN_CTRL, REG_COMMIT}, 128'(l_len[l]));
    end
    do begin
      repeat (10) @(posedge clk);
      bus_read({RGN_CTRL, REG_STATUS}, st);
    end while (st[63:32] != 32'(NL));
    check(cur_list == NL, "scoreboard saw every list finish");
    for (int l = 0; l < NL; l++)
      for (int i = 0; i < l_len[l]; i++)
        check(l_pe[l][i] < 0 || (started[l][i] && fin[l][i]), "every task ran");
    check(n_ooo > 0 && n_parallel > 0, "out-of-order starts and parallel PEs occurred");
    $display("list size %0d, dependency depth %0d: %0d lists, ooo=%0d parallel=%0d",
             LIST_LEN, DEP_DEPTH, NL, n_ooo, n_parallel);
    done = 1;
  end
endmodule
