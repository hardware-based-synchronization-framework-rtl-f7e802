// tb_drs_bus_if: checks the scheduler's bus interface. Slave writes to every
// region are checked for the decoded strobes, index and fields (and that
// out-of-range and unmapped writes raise nothing); slave reads of the
// response configuration, status and task state registers are checked one
// cycle later against the driven inputs; master transfers are checked for
// the PE address, data, request and handshake.
module tb_drs_bus_if;
  import drs_pkg::*;
  localparam int L = 8, D = 5, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              s_we, s_re, s_rvalid, m_req, m_gnt;
  logic [15:0]       s_addr;
  logic [127:0]      s_wdata, s_rdata, m_wdata, wr_cfg_data, tx_data;
  logic [31:0]       m_addr, lists_done;
  logic              wr_desc, wr_cfg, commit, cfg_we, cfg_resp_en, resp_ack;
  logic [2:0]        wr_idx;
  logic [P-1:0]      wr_pe, pe_busy;
  logic [D-1:0]      wr_dep;
  logic [3:0]        commit_len;
  logic              resp_en, risc_resp, exec_valid, shadow_full, tx_valid, tx_ready;
  task_state_e       state [L];
  logic [1:0]        tx_pe;

  drs_bus_if #(.LIST_LEN(L), .DEP_DEPTH(D), .NUM_PE(P),
               .PE_BASE(32'h4000_0000), .PE_STRIDE(32'h0000_1000)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    s_we = 0; s_re = 0; s_addr = 0; s_wdata = 0; m_gnt = 0; tx_valid = 0; tx_pe = 0; tx_data = 0;
    resp_en = 0; risc_resp = 0; lists_done = 0; exec_valid = 0; shadow_full = 0; pe_busy = 0;
    for (int i = 0; i < L; i++) state[i] = TS_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // writes
    for (int n = 0; n < 400; n++) begin
      logic [3:0] rgn;
      logic [11:0] off;
      rgn = 4'($urandom_range(4));
      off = ($urandom_range(1) == 0) ? 12'($urandom_range(L + 1)) : 12'($urandom_range(3));
      @(negedge clk);
      s_we = 1; s_addr = {rgn, off}; s_wdata = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(wr_desc == (rgn == 0 && off < L), "descriptor write strobe");
      check(wr_cfg  == (rgn == 1 && off < L), "config write strobe");
      check(commit  == (rgn == 2 && off == 0), "commit strobe");
      check(cfg_we  == (rgn == 2 && off == 1), "response configuration strobe");
      check(resp_ack == (rgn == 2 && off == 2), "acknowledge strobe");
      if (off < L) check(wr_idx == off[2:0], "entry index");
      check(wr_pe == s_wdata[P-1:0] && wr_dep == s_wdata[64 +: D] && wr_cfg_data == s_wdata,
            "descriptor and config fields");
      check(commit_len == s_wdata[3:0] && cfg_resp_en == s_wdata[0], "control fields");
      @(negedge clk);
      s_we = 0;
      #1;
      check(!wr_desc && !wr_cfg && !commit && !cfg_we && !resp_ack, "no strobe without a write");
    end
    // reads
    for (int n = 0; n < 300; n++) begin
      logic [15:0] a;
      logic [127:0] e;
      resp_en = 1'($urandom); risc_resp = 1'($urandom); lists_done = $urandom;
      exec_valid = 1'($urandom); shadow_full = 1'($urandom); pe_busy = P'($urandom);
      for (int i = 0; i < L; i++) state[i] = task_state_e'($urandom_range(3));
      case ($urandom_range(3))
        0: a = {RGN_CTRL, REG_RESP_CFG};
        1: a = {RGN_CTRL, REG_STATUS};
        2: a = {RGN_TSTA, 12'($urandom_range(L - 1))};
        default: a = {RGN_DESC, 12'($urandom_range(L - 1))};
      endcase
      e = '0;
      if (a == {RGN_CTRL, REG_RESP_CFG}) e[0] = resp_en;
      else if (a == {RGN_CTRL, REG_STATUS}) begin
        e[0] = exec_valid; e[1] = shadow_full; e[2] = risc_resp;
        e[16 +: P] = pe_busy; e[63:32] = lists_done;
      end else if (a[15:12] == RGN_TSTA) e[1:0] = state[a[2:0]];
      @(negedge clk);
      s_re = 1; s_addr = a;
      @(negedge clk);
      s_re = 0;
      check(s_rvalid, "read valid after one cycle");
      check(s_rdata == e, $sformatf("read of %h: %h expected %h", a, s_rdata, e));
      @(negedge clk);
      check(!s_rvalid, "read valid for one cycle");
    end
    // master transfers
    for (int n = 0; n < 200; n++) begin
      int waits;
      @(negedge clk);
      tx_valid = 1; tx_pe = 2'($urandom_range(P - 1)); tx_data = {$urandom, $urandom, $urandom, $urandom};
      waits = $urandom_range(3);
      for (int w = 0; w <= waits; w++) begin
        m_gnt = (w == waits);
        #1;
        check(m_req && m_addr == 32'h4000_0000 + 32'h1000 * tx_pe && m_wdata == tx_data,
              "master request, PE address and data");
        check(tx_ready == m_gnt, "transfer completes with the grant");
        if (w != waits) @(negedge clk);
      end
      @(negedge clk);
      tx_valid = 0; m_gnt = 0;
      #1;
      check(!m_req, "no request without a task");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
