// tb_drs_task_list: checks the double-buffered task list storage.
// Uploads a list into the shadow buffer, commits it and checks that it is
// activated with its length, descriptors and configuration words; uploads a
// second list while the first executes, checks that the execute outputs do
// not change, that uploads after the commit are ignored, and that the second
// list is activated automatically in the cycle after list_done.
module tb_drs_task_list;
  localparam int L = 8, D = 7, P = 4, W = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          wr_desc, wr_cfg, commit, shadow_full, list_done, exec_valid, act, cfg_re;
  logic [2:0]    wr_idx, cfg_ridx;
  logic [P-1:0]  wr_pe;
  logic [D-1:0]  wr_dep;
  logic [W-1:0]  wr_cfg_data, cfg_rdata;
  logic [3:0]    commit_len, act_len;
  logic [P-1:0]  exec_pe  [L];
  logic [D-1:0]  exec_dep [L];

  drs_task_list #(.LIST_LEN(L), .DEP_DEPTH(D), .NUM_PE(P), .CFG_W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  logic [P-1:0] m_pe  [2][L];
  logic [D-1:0] m_dep [2][L];
  logic [W-1:0] m_cfg [2][L];

  task automatic upload(input int b, input int n);
    for (int i = 0; i < n; i++) begin
      m_pe[b][i]  = P'(1 << $urandom_range(P - 1));
      m_dep[b][i] = D'($urandom);
      m_cfg[b][i] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      wr_desc = 1; wr_idx = 3'(i); wr_pe = m_pe[b][i]; wr_dep = m_dep[b][i];
      @(negedge clk);
      wr_desc = 0; wr_cfg = 1; wr_cfg_data = m_cfg[b][i];
      @(negedge clk);
      wr_cfg = 0;
    end
    @(negedge clk);
    commit = 1; commit_len = 4'(n);
    @(negedge clk);
    commit = 0;
  endtask

  task automatic check_exec(input int b, input int n);
    for (int i = 0; i < n; i++) begin
      check(exec_pe[i] == m_pe[b][i] && exec_dep[i] == m_dep[b][i],
            $sformatf("descriptor %0d of list %0d", i, b));
      @(negedge clk);
      cfg_re = 1; cfg_ridx = 3'(i);
      @(negedge clk);
      cfg_re = 0;
      check(cfg_rdata == m_cfg[b][i], $sformatf("config word %0d of list %0d", i, b));
    end
  endtask

  initial begin
    wr_desc = 0; wr_cfg = 0; commit = 0; list_done = 0; cfg_re = 0;
    wr_idx = 0; cfg_ridx = 0; wr_pe = 0; wr_dep = 0; wr_cfg_data = 0; commit_len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!exec_valid && !shadow_full, "idle after reset");
    // first list, 5 entries: commit makes it active one cycle later
    upload(0, 5);
    check(act && act_len == 4'd5, "activation pulse once committed");
    @(negedge clk);
    check(exec_valid && !shadow_full, "first list activated after commit");
    check_exec(0, 5);
    // second list into the shadow buffer while the first executes
    upload(1, 8);
    check(shadow_full && exec_valid, "second list waits in the shadow buffer");
    check_exec(0, 5);
    // an upload to a full shadow buffer is ignored
    @(negedge clk);
    wr_desc = 1; wr_idx = 0; wr_pe = ~m_pe[1][0]; wr_dep = ~m_dep[1][0];
    @(negedge clk);
    wr_desc = 0;
    // finish the first list: the second is activated automatically
    list_done = 1;
    @(negedge clk);
    list_done = 0;
    check(!exec_valid && act && act_len == 4'd8, "activation pulse with the shadow length");
    @(negedge clk);
    check(exec_valid && !act && !shadow_full, "second list active");
    check_exec(1, 8);
    // finish it; nothing is left
    list_done = 1;
    @(negedge clk);
    list_done = 0;
    @(negedge clk);
    check(!exec_valid && !act, "idle when no list is loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
