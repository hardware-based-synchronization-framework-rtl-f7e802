// tb_drs_exec_ctrl: checks the execution controller on its own. The
// testbench keeps the task states and PE busy bits itself (as the register
// file would), holds the configuration words, finishes running tasks after
// random times and grants the transfer port randomly. For random lists with
// random one-hot PEs, empty entries and dependency bits it checks:
//   - every start is of a waiting entry whose dependencies have finished and
//     whose PE is idle, and no lower entry was ready both then and in the
//     cycle before (lowest-position selection);
//   - the transfer that follows names that entry's PE and carries its word,
//     and tx_valid rises two cycles after the start;
//   - nop_fin flags exactly the waiting PE-less entries whose dependencies
//     have finished;
//   - every list runs to completion.
module tb_drs_exec_ctrl;
  import drs_pkg::*;
  localparam int L = 8, D = 3, P = 4, W = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          exec_valid, start, cfg_re, tx_valid, tx_ready;
  logic [P-1:0]  exec_pe  [L];
  logic [D-1:0]  exec_dep [L];
  task_state_e   state    [L];
  logic [P-1:0]  pe_busy;
  logic [2:0]    start_idx, cfg_ridx;
  logic [1:0]    start_pe, tx_pe;
  logic [L-1:0]  nop_fin;
  logic [W-1:0]  cfg_rdata, tx_data;

  drs_exec_ctrl #(.LIST_LEN(L), .DEP_DEPTH(D), .NUM_PE(P), .CFG_W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  logic [W-1:0] cfg_mem [L];
  int           pe_rem [P];
  int           pe_ent [P];
  logic [L-1:0] ready_prev;
  logic         s_start;
  logic [2:0]   s_idx;
  logic [1:0]   s_pe;
  logic [L-1:0] s_nop;
  int           pend_idx = -1, pend_age = 0, n_starts = 0, n_nops = 0;

  function automatic bit deps_done(int i);
    for (int k = 1; k <= D; k++)
      if (exec_dep[i][k-1] && i - k >= 0 && state[i-k] != TS_DONE) return 0;
    return 1;
  endfunction
  function automatic logic [L-1:0] ready_now();
    logic [L-1:0] r;
    for (int i = 0; i < L; i++)
      r[i] = exec_valid && state[i] == TS_WAIT && exec_pe[i] != 0 && deps_done(i) &&
             (exec_pe[i] & pe_busy) == 0;
    return r;
  endfunction

  // configuration memory with one cycle read latency
  always @(posedge clk) if (cfg_re) cfg_rdata <= cfg_mem[cfg_ridx];

  initial begin
    exec_valid = 0; pe_busy = 0; tx_ready = 0; ready_prev = 0;
    for (int i = 0; i < L; i++) begin state[i] = TS_NONE; exec_pe[i] = 0; exec_dep[i] = 0; end
    for (int p = 0; p < P; p++) begin pe_rem[p] = 0; pe_ent[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 40; l++) begin
      int guard;
      // new list
      for (int i = 0; i < L; i++) begin
        exec_pe[i]  = ($urandom_range(5) == 0) ? '0 : P'(1 << $urandom_range(P - 1));
        exec_dep[i] = D'($urandom);
        cfg_mem[i]  = {$urandom, $urandom, $urandom, $urandom};
        state[i]    = TS_WAIT;
      end
      exec_valid = 1;
      guard = 0;
      while (guard < 2000) begin
        bit all;
        @(negedge clk);
        // sample outputs of this cycle
        begin
          logic [L-1:0] rn;
          logic [L-1:0] exp_nop;
          rn = ready_now();
          for (int i = 0; i < L; i++)
            exp_nop[i] = state[i] == TS_WAIT && exec_pe[i] == 0 && deps_done(i);
          check(nop_fin == exp_nop, "nop_fin flags the finished PE-less entries");
          if (start) begin
            int i;
            i = int'(start_idx);
            check(rn[i], $sformatf("started entry %0d is ready (rn=%b st=%0d pe=%b busy=%b dep=%b)", i, rn, state[i], exec_pe[i], pe_busy, exec_dep[i]));
            check(exec_pe[i][start_pe], "start PE matches the one-hot code");
            for (int j = 0; j < i; j++)
              check(!(rn[j] && ready_prev[j]), $sformatf("entry %0d skipped for %0d", j, i));
            check(pend_idx < 0, "one task in flight at a time");
            pend_idx = i; pend_age = 0;
            n_starts++;
          end
          if (pend_idx >= 0) pend_age++;
          if (tx_valid) begin
            check(pend_idx >= 0 && tx_data == cfg_mem[pend_idx] &&
                  exec_pe[pend_idx][tx_pe], "transfer carries the started task");
            if (pend_age < 3) check(0, "tx_valid too early");
          end
          if (pend_idx >= 0 && pend_age == 3) check(tx_valid, "tx_valid two cycles after start");
          if (tx_valid && tx_ready) pend_idx = -1;
          ready_prev = rn;
          s_start = start; s_idx = start_idx; s_pe = start_pe; s_nop = nop_fin;
        end
        // register file model: apply this edge's updates just after it
        @(posedge clk);
        #1;
        for (int i = 0; i < L; i++) if (s_nop[i]) begin state[i] = TS_DONE; n_nops++; end
        for (int p = 0; p < P; p++)
          if (pe_busy[p]) begin
            if (pe_rem[p] <= 1) begin pe_busy[p] = 0; state[pe_ent[p]] = TS_DONE; end
            else pe_rem[p]--;
          end
        if (s_start) begin
          state[s_idx] = TS_RUN; pe_busy[s_pe] = 1;
          pe_ent[s_pe] = int'(s_idx); pe_rem[s_pe] = 1 + $urandom_range(6);
        end
        tx_ready = ($urandom_range(2) != 0);
        all = 1;
        for (int i = 0; i < L; i++) all &= (state[i] == TS_DONE);
        if (all && pend_idx < 0) break;
        guard++;
      end
      check(guard < 2000, $sformatf("list %0d completed", l));
      exec_valid = 0;
      @(posedge clk);
    end
    check(n_starts > 100 && n_nops > 10, "tasks and empty entries were retired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
