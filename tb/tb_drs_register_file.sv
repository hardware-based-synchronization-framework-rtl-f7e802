// tb_drs_register_file: checks the scheduler's status registers against a
// reference model kept in the testbench. Random legal event streams (list
// activation, task starts on idle PEs, PE finishes, finishes of tasks
// without a PE, list completion, response configuration and acknowledge) are
// applied; every cycle the task states, PE busy bits, response enable, RISC
// response flag and list counter are compared with the model.
module tb_drs_register_file;
  import drs_pkg::*;
  localparam int L = 8, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          act, start, list_done, cfg_we, cfg_resp_en, resp_ack;
  logic [3:0]    act_len;
  logic [2:0]    start_idx;
  logic [1:0]    start_pe;
  logic [L-1:0]  nop_fin;
  logic [P-1:0]  pe_fin, pe_busy;
  task_state_e   state [L];
  logic          resp_en, risc_resp;
  logic [31:0]   lists_done;

  drs_register_file #(.LIST_LEN(L), .NUM_PE(P)) dut (.*);

  int checks = 0, failures = 0;
  task_state_e m_state [L];
  bit          m_busy [P];
  int          m_task [P];
  bit          m_en, m_resp;
  int          m_lists;

  initial begin
    act = 0; start = 0; list_done = 0; cfg_we = 0; cfg_resp_en = 0; resp_ack = 0;
    act_len = 0; start_idx = 0; start_pe = 0; nop_fin = 0; pe_fin = 0;
    for (int i = 0; i < L; i++) m_state[i] = TS_NONE;
    for (int p = 0; p < P; p++) begin m_busy[p] = 0; m_task[p] = 0; end
    m_en = 0; m_resp = 0; m_lists = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // compare
      checks++;
      begin
        bit ok;
        ok = (resp_en == m_en) && (risc_resp == m_resp) && (lists_done == 32'(m_lists));
        for (int i = 0; i < L; i++) ok &= (state[i] == m_state[i]);
        for (int p = 0; p < P; p++) ok &= (pe_busy[p] == m_busy[p]);
        if (!ok) begin
          failures++;
          $display("FAIL cycle %0d: register file differs from the model", n);
        end
      end
      // new random legal inputs
      act = 0; start = 0; list_done = 0; cfg_we = 0; resp_ack = 0; nop_fin = 0; pe_fin = 0;
      if ($urandom_range(40) == 0) begin
        act = 1; act_len = 4'($urandom_range(L));
      end else begin
        // start a waiting entry on an idle PE
        if ($urandom_range(1) == 0) begin
          int i, p;
          i = $urandom_range(L - 1); p = $urandom_range(P - 1);
          if (m_state[i] == TS_WAIT && !m_busy[p]) begin
            start = 1; start_idx = 3'(i); start_pe = 2'(p);
          end
        end
        for (int i = 0; i < L; i++)
          if (m_state[i] == TS_WAIT && !(start && start_idx == 3'(i)) && $urandom_range(7) == 0)
            nop_fin[i] = 1;
        for (int p = 0; p < P; p++)
          if ($urandom_range(3) == 0) pe_fin[p] = 1;   // also on idle PEs: must be ignored
        if ($urandom_range(15) == 0) list_done = 1;
        if ($urandom_range(15) == 0) begin cfg_we = 1; cfg_resp_en = 1'($urandom); end
        if ($urandom_range(7) == 0) resp_ack = 1;
      end
      // model update
      if (act) begin
        for (int i = 0; i < L; i++) m_state[i] = (i < int'(act_len)) ? TS_WAIT : TS_NONE;
        for (int p = 0; p < P; p++) m_busy[p] = 0;
      end else begin
        for (int i = 0; i < L; i++) if (nop_fin[i]) m_state[i] = TS_DONE;
        for (int p = 0; p < P; p++)
          if (pe_fin[p] && m_busy[p]) begin m_state[m_task[p]] = TS_DONE; m_busy[p] = 0; end
        if (start) begin
          m_state[start_idx] = TS_RUN; m_busy[start_pe] = 1; m_task[start_pe] = int'(start_idx);
        end
      end
      if (list_done) begin m_lists++; if (m_en) m_resp = 1; end
      else if (resp_ack) m_resp = 0;
      if (cfg_we) m_en = cfg_resp_en;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
