// tb_drs_resp_ctrl: checks the response controller. Random PE response and
// busy vectors: pe_fin must equal the previous cycle's responses of busy PEs.
// Random task status vectors: list_done must be high exactly when a list is
// active and no entry is waiting or running.
module tb_drs_resp_ctrl;
  import drs_pkg::*;
  localparam int L = 8, P = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0] pe_resp, pe_busy, pe_fin, exp_fin;
  logic         exec_valid, list_done;
  task_state_e  state [L];

  drs_resp_ctrl #(.LIST_LEN(L), .NUM_PE(P)) dut (.*);

  int checks = 0, failures = 0, n_done = 0;

  initial begin
    pe_resp = 0; pe_busy = 0; exec_valid = 0; exp_fin = 0;
    for (int i = 0; i < L; i++) state[i] = TS_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      bit busy_entry;
      pe_resp = 4'($urandom); pe_busy = 4'($urandom);
      exec_valid = ($urandom_range(7) != 0);
      for (int i = 0; i < L; i++)
        state[i] = ($urandom_range(5) == 0) ? task_state_e'($urandom_range(3))
                 : (($urandom_range(1) == 0) ? TS_DONE : TS_NONE);
      #1;
      busy_entry = 0;
      for (int i = 0; i < L; i++) busy_entry |= (state[i] == TS_WAIT || state[i] == TS_RUN);
      checks++;
      if (list_done !== (exec_valid && !busy_entry)) begin
        failures++; $display("FAIL list_done at cycle %0d", n);
      end
      n_done += list_done;
      @(posedge clk);
      exp_fin = pe_resp & pe_busy;
      @(negedge clk);
      checks++;
      if (pe_fin !== exp_fin) begin
        failures++; $display("FAIL pe_fin %b expected %b", pe_fin, exp_fin);
      end
    end
    checks++;
    if (n_done == 0) begin failures++; $display("FAIL list_done never seen"); end
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
