// drs_register_file: status registers of the DRS.
//
// Holds everything the scheduler needs while a task list is processed, in the
// three groups of the scheduler's block diagram:
//   Task Status - one state per execute-list entry (no task, waiting,
//                 running, finished);
//   Resources   - the idle/running state of every PE, plus which entry runs
//                 on it so that a PE response can be mapped back to its task;
//   Responses   - the response configuration (bit 0: RISC response enabled)
//                 and the RISC response flag raised when a list completes.
// The groups follow the document; the encodings, the entry index kept per PE,
// the list counter and the flag's clear-by-acknowledge are this design's.
//
// Update sources, all applied at the same clock edge:
//   act/act_len  a new list is activated: entries below act_len -> waiting,
//                the rest -> no task;
//   start        the execution controller starts entry start_idx on PE
//                start_pe: entry -> running, PE -> busy;
//   nop_fin      entries without a PE (empty or bridging tasks) -> finished;
//   pe_fin       bit p: the task on PE p finished: its entry -> finished,
//                PE -> idle;
//   list_done    raises the RISC response flag if enabled, counts the list.
module drs_register_file
  import drs_pkg::*;
#(
  parameter int unsigned LIST_LEN = 32,
  parameter int unsigned NUM_PE   = 4,
  localparam int unsigned IW      = $clog2(LIST_LEN),
  localparam int unsigned LW      = $clog2(LIST_LEN + 1),
  localparam int unsigned PW      = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              act,
  input  logic [LW-1:0]     act_len,
  input  logic              start,
  input  logic [IW-1:0]     start_idx,
  input  logic [PW-1:0]     start_pe,
  input  logic [LIST_LEN-1:0] nop_fin,
  input  logic [NUM_PE-1:0] pe_fin,
  input  logic              list_done,
  input  logic              cfg_we,
  input  logic              cfg_resp_en,
  input  logic              resp_ack,
  output task_state_e       state [LIST_LEN],
  output logic [NUM_PE-1:0] pe_busy,
  output logic              resp_en,
  output logic              risc_resp,
  output logic [31:0]       lists_done
);

  logic [IW-1:0] pe_task [NUM_PE];  // entry running on each PE

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '{default: TS_NONE};
      pe_busy <= '0;
      pe_task <= '{default: '0};
    end else if (act) begin
      for (int i = 0; i < LIST_LEN; i++)
        state[i] <= (LW'(i) < act_len) ? TS_WAIT : TS_NONE;
      pe_busy <= '0;
    end else begin
      for (int i = 0; i < LIST_LEN; i++)
        if (nop_fin[i]) state[i] <= TS_DONE;
      for (int p = 0; p < NUM_PE; p++)
        if (pe_fin[p] && pe_busy[p]) begin
          state[pe_task[p]] <= TS_DONE;
          pe_busy[p]        <= 1'b0;
        end
      if (start) begin
        state[start_idx]   <= TS_RUN;
        pe_busy[start_pe]  <= 1'b1;
        pe_task[start_pe]  <= start_idx;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_en    <= 1'b0;
      risc_resp  <= 1'b0;
      lists_done <= '0;
    end else begin
      if (cfg_we) resp_en <= cfg_resp_en;
      if (list_done) begin
        lists_done <= lists_done + 32'd1;
        if (resp_en) risc_resp <= 1'b1;
      end else if (resp_ack) begin
        risc_resp <= 1'b0;
      end
    end
  end

endmodule
