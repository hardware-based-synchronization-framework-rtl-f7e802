// drs_exec_ctrl: execution controller of the DRS task controller.
//
// Analyses the conflicts of all entries of the execute list in parallel and
// starts one task at a time on its PE, allowing out-of-order execution.
// An entry i is ready when
//   - it is waiting for execution,
//   - every dependency bit k-1 it has set points at an entry i-k that has
//     finished (a bit pointing in front of the list start counts as met,
//     because the previous list has finished completely before this one
//     was activated), and
//   - its PE (one-hot code) is idle.
// Entries without a PE (the empty last entry and bridging tasks) are retired
// directly through nop_fin once their dependencies are met; they never use
// the bus. The parallel analysis, the dependency window, the one-hot PE code
// and bridging tasks follow the document; selecting the lowest ready list
// position and the four-step control sequence are this design's choices.
//
// Sequence (one task start takes four cycles when a task is ready):
//   ANALYZE  the ready vector of all entries is registered;
//   SELECT   lowest ready entry is chosen, start is pulsed to the register
//            file (entry -> running, PE -> busy), or back to ANALYZE;
//   READ     its address/configuration word is read from the SRAM;
//   ISSUE    tx_valid with PE index and word until the bus interface takes it
//            (tx_ready), then back to ANALYZE.
// The ready vector can only be stale in the safe direction: between ANALYZE
// and SELECT nothing but this controller turns an entry or a PE busy.
module drs_exec_ctrl
  import drs_pkg::*;
#(
  parameter int unsigned LIST_LEN  = 32,
  parameter int unsigned DEP_DEPTH = 31,
  parameter int unsigned NUM_PE    = 4,
  parameter int unsigned CFG_W     = 128,
  localparam int unsigned IW       = $clog2(LIST_LEN),
  localparam int unsigned PW       = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 exec_valid,
  input  logic [NUM_PE-1:0]    exec_pe  [LIST_LEN],
  input  logic [DEP_DEPTH-1:0] exec_dep [LIST_LEN],
  input  task_state_e          state    [LIST_LEN],
  input  logic [NUM_PE-1:0]    pe_busy,
  // to the register file
  output logic                 start,
  output logic [IW-1:0]        start_idx,
  output logic [PW-1:0]        start_pe,
  output logic [LIST_LEN-1:0]  nop_fin,
  // task configuration memory
  output logic                 cfg_re,
  output logic [IW-1:0]        cfg_ridx,
  input  logic [CFG_W-1:0]     cfg_rdata,
  // task transfer to the bus interface
  output logic                 tx_valid,
  output logic [PW-1:0]        tx_pe,
  output logic [CFG_W-1:0]     tx_data,
  input  logic                 tx_ready
);

  typedef enum logic [1:0] {S_ANALYZE, S_SELECT, S_READ, S_ISSUE} ex_state_e;

  ex_state_e           st;
  logic [LIST_LEN-1:0] dep_ok, ready, ready_q;
  logic [IW-1:0]       sel_idx, cur_idx;
  logic [PW-1:0]       sel_pe, cur_pe;

  // Parallel conflict analysis of all entries.
  always_comb begin
    for (int i = 0; i < LIST_LEN; i++) begin
      dep_ok[i] = 1'b1;
      for (int k = 1; k <= DEP_DEPTH; k++)
        if (exec_dep[i][k-1] && (i - k >= 0))
          if (state[(i - k >= 0) ? (i - k) : 0] != TS_DONE) dep_ok[i] = 1'b0;
      ready[i]   = exec_valid && (state[i] == TS_WAIT) && dep_ok[i] &&
                   (exec_pe[i] != '0) && ((exec_pe[i] & pe_busy) == '0);
      nop_fin[i] = exec_valid && (state[i] == TS_WAIT) && dep_ok[i] &&
                   (exec_pe[i] == '0);
    end
  end

  // Lowest ready list position and its PE index.
  always_comb begin
    sel_idx = '0;
    for (int i = LIST_LEN - 1; i >= 0; i--)
      if (ready_q[i]) sel_idx = IW'(i);
    sel_pe = '0;
    for (int p = NUM_PE - 1; p >= 0; p--)
      if (exec_pe[sel_idx][p]) sel_pe = PW'(p);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_ANALYZE;
      ready_q <= '0;
      cur_idx <= '0;
      cur_pe  <= '0;
    end else begin
      unique case (st)
        S_ANALYZE: begin
          ready_q <= ready;
          st      <= S_SELECT;
        end
        S_SELECT: begin
          if (ready_q != '0 && exec_valid) begin
            cur_idx <= sel_idx;
            cur_pe  <= sel_pe;
            st      <= S_READ;
          end else begin
            st      <= S_ANALYZE;
          end
        end
        S_READ:  st <= S_ISSUE;
        S_ISSUE: if (tx_ready) st <= S_ANALYZE;
        default: st <= S_ANALYZE;
      endcase
    end
  end

  assign start     = (st == S_SELECT) && (ready_q != '0) && exec_valid;
  assign start_idx = sel_idx;
  assign start_pe  = sel_pe;
  assign cfg_re    = (st == S_READ);
  assign cfg_ridx  = cur_idx;
  assign tx_valid  = (st == S_ISSUE);
  assign tx_pe     = cur_pe;
  assign tx_data   = cfg_rdata;

endmodule
