// drs: Dynamic Resource Scheduler unit.
//
// The scheduler lets a RISC that sits behind a slow, high-latency link drive
// many short hardware tasks on a coprocessor. Instead of one round trip per
// task, the RISC uploads a whole task list; the scheduler starts every task on
// its processing element (PE) as soon as the PE is idle and the tasks it
// depends on have finished, and answers the RISC once, when the whole list is
// done. Task lists are double buffered: the next list is uploaded into a
// shadow buffer while the current one runs and starts by itself afterwards.
//
// Structure (after the scheduler's block diagram):
//   drs_bus_if        system bus slave (upload, registers) and master (tasks
//                     to PEs)
//   drs_task_list     shadow/execute task list; descriptors in registers,
//                     address/configuration words in drs_cfg_sram
//   drs_register_file task status, PE resources, response configuration
//   task controller   drs_exec_ctrl (parallel conflict analysis, task start)
//                     and drs_resp_ctrl (PE response scan, list completion)
//
// A task list entry holds a PE one-hot code (all zero for an empty or
// bridging task), DEP_DEPTH dependency bits (bit k-1: depends on the entry k
// positions above) and a 128-bit address/configuration word that is written
// to the PE to start the task. A PE reports the end of its task with a
// one-cycle pulse on pe_resp[p]; risc_resp is the RISC response flag.
//
// Timing: with a bus that grants at once, the dependent task's start write
// is accepted 7 clock cycles (8 if the execution controller has just passed
// its analysis step) after the PE response pulse of the task it waits for;
// the original description quotes 10 cycles for its implementation. Bus wait
// states add to this. Default sizes are the document's evaluated configuration: 32
// entries, dependencies on all preceding entries (31), four PEs.
module drs
  import drs_pkg::*;
#(
  parameter int unsigned       LIST_LEN  = 32,
  parameter int unsigned       DEP_DEPTH = 31,
  parameter int unsigned       NUM_PE    = 4,
  parameter logic [BUS_AW-1:0] PE_BASE   = 32'h1000_0000,
  parameter logic [BUS_AW-1:0] PE_STRIDE = 32'h0100_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // system bus slave port (task list upload, registers)
  input  logic              s_we,
  input  logic              s_re,
  input  logic [SLV_AW-1:0] s_addr,
  input  logic [BUS_DW-1:0] s_wdata,
  output logic [BUS_DW-1:0] s_rdata,
  output logic              s_rvalid,
  // system bus master port (task start writes to the PEs)
  output logic              m_req,
  output logic [BUS_AW-1:0] m_addr,
  output logic [BUS_DW-1:0] m_wdata,
  input  logic              m_gnt,
  // PE responses and RISC response
  input  logic [NUM_PE-1:0] pe_resp,
  output logic              risc_resp
);

  localparam int unsigned IW = $clog2(LIST_LEN);
  localparam int unsigned LW = $clog2(LIST_LEN + 1);
  localparam int unsigned PW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;

  // upload path
  logic                 wr_desc, wr_cfg, commit, shadow_full;
  logic [IW-1:0]        wr_idx;
  logic [NUM_PE-1:0]    wr_pe;
  logic [DEP_DEPTH-1:0] wr_dep;
  logic [BUS_DW-1:0]    wr_cfg_data;
  logic [LW-1:0]        commit_len;
  // execute list
  logic                 exec_valid, act, list_done;
  logic [LW-1:0]        act_len;
  logic [NUM_PE-1:0]    exec_pe  [LIST_LEN];
  logic [DEP_DEPTH-1:0] exec_dep [LIST_LEN];
  logic                 cfg_re;
  logic [IW-1:0]        cfg_ridx;
  logic [BUS_DW-1:0]    cfg_rdata;
  // register file
  task_state_e          state [LIST_LEN];
  logic [NUM_PE-1:0]    pe_busy, pe_fin;
  logic                 cfg_we, cfg_resp_en, resp_ack, resp_en;
  logic [31:0]          lists_done;
  // task controller
  logic                 start;
  logic [IW-1:0]        start_idx;
  logic [PW-1:0]        start_pe;
  logic [LIST_LEN-1:0]  nop_fin;
  logic                 tx_valid, tx_ready;
  logic [PW-1:0]        tx_pe;
  logic [BUS_DW-1:0]    tx_data;

  drs_bus_if #(
    .LIST_LEN(LIST_LEN), .DEP_DEPTH(DEP_DEPTH), .NUM_PE(NUM_PE),
    .PE_BASE(PE_BASE), .PE_STRIDE(PE_STRIDE)
  ) u_bus_if (
    .clk, .rst_n,
    .s_we, .s_re, .s_addr, .s_wdata, .s_rdata, .s_rvalid,
    .m_req, .m_addr, .m_wdata, .m_gnt,
    .wr_desc, .wr_cfg, .wr_idx, .wr_pe, .wr_dep, .wr_cfg_data,
    .commit, .commit_len,
    .cfg_we, .cfg_resp_en, .resp_ack, .resp_en, .risc_resp, .lists_done,
    .exec_valid, .shadow_full, .pe_busy, .state,
    .tx_valid, .tx_pe, .tx_data, .tx_ready
  );

  drs_task_list #(
    .LIST_LEN(LIST_LEN), .DEP_DEPTH(DEP_DEPTH), .NUM_PE(NUM_PE), .CFG_W(BUS_DW)
  ) u_task_list (
    .clk, .rst_n,
    .wr_desc, .wr_cfg, .wr_idx, .wr_pe, .wr_dep, .wr_cfg_data,
    .commit, .commit_len, .shadow_full,
    .list_done, .exec_valid, .act, .act_len, .exec_pe, .exec_dep,
    .cfg_re, .cfg_ridx, .cfg_rdata
  );

  drs_register_file #(.LIST_LEN(LIST_LEN), .NUM_PE(NUM_PE)) u_regfile (
    .clk, .rst_n,
    .act, .act_len, .start, .start_idx, .start_pe, .nop_fin, .pe_fin,
    .list_done, .cfg_we, .cfg_resp_en, .resp_ack,
    .state, .pe_busy, .resp_en, .risc_resp, .lists_done
  );

  drs_exec_ctrl #(
    .LIST_LEN(LIST_LEN), .DEP_DEPTH(DEP_DEPTH), .NUM_PE(NUM_PE), .CFG_W(BUS_DW)
  ) u_exec_ctrl (
    .clk, .rst_n,
    .exec_valid, .exec_pe, .exec_dep, .state, .pe_busy,
    .start, .start_idx, .start_pe, .nop_fin,
    .cfg_re, .cfg_ridx, .cfg_rdata,
    .tx_valid, .tx_pe, .tx_data, .tx_ready
  );

  initial begin
    assert (LIST_LEN >= 2 && DEP_DEPTH >= 1 && NUM_PE >= 1)
      else $fatal(1, "drs needs LIST_LEN >= 2, DEP_DEPTH >= 1 and NUM_PE >= 1");
  end

  drs_resp_ctrl #(.LIST_LEN(LIST_LEN), .NUM_PE(NUM_PE)) u_resp_ctrl (
    .clk, .rst_n,
    .pe_resp, .pe_busy, .exec_valid, .state,
    .pe_fin, .list_done
  );

endmodule
