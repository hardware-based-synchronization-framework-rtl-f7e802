// drs_resp_ctrl: response controller of the DRS task controller.
//
// Scans the response signals of all PEs at once every cycle. A response from
// a PE that is running a task is registered and passed to the register file
// as pe_fin, which marks that PE's task finished and the PE idle. The
// controller also watches the task status of the execute list: when no entry
// is waiting or running any more, it pulses list_done, which retires the
// list, activates a committed shadow list and raises the RISC response.
// Scanning all responses in parallel and the response to the RISC after list
// completion follow the document. A PE response is taken to be a one-cycle
// pulse, and a response from an idle PE is ignored (this design's choices).
//
// Timing: pe_fin follows pe_resp by one clock; list_done is combinational
// from the task status and is high for one cycle, because the list is
// retired at that clock edge.
module drs_resp_ctrl
  import drs_pkg::*;
#(
  parameter int unsigned LIST_LEN = 32,
  parameter int unsigned NUM_PE   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_PE-1:0] pe_resp,
  input  logic [NUM_PE-1:0] pe_busy,
  input  logic              exec_valid,
  input  task_state_e       state [LIST_LEN],
  output logic [NUM_PE-1:0] pe_fin,
  output logic              list_done
);

  logic all_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pe_fin <= '0;
    else        pe_fin <= pe_resp & pe_busy;
  end

  always_comb begin
    all_done = 1'b1;
    for (int i = 0; i < LIST_LEN; i++)
      if (state[i] == TS_WAIT || state[i] == TS_RUN) all_done = 1'b0;
  end

  assign list_done = exec_valid && all_done;

endmodule
