// drs_cfg_sram: task address/configuration memory of the DRS.
//
// The scheduler keeps the per-task PE type and dependency bits in registers so
// that all entries can be checked in parallel, but the wide address and
// configuration data of a task is only needed when that one task is started,
// so it lives in an SRAM. This module is that SRAM: a simple dual-port array
// with one write port (bus upload into the shadow list) and one synchronous
// read port (the execution controller fetching the task it starts).
//
// The task list uses it with 2*LIST_LEN words (rounded up to a power of two),
// one half per task list buffer, selected by the top address bit; the width is
// one 128-bit bus word per task, which is this design's choice (the text only
// says the data holds read addresses, write addresses and PE configuration).
// Timing: a write is performed at the clock edge where we is high; a read
// returns the word at raddr one cycle after re is high, and rdata holds until
// the next read. A read and a write of the same address in one cycle return
// the old word.
module drs_cfg_sram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
