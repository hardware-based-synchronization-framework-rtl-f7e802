// drs_bus_if: system bus interface of the DRS.
//
// Connects the scheduler to the coprocessor's 128-bit system bus in both
// directions, as the document describes: task lists and register accesses
// arrive on a slave port, and tasks leave for the PEs on a master port.
//
// Slave port: single-cycle writes (s_we) and reads (s_re) of 128-bit words at
// word address s_addr; read data appears on s_rdata with s_rvalid one cycle
// later. The register map (this design's choice, constants in drs_pkg):
//   0x0iii  W  descriptor of shadow entry i: bits [NUM_PE-1:0] PE one-hot
//              code, bits [64 +: DEP_DEPTH] dependency bits (bit 64+k-1 =
//              depends on the entry k positions above)
//   0x1iii  W  address/configuration word of shadow entry i
//   0x2000  W  commit: bits [15:0] number of entries of the shadow list
//   0x2001  RW response configuration, bit 0 enables the RISC response
//   0x2002  W  acknowledge: clears the RISC response flag
//   0x2003  R  status: bit 0 execute list active, bit 1 shadow list loaded,
//              bit 2 RISC response flag, bits [16 +: NUM_PE] PE busy,
//              bits [63:32] number of completed lists
//   0x3iii  R  bits [1:0] state of execute entry i
// Unmapped reads return zero, unmapped writes are ignored.
//
// Master port: a task handed over by the execution controller (tx_valid,
// PE index, configuration word) is put on the bus as one write to the PE's
// base address PE_BASE + pe*PE_STRIDE (an assumed address map). m_req stays
// high with stable address and data until m_gnt; the transfer completes in
// the cycle where both are high, and tx_ready reports that back.
module drs_bus_if
  import drs_pkg::*;
#(
  parameter int unsigned     LIST_LEN  = 32,
  parameter int unsigned     DEP_DEPTH = 31,
  parameter int unsigned     NUM_PE    = 4,
  parameter logic [BUS_AW-1:0] PE_BASE   = 32'h1000_0000,
  parameter logic [BUS_AW-1:0] PE_STRIDE = 32'h0100_0000,
  localparam int unsigned    IW        = $clog2(LIST_LEN),
  localparam int unsigned    LW        = $clog2(LIST_LEN + 1),
  localparam int unsigned    PW        = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // system bus slave port
  input  logic                 s_we,
  input  logic                 s_re,
  input  logic [SLV_AW-1:0]    s_addr,
  input  logic [BUS_DW-1:0]    s_wdata,
  output logic [BUS_DW-1:0]    s_rdata,
  output logic                 s_rvalid,
  // system bus master port
  output logic                 m_req,
  output logic [BUS_AW-1:0]    m_addr,
  output logic [BUS_DW-1:0]    m_wdata,
  input  logic                 m_gnt,
  // task list upload
  output logic                 wr_desc,
  output logic                 wr_cfg,
  output logic [IW-1:0]        wr_idx,
  output logic [NUM_PE-1:0]    wr_pe,
  output logic [DEP_DEPTH-1:0] wr_dep,
  output logic [BUS_DW-1:0]    wr_cfg_data,
  output logic                 commit,
  output logic [LW-1:0]        commit_len,
  // register file access
  output logic                 cfg_we,
  output logic                 cfg_resp_en,
  output logic                 resp_ack,
  input  logic                 resp_en,
  input  logic                 risc_resp,
  input  logic [31:0]          lists_done,
  input  logic                 exec_valid,
  input  logic                 shadow_full,
  input  logic [NUM_PE-1:0]    pe_busy,
  input  task_state_e          state [LIST_LEN],
  // task transfer from the execution controller
  input  logic                 tx_valid,
  input  logic [PW-1:0]        tx_pe,
  input  logic [BUS_DW-1:0]    tx_data,
  output logic                 tx_ready
);

  logic [3:0]  rgn;
  logic [11:0] off;
  logic        idx_ok;

  assign rgn    = s_addr[15:12];
  assign off    = s_addr[11:0];
  assign idx_ok = (32'(off) < LIST_LEN);

  // Write decode.
  assign wr_desc     = s_we && (rgn == RGN_DESC) && idx_ok;
  assign wr_cfg      = s_we && (rgn == RGN_CFG) && idx_ok;
  assign wr_idx      = off[IW-1:0];
  assign wr_pe       = s_wdata[DESC_PE_LSB +: NUM_PE];
  assign wr_dep      = s_wdata[DESC_DEP_LSB +: DEP_DEPTH];
  assign wr_cfg_data = s_wdata;
  assign commit      = s_we && (rgn == RGN_CTRL) && (off == REG_COMMIT);
  assign commit_len  = LW'(s_wdata[15:0]);
  assign cfg_we      = s_we && (rgn == RGN_CTRL) && (off == REG_RESP_CFG);
  assign cfg_resp_en = s_wdata[0];
  assign resp_ack    = s_we && (rgn == RGN_CTRL) && (off == REG_RESP_ACK);

  // Registered read data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rdata  <= '0;
      s_rvalid <= 1'b0;
    end else begin
      s_rvalid <= s_re;
      if (s_re) begin
        s_rdata <= '0;
        if (rgn == RGN_CTRL && off == REG_RESP_CFG) begin
          s_rdata[0] <= resp_en;
        end else if (rgn == RGN_CTRL && off == REG_STATUS) begin
          s_rdata[0]            <= exec_valid;
          s_rdata[1]            <= shadow_full;
          s_rdata[2]            <= risc_resp;
          s_rdata[16 +: NUM_PE] <= pe_busy;
          s_rdata[63:32]        <= lists_done;
        end else if (rgn == RGN_TSTA && idx_ok) begin
          s_rdata[1:0] <= state[off[IW-1:0]];
        end
      end
    end
  end

  // Master port: a task write to its PE.
  assign m_req    = tx_valid;
  assign m_addr   = PE_BASE + PE_STRIDE * BUS_AW'(tx_pe);
  assign m_wdata  = tx_data;
  assign tx_ready = m_gnt;

  // Bus rule: a pending request holds its address and data until granted.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (m_req && !m_gnt) |=> (m_req && $stable(m_addr) && $stable(m_wdata));
  endproperty
  a_req_stable: assert property (p_req_stable)
    else $error("DRS bus master changed a pending request");

  initial begin
    assert (NUM_PE <= 64 && DEP_DEPTH <= 64)
      else $fatal(1, "descriptor format holds at most 64 PEs and 64 dependency bits");
    assert (LIST_LEN <= 4096)
      else $fatal(1, "register map holds at most 4096 list entries");
  end

endmodule
