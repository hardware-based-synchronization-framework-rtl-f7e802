// drs_task_list: double-buffered task list storage of the DRS.
//
// Two task list buffers are kept. One is the execute list that the task
// controller works on; the other is the shadow list that the RISC fills over
// the bus while the first one runs, which hides part of the RISC/coprocessor
// communication delay. When the execute list has finished (list_done) and the
// shadow list has been committed, the shadow list becomes the execute list
// automatically. These are the document's mechanisms.
//
// Per entry the PE one-hot code and the dependency bits are held in
// registers, so the whole execute list is visible at once for the parallel
// conflict analysis; the address/configuration word goes to drs_cfg_sram. A
// commit write gives the shadow list's length (this design's choice of how
// the end of a list is marked; entries at and beyond the length are "no
// task"). Uploads while the shadow list is already committed are ignored.
//
// Timing: act (activation) is a combinational pulse in the cycle where the
// shadow list is swapped in; at that clock edge the execute outputs switch to
// the new list and act_len gives its length. cfg_rdata follows cfg_re by one
// cycle and reads the execute buffer.
module drs_task_list #(
  parameter int unsigned LIST_LEN  = 32,
  parameter int unsigned DEP_DEPTH = 31,
  parameter int unsigned NUM_PE    = 4,
  parameter int unsigned CFG_W     = 128,
  localparam int unsigned IW       = $clog2(LIST_LEN),
  localparam int unsigned LW       = $clog2(LIST_LEN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // upload into the shadow list (from the bus interface)
  input  logic                 wr_desc,
  input  logic                 wr_cfg,
  input  logic [IW-1:0]        wr_idx,
  input  logic [NUM_PE-1:0]    wr_pe,
  input  logic [DEP_DEPTH-1:0] wr_dep,
  input  logic [CFG_W-1:0]     wr_cfg_data,
  input  logic                 commit,
  input  logic [LW-1:0]        commit_len,
  output logic                 shadow_full,
  // execute list
  input  logic                 list_done,
  output logic                 exec_valid,
  output logic                 act,
  output logic [LW-1:0]        act_len,
  output logic [NUM_PE-1:0]    exec_pe  [LIST_LEN],
  output logic [DEP_DEPTH-1:0] exec_dep [LIST_LEN],
  input  logic                 cfg_re,
  input  logic [IW-1:0]        cfg_ridx,
  output logic [CFG_W-1:0]     cfg_rdata
);

  logic                 bank;      // buffer holding the execute list
  logic [LW-1:0]        shadow_len;
  logic [NUM_PE-1:0]    pe_q  [2][LIST_LEN];
  logic [DEP_DEPTH-1:0] dep_q [2][LIST_LEN];
  logic                 upload_ok;

  assign upload_ok = !shadow_full;
  assign act       = shadow_full && !exec_valid;
  assign act_len   = shadow_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank        <= 1'b0;
      shadow_full <= 1'b0;
      shadow_len  <= '0;
      exec_valid  <= 1'b0;
    end else begin
      if (commit && upload_ok) begin
        shadow_full <= 1'b1;
        shadow_len  <= (commit_len > LW'(LIST_LEN)) ? LW'(LIST_LEN) : commit_len;
      end
      if (act) begin
        bank        <= !bank;
        exec_valid  <= 1'b1;
        shadow_full <= 1'b0;
      end else if (list_done) begin
        exec_valid  <= 1'b0;
      end
    end
  end

  // Descriptor registers; the shadow buffer is the one not executing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_q  <= '{default: '0};
      dep_q <= '{default: '0};
    end else if (wr_desc && upload_ok) begin
      pe_q [!bank][wr_idx] <= wr_pe;
      dep_q[!bank][wr_idx] <= wr_dep;
    end
  end

  always_comb begin
    for (int i = 0; i < LIST_LEN; i++) begin
      exec_pe[i]  = pe_q [bank][i];
      exec_dep[i] = dep_q[bank][i];
    end
  end

  drs_cfg_sram #(.DEPTH(2 ** (IW + 1)), .WIDTH(CFG_W)) u_sram (
    .clk   (clk),
    .we    (wr_cfg && upload_ok),
    .waddr ({!bank, wr_idx}),
    .wdata (wr_cfg_data),
    .re    (cfg_re),
    .raddr ({bank, cfg_ridx}),
    .rdata (cfg_rdata)
  );

endmodule
