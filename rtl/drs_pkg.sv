// drs_pkg: types and constants shared by the Dynamic Resource Scheduler (DRS).
//
// The DRS keeps one of four states for every entry of the executing task
// list (no task, waiting for execution, running, finished); the four states
// follow the description of the scheduler's register file, their encoding is
// this design's choice. The register map of the bus slave port below is also
// this design's own: addresses are word addresses of 128-bit bus words.
package drs_pkg;

  // State of one task list entry.
  typedef enum logic [1:0] {
    TS_NONE = 2'd0,   // no task in this entry
    TS_WAIT = 2'd1,   // waiting for execution
    TS_RUN  = 2'd2,   // running on its PE
    TS_DONE = 2'd3    // finished
  } task_state_e;

  // Width of the 128-bit system bus data path and of a bus word address.
  localparam int unsigned BUS_DW = 128;
  localparam int unsigned BUS_AW = 32;
  localparam int unsigned SLV_AW = 16;

  // Slave register map (word addresses, upper nibble selects the region).
  localparam logic [3:0] RGN_DESC = 4'h0;  // 0x0iii: descriptor of shadow entry i
  localparam logic [3:0] RGN_CFG  = 4'h1;  // 0x1iii: address/config word of shadow entry i
  localparam logic [3:0] RGN_CTRL = 4'h2;  // 0x20xx: control and status registers
  localparam logic [3:0] RGN_TSTA = 4'h3;  // 0x3iii: read state of executing entry i

  localparam logic [11:0] REG_COMMIT   = 12'h000; // W: length of shadow list, marks it loaded
  localparam logic [11:0] REG_RESP_CFG = 12'h001; // RW: bit 0 enables the RISC response
  localparam logic [11:0] REG_RESP_ACK = 12'h002; // W: clears the RISC response flag
  localparam logic [11:0] REG_STATUS   = 12'h003; // R: see drs_bus_if

  // Field positions inside a descriptor word.
  localparam int unsigned DESC_PE_LSB  = 0;   // PE one-hot code
  localparam int unsigned DESC_DEP_LSB = 64;  // dependency bits, bit k-1 = "depends on entry -k"

endpackage
