// dpm_pkg -- shared constants and types of the gated dual-port memory.
//
// The memory is 256 words of 8 bits with an 8-bit address on each port
// (the sizes the design is specified with). Port 2 may not write the
// lowest 16 addresses (00h..0Fh), which hold configuration data. The
// port_req_t struct bundles what one port presents in a cycle; it is the
// shape the testbenches use for stimulus and the arbiter for its decision.
package dpm_pkg;

  localparam int unsigned DPM_ADDR_W     = 8;
  localparam int unsigned DPM_DATA_W     = 8;
  localparam int unsigned DPM_DEPTH      = 256;
  // Port 2 writes to addresses below this value are refused (00h..0Fh).
  localparam int unsigned DPM_P2_PROT_END = 16;

  // Why a Port 2 write request was not performed.
  typedef enum logic [1:0] {
    P2_WRITE_DONE      = 2'd0,
    P2_DROP_CONFLICT   = 2'd1,   // Port 1 writes the same address
    P2_DROP_PROTECTED  = 2'd2,   // address in the protected range
    P2_DROP_SINGLEPORT = 2'd3    // Port 2 disabled by single-port mode
  } p2_write_status_e;

endpackage
