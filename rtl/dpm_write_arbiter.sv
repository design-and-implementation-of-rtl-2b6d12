// dpm_write_arbiter -- write arbitration of the dual-port memory.
//
// Combinational. Port 1 has priority: its write request always passes.
// Port 2's write request passes only when
//   * Port 1 is not writing the same address in the same cycle (conflict:
//     Port 2's data is dropped),
//   * the address is not in the protected range 0 .. P2_PROT_END-1
//     (00h..0Fh by default), and
//   * single-port mode is off (Port 2 is then inactive).
// p2_status reports which rule, if any, stopped a Port 2 write; it is
// P2_WRITE_DONE when Port 2 is not writing at all.
//
// The priority of Port 1, the dropped Port 2 data and the protected range
// follow the design; that single-port mode also blocks Port 2 writes is this
// implementation's reading of that mode. Setting P2_PROT_END to 0 removes
// the protection.
module dpm_write_arbiter
  import dpm_pkg::*;
#(
  parameter int unsigned ADDR_W      = DPM_ADDR_W,
  parameter int unsigned P2_PROT_END = DPM_P2_PROT_END
) (
  input  logic              singleportmode,
  input  logic              wr_1,
  input  logic [ADDR_W-1:0] addr_1,
  input  logic              wr_2,
  input  logic [ADDR_W-1:0] addr_2,
  output logic              we_1,
  output logic              we_2,
  output p2_write_status_e  p2_status
);

  logic same_addr;
  logic protected_addr;

  assign same_addr      = (addr_1 == addr_2);
  assign protected_addr = (32'(addr_2) < P2_PROT_END);

  always_comb begin
    we_1      = wr_1;
    we_2      = 1'b0;
    p2_status = P2_WRITE_DONE;
    if (wr_2) begin
      if (singleportmode)         p2_status = P2_DROP_SINGLEPORT;
      else if (protected_addr)    p2_status = P2_DROP_PROTECTED;
      else if (wr_1 && same_addr) p2_status = P2_DROP_CONFLICT;
      else                        we_2      = 1'b1;
    end
  end

endmodule
