// dpm_gated_top -- power-gated synchronous dual-port memory.
//
// The global clock clk and the enable en feed the latch-based clock gate;
// its gated clock runs the whole dual-port memory, so while en is low
// neither the array nor any pipeline register sees a clock edge and the
// memory holds its contents and outputs. The memory interface (two ports of
// address, write control, input and output data, plus singleportmode) is
// the same as that of the ungated memory, so the gated version can replace
// it directly.
//
// Timing: en is sampled while clk is low; a cycle whose en was high just
// before the rising edge of clk is a memory cycle. A read presented in
// memory cycle k appears on dataout_x after memory cycle k+1 (see
// dpm_dual_port_ram). Inputs should be stable around the rising edge of clk.
//
// rst_n (active-low, asynchronous) clears the clock gate and the memory's
// pipeline and output registers. p2_status is the memory's Port 2 write
// outcome.
module dpm_gated_top
  import dpm_pkg::*;
#(
  parameter int unsigned ADDR_W      = DPM_ADDR_W,
  parameter int unsigned DATA_W      = DPM_DATA_W,
  parameter int unsigned DEPTH       = DPM_DEPTH,
  parameter int unsigned P2_PROT_END = DPM_P2_PROT_END
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              singleportmode,
  input  logic [ADDR_W-1:0] addr_1,
  input  logic              wr_1,
  input  logic [DATA_W-1:0] datain_1,
  output logic [DATA_W-1:0] dataout_1,
  input  logic [ADDR_W-1:0] addr_2,
  input  logic              wr_2,
  input  logic [DATA_W-1:0] datain_2,
  output logic [DATA_W-1:0] dataout_2,
  output p2_write_status_e  p2_status
);

  logic gated_clk;

  dpm_clock_gate u_clock_gate (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .gclk  (gated_clk)
  );

  dpm_dual_port_ram #(
    .ADDR_W      (ADDR_W),
    .DATA_W      (DATA_W),
    .DEPTH       (DEPTH),
    .P2_PROT_END (P2_PROT_END)
  ) u_memory (
    .clk            (gated_clk),
    .rst_n          (rst_n),
    .singleportmode (singleportmode),
    .addr_1         (addr_1),
    .wr_1           (wr_1),
    .datain_1       (datain_1),
    .dataout_1      (dataout_1),
    .addr_2         (addr_2),
    .wr_2           (wr_2),
    .datain_2       (datain_2),
    .dataout_2      (dataout_2),
    .p2_status      (p2_status)
  );

endmodule
