// dpm_dual_port_ram -- synchronous dual-port RAM with pipelined reads.
//
// DEPTH words of DATA_W bits (256 x 8 by default), two independent ports,
// each with its own address, write control (wr_x: 1 = write, 0 = read),
// input data and output data, all on one clock.
//
// Writes: a write request is performed at the rising edge where it is
// presented, after dpm_write_arbiter has resolved it. Port 1 wins a
// same-address double write (Port 2's data is dropped); Port 2 may not write
// the protected low addresses; in single-port mode Port 2 does not write.
//
// Reads (two register stages): at edge N the address and the read enable
// (rd_en_x = not wr_x) are captured in the *_pipe registers; at edge N+1
// the array is read at the registered address into the dataout_x register.
// The data of a read presented before edge N therefore appears after edge
// N+1, one cycle later than in an unpipelined synchronous RAM. The read at
// edge N+1 sees every write made up to edge N, so a read presented in the
// same cycle as a write to the same address returns the new data. A write
// cycle does not load dataout_x, which keeps its last value.
//
// Single-port mode (singleportmode = 1): Port 2 is switched off. Its writes
// are refused, its address register stops toggling and dataout_2 is cleared
// to zero with the same latency as a read; Port 1 works as usual.
//
// p2_status (extra to the plain memory interface) tells, for the current
// cycle, whether a Port 2 write was performed or why it was dropped.
//
// Reset: rst_n (active-low, asynchronous) clears the pipeline and output
// registers; the array itself is not reset, like FPGA block RAM contents.
//
// The size, the port set, priority of Port 1, the protected range, the
// registered address/control stage, the read-enable-from-not-write and the
// cleared dataout_2 in single-port mode follow the design. The reset, the
// read-before-write order at one edge and the extra status output are this
// implementation's choices.
module dpm_dual_port_ram
  import dpm_pkg::*;
#(
  parameter int unsigned ADDR_W      = DPM_ADDR_W,
  parameter int unsigned DATA_W      = DPM_DATA_W,
  parameter int unsigned DEPTH       = DPM_DEPTH,
  parameter int unsigned P2_PROT_END = DPM_P2_PROT_END
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              singleportmode,
  // Port 1
  input  logic [ADDR_W-1:0] addr_1,
  input  logic              wr_1,
  input  logic [DATA_W-1:0] datain_1,
  output logic [DATA_W-1:0] dataout_1,
  // Port 2
  input  logic [ADDR_W-1:0] addr_2,
  input  logic              wr_2,
  input  logic [DATA_W-1:0] datain_2,
  output logic [DATA_W-1:0] dataout_2,
  // Port 2 write outcome of this cycle
  output p2_write_status_e  p2_status
);

  logic [DATA_W-1:0] mem [DEPTH];

  logic we_1, we_2;

  // Stage 1 registers: address and control of the reads
  logic [ADDR_W-1:0] addr_1_pipe, addr_2_pipe;
  logic              rd_en_1_pipe, rd_en_2_pipe;
  logic              sp_pipe;

  dpm_write_arbiter #(
    .ADDR_W      (ADDR_W),
    .P2_PROT_END (P2_PROT_END)
  ) u_arbiter (
    .singleportmode (singleportmode),
    .wr_1           (wr_1),
    .addr_1         (addr_1),
    .wr_2           (wr_2),
    .addr_2         (addr_2),
    .we_1           (we_1),
    .we_2           (we_2),
    .p2_status      (p2_status)
  );

  // Memory array: both write ports, same clock. The arbiter never lets both
  // write one address in the same cycle.
  always_ff @(posedge clk) begin
    if (we_1) mem[addr_1] <= datain_1;
    if (we_2) mem[addr_2] <= datain_2;
  end

  // The arbiter must never let both ports write one word in one cycle.
  a_single_writer: assert property (
    @(posedge clk) disable iff (!rst_n) !(we_1 && we_2 && addr_1 == addr_2)
  ) else $error("both ports write address %0h", addr_1);

  // Stage 1: register address and read control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_1_pipe  <= '0;
      addr_2_pipe  <= '0;
      rd_en_1_pipe <= 1'b0;
      rd_en_2_pipe <= 1'b0;
      sp_pipe      <= 1'b0;
    end else begin
      addr_1_pipe  <= addr_1;
      rd_en_1_pipe <= ~wr_1;
      if (!singleportmode) addr_2_pipe <= addr_2;
      rd_en_2_pipe <= ~wr_2 & ~singleportmode;
      sp_pipe      <= singleportmode;
    end
  end

  // Stage 2: read the array into the output registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dataout_1 <= '0;
      dataout_2 <= '0;
    end else begin
      if (rd_en_1_pipe) dataout_1 <= mem[addr_1_pipe];
      if (sp_pipe)           dataout_2 <= '0;
      else if (rd_en_2_pipe) dataout_2 <= mem[addr_2_pipe];
    end
  end

endmodule
