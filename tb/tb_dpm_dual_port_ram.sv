// tb_dpm_dual_port_ram -- self-checking testbench of the dual-port RAM.
//
// Inputs change on the falling clock edge; outputs are checked just after
// each rising edge against dpm_ref_pkg::dpm_ref_model and, in the directed
// part, against literal values:
//   * reset values of the outputs,
//   * read latency: data presented before edge N appears after edge N+1 and
//     not after edge N,
//   * the five cases of simultaneous port operations, including a read of
//     the address the other port writes in the same cycle (new data) and a
//     same-address double write (Port 1's data is kept),
//   * Port 2 writes to the protected range 00h..0Fh are refused,
//   * single-port mode: Port 2 writes refused, dataout_2 cleared,
//   * then random traffic on a narrow address range.
// Each mechanism is counted and must occur at least once.
module tb_dpm_dual_port_ram;
  import dpm_pkg::*;
  import dpm_ref_pkg::*;

  localparam int unsigned AW = 8;
  localparam int unsigned DW = 8;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          singleportmode;
  logic [AW-1:0] addr_1, addr_2;
  logic          wr_1, wr_2;
  logic [DW-1:0] datain_1, datain_2, dataout_1, dataout_2;
  p2_write_status_e p2_status;

  int checks = 0;
  int failures = 0;
  int n_conflict = 0, n_protected = 0, n_single = 0, n_dual_write = 0;
  int n_rw_same = 0, n_dual_read = 0, n_cleared = 0;

  dpm_ref_model #(AW, DW) model;

  dpm_dual_port_ram dut (
    .clk(clk), .rst_n(rst_n), .singleportmode(singleportmode),
    .addr_1(addr_1), .wr_1(wr_1), .datain_1(datain_1), .dataout_1(dataout_1),
    .addr_2(addr_2), .wr_2(wr_2), .datain_2(datain_2), .dataout_2(dataout_2),
    .p2_status(p2_status)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One memory cycle: inputs applied in the low phase, checks after the edge.
  task automatic cycle(input bit sp,
                       input bit w1, input bit [AW-1:0] a1, input bit [DW-1:0] d1,
                       input bit w2, input bit [AW-1:0] a2, input bit [DW-1:0] d2);
    int unsigned st;
    @(negedge clk);
    singleportmode = sp;
    wr_1 = w1; addr_1 = a1; datain_1 = d1;
    wr_2 = w2; addr_2 = a2; datain_2 = d2;
    #1;
    st = model.p2_outcome(sp, w1, a1, w2, a2);
    check(int'(p2_status) == int'(st), $sformatf("p2_status %0d, expected %0d", p2_status, st));
    case (st)
      1: n_conflict++;
      2: n_protected++;
      3: n_single++;
      default: ;
    endcase
    if (w1 && w2 && st == 0) n_dual_write++;
    if (!sp && w1 != w2 && a1 == a2) n_rw_same++;
    if (!sp && !w1 && !w2) n_dual_read++;
    if (model.spp && sp) n_cleared++;
    @(posedge clk);
    model.clock(sp, w1, a1, d1, w2, a2, d2);
    #1;
    if (model.out1_known)
      check(dataout_1 == model.out1,
            $sformatf("dataout_1 %02h, expected %02h", dataout_1, model.out1));
    if (model.out2_known)
      check(dataout_2 == model.out2,
            $sformatf("dataout_2 %02h, expected %02h", dataout_2, model.out2));
  endtask

  task automatic idle();
    cycle(0, 0, '0, '0, 0, 8'h10, '0);
  endtask

  initial begin
    model = new(DPM_DEPTH, DPM_P2_PROT_END);
    rst_n = 1'b1;   // a falling edge of rst_n starts the asynchronous reset
    #1 rst_n = 1'b0;
    singleportmode = 1'b0;
    wr_1 = 1'b0; wr_2 = 1'b0;
    addr_1 = '0; addr_2 = '0; datain_1 = '0; datain_2 = '0;
    repeat (2) @(posedge clk);
    #1;
    check(dataout_1 == '0 && dataout_2 == '0, "outputs not cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    model.clock(0, 0, '0, '0, 0, '0, '0);   // the edge right after release

    // fill the whole array through both ports (Port 2 above the protected range)
    for (int unsigned a = 0; a < DPM_DEPTH; a += 2) begin
      if (a < DPM_P2_PROT_END)
        cycle(0, 1, AW'(a), DW'(a * 7 + 3), 0, '0, '0);
      else
        cycle(0, 1, AW'(a), DW'(a * 7 + 3), 1, AW'(a + 1), DW'((a + 1) * 7 + 3));
    end
    for (int unsigned a = 1; a < DPM_P2_PROT_END; a += 2)
      cycle(0, 1, AW'(a), DW'(a * 7 + 3), 0, '0, '0);

    // read latency: word a holds a*7+3 (mod 256): 21h -> EAh, 20h -> E3h
    cycle(0, 0, 8'h21, '0, 0, 8'h21, '0);   // present 21h
    cycle(0, 0, 8'h20, '0, 0, 8'h20, '0);   // present 20h
    check(dataout_1 == 8'hEA && dataout_2 == 8'hEA, "read of 21h after two edges");
    cycle(0, 1, 8'h30, 8'h00, 1, 8'h31, 8'h01); // write cycle: outputs load 20h
    check(dataout_1 == 8'hE3 && dataout_2 == 8'hE3, "read of 20h after two edges");
    idle();
    check(dataout_1 == 8'hE3, "a write cycle must not load dataout_1");

    // case 1: Port 1 writes 40h, Port 2 reads 40h in the same cycle
    cycle(0, 1, 8'h40, 8'h33, 0, 8'h40, '0);
    idle();
    check(dataout_2 == 8'h33, "Port 2 read of the address Port 1 wrote");
    // case 2: Port 2 writes 44h, Port 1 reads 44h
    cycle(0, 0, 8'h44, '0, 1, 8'h44, 8'h5A);
    idle();
    check(dataout_1 == 8'h5A, "Port 1 read of the address Port 2 wrote");
    // case 3: both read 40h
    cycle(0, 0, 8'h40, '0, 0, 8'h40, '0);
    idle();
    check(dataout_1 == 8'h33 && dataout_2 == 8'h33, "both ports read the same word");
    // case 4: both write, different addresses
    cycle(0, 1, 8'h50, 8'hC1, 1, 8'h51, 8'hC2);
    cycle(0, 0, 8'h51, '0, 0, 8'h50, '0);
    idle();
    check(dataout_1 == 8'hC2 && dataout_2 == 8'hC1, "two writes to different addresses");
    // case 5: both write 52h: Port 1 wins
    cycle(0, 1, 8'h52, 8'h11, 1, 8'h52, 8'h22);
    cycle(0, 0, 8'h52, '0, 0, 8'h52, '0);
    idle();
    check(dataout_1 == 8'h11 && dataout_2 == 8'h11, "same-address double write: Port 1 data kept");
    // protection: Port 2 may not write 05h (holds 05h*7+3 = 26h)
    cycle(0, 0, '0, '0, 1, 8'h05, 8'h77);
    cycle(0, 0, 8'h05, '0, 0, 8'h05, '0);
    idle();
    check(dataout_1 == 8'h26 && dataout_2 == 8'h26, "Port 2 wrote the protected range");
    // single-port mode: Port 2 write dropped and dataout_2 cleared
    cycle(1, 0, 8'h40, '0, 1, 8'h60, 8'hEE);
    cycle(1, 0, 8'h60, '0, 0, 8'h60, '0);
    check(dataout_2 == 8'h00 && dataout_1 == 8'h33, "single-port mode outputs");
    idle();
    check(dataout_1 == 8'(8'h60 * 7 + 3) && dataout_2 == 8'h00, "Port 2 wrote in single-port mode");
    idle();
    check(dataout_2 == 8'(8'h10 * 7 + 3), "Port 2 reads again after single-port mode");

    // random traffic, narrow address window for frequent collisions
    for (int i = 0; i < 4000; i++) begin
      bit sp;
      sp = ($urandom_range(0, 15) == 0);
      cycle(sp, 1'($urandom_range(0, 1)), AW'($urandom_range(4, 24)), DW'($urandom),
                1'($urandom_range(0, 1)), AW'($urandom_range(4, 24)), DW'($urandom));
    end

    $display("conflicts=%0d protected=%0d singleport=%0d cleared=%0d dual writes=%0d rw same addr=%0d dual reads=%0d",
             n_conflict, n_protected, n_single, n_cleared, n_dual_write, n_rw_same, n_dual_read);
    check(n_conflict > 0 && n_protected > 0 && n_single > 0 && n_cleared > 0 &&
          n_dual_write > 0 && n_rw_same > 0 && n_dual_read > 0,
          "a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
