// tb_dpm_gated_top -- end-to-end testbench of the clock-gated dual-port memory.
//
// Runs the top with its default parameters (256 x 8). Inputs, the clock
// enable included, change on the falling edge of the global clock; outputs
// are checked just after each rising edge against dpm_ref_pkg's model, which
// advances only on cycles whose enable was high. The test
//   * fills the whole array and reads every word back through both ports,
//   * replays the stimulus of the design's reference waveform (port 1
//     writes DEh to AAh, ADh to BBh, CAh to 01h; port 2 tries FEh at 02h,
//     which the write protection refuses; then single-port mode),
//   * checks that nothing changes while the clock is gated off, even with
//     write requests on both ports,
//   * runs random traffic with random enable and single-port mode.
// It counts gated-off cycles, read latencies checked, same-address write
// conflicts, refused protected writes, single-port cycles, dataout_2
// clears and reads of a word written in the same cycle, and fails if any
// of them never happened.
module tb_dpm_gated_top;
  import dpm_pkg::*;
  import dpm_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, en, singleportmode;
  logic [7:0] addr_1, addr_2, datain_1, datain_2, dataout_1, dataout_2;
  logic       wr_1, wr_2;
  p2_write_status_e p2_status;

  int checks = 0;
  int failures = 0;
  int n_gated = 0, n_latency = 0, n_conflict = 0, n_protected = 0;
  int n_single = 0, n_cleared = 0, n_rw_same = 0, n_dual_write = 0;

  dpm_ref_model #(8, 8) model;

  dpm_gated_top dut (
    .clk(clk), .rst_n(rst_n), .en(en), .singleportmode(singleportmode),
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
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input bit e, input bit sp,
                       input bit w1, input bit [7:0] a1, input bit [7:0] d1,
                       input bit w2, input bit [7:0] a2, input bit [7:0] d2);
    bit [7:0] hold1, hold2;
    @(negedge clk);
    en = e; singleportmode = sp;
    wr_1 = w1; addr_1 = a1; datain_1 = d1;
    wr_2 = w2; addr_2 = a2; datain_2 = d2;
    hold1 = dataout_1; hold2 = dataout_2;
    @(posedge clk);
    #1;
    if (!e) begin
      n_gated++;
      check(dataout_1 == hold1 && dataout_2 == hold2, "outputs moved while the clock was gated off");
    end else begin
      case (model.p2_outcome(sp, w1, a1, w2, a2))
        1: n_conflict++;
        2: n_protected++;
        3: n_single++;
        default: if (w1 && w2) n_dual_write++;
      endcase
      if (!sp && w1 != w2 && a1 == a2) n_rw_same++;
      if (model.spp && sp) n_cleared++;
      model.clock(sp, w1, a1, d1, w2, a2, d2);
      if (model.out1_known)
        check(dataout_1 == model.out1, $sformatf("dataout_1 %02h, expected %02h", dataout_1, model.out1));
      if (model.out2_known)
        check(dataout_2 == model.out2, $sformatf("dataout_2 %02h, expected %02h", dataout_2, model.out2));
    end
  endtask

  // read one word through both ports and check it arrives exactly two
  // memory edges after it is presented
  task automatic read_latency(input bit [7:0] a, input bit [7:0] expected);
    cycle(1, 0, 0, a, '0, 0, a, '0);
    check(!(dataout_1 == expected && model.out1 != expected), "read data arrived one edge early");
    cycle(1, 0, 0, a + 8'd1, '0, 0, a + 8'd1, '0);
    check(dataout_1 == expected && dataout_2 == expected,
          $sformatf("read of %02h: %02h/%02h, expected %02h", a, dataout_1, dataout_2, expected));
    n_latency++;
  endtask

  initial begin
    model = new(DPM_DEPTH, DPM_P2_PROT_END);
    rst_n = 1'b1;   // a falling edge of rst_n starts the asynchronous reset
    en = 1'b0; singleportmode = 1'b0;
    wr_1 = 1'b0; wr_2 = 1'b0; addr_1 = '0; addr_2 = '0; datain_1 = '0; datain_2 = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(dataout_1 == '0 && dataout_2 == '0, "outputs not cleared by reset");
    @(negedge clk);
    rst_n = 1'b1;

    // fill: word a gets a ^ 8'h5C, Port 1 the even and Port 2 the odd words
    // above the protected range; Port 1 alone writes 00h..0Fh
    for (int a = 0; a < 256; a += 2) begin
      if (a < 16) begin
        cycle(1, 0, 1, 8'(a), 8'(a) ^ 8'h5C, 0, '0, '0);
        cycle(1, 0, 1, 8'(a + 1), 8'(a + 1) ^ 8'h5C, 0, '0, '0);
      end else
        cycle(1, 0, 1, 8'(a), 8'(a) ^ 8'h5C, 1, 8'(a + 1), 8'(a + 1) ^ 8'h5C);
    end
    // read back every word with its latency
    for (int a = 0; a < 256; a++) read_latency(8'(a), 8'(a) ^ 8'h5C);

    // replay of the reference waveform's stimulus
    cycle(1, 0, 0, 8'h00, 8'h00, 0, 8'h00, 8'h00);
    cycle(1, 0, 0, 8'hAA, 8'hDE, 0, 8'h00, 8'h00);
    cycle(1, 0, 1, 8'hAA, 8'hDE, 0, 8'h00, 8'h00);   // write DEh to AAh
    cycle(1, 0, 0, 8'hBB, 8'hAD, 0, 8'h00, 8'h00);
    cycle(1, 0, 1, 8'hBB, 8'hAD, 0, 8'h00, 8'h00);   // write ADh to BBh
    cycle(1, 0, 0, 8'hAA, 8'hAD, 0, 8'h00, 8'h00);
    cycle(1, 0, 0, 8'hBB, 8'hAD, 0, 8'h00, 8'h00);
    check(dataout_1 == 8'hDE, "waveform replay: AAh reads DEh");
    cycle(1, 0, 1, 8'h01, 8'hCA, 1, 8'h02, 8'hFE);   // P2's FEh at 02h refused
    check(dataout_1 == 8'hAD, "waveform replay: BBh reads ADh");
    cycle(1, 0, 0, 8'h01, 8'hCA, 0, 8'h01, 8'hFE);
    cycle(1, 0, 0, 8'h01, 8'hCA, 0, 8'h02, 8'hFE);
    check(dataout_1 == 8'hCA && dataout_2 == 8'hCA, "waveform replay: 01h reads CAh");
    cycle(1, 0, 0, 8'h01, 8'hCA, 0, 8'h01, 8'hFE);
    check(dataout_2 == 8'(8'h02 ^ 8'h5C), "waveform replay: protected 02h kept its data");
    cycle(1, 1, 0, 8'h01, 8'hCA, 0, 8'h01, 8'hFE);   // single-port mode on
    cycle(1, 1, 0, 8'h01, 8'hCA, 0, 8'h01, 8'hFE);
    check(dataout_1 == 8'hCA && dataout_2 == 8'h00, "waveform replay: single-port mode");

    // clock gated off with writes requested: nothing may happen
    repeat (5) cycle(0, 0, 1, 8'h80, 8'h00, 1, 8'h81, 8'h00);
    cycle(1, 0, 0, 8'h80, '0, 0, 8'h81, '0);
    cycle(1, 0, 0, 8'h80, '0, 0, 8'h81, '0);
    check(dataout_1 == 8'(8'h80 ^ 8'h5C) && dataout_2 == 8'(8'h81 ^ 8'h5C),
          "a write happened while the clock was gated off");

    // random traffic
    for (int i = 0; i < 6000; i++) begin
      bit e, sp;
      e  = ($urandom_range(0, 3) != 0);
      sp = ($urandom_range(0, 15) == 0);
      cycle(e, sp, 1'($urandom_range(0, 1)), 8'($urandom_range(8, 20)), 8'($urandom),
                   1'($urandom_range(0, 1)), 8'($urandom_range(8, 20)), 8'($urandom));
    end

    $display("gated=%0d latency=%0d conflict=%0d protected=%0d single=%0d cleared=%0d rw_same=%0d dual_write=%0d",
             n_gated, n_latency, n_conflict, n_protected, n_single, n_cleared, n_rw_same, n_dual_write);
    check(n_gated > 0,      "clock gating never happened");
    check(n_latency > 0,    "read latency never checked");
    check(n_conflict > 0,   "same-address write conflict never happened");
    check(n_protected > 0,  "protected write never happened");
    check(n_single > 0,     "single-port write drop never happened");
    check(n_cleared > 0,    "single-port dataout_2 clear never happened");
    check(n_rw_same > 0,    "read of a word written the same cycle never happened");
    check(n_dual_write > 0, "two writes in one cycle never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
