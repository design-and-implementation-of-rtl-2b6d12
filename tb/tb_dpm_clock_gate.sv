// tb_dpm_clock_gate -- self-checking testbench of the latch-based clock gate.
//
// Drives a free-running clock and a random enable that changes in the low
// phase (legal) and sometimes also in the high phase (must have no effect
// until the next low phase). Checks, every cycle: the gated clock is high
// during the high phase exactly when the enable was high at the rising edge,
// it never changes in the middle of a high phase, it is low while clk is
// low, and it stays low throughout reset. Counts gated clock pulses against
// the number of enabled cycles.
module tb_dpm_clock_gate;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  logic gclk;

  int checks = 0;
  int failures = 0;
  int pulses = 0;
  int enabled_cycles = 0;

  dpm_clock_gate dut (.clk(clk), .rst_n(rst_n), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(posedge gclk) pulses++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit en_at_edge;
    rst_n = 1'b0;
    en    = 1'b1;
    // reset holds the gate closed even with en high
    repeat (3) begin
      @(posedge clk); #1;
      check(gclk == 1'b0, "gclk pulsed during reset");
    end
    @(negedge clk);
    en    = 1'b0;
    rst_n = 1'b1;
    pulses = 0;
    for (int i = 0; i < 400; i++) begin
      // low phase: set the enable for the coming edge
      @(negedge clk);
      #1;
      check(gclk == 1'b0, "gclk high while clk low");
      en = 1'($urandom_range(0, 1));
      #2;
      en_at_edge = en;
      if (en_at_edge) enabled_cycles++;
      @(posedge clk);
      #1;
      check(gclk == en_at_edge, "gclk does not follow the enable of this edge");
      // high phase: a change of en must not reach gclk now
      if ($urandom_range(0, 2) == 0) en = ~en;
      #2;
      check(gclk == en_at_edge, "gclk changed inside the high phase");
    end
    @(negedge clk); #1;
    check(pulses == enabled_cycles, "number of gated clock pulses");
    $display("gated pulses=%0d enabled cycles=%0d of 400", pulses, enabled_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
