// tb_dpm_write_arbiter -- self-checking testbench of the write arbiter.
//
// Applies the five port-operation cases (write/read, read/write, read/read,
// write/write to different and to the same address), writes into the
// protected range and single-port mode, then random vectors with a narrow
// address range so that conflicts are frequent. Each result is compared
// with the rule worked out here: Port 1 always writes; Port 2 writes unless
// single-port mode is on, its address is below 16, or Port 1 writes the same
// address.
module tb_dpm_write_arbiter;
  import dpm_pkg::*;

  logic       singleportmode, wr_1, wr_2, we_1, we_2;
  logic [7:0] addr_1, addr_2;
  p2_write_status_e p2_status;

  int checks = 0;
  int failures = 0;
  int n_conflict = 0, n_protected = 0, n_single = 0, n_dual = 0;

  dpm_write_arbiter dut (
    .singleportmode(singleportmode), .wr_1(wr_1), .addr_1(addr_1),
    .wr_2(wr_2), .addr_2(addr_2), .we_1(we_1), .we_2(we_2),
    .p2_status(p2_status)
  );

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input bit sp, input bit w1, input bit [7:0] a1,
                       input bit w2, input bit [7:0] a2);
    bit exp_we2;
    p2_write_status_e exp_st;
    singleportmode = sp; wr_1 = w1; addr_1 = a1; wr_2 = w2; addr_2 = a2;
    #1;
    exp_st = P2_WRITE_DONE;
    if (w2) begin
      if (sp)                 exp_st = P2_DROP_SINGLEPORT;
      else if (a2 < 8'h10)    exp_st = P2_DROP_PROTECTED;
      else if (w1 && a1 == a2) exp_st = P2_DROP_CONFLICT;
    end
    exp_we2 = w2 && exp_st == P2_WRITE_DONE;
    case (exp_st)
      P2_DROP_CONFLICT:   n_conflict++;
      P2_DROP_PROTECTED:  n_protected++;
      P2_DROP_SINGLEPORT: n_single++;
      default: if (w1 && exp_we2) n_dual++;
    endcase
    checks++;
    if (we_1 !== w1 || we_2 !== exp_we2 || p2_status !== exp_st) begin
      failures++;
      $display("FAIL sp=%0b wr1=%0b a1=%02h wr2=%0b a2=%02h: we1=%0b we2=%0b st=%0d, expected %0b %0b %0d",
               sp, w1, a1, w2, a2, we_1, we_2, p2_status, w1, exp_we2, exp_st);
    end
  endtask

  initial begin
    // the five cases, same and different addresses
    apply(0, 1, 8'h40, 0, 8'h40);   // P1 write, P2 read
    apply(0, 1, 8'h40, 0, 8'h41);
    apply(0, 0, 8'h50, 1, 8'h50);   // P1 read, P2 write
    apply(0, 0, 8'h50, 1, 8'h51);
    apply(0, 0, 8'h60, 0, 8'h60);   // both read
    apply(0, 1, 8'h70, 1, 8'h71);   // both write, different
    apply(0, 1, 8'h70, 1, 8'h70);   // both write, same: P2 dropped
    // protection boundary
    apply(0, 0, 8'h00, 1, 8'h00);
    apply(0, 0, 8'h00, 1, 8'h0F);
    apply(0, 0, 8'h00, 1, 8'h10);
    apply(0, 1, 8'h05, 0, 8'h05);   // Port 1 may write the protected range
    // single-port mode
    apply(1, 0, 8'h80, 1, 8'h90);
    apply(1, 1, 8'h80, 0, 8'h90);
    for (int i = 0; i < 5000; i++)
      apply(1'($urandom_range(0, 7) == 0), 1'($urandom_range(0, 1)),
            8'($urandom_range(8, 24)), 1'($urandom_range(0, 1)),
            8'($urandom_range(8, 24)));
    for (int i = 0; i < 2000; i++)
      apply(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 8'($urandom),
            1'($urandom_range(0, 1)), 8'($urandom));
    $display("conflicts=%0d protected=%0d singleport=%0d dual writes=%0d",
             n_conflict, n_protected, n_single, n_dual);
    checks++;
    if (n_conflict == 0 || n_protected == 0 || n_single == 0 || n_dual == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
