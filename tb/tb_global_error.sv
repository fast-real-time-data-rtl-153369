// tb_global_error - self-checking test of the global error logic.
//
// A local fault must drive the line and block PWM in the same clock and be
// latched; the line alone must block PWM and set the remote flag; clear must
// release the latch only when no fault is active.
module tb_global_error;
  import remcs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_FAULT-1:0] fault, cause;
  logic glob_in, clear, glob_drive, pwm_block, remote;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  global_error dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault = '0; glob_in = 0; clear = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!pwm_block && !glob_drive && cause == '0 && !remote, "quiet after reset");
    fault = 6'b000010;
    #1 check(pwm_block && glob_drive, "fault blocks at once");
    @(negedge clk);
    fault = '0;
    glob_in = 1;                      // the line follows the drive
    #1 check(cause == 6'b000010 && glob_drive && pwm_block, "cause latched");
    clear = 1;
    fault = 6'b100000;                // clear refused while a fault is active
    @(negedge clk);
    clear = 0;
    fault = '0;
    check(cause == 6'b100010, "clear refused under an active fault");
    clear = 1;
    @(negedge clk);
    clear = 0;
    glob_in = 0;
    #1 check(cause == '0 && !glob_drive && !pwm_block, "cleared");
    // an error of another card
    @(negedge clk);
    glob_in = 1;
    #1 check(pwm_block && !glob_drive, "remote error blocks, not driven");
    @(negedge clk);
    glob_in = 0;
    #1 check(remote && pwm_block, "remote flag holds the block");
    clear = 1;
    @(negedge clk);
    clear = 0;
    #1 check(!remote && !pwm_block, "remote cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
