// tb_pwm_gen - self-checking test of the PWM generator.
//
// A sync pulse every 7222 clocks (18 kHz at 130 MHz). Duty cycles loaded in
// the middle of a period must act only from the next sync; each channel's
// high time over one 9 kHz carrier period (two sync periods) must be twice
// its duty value; block must force every output low at once.
module tb_pwm_gen;
  import remcs_pkg::*;
  localparam int HALF = CLK_HZ_DEF / SAMPLE_HZ_DEF;
  logic clk = 1'b0, rst_n = 1'b0, sync_in = 1'b0, load = 1'b0, block = 1'b0;
  logic [N_PWM-1:0][15:0] duty;
  logic [N_PWM-1:0] pwm;
  logic [15:0] carrier;
  logic rising;
  int checks = 0, failures = 0;
  int hi [N_PWM];
  int want [N_PWM];

  always #4 clk = ~clk;
  pwm_gen dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (12 * HALF) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sync generator
  initial begin
    repeat (10) @(negedge clk);
    forever begin
      sync_in = 1;
      @(negedge clk);
      sync_in = 0;
      repeat (HALF - 1) @(negedge clk);
    end
  end

  initial begin
    duty = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    want = '{0, 1, 1000, 3611, 7000, 9000};
    // load in the middle of a period
    @(posedge sync_in);
    repeat (HALF / 2) @(negedge clk);
    for (int i = 0; i < N_PWM; i++) duty[i] = 16'(want[i]);
    load = 1;
    @(negedge clk);
    load = 0;
    duty = '0;
    check(pwm == '0, "new duty not active before the sync");
    // measure from the start of a rising half over two halves
    do @(posedge sync_in); while (rising);
    @(negedge clk);
    hi = '{default: 0};
    repeat (2 * HALF) begin
      for (int i = 0; i < N_PWM; i++) hi[i] += int'(pwm[i]);
      @(negedge clk);
    end
    for (int i = 0; i < N_PWM; i++)
      check(hi[i] == 2 * (want[i] > HALF ? HALF : want[i]),
            $sformatf("channel %0d high %0d clocks", i, hi[i]));
    // centre: channel 2 is high at the valley, low at the peak
    do @(posedge sync_in); while (rising);
    @(negedge clk);
    check(pwm[2] && carrier == 16'd0, "high at the valley");
    repeat (HALF - 3) @(negedge clk);
    check(!pwm[2], "low at the peak");
    block = 1;
    #1 check(pwm == '0, "block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
