// tb_sample_timer - self-checking test of the sampling timer.
//
// A master timer drives the sync and EOC lines of a slave timer, at the
// default 130 MHz clock. The test checks the sync period (7222 clocks,
// 55.6 us), the conversion time (442 clocks, 3.4 us) from sync to EOC, the
// ADC start on both cards, and that both capture their ADC data on EOC.
module tb_sample_timer;
  import remcs_pkg::*;
  localparam int PERIOD = CLK_HZ_DEF / SAMPLE_HZ_DEF;
  localparam int CONV   = 442;
  logic clk = 1'b0, rst_n = 1'b0;
  logic m_sync, m_eoc, s_sync, s_eoc, m_start, s_start, m_irq, s_irq;
  logic [N_ADC-1:0][15:0] m_adc, s_adc, m_q, s_q;
  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  sample_timer #(.IS_MASTER(1'b1)) u_m (
    .clk, .rst_n, .sync_out(m_sync), .sync_in(m_sync), .eoc_out(m_eoc), .eoc_in(m_eoc),
    .adc_start(m_start), .adc_data(m_adc), .adc_q(m_q), .sample_irq(m_irq));
  sample_timer #(.IS_MASTER(1'b0)) u_s (
    .clk, .rst_n, .sync_out(s_sync), .sync_in(m_sync), .eoc_out(s_eoc), .eoc_in(m_eoc),
    .adc_start(s_start), .adc_data(s_adc), .adc_q(s_q), .sample_irq(s_irq));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, t_sync [$], t_eoc [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (m_sync) t_sync.push_back(cyc);
    if (m_eoc)  t_eoc.push_back(cyc);
    if (s_sync || s_eoc) begin failures++; $display("FAIL: slave drives a line"); end
  end

  initial begin
    for (int i = 0; i < N_ADC; i++) begin m_adc[i] = 16'(i); s_adc[i] = 16'(100 + i); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      wait (m_sync);
      #1 check(m_start && s_start, "ADC start on both cards");
      for (int i = 0; i < N_ADC; i++) begin m_adc[i] = 16'(p * 1000 + i); s_adc[i] = 16'(p * 1000 + 500 + i); end
      @(posedge m_irq);
      #1 check(s_irq, "interrupt on both cards");
      check(m_q[3] == 16'(p * 1000 + 3) && s_q[7] == 16'(p * 1000 + 507), "samples captured");
      @(negedge clk);
    end
    check(t_sync.size() == 3 && t_eoc.size() == 3, "three periods");
    check(t_sync[1] - t_sync[0] == PERIOD && t_sync[2] - t_sync[1] == PERIOD,
          $sformatf("sync period %0d", t_sync[1] - t_sync[0]));
    check(t_eoc[0] - t_sync[0] == CONV + 1, $sformatf("EOC %0d after sync", t_eoc[0] - t_sync[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
