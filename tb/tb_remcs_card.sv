// tb_remcs_card - self-checking test of one card's FPGA (DIF01 slave U).
//
// The test plays the rest of the system: it encodes the master's messages
// onto the card's ring input, decodes the card's ring output, drives the
// sync and EOC lines, and acts as the card's CPU on the parallel bus. It
// checks the status message the card answers with (CPU words plus ADC,
// PWM blocking, PWM errors and PWM levels filled in by hardware), the user
// data answer to the control message, the LED / I/O outputs and PWM driven
// by the control message, a message for another card passing through, the
// interrupt on EOC, and the global error output.
module tb_remcs_card;
  import remcs_pkg::*;
  localparam int PERIOD = CLK_HZ_DEF / SAMPLE_HZ_DEF;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] src_d;
  logic src_k, src_rd;
  logic [9:0] ring_rx, ring_tx;
  logic sync_out, sync_in = 0, eoc_out, eoc_in = 0, err_out, err_in, adc_start;
  logic [N_ADC-1:0][15:0] adc_data;
  logic [N_FAULT-1:0] fault = '0;
  logic [N_PWM-1:0] pwm;
  logic [7:0] led;
  logic [31:0] io_out;
  logic cpu_cs_n = 1, cpu_we_n = 1, cpu_oe_n = 1;
  logic [CPU_AW-1:0] cpu_addr = '0;
  logic [15:0] cpu_din = '0, cpu_dout;
  logic cpu_dout_oe, cpu_irq;
  logic [7:0] out_d;
  logic out_k, out_cerr, out_derr;
  int checks = 0, failures = 0;
  sym_t outq [$];

  always #4 clk = ~clk;
  assign err_in = err_out;

  enc_8b10b u_src (.clk, .rst_n, .din(src_d), .kin(src_k), .code(ring_rx), .rd(src_rd));
  remcs_card #(.MY_ID(ID_U)) dut (.*);
  dec_8b10b u_sink (.clk, .rst_n, .code(ring_tx), .dout(out_d), .kout(out_k),
                    .code_err(out_cerr), .disp_err(out_derr));

  always @(posedge clk)
    if (rst_n && !(out_k && out_d == K_IDLE)) outq.push_back('{1'b1, out_k, out_d});

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (6 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_wr(input logic [CPU_AW-1:0] a, input logic [15:0] v);
    @(negedge clk);
    cpu_addr = a; cpu_din = v; cpu_cs_n = 0; cpu_we_n = 0;
    repeat (4) @(negedge clk);
    cpu_we_n = 1; cpu_cs_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic bus_rd(input logic [CPU_AW-1:0] a, output logic [15:0] v);
    @(negedge clk);
    cpu_addr = a; cpu_cs_n = 0; cpu_oe_n = 0;
    repeat (6) @(negedge clk);
    v = cpu_dout;
    cpu_oe_n = 1; cpu_cs_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic put(input logic kk, input logic [7:0] v);
    src_k = kk; src_d = v;
    @(negedge clk);
    src_k = 1; src_d = K_IDLE;
  endtask

  task automatic send(input hdr_t h, input logic [15:0] w [$]);
    put(1, K_SOF); put(0, h); put(0, 8'(w.size()));
    foreach (w[i]) begin put(0, w[i][7:0]); put(0, w[i][15:8]); end
    put(1, K_EOF);
  endtask

  // takes one frame from the output queue
  task automatic take(output hdr_t h, output logic [15:0] w [$]);
    int n;
    w.delete();
    h = '0;
    check(outq.size() >= 4 && outq[0].k && outq[0].d == K_SOF, "frame starts with SOF");
    if (outq.size() < 4) return;
    h = hdr_t'(outq[1].d);
    n = int'(outq[2].d);
    check(outq.size() >= 4 + 2 * n, "whole frame");
    if (outq.size() < 4 + 2 * n) return;
    for (int i = 0; i < n; i++) w.push_back({outq[4 + 2*i].d, outq[3 + 2*i].d});
    check(outq[3 + 2*n].k && outq[3 + 2*n].d == K_EOF, "frame ends with EOF");
    repeat (4 + 2 * n) void'(outq.pop_front());
  endtask

  logic [15:0] v;
  logic [15:0] w [$];
  logic [15:0] req [$];
  hdr_t h;

  initial begin
    src_k = 1; src_d = K_IDLE;
    for (int i = 0; i < N_ADC; i++) adc_data[i] = 16'h0A00 + 16'(i);
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 26; i++) bus_wr({1'b0, 1'b0, PH_EXCH1, ID_MASTER, 6'(i)}, 16'h5100 + 16'(i));
    for (int i = 0; i < 4; i++)  bus_wr({1'b0, 1'b0, PH_EXCH2, ID_MASTER, 6'(i)}, 16'h6100 + 16'(i));
    // sampling: sync, then EOC captures the ADC and interrupts the CPU
    @(negedge clk); sync_in = 1; #1 check(adc_start, "ADC start on sync"); @(negedge clk); sync_in = 0;
    repeat (20) @(negedge clk);
    @(negedge clk); eoc_in = 1; @(negedge clk); eoc_in = 0;
    @(negedge clk);
    check(cpu_irq, "interrupt on EOC");
    check(!sync_out && !eoc_out, "a slave drives neither sync nor EOC");
    bus_wr({1'b1, 4'b0, REG_CMD}, 16'h0008);
    check(!cpu_irq, "interrupt acknowledged");
    // part 1: user data in, status out
    outq.delete();
    req = '{16'h1111, 16'h2222, 16'h3333, 16'h4444};
    send('{PH_EXCH1, ID_MASTER, ID_U}, req);
    repeat (80) @(negedge clk);
    take(h, w);
    check(h == '{PH_EXCH1, ID_U, ID_MASTER}, "status header");
    check(w.size() == LEN_T1, "status length");
    if (w.size() == LEN_T1)
      for (int i = 0; i < 26; i++) begin
        logic [15:0] e;
        e = 16'h5100 + 16'(i);
        if (i == 13 || i == 15 || i == 25) e = 16'h0;
        if (i >= 17 && i < 25) e = 16'h0A00 + 16'(i - 17);
        check(w[i] == e, $sformatf("status word %0d = %04x want %04x", i, w[i], e));
      end
    check(outq.size() == 0, "nothing else sent");
    bus_rd({1'b0, 1'b1, PH_EXCH1, ID_MASTER, 6'd2}, v);
    check(v == 16'h3333, "user data from the master in the mailbox");
    // part 2: control message in, user data out
    req = '{16'hB000, 16'hB001, 16'hB002, 16'hB003, 16'hCAFE, 16'hBEEF, 16'h00A5,
            16'd100, 16'd200, 16'd300, 16'd400, 16'd500, 16'd7000};
    send('{PH_EXCH2, ID_MASTER, ID_U}, req);
    repeat (40) @(negedge clk);
    take(h, w);
    check(h == '{PH_EXCH2, ID_U, ID_MASTER} && w.size() == 4 && w[0] == 16'h6100 && w[3] == 16'h6103,
          "user data answer");
    check(led == 8'hA5 && io_out == 32'hBEEF_CAFE, "LED and I/O outputs");
    bus_rd({1'b1, 4'b0, REG_STATUS}, v);
    check(v[8 + ID_MASTER], "message from the master marked intact");
    check(pwm == '0, "duty cycles wait for the sync");
    // this sync starts a falling half: near the peak only duty 7000 is above
    // nothing, so all are low; the next sync starts a rising half
    @(negedge clk); sync_in = 1; @(negedge clk); sync_in = 0;
    repeat (50) @(negedge clk);
    check(pwm == 6'b000000, $sformatf("PWM near the peak: %b", pwm));
    @(negedge clk); sync_in = 1; @(negedge clk); sync_in = 0;
    repeat (50) @(negedge clk);
    check(pwm == 6'b111111, $sformatf("PWM near the valley: %b", pwm));
    repeat (250) @(negedge clk);
    check(pwm == 6'b111000, $sformatf("PWM with the carrier past 300: %b", pwm));
    // a message for V passes through unchanged
    outq.delete();
    req = '{16'h0102, 16'h0304};
    send('{PH_EXCH1, ID_MASTER, ID_V}, req);
    repeat (20) @(negedge clk);
    take(h, w);
    check(h == '{PH_EXCH1, ID_MASTER, ID_V} && w.size() == 2 && w[1] == 16'h0304, "message for V forwarded");
    // global error
    @(negedge clk); fault = 6'b010000; #1;
    check(err_out && pwm == '0, "fault drives the error line and blocks PWM");
    @(negedge clk); fault = '0;
    bus_rd({1'b1, 4'b0, REG_CAUSE}, v);
    check(v[5:0] == 6'b010000, "cause register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
