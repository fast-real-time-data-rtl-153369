// tb_frame_rx - self-checking test of the frame receiver.
//
// Two receivers, a DIF01 slave (card U) and MCU01, see the same symbol
// stream. The test sends: the master's control message to U (Table III),
// which U must store and whose duty cycles, LED and I/O words U must hand on;
// a status reply of V to the master, which only MCU01 keeps; a message to U
// broken by a code error, which must be reported and not handed on; and a
// message to U with a wrong end. Mailbox writes are recorded and compared.
module tb_frame_rx;
  import remcs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] d;
  logic k, sym_err;
  // card U
  logic u_we, u_end, u_ok, u_err, u_upd;
  mb_addr_t u_addr;
  logic [15:0] u_wdata;
  hdr_t u_hdr;
  logic [N_PWM-1:0][15:0] u_duty, m_duty;
  logic [7:0] u_led, m_led;
  logic [31:0] u_io, m_io;
  // MCU01
  logic m_we, m_end, m_ok, m_err, m_upd;
  mb_addr_t m_addr;
  logic [15:0] m_wdata;
  hdr_t m_hdr;
  int checks = 0, failures = 0;
  int u_writes = 0, m_writes = 0, u_ends = 0, u_oks = 0, u_errs = 0, u_upds = 0, m_oks = 0;
  logic [15:0] u_mem [4096], m_mem [4096];

  always #5 clk = ~clk;

  frame_rx #(.MY_ID(ID_U)) u_rx (
    .clk, .rst_n, .d, .k, .sym_err, .mb_we(u_we), .mb_addr_o(u_addr), .mb_wdata(u_wdata),
    .rx_end(u_end), .rx_ok(u_ok), .rx_hdr(u_hdr), .rx_err(u_err),
    .ctl_upd(u_upd), .duty(u_duty), .led(u_led), .io(u_io));
  frame_rx #(.MY_ID(ID_MCU)) m_rx (
    .clk, .rst_n, .d, .k, .sym_err, .mb_we(m_we), .mb_addr_o(m_addr), .mb_wdata(m_wdata),
    .rx_end(m_end), .rx_ok(m_ok), .rx_hdr(m_hdr), .rx_err(m_err),
    .ctl_upd(m_upd), .duty(m_duty), .led(m_led), .io(m_io));

  always @(posedge clk) if (rst_n) begin
    if (u_we) begin u_writes++; u_mem[u_addr] = u_wdata; end
    if (m_we) begin m_writes++; m_mem[m_addr] = m_wdata; end
    if (u_end) u_ends++;
    if (u_end && u_ok) u_oks++;
    if (u_err) u_errs++;
    if (u_upd) u_upds++;
    if (m_end && m_ok) m_oks++;
    if (m_upd) begin failures++; $display("FAIL: MCU01 took PWM data"); end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sym(input logic kk, input logic [7:0] v, input logic e = 1'b0);
    k = kk; d = v; sym_err = e;
    @(negedge clk);
    k = 1'b1; d = K_IDLE; sym_err = 1'b0;
  endtask

  // frame with words w(i) = base_v + i; err_at >= 0 breaks that payload byte;
  // bad_end sends a data byte in place of EOF
  task automatic frame(input hdr_t h, input int n, input logic [15:0] base_v,
                       input int err_at = -1, input bit bad_end = 0);
    sym(1, K_SOF);
    sym(0, h);
    sym(0, 8'(n));
    for (int i = 0; i < n; i++) begin
      logic [15:0] w = wv(h, base_v, i);
      sym(0, w[7:0], 2 * i == err_at);
      sym(0, w[15:8], 2 * i + 1 == err_at);
    end
    if (bad_end) sym(0, 8'h00); else sym(1, K_EOF);
    repeat (3) @(negedge clk);
  endtask

  // word i of a test message; Table III words get meaningful values
  function automatic logic [15:0] wv(input hdr_t h, input logic [15:0] b, input int i);
    if (h.ph == PH_EXCH2 && h.dst == ID_U && i >= 4) return b + 16'(i * 100);
    return b + 16'(i);
  endfunction

  initial begin
    d = K_IDLE; k = 1; sym_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. Table III to U
    frame('{ph: PH_EXCH2, src: ID_MASTER, dst: ID_U}, 13, 16'h1000);
    check(u_writes == 13 && u_oks == 1 && u_upds == 1, "U kept the control message");
    for (int i = 0; i < 13; i++)
      check(u_mem[{1'b1, PH_EXCH2, ID_MASTER, 6'(i)}] == wv('{PH_EXCH2, ID_MASTER, ID_U}, 16'h1000, i),
            $sformatf("U mailbox word %0d", i));
    for (int c = 0; c < N_PWM; c++)
      check(u_duty[c] == 16'h1000 + 16'((7 + c) * 100), $sformatf("duty %0d = %0d", c, u_duty[c]));
    check(u_led == 8'(16'h1000 + 600), "LED byte");
    check(u_io == {16'h1000 + 16'd500, 16'h1000 + 16'd400}, "I/O word");
    check(m_writes == 0, "MCU01 ignores a message to U");
    // 2. status reply of V to the master: MCU01 keeps it, U does not
    frame('{ph: PH_EXCH1, src: ID_V, dst: ID_MASTER}, 26, 16'h2000);
    check(m_writes == 26 && m_oks == 1, "MCU01 read the reply");
    check(m_mem[{1'b1, PH_EXCH1, ID_V, 6'd20}] == 16'h2014, "MCU01 mailbox word 20");
    check(u_writes == 13, "U ignores the reply");
    // 3. broken control message
    frame('{ph: PH_EXCH2, src: ID_MASTER, dst: ID_U}, 13, 16'h3000, 17);
    check(u_errs == 1 && u_ends == 2 && u_oks == 1 && u_upds == 1, "broken message reported, not used");
    check(u_duty[0] == 16'h1000 + 16'd700, "duty kept");
    // 4. message without its end
    frame('{ph: PH_EXCH1, src: ID_MASTER, dst: ID_U}, 4, 16'h4000, -1, 1);
    check(u_errs == 2 && u_ends == 3 && u_oks == 1, "missing end reported");
    // 5. a good message to U in part 1
    frame('{ph: PH_EXCH1, src: ID_MASTER, dst: ID_U}, 4, 16'h5000);
    check(u_oks == 2 && u_upds == 1, "part 1 message kept, no PWM update");
    check(u_mem[{1'b1, PH_EXCH1, ID_MASTER, 6'd3}] == 16'h5003, "U user data word 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
