// tb_remcs_top - end-to-end test of the REMCS backplane at default sizes.
//
// Five CPU models fill their cards' mailboxes over the parallel bus, then
// the test runs the exchange of a sampling period as the master's CPU would:
// on the EOC interrupt it starts part 1 (user data out, slave status back),
// then part 2 (duty cycles out, user data back, Table II packet to MCU01).
// Every received mailbox area is read back over the bus and compared with
// values the test works out itself. It then checks the PWM of the slaves in
// the next periods, the global error line, a bypassed slot and a frame
// broken on the line, and counts how often each of these happened.
module tb_remcs_top;
  import remcs_pkg::*;

  localparam int unsigned PERIOD = CLK_HZ_DEF / SAMPLE_HZ_DEF;
  localparam int unsigned CONV   = int'((longint'(CLK_HZ_DEF) * ADC_CONV_NS) / 64'd1_000_000_000);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CARDS-1:0]                  slot_present;
  logic [N_CARDS-1:0]                  cpu_cs_n, cpu_we_n, cpu_oe_n;
  logic [N_CARDS-1:0][CPU_AW-1:0]      cpu_addr;
  logic [N_CARDS-1:0][15:0]            cpu_din, cpu_dout;
  logic [N_CARDS-1:0]                  cpu_dout_oe, cpu_irq, adc_start;
  logic [N_CARDS-1:0][N_ADC-1:0][15:0] adc_data;
  logic [N_CARDS-1:0][N_FAULT-1:0]     fault;
  logic [N_CARDS-1:0][N_PWM-1:0]       pwm;
  logic [N_CARDS-1:0][7:0]             led;
  logic [N_CARDS-1:0][31:0]            io_out;
  logic sync_line, eoc_line, err_line;

  always #4 clk = ~clk;

  remcs_top dut (.*);

  int checks = 0, failures = 0;
  int n_exch1 = 0, n_exch2 = 0, n_t2 = 0, n_snoop = 0, n_block = 0,
      n_bypass = 0, n_broken = 0, n_pwm = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------- CPU bus
  task automatic bus_wr(input int c, input logic [CPU_AW-1:0] a, input logic [15:0] v);
    @(negedge clk);
    cpu_addr[c] = a; cpu_din[c] = v; cpu_cs_n[c] = 1'b0; cpu_we_n[c] = 1'b0;
    repeat (4) @(negedge clk);
    cpu_we_n[c] = 1'b1; cpu_cs_n[c] = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  task automatic bus_rd(input int c, input logic [CPU_AW-1:0] a, output logic [15:0] v);
    @(negedge clk);
    cpu_addr[c] = a; cpu_cs_n[c] = 1'b0; cpu_oe_n[c] = 1'b0;
    repeat (6) @(negedge clk);
    v = cpu_dout[c];
    cpu_oe_n[c] = 1'b1; cpu_cs_n[c] = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  function automatic logic [CPU_AW-1:0] reg_a(input logic [7:0] r);
    return {1'b1, 4'b0, r};
  endfunction

  function automatic logic [CPU_AW-1:0] mb_a(input logic rx, input logic [1:0] ph,
                                            input logic [2:0] peer, input int idx);
    return {1'b0, rx, ph, peer, 6'(idx)};
  endfunction

  // -------------------------------------------------- reference contents
  function automatic logic [15:0] m_user(input int d, input int i);   // master -> d, part 1
    return 16'hA000 | 16'(d << 8) | 16'(i);
  endfunction
  function automatic logic [15:0] m_duty(input int d, input int ch);
    return 16'(500 + d * 300 + ch * 1000);
  endfunction
  function automatic logic [15:0] m_ctl(input int d, input int i);    // Table III
    if (i < 4)  return 16'hB000 | 16'(d << 8) | 16'(i);
    if (i == 4) return 16'hC000 | 16'(d);
    if (i == 5) return 16'hC100 | 16'(d);
    if (i == 6) return 16'(8'h50 + d);
    return m_duty(d, i - 7);
  endfunction
  function automatic logic [15:0] adc_val(input int c, input int ch);
    return 16'((c << 12) | (ch << 8) | 8'h42);
  endfunction
  function automatic logic [15:0] s_stat(input int k, input int i);  // Table I, CPU part
    return 16'h5000 | 16'(k << 8) | 16'(i);
  endfunction
  function automatic logic [15:0] s_stat_rx(input int k, input int i, input logic [15:0] pstat);
    if (i == 13 || i == 15) return 16'h0;
    if (i >= 17 && i < 25)  return adc_val(k, i - 17);
    if (i == 25)            return pstat;
    return s_stat(k, i);
  endfunction
  function automatic logic [15:0] t2_word(input int j);
    int k, o;
    if (j < 4) return 16'hD000 | 16'(j);
    if (j < 37) begin
      k = 1 + (j - 4) / 11;
      o = (j - 4) % 11;
      if (o < 8)  return adc_val(k, o);
      if (o == 8) return 16'h0;                 // PWM levels at the time of part 1
      return m_duty(k, o - 9);
    end
    if (j < 45) return adc_val(0, j - 37);
    k = 1 + (j - 45) / 4;
    return m_user(k, (j - 45) % 4);
  endfunction

  // ------------------------------------------------------------- watchdog
  initial begin : watchdog
    repeat (12 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ sync / EOC timing
  int sync_t [$];
  int eoc_t  [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && sync_line) sync_t.push_back(cyc);
    if (rst_n && eoc_line)  eoc_t.push_back(cyc);
  end

  // ------------------------------------------------------------ test body
  logic [15:0] v;
  int t0, hi_u, hi_v;

  task automatic wait_master_idle();
    logic [15:0] st;
    do bus_rd(0, reg_a(REG_STATUS), st); while (st[0]);
  endtask

  initial begin
    slot_present = '1;
    cpu_cs_n = '1; cpu_we_n = '1; cpu_oe_n = '1;
    cpu_addr = '0; cpu_din = '0; fault = '0;
    for (int c = 0; c < N_CARDS; c++)
      for (int ch = 0; ch < N_ADC; ch++) adc_data[c][ch] = adc_val(c, ch);
    repeat (5) @(negedge clk);
    rst_n = 1'b1;

    // ---- mailboxes filled by the CPUs, all cards at once
    fork
      begin
        for (int d = 1; d <= 4; d++)
          for (int i = 0; i < 4; i++) bus_wr(0, mb_a(0, PH_EXCH1, 3'(d), i), m_user(d, i));
        for (int d = 1; d <= 3; d++)
          for (int i = 0; i < 13; i++) bus_wr(0, mb_a(0, PH_EXCH2, 3'(d), i), m_ctl(d, i));
        for (int i = 0; i < 4; i++) bus_wr(0, mb_a(0, PH_MCU, ID_MCU, i), 16'hD000 | 16'(i));
      end
      begin
        for (int i = 0; i < 26; i++) bus_wr(1, mb_a(0, PH_EXCH1, 0, i), s_stat(1, i));
        for (int i = 0; i < 4; i++)  bus_wr(1, mb_a(0, PH_EXCH2, 0, i), 16'h6100 | 16'(i));
      end
      begin
        for (int i = 0; i < 26; i++) bus_wr(2, mb_a(0, PH_EXCH1, 0, i), s_stat(2, i));
        for (int i = 0; i < 4; i++)  bus_wr(2, mb_a(0, PH_EXCH2, 0, i), 16'h6200 | 16'(i));
      end
      begin
        for (int i = 0; i < 26; i++) bus_wr(3, mb_a(0, PH_EXCH1, 0, i), s_stat(3, i));
        for (int i = 0; i < 4; i++)  bus_wr(3, mb_a(0, PH_EXCH2, 0, i), 16'h6300 | 16'(i));
      end
      begin
        for (int i = 0; i < 4; i++)  bus_wr(4, mb_a(0, PH_MCU, 0, i), 16'h7000 | 16'(i));
      end
    join

    // ---- step 1-2: sync, ADC start, EOC interrupt on every card
    wait (cpu_irq == '1);
    check(sync_t.size() == 1 && eoc_t.size() == 1, "one sync and one EOC");
    check(eoc_t[0] - sync_t[0] == CONV + 1, $sformatf("EOC %0d clocks after sync", eoc_t[0] - sync_t[0]));
    for (int c = 0; c < N_CARDS; c++) bus_wr(c, reg_a(REG_CMD), 16'h0008);   // ack
    bus_rd(2, reg_a(REG_ADC0 + 8'd3), v);
    check(v == adc_val(2, 3), "ADC sample captured on V");

    // ---- step 3/9: part 1
    t0 = cyc;
    bus_wr(0, reg_a(REG_CMD), 16'h0001);
    wait_master_idle();
    $display("part 1 took %0d clocks (%0d ns)", cyc - t0, longint'(cyc - t0) * 1_000_000_000 / CLK_HZ_DEF);
    check(cyc - t0 <= int'(6400 * longint'(CLK_HZ_DEF) / 64'd1_000_000_000),
          "part 1 within 6.4 us");
    bus_rd(0, reg_a(REG_STATUS), v);
    check(v[12:8] == 5'b01110, $sformatf("master got status of U,V,W (mask %b)", v[12:8]));
    if (v[12:8] == 5'b01110) n_exch1++;
    for (int k = 1; k <= 3; k++)
      for (int i = 0; i < 26; i++) begin
        bus_rd(0, mb_a(1, PH_EXCH1, 3'(k), i), v);
        check(v == s_stat_rx(k, i, 16'h0), $sformatf("master rx T1 card %0d word %0d = %04x", k, i, v));
      end
    for (int k = 1; k <= 4; k++)
      for (int i = 0; i < 4; i++) begin
        bus_rd(k, mb_a(1, PH_EXCH1, ID_MASTER, i), v);
        check(v == m_user(k, i), $sformatf("card %0d user data word %0d", k, i));
      end
    // MCU01 read the slaves' status messages on their way
    for (int k = 1; k <= 3; k++)
      for (int i = 17; i < 26; i++) begin
        bus_rd(4, mb_a(1, PH_EXCH1, 3'(k), i), v);
        check(v == s_stat_rx(k, i, 16'h0), $sformatf("MCU snoop card %0d word %0d", k, i));
        if (v == s_stat_rx(k, i, 16'h0) && i == 17) n_snoop++;
      end

    // ---- step 8/10/11: part 2
    t0 = cyc;
    bus_wr(0, reg_a(REG_CMD), 16'h0002);
    wait_master_idle();
    $display("part 2 took %0d clocks (%0d ns)", cyc - t0, longint'(cyc - t0) * 1_000_000_000 / CLK_HZ_DEF);
    check(cyc - t0 < PERIOD / 4, "part 2 well within the period");
    bus_rd(0, reg_a(REG_STATUS), v);
    check(v[12:8] == 5'b11110, $sformatf("master got user data of U,V,W,MCU (mask %b)", v[12:8]));
    if (v[12:8] == 5'b11110) n_exch2++;
    for (int k = 1; k <= 3; k++) begin
      check(led[k] == 8'(8'h50 + k), "LED byte on slave");
      check(io_out[k] == {16'hC100 | 16'(k), 16'hC000 | 16'(k)}, "I/O word on slave");
      for (int i = 0; i < 4; i++) begin
        bus_rd(0, mb_a(1, PH_EXCH2, 3'(k), i), v);
        check(v == (16'h6000 | 16'(k << 8) | 16'(i)), "master rx slave user data");
      end
    end
    for (int i = 0; i < 4; i++) begin
      bus_rd(0, mb_a(1, PH_MCU, ID_MCU, i), v);
      check(v == (16'h7000 | 16'(i)), "master rx MCU user data");
    end
    begin
      int ok = 1;
      for (int j = 0; j < 57; j++) begin
        bus_rd(4, mb_a(1, PH_MCU, ID_MASTER, j), v);
        check(v == t2_word(j), $sformatf("MCU Table II word %0d = %04x, want %04x", j, v, t2_word(j)));
        if (v != t2_word(j)) ok = 0;
      end
      n_t2 += ok;
    end

    // ---- PWM: new duty cycles act from the next sync, carriers in step
    wait (sync_t.size() == 2);
    @(posedge clk);
    wait (sync_line);                  // a rising half starts after this one
    @(posedge clk);
    if (!dut.g_card[1].u_card.u_pwm.rising) begin
      wait (sync_line);
      @(posedge clk);
    end
    #1;
    check(pwm[1][0] && pwm[2][0] && pwm[3][0], "PWM of U, V, W high together at the valley");
    hi_u = 0; hi_v = 0;
    repeat (2 * PERIOD) begin
      @(posedge clk); #1;
      hi_u += int'(pwm[1][0]);
      hi_v += int'(pwm[2][5]);
    end
    check(hi_u == 2 * m_duty(1, 0), $sformatf("U ch0 high %0d clocks per 9 kHz period", hi_u));
    check(hi_v == 2 * m_duty(2, 5), $sformatf("V ch5 high %0d clocks", hi_v));
    if (hi_u == 2 * m_duty(1, 0)) n_pwm++;

    // ---- global error: a fault on V blocks every card at once
    @(negedge clk);
    fault[2] = 6'b000100;
    #1;
    check(err_line && pwm == '0, "fault on V blocks all PWM at once");
    if (err_line && pwm == '0) n_block++;
    @(negedge clk);
    fault[2] = '0;
    repeat (3) @(negedge clk);
    check(pwm == '0, "PWM stays blocked after the fault is gone");
    bus_rd(2, reg_a(REG_CAUSE), v);
    check(v[5:0] == 6'b000100, "cause latched on V");
    bus_rd(1, reg_a(REG_CAUSE), v);
    check(v[15], "U sees a remote error");
    bus_wr(2, reg_a(REG_CMD), 16'h0004);     // the card with the cause first
    repeat (2) @(negedge clk);
    check(!err_line, "error line released");
    check(pwm[1] == '0, "U still blocked by its remote flag");
    for (int c = 0; c < N_CARDS; c++) if (c != 2) bus_wr(c, reg_a(REG_CMD), 16'h0004);
    hi_u = 0;
    repeat (PERIOD) begin
      @(negedge clk);
      hi_u += int'(pwm[1] != '0);
    end
    check(hi_u > 0, "PWM running again");

    // ---- a broken symbol on the line from the master during part 1
    fork
      begin
        wait (dut.g_card[0].u_card.tx_sym.valid);
        repeat (6) @(posedge clk);
        @(negedge clk);
        force dut.ring[1] = 10'b1111100000;
        @(negedge clk);
        release dut.ring[1];
      end
      bus_wr(0, reg_a(REG_CMD), 16'h0001);
    join
    wait_master_idle();
    bus_rd(1, reg_a(REG_RXERR), v);
    check(v == 16'd1, $sformatf("U counted one broken frame (%0d)", v));
    if (v == 16'd1) n_broken++;
    bus_rd(1, reg_a(REG_STATUS), v);
    bus_rd(0, reg_a(REG_STATUS), v);
    check(v[12:8] == 5'b01110, "U still answered the broken message");

    // ---- bypassed slot: W removed
    slot_present[3] = 1'b0;
    repeat (20) @(negedge clk);
    bus_wr(0, reg_a(REG_CMD), 16'h0001);
    wait_master_idle();
    bus_rd(0, reg_a(REG_STATUS), v);
    check(v[12:8] == 5'b00110, $sformatf("with W bypassed only U, V answer (mask %b)", v[12:8]));
    if (v[12:8] == 5'b00110) n_bypass++;
    for (int c = 0; c < N_CARDS; c++) begin
      bus_rd(c, reg_a(REG_COLL), v);
      check(v == 16'd0, "no forwarded symbol lost");
    end

    // ---- period
    check(sync_t.size() >= 3 && sync_t[1] - sync_t[0] == PERIOD, "sync period");

    $display("mechanisms: exch1=%0d exch2=%0d tableII=%0d snoop=%0d pwm=%0d block=%0d broken=%0d bypass=%0d",
             n_exch1, n_exch2, n_t2, n_snoop, n_pwm, n_block, n_broken, n_bypass);
    check(n_exch1 > 0 && n_exch2 > 0 && n_t2 > 0 && n_snoop > 0 && n_pwm > 0 &&
          n_block > 0 && n_broken > 0 && n_bypass > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
