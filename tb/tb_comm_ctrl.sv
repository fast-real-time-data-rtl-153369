// tb_comm_ctrl - self-checking test of the exchange sequencer.
//
// Master: a model of the transmitter (busy for 4 + 2 * words clocks)
// answers the sequencer. The test starts part 1 and part 2 and checks the
// messages (destination, phase, length, mailbox area, mode), their spacing
// (message, then a gap as long as the expected answer plus the margin), the
// drain time, and the received-message mask. Slaves: a DIF01 slave and
// MCU01 must answer the master's messages with the right message at once,
// and MCU01 must not answer in part 1.
module tb_comm_ctrl;
  import remcs_pkg::*;
  localparam int GAP = 8, DRAIN = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start1 = 0, start2 = 0, mask_clr = 0;
  logic rx_end = 0, rx_ok = 0;
  hdr_t rx_hdr = '0;
  // master
  logic m_start, m_busy_tx = 0, m_done = 0, m_busy, m_seq_done;
  hdr_t m_hdr;
  logic [5:0] m_len;
  mb_addr_t m_base;
  txmode_e m_mode;
  logic [N_CARDS-1:0] m_mask;
  // slaves
  logic w_start, c_start, w_busy, c_busy, w_sd, c_sd;
  hdr_t w_hdr, c_hdr;
  logic [5:0] w_len, c_len;
  mb_addr_t w_base, c_base;
  txmode_e w_mode, c_mode;
  logic [N_CARDS-1:0] w_mask, c_mask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comm_ctrl #(.MY_ID(ID_MASTER), .GAP_MARGIN(GAP), .DRAIN(DRAIN)) u_m (
    .clk, .rst_n, .start1, .start2, .mask_clr, .rx_end, .rx_ok, .rx_hdr,
    .tx_start(m_start), .tx_hdr(m_hdr), .tx_len(m_len), .tx_base(m_base), .tx_mode(m_mode),
    .tx_busy(m_busy_tx), .tx_done(m_done), .busy(m_busy), .seq_done(m_seq_done), .rx_mask(m_mask));
  comm_ctrl #(.MY_ID(ID_W)) u_w (
    .clk, .rst_n, .start1(1'b0), .start2(1'b0), .mask_clr, .rx_end, .rx_ok, .rx_hdr,
    .tx_start(w_start), .tx_hdr(w_hdr), .tx_len(w_len), .tx_base(w_base), .tx_mode(w_mode),
    .tx_busy(1'b0), .tx_done(1'b0), .busy(w_busy), .seq_done(w_sd), .rx_mask(w_mask));
  comm_ctrl #(.MY_ID(ID_MCU)) u_c (
    .clk, .rst_n, .start1(1'b0), .start2(1'b0), .mask_clr, .rx_end, .rx_ok, .rx_hdr,
    .tx_start(c_start), .tx_hdr(c_hdr), .tx_len(c_len), .tx_base(c_base), .tx_mode(c_mode),
    .tx_busy(1'b0), .tx_done(1'b0), .busy(c_busy), .seq_done(c_sd), .rx_mask(c_mask));

  // transmitter model and message log
  typedef struct { int t; hdr_t h; int len; int base; txmode_e mode; } msg_t;
  msg_t log_q [$];
  int cyc = 0, left = 0, t_done = 0;
  always @(posedge clk) begin
    cyc++;
    m_done <= 1'b0;
    if (rst_n && m_start) begin
      log_q.push_back('{cyc, m_hdr, int'(m_len), int'(m_base), m_mode});
      m_busy_tx <= 1'b1;
      left = frame_syms(m_len);
    end else if (m_busy_tx) begin
      left--;
      if (left == 1) m_done <= 1'b1;
      if (left == 0) m_busy_tx <= 1'b0;
    end
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

  task automatic rx_event(input hdr_t h, input logic ok);
    @(negedge clk);
    rx_end = 1; rx_ok = ok; rx_hdr = h;
    #1;
  endtask

  task automatic check_seq(input int part);
    int want_len, want_gap;
    check(log_q.size() == 4, $sformatf("four messages, got %0d", log_q.size()));
    for (int n = 0; n < log_q.size(); n++) begin
      logic [2:0] dst = (n == 3) ? ID_MCU : 3'(n + 1);
      logic [1:0] ph = (part == 1) ? PH_EXCH1 : (n == 3 ? PH_MCU : PH_EXCH2);
      want_len = (part == 1) ? LEN_USER : (n == 3 ? LEN_T2 : LEN_T3);
      check(log_q[n].h == '{ph, ID_MASTER, dst}, $sformatf("message %0d header", n));
      check(log_q[n].len == want_len, $sformatf("message %0d length", n));
      check(log_q[n].mode == ((part == 2 && n == 3) ? TXM_T2 : TXM_PLAIN), "mode");
      if (!(part == 2 && n == 3))
        check(log_q[n].base == int'({1'b0, ph, dst, 6'd0}), $sformatf("message %0d area", n));
      if (n > 0) begin
        want_gap = (part == 1) ? frame_syms(LEN_T1) : frame_syms(LEN_USER);
        check(log_q[n].t - log_q[n-1].t ==
              frame_syms(log_q[n-1].len) + want_gap + GAP + 2,
              $sformatf("spacing %0d", log_q[n].t - log_q[n-1].t));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- master, part 1
    @(negedge clk); start1 = 1; @(negedge clk); start1 = 0;
    check(m_busy, "busy after start");
    wait (!m_busy);
    t_done = cyc;
    check_seq(1);
    check(t_done - log_q[3].t == frame_syms(LEN_USER) + GAP + DRAIN + 2,
          $sformatf("drain %0d", t_done - log_q[3].t));
    log_q.delete();
    // ---- master, part 2, with answers arriving
    @(negedge clk); start2 = 1; mask_clr = 1; @(negedge clk); start2 = 0; mask_clr = 0;
    rx_event('{PH_EXCH2, ID_U, ID_MASTER}, 1);
    rx_event('{PH_EXCH2, ID_V, ID_MASTER}, 0);      // broken, not in the mask
    rx_event('{PH_MCU, ID_MCU, ID_MASTER}, 1);
    @(negedge clk); rx_end = 0;
    wait (!m_busy);
    check_seq(2);
    check(m_mask == 5'b10010, $sformatf("mask %b", m_mask));
    // ---- slaves
    rx_event('{PH_EXCH1, ID_MASTER, ID_W}, 1);
    check(w_start && w_hdr == '{PH_EXCH1, ID_W, ID_MASTER} && w_len == LEN_T1 && w_mode == TXM_T1 &&
          w_base == {1'b0, PH_EXCH1, ID_MASTER, 6'd0}, "W answers part 1 with its status");
    check(!c_start, "MCU01 does not answer in part 1");
    rx_event('{PH_EXCH2, ID_MASTER, ID_W}, 0);
    check(w_start && w_hdr == '{PH_EXCH2, ID_W, ID_MASTER} && w_len == LEN_USER && w_mode == TXM_PLAIN &&
          w_base == {1'b0, PH_EXCH2, ID_MASTER, 6'd0}, "W answers part 2 with user data");
    rx_event('{PH_MCU, ID_MASTER, ID_MCU}, 1);
    check(c_start && c_hdr == '{PH_MCU, ID_MCU, ID_MASTER} && c_len == LEN_USER &&
          c_base == {1'b0, PH_MCU, ID_MASTER, 6'd0}, "MCU01 answers the Table II packet");
    check(!w_start, "W ignores a message to MCU01");
    rx_event('{PH_EXCH1, ID_V, ID_MASTER}, 1);
    check(!w_start && !c_start, "nobody answers an answer");
    @(negedge clk); rx_end = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
