// tb_ring_port - self-checking test of a card's ring attachment.
//
// An encoder feeds the port of card V; a decoder reads its transmit line.
// The test sends a frame addressed to W (must come out unchanged), a frame
// addressed to V (must be consumed: only idle comes out), a frame for W with
// a code error on the line (must come out with K30.7 in place of the broken
// symbol), an own frame from the card (must come out), and an own frame
// while a forwarded one passes (must be counted as a collision). The port
// is also checked to hand every decoded input symbol to the receiver, and a
// forwarded symbol to take three clocks from line to line.
module tb_ring_port;
  import remcs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] src_d;
  logic src_k;
  logic [9:0] src_code, line_in, tx_code;
  logic src_rd;
  logic [7:0] rx_d, out_d;
  logic rx_k, rx_err, out_k, out_cerr, out_derr, collision, forwarding;
  logic corrupt = 1'b0;
  sym_t tx_sym;
  int checks = 0, failures = 0, n_coll = 0;
  int t_in [$], t_out [$];
  sym_t outq [$];
  int cyc = 0;

  always #5 clk = ~clk;

  enc_8b10b u_src (.clk, .rst_n, .din(src_d), .kin(src_k), .code(src_code), .rd(src_rd));
  logic corrupt_q = 1'b0;        // aligned with the encoder's output
  always @(posedge clk) corrupt_q <= corrupt;
  assign line_in = corrupt_q ? 10'b1111100000 : src_code;
  ring_port #(.MY_ID(ID_V)) dut (
    .clk, .rst_n, .rx_code(line_in), .tx_code, .rx_d, .rx_k, .rx_err, .tx_sym,
    .collision, .forwarding);
  dec_8b10b u_sink (.clk, .rst_n, .code(tx_code), .dout(out_d), .kout(out_k),
                    .code_err(out_cerr), .disp_err(out_derr));

  always @(posedge clk) begin
    cyc++;
    if (rst_n && !(out_k && out_d == K_IDLE)) begin
      outq.push_back('{1'b1, out_k, out_d});
      t_out.push_back(cyc);
    end
    if (rst_n && (out_cerr || out_derr)) begin failures++; $display("FAIL: line error on the output"); end
    if (rst_n && collision) n_coll++;
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

  // symbols the port hands to the receiver
  sym_t rxq [$];
  always @(posedge clk)
    if (rst_n && !(rx_k && rx_d == K_IDLE)) rxq.push_back('{1'b1, rx_k, rx_d});

  task automatic put(input logic kk, input logic [7:0] v);
    src_k = kk; src_d = v;
    @(negedge clk);
    src_k = 1; src_d = K_IDLE;
  endtask

  task automatic frame(input hdr_t h, input int n, input int bad = -1);
    put(1, K_SOF);
    put(0, h);
    put(0, 8'(n));
    for (int i = 0; i < 2 * n; i++) begin
      if (i == bad) begin
        src_k = 0; src_d = 8'(i); corrupt = 1;
        @(negedge clk);
        corrupt = 0; src_k = 1; src_d = K_IDLE;
      end else put(0, 8'(i + 16));
    end
    put(1, K_EOF);
  endtask

  task automatic expect_frame(input hdr_t h, input int n, input int bad = -1);
    check(outq.size() == 4 + 2 * n, $sformatf("%0d symbols out, want %0d", outq.size(), 4 + 2 * n));
    if (outq.size() == 4 + 2 * n) begin
      check(outq[0].k && outq[0].d == K_SOF, "SOF out");
      check(!outq[1].k && outq[1].d == h, "header out");
      for (int i = 0; i < 2 * n; i++)
        if (i == bad) check(outq[3 + i].k && outq[3 + i].d == K_ERR, "K30.7 for the broken symbol");
        // the lost symbol may leave the running disparity off by one symbol
        else if (i == bad + 1 && outq[3 + i].k && outq[3 + i].d == K_ERR) check(1'b1, "disparity");
        else check(!outq[3 + i].k && outq[3 + i].d == 8'(i + 16), $sformatf("byte %0d", i));
      check(outq[3 + 2 * n].k && outq[3 + 2 * n].d == K_EOF, "EOF out");
    end
    outq.delete();
  endtask

  initial begin
    src_k = 1; src_d = K_IDLE; tx_sym = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    outq.delete(); t_out.delete();
    // 1. passing frame, and its latency
    t_in.push_back(cyc + 1);
    frame('{ph: PH_EXCH1, src: ID_MASTER, dst: ID_W}, 3);
    repeat (8) @(negedge clk);
    check(t_out.size() > 0 && t_out[0] - t_in[0] == 3 + 2, $sformatf("latency %0d", t_out[0] - t_in[0]));
    expect_frame('{ph: PH_EXCH1, src: ID_MASTER, dst: ID_W}, 3);
    // 2. frame for V is consumed
    rxq.delete();
    frame('{ph: PH_EXCH2, src: ID_MASTER, dst: ID_V}, 5);
    repeat (8) @(negedge clk);
    check(outq.size() == 0, "frame for V consumed");
    check(rxq.size() == 4 + 10 && rxq[1].d == 8'({PH_EXCH2, ID_MASTER, ID_V}) && rxq[13].d == K_EOF,
          "frame for V handed to the receiver");
    outq.delete();
    // 3. broken symbol is marked
    frame('{ph: PH_EXCH1, src: ID_U, dst: ID_MASTER}, 4, 3);
    repeat (8) @(negedge clk);
    expect_frame('{ph: PH_EXCH1, src: ID_U, dst: ID_MASTER}, 4, 3);
    // 4. own frame
    tx_sym = '{1'b1, 1'b1, K_SOF}; @(negedge clk);
    tx_sym = '{1'b1, 1'b0, 8'h48};  @(negedge clk);
    tx_sym = '{1'b1, 1'b1, K_EOF};  @(negedge clk);
    tx_sym = '0;
    repeat (5) @(negedge clk);
    check(rxq.size() == 14 + 12, "receiver saw the broken frame too");
    check(outq.size() == 3 && outq[1].d == 8'h48 && outq[2].d == K_EOF, "own frame sent");
    outq.delete();
    check(n_coll == 0, "no collision so far");
    // 5. own frame over a passing one
    fork
      frame('{ph: PH_EXCH1, src: ID_MASTER, dst: ID_W}, 2);
      begin
        repeat (3) @(negedge clk);
        tx_sym = '{1'b1, 1'b0, 8'h77};
        repeat (4) @(negedge clk);
        tx_sym = '0;
      end
    join
    repeat (8) @(negedge clk);
    check(n_coll == 4, $sformatf("collisions counted: %0d", n_coll));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
