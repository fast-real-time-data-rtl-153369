// tb_frame_tx - self-checking test of the frame transmitter.
//
// A memory model answers the mailbox read port one clock after the address.
// The test sends a plain frame, a Table I frame (hardware words 13, 15,
// 17-25 replaced) and a Table II frame (words gathered from the mailbox and
// the ADC), records the symbols and compares them with frames it builds
// itself, including the length of 4 + 2 * words symbols.
module tb_frame_tx;
  import remcs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  hdr_t hdr;
  logic [5:0] len;
  mb_addr_t base, mb_addr_o;
  txmode_e mode;
  logic [N_ADC-1:0][15:0] adc;
  logic [15:0] pwm_block, pwm_err, pwm_stat, mb_rdata;
  sym_t out;
  logic busy, done;
  logic [15:0] mem [4096];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frame_tx dut (.*);
  always_ff @(posedge clk) mb_rdata <= mem[mb_addr_o];

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

  // memory content: word at address a is a ^ 16'h5A00
  function automatic logic [15:0] memv(input int a);
    return 16'(a) ^ 16'h5A00;
  endfunction

  // expected word j of each mode
  function automatic logic [15:0] exp_word(input txmode_e m, input int b, input int j);
    int k, o;
    if (m == TXM_T1) begin
      if (j == 13) return pwm_block;
      if (j == 15) return pwm_err;
      if (j == 25) return pwm_stat;
      if (j >= 17 && j < 25) return adc[j - 17];
      return memv(b + j);
    end
    if (m == TXM_T2) begin
      if (j < 4) return memv({1'b0, 2'd3, 3'd4, 6'(j)});
      if (j < 37) begin
        k = 1 + (j - 4) / 11; o = (j - 4) % 11;
        if (o < 8)  return memv({1'b1, 2'd1, 3'(k), 6'(17 + o)});
        if (o == 8) return memv({1'b1, 2'd1, 3'(k), 6'd25});
        return memv({1'b0, 2'd2, 3'(k), 6'(7 + o - 9)});
      end
      if (j < 45) return adc[j - 37];
      k = 1 + (j - 45) / 4;
      return memv({1'b0, 2'd1, 3'(k), 6'((j - 45) % 4)});
    end
    return memv(b + j);
  endfunction

  task automatic send(input hdr_t h, input int n, input int b, input txmode_e m);
    sym_t got [$];
    int t;
    @(negedge clk);
    hdr = h; len = 6'(n); base = mb_addr_t'(b); mode = m; start = 1;
    @(negedge clk);
    start = 0;
    hdr = '0; len = '0; base = '0;
    t = 0;
    while (busy && t < 200) begin
      got.push_back(out);
      @(negedge clk);
      t++;
    end
    check(got.size() == 4 + 2 * n, $sformatf("frame of %0d words is %0d symbols", n, got.size()));
    check(!out.valid, "nothing sent after the frame");
    if (got.size() == 4 + 2 * n) begin
      check(got[0] == '{1'b1, 1'b1, K_SOF}, "SOF");
      check(got[1] == '{1'b1, 1'b0, h}, "header");
      check(got[2] == '{1'b1, 1'b0, 8'(n)}, "length");
      for (int j = 0; j < n; j++) begin
        logic [15:0] w = exp_word(m, b, j);
        check(got[3 + 2*j] == '{1'b1, 1'b0, w[7:0]} && got[4 + 2*j] == '{1'b1, 1'b0, w[15:8]},
              $sformatf("mode %0d word %0d: %02x%02x want %04x", m, j, got[4+2*j].d, got[3+2*j].d, w));
      end
      check(got[3 + 2*n] == '{1'b1, 1'b1, K_EOF}, "EOF");
    end
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) mem[a] = memv(a);
    for (int i = 0; i < N_ADC; i++) adc[i] = 16'hAD00 + 16'(i);
    pwm_block = 16'h0FFF; pwm_err = 16'h0021; pwm_stat = 16'h0015;
    hdr = '0; len = '0; base = '0; mode = TXM_PLAIN;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy && !out.valid, "idle");
    send('{ph: PH_EXCH1, src: ID_MASTER, dst: ID_V}, 4, 'h082, TXM_PLAIN);
    send('{ph: PH_EXCH1, src: ID_U, dst: ID_MASTER}, 26, 'h040, TXM_T1);
    send('{ph: PH_MCU, src: ID_MASTER, dst: ID_MCU}, 57, 0, TXM_T2);
    send('{ph: PH_EXCH2, src: ID_MCU, dst: ID_MASTER}, 1, 'h7C0, TXM_PLAIN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
