// tb_codec_8b10b - self-checking test of enc_8b10b and dec_8b10b.
//
// Sends every data byte and the control characters of the link through the
// encoder into the decoder and checks: known codes from the 8b/10b standard,
// that every code has 4, 5 or 6 ones, that the running digital sum of the
// line stays within +/-3, the decoded byte and flag, and no error flags.
// Then it feeds a code that is not in the table and a repeated unbalanced
// code and checks that the decoder flags them.
module tb_codec_8b10b;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] din;
  logic       kin;
  logic [9:0] code, dcode;
  logic       rd;
  logic [7:0] dout;
  logic       kout, code_err, disp_err;
  logic       use_raw;
  logic [9:0] raw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_8b10b u_enc (.clk, .rst_n, .din, .kin, .code, .rd);
  assign dcode = use_raw ? raw : code;
  dec_8b10b u_dec (.clk, .rst_n, .code(dcode), .dout, .kout, .code_err, .disp_err);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int ones10(input logic [9:0] v);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(v[i]);
    return n;
  endfunction

  // stimulus list: 256 data bytes then control characters
  logic [8:0] stim [0:263];
  initial begin
    for (int i = 0; i < 256; i++) stim[i] = {1'b0, 8'(i)};
    stim[256] = {1'b1, 8'hBC}; stim[257] = {1'b1, 8'hFB};
    stim[258] = {1'b1, 8'hFD}; stim[259] = {1'b1, 8'hFE};
    stim[260] = {1'b1, 8'h3C}; stim[261] = {1'b1, 8'h1C};
    stim[262] = {1'b1, 8'hF7}; stim[263] = {1'b1, 8'hBC};
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rds;
  logic seen;
  initial begin
    use_raw = 1'b0;
    raw = '0;
    din = 8'hBC; kin = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // known codes at a known disparity: after reset the encoder has sent
    // K28.5 at negative disparity, so the next K28.5 is the positive one
    din = 8'hBC; kin = 1'b1;
    @(negedge clk); check(code == 10'b1100000101, "K28.5 RD+");
    din = 8'hBC; kin = 1'b1;
    @(negedge clk); check(code == 10'b0011111010, "K28.5 RD-");
    din = 8'hB5; kin = 1'b0;               // D21.5, balanced
    @(negedge clk); check(code == 10'b1010101010, "D21.5");
    din = 8'hFB; kin = 1'b1;               // K27.7 at RD+
    @(negedge clk); check(code == 10'b0010010111, "K27.7 RD+");
    din = 8'h00; kin = 1'b0;               // D0.0 at RD+
    @(negedge clk); check(code == 10'b0110001011, "D0.0 RD+");
    din = 8'h4A; kin = 1'b0;               // D10.2, balanced
    @(negedge clk); check(code == 10'b0101010101, "D10.2");
    din = 8'hFD; kin = 1'b1;               // K29.7 at RD+
    @(negedge clk); check(code == 10'b0100010111, "K29.7 RD+");

    // loop-back of every symbol
    rds = 0;
    for (int i = 0; i < 264 + 2; i++) begin
      if (i < 264) begin din = stim[i][7:0]; kin = stim[i][8]; end
      else begin din = 8'hBC; kin = 1'b1; end
      @(negedge clk);
      // code now holds symbol i, decoder output symbol i-1
      if (i < 264) begin
        check(ones10(code) >= 4 && ones10(code) <= 6, $sformatf("ones of %03x", code));
        rds += ones10(code) - 5;
        check(rds >= -3 && rds <= 3, $sformatf("running sum %0d", rds));
      end
      if (i >= 1 && i <= 264) begin
        check(dout == stim[i-1][7:0] && kout == stim[i-1][8],
              $sformatf("decode %0d: got %02x k%0d", i - 1, dout, kout));
        check(!code_err && !disp_err, $sformatf("no error at %0d", i - 1));
      end
    end

    // a code outside the table
    use_raw = 1'b1;
    raw = 10'b1111100000;
    @(negedge clk);
    check(code_err, "invalid code flagged");
    // two unbalanced codes of the same sign in a row
    raw = 10'b1001111001;                     // D0.1 RD- (+2), three times
    seen = 1'b0;
    repeat (4) begin
      @(negedge clk);
      seen |= disp_err;
    end
    check(seen, "disparity error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
