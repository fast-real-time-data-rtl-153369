// dec_8b10b - 8b/10b line decoder with error detection.
//
// Every clock one 10-bit code ({a..e,i,f..j}, 'a' in bit 9) is decoded to a
// byte and a control-character flag, registered on the next clock edge.
// code_err is set for a sub-block that is not in the code table, disp_err for
// a sub-block whose disparity does not fit the running disparity tracked by
// the decoder (which starts negative after reset). The link discards a frame
// that holds such a symbol: the protocol never repeats broken data. The
// 8b/10b code is this design's reading of the link's 10-bit transmission
// coding; the control characters recognised are K28.y, K23.7, K27.7, K29.7
// and K30.7.
//
// Timing: one cycle latency, one symbol per clock.
module dec_8b10b
  import line_code_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] code,
  output logic [7:0] dout,
  output logic       kout,
  output logic       code_err,
  output logic       disp_err
);

  logic       rd;
  logic [5:0] c6;
  logic [3:0] c4, c4d;
  logic [4:0] x;
  logic [2:0] y;
  logic       f6, f4, k28, a7, kk, cerr, derr;
  logic       rd6, rd_next;
  int         n6, n4;

  always_comb begin
    c6 = code[9:4];
    c4 = code[3:0];
    x  = '0;
    y  = '0;
    f6 = 1'b0;
    f4 = 1'b0;
    a7 = 1'b0;
    k28 = (c6 == K28_6B) || (c6 == ~K28_6B);
    if (k28) begin
      x  = 5'd28;
      f6 = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++) begin
        if (c6 == tbl6(5'(i)) ||
            ((ones6(tbl6(5'(i))) != 3 || i == 7) && c6 == ~tbl6(5'(i)))) begin
          x  = 5'(i);
          f6 = 1'b1;
        end
      end
    end

    n6   = ones6(c6);
    derr = 1'b0;
    if ((n6 == 4 && rd) || (n6 == 2 && !rd) ||
        (c6 == 6'b111000 && rd) || (c6 == 6'b000111 && !rd)) derr = 1'b1;
    rd6 = (n6 == 4) ? 1'b1 : (n6 == 2) ? 1'b0 : rd;

    // K28 after a negative 6-bit block carries the complemented balanced codes
    c4d = c4;
    if (k28 && c6 == ~K28_6B && ones4(c4) == 2 && c4 != 4'b1100 && c4 != 4'b0011)
      c4d = ~c4;
    if (c4d == A7_4B || c4d == ~A7_4B) begin
      y  = 3'd7;
      f4 = 1'b1;
      a7 = 1'b1;
    end else begin
      for (int j = 0; j < 8; j++) begin
        if (c4d == tbl4(3'(j)) ||
            ((ones4(tbl4(3'(j))) != 2 || j == 3) && c4d == ~tbl4(3'(j)))) begin
          y  = 3'(j);
          f4 = 1'b1;
        end
      end
    end

    n4 = ones4(c4);
    if ((n4 == 3 && rd6) || (n4 == 1 && !rd6) ||
        (c4 == 4'b1100 && rd6) || (c4 == 4'b0011 && !rd6)) derr = 1'b1;
    rd_next = (n4 == 3) ? 1'b1 : (n4 == 1) ? 1'b0 : rd6;

    kk   = k28 || (a7 && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30));
    cerr = !f6 || !f4 || (n6 < 2) || (n6 > 4) ||
           (a7 && !kk && !(x == 5'd17 || x == 5'd18 || x == 5'd20 ||
                           x == 5'd11 || x == 5'd13 || x == 5'd14));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd       <= 1'b0;
      dout     <= 8'hBC;
      kout     <= 1'b1;
      code_err <= 1'b0;
      disp_err <= 1'b0;
    end else begin
      rd       <= cerr ? rd : rd_next;
      dout     <= {y, x};
      kout     <= kk;
      code_err <= cerr;
      disp_err <= !cerr && derr;
    end
  end

endmodule
