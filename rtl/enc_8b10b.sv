// enc_8b10b - 8b/10b line encoder with running disparity.
//
// Every clock one byte (data, or a control character when k is set) is
// encoded and the 10-bit code appears on the next clock edge. The running
// disparity starts negative after reset and is carried from symbol to symbol,
// so the line stays DC balanced. The link's 10-bit transmission coding is
// from the protocol; that it is the standard 8b/10b code, and the set of
// control characters (K28.y, K23.7, K27.7, K29.7, K30.7), are this design's
// reading. A control byte outside that set is sent as the data byte.
//
// Timing: one cycle latency, one symbol per clock.
module enc_8b10b
  import line_code_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] din,
  input  logic       kin,
  output logic [9:0] code,
  output logic       rd      // running disparity after 'code' (1 = positive)
);

  logic [4:0] x;
  logic [2:0] y;
  logic       kk;
  logic [5:0] c6;
  logic [3:0] c4;
  logic       rd6, rd_next;
  logic       bal6, bal4;

  always_comb begin
    x  = din[4:0];
    y  = din[7:5];
    kk = kin && is_valid_k(din);

    // 6-bit sub-block
    c6   = (kk && x == 5'd28) ? K28_6B : tbl6(x);
    bal6 = (ones6(c6) == 3);
    if (rd && (!bal6 || c6 == 6'b111000)) c6 = ~c6;
    rd6 = bal6 ? rd : ~rd;

    // 4-bit sub-block
    if (y == 3'd7 && (kk ||
        (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
        ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
      c4 = A7_4B;
    else
      c4 = tbl4(y);
    bal4 = (ones4(c4) == 2);
    if (rd6 && (!bal4 || c4 == 4'b1100)) c4 = ~c4;
    // K28.1, .2, .5, .6 after a negative 6-bit block take the complement
    if (kk && x == 5'd28 && !rd6 && bal4 && c4 != 4'b1100 && c4 != 4'b0011) c4 = ~c4;
    rd_next = bal4 ? rd6 : ~rd6;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= 10'b0011111010;  // K28.5, negative disparity
      rd   <= 1'b1;
    end else begin
      code <= {c6, c4};
      rd   <= rd_next;
    end
  end

endmodule
