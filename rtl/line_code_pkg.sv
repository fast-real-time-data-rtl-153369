// line_code_pkg - code tables of the 8b/10b transmission code.
//
// A byte HGF EDCBA is sent as a 6-bit sub-block abcdei (from EDCBA) followed by
// a 4-bit sub-block fghj (from HGF). Here a 10-bit code is written
// {a,b,c,d,e,i,f,g,h,j}, 'a' in bit 9. The tables give the code used when the
// running disparity is negative; the positive-disparity code is its
// complement wherever the sub-block is unbalanced, and for D.07 / x.3.
package line_code_pkg;

  // 5b/6b, running disparity negative
  function automatic logic [5:0] tbl6(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  localparam logic [5:0] K28_6B = 6'b001111;

  // 3b/4b, running disparity negative; y = 7 gives the primary code P7
  function automatic logic [3:0] tbl4(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  localparam logic [3:0] A7_4B = 4'b0111;

  function automatic int ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  function automatic int ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Control characters this link uses: K28.y, K23.7, K27.7, K29.7, K30.7.
  function automatic logic is_valid_k(input logic [7:0] b);
    return (b[4:0] == 5'd28) ||
           (b[7:5] == 3'd7 && (b[4:0] == 5'd23 || b[4:0] == 5'd27 ||
                               b[4:0] == 5'd29 || b[4:0] == 5'd30));
  endfunction

endpackage
