// frame_tx - builds one message frame and sends it, one symbol per clock.
//
// On 'start' it takes a header, a length in 16-bit words, a mailbox base
// address and a content mode, and then emits
//     SOF, header, length, word0 low, word0 high, ... , EOF
// with 'out.valid' set for every symbol of the frame. Words come from the
// mailbox through its synchronous read port (address one clock ahead), so the
// CPU is not involved. Two modes replace words by hardware data:
//   TXM_T1 (status message of a DIF01 slave, Table I): word 13 PWM blocking,
//          word 15 PWM errors, words 17-24 the eight ADC samples, word 25
//          the PWM output levels.
//   TXM_T2 (packet for MCU01, Table II): word j is gathered from the address
//          given by remcs_pkg::t2_src(j), or from the card's own ADC.
// Which fields are filled by hardware follows the tables; the frame format
// and the gather addresses are this design's.
//
// Timing: 'busy' from the clock after 'start' until the EOF symbol has been
// sent; 4 + 2*len symbols; 'done' pulses with the EOF symbol.
module frame_tx
  import remcs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  hdr_t                  hdr,
  input  logic [5:0]            len,
  input  mb_addr_t              base,
  input  txmode_e               mode,
  // hardware fields
  input  logic [N_ADC-1:0][15:0] adc,
  input  logic [15:0]           pwm_block,
  input  logic [15:0]           pwm_err,
  input  logic [15:0]           pwm_stat,
  // mailbox read port
  output mb_addr_t              mb_addr_o,
  input  logic [15:0]           mb_rdata,
  // symbol out
  output sym_t                  out,
  output logic                  busy,
  output logic                  done
);

  typedef enum logic [2:0] {S_IDLE, S_SOF, S_HDR, S_LEN, S_LO, S_HI, S_EOF} state_e;
  state_e     st;
  hdr_t       hdr_q;
  logic [5:0] len_q, idx, ridx;
  mb_addr_t   base_q;
  txmode_e    mode_q;
  logic       ov_sel_q;
  logic [15:0] ov_val_q;
  logic [15:0] word;

  // address and hardware value of word 'ridx'
  logic        ov_sel;
  logic [15:0] ov_val;
  t2_src_t     t2;
  always_comb begin
    ov_sel    = 1'b0;
    ov_val    = '0;
    t2        = t2_src(ridx);
    mb_addr_o = base_q + mb_addr_t'(ridx);
    case (mode_q)
      TXM_T1: begin
        if (ridx == 6'(T1_PWM_BLOCK)) begin ov_sel = 1'b1; ov_val = pwm_block; end
        if (ridx == 6'(T1_PWM_ERR))   begin ov_sel = 1'b1; ov_val = pwm_err;   end
        if (ridx == 6'(T1_PWM_STAT))  begin ov_sel = 1'b1; ov_val = pwm_stat;  end
        if (ridx >= 6'(T1_ADC) && ridx < 6'(T1_ADC + 8)) begin
          ov_sel = 1'b1;
          ov_val = adc[4'(ridx - 6'(T1_ADC))];
        end
      end
      TXM_T2: begin
        mb_addr_o = t2.addr;
        if (t2.adc) begin
          ov_sel = 1'b1;
          ov_val = adc[t2.addr[3:0]];
        end
      end
      default: ;
    endcase
  end

  assign word = ov_sel_q ? ov_val_q : mb_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      hdr_q    <= '0;
      len_q    <= '0;
      base_q   <= '0;
      mode_q   <= TXM_PLAIN;
      idx      <= '0;
      ridx     <= '0;
      ov_sel_q <= 1'b0;
      ov_val_q <= '0;
    end else begin
      ov_sel_q <= ov_sel;
      ov_val_q <= ov_val;
      case (st)
        S_IDLE: if (start) begin
          hdr_q  <= hdr;
          len_q  <= len;
          base_q <= base;
          mode_q <= mode;
          idx    <= '0;
          ridx   <= '0;
          st     <= S_SOF;
        end
        S_SOF: st <= S_HDR;
        S_HDR: st <= S_LEN;
        S_LEN: st <= (len_q == 0) ? S_EOF : S_LO;
        S_LO: begin
          ridx <= idx + 6'd1;
          st   <= S_HI;
        end
        S_HI: begin
          idx <= idx + 6'd1;
          st  <= (idx + 6'd1 == len_q) ? S_EOF : S_LO;
        end
        S_EOF: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    out  = '0;
    busy = (st != S_IDLE);
    done = (st == S_EOF);
    case (st)
      S_SOF: out = '{valid: 1'b1, k: 1'b1, d: K_SOF};
      S_HDR: out = '{valid: 1'b1, k: 1'b0, d: hdr_q};
      S_LEN: out = '{valid: 1'b1, k: 1'b0, d: {2'b00, len_q}};
      S_LO:  out = '{valid: 1'b1, k: 1'b0, d: word[7:0]};
      S_HI:  out = '{valid: 1'b1, k: 1'b0, d: word[15:8]};
      S_EOF: out = '{valid: 1'b1, k: 1'b1, d: K_EOF};
      default: ;
    endcase
  end

endmodule
