// frame_rx - receives message frames from the ring and stores them.
//
// It follows the decoded symbol stream of the card's ring input (one symbol
// per clock, idle included) and parses every frame. A frame is kept when it
// is addressed to this card, and on MCU01 also when it is a reply travelling
// to the master: MCU01 reads all data exchanged on the ring. Each payload
// word of a kept frame is written to the mailbox at {rx=1, phase, source,
// index} as soon as its high byte arrives, with no CPU involvement.
// On a DIF01 slave the master's control message (Table III, exchange 2)
// also carries the six PWM duty cycles (words 7-12), the LED byte (word 6)
// and the local I/O word (words 4-5); they are collected on the way and
// handed to the hardware with 'ctl_upd' only when the frame ends correctly.
//
// A frame with a code or disparity error, an unexpected control character
// or a misplaced end is broken: it is dropped (broken data is never repeated
// in this protocol), 'rx_err' pulses, and 'rx_end' pulses with rx_ok = 0 if
// the header had already arrived. Words stored before the error stay in the
// mailbox; the CPU tells a good message by the rx_ok status.
//
// Timing: rx_end / rx_ok / ctl_upd pulse one clock after the EOF symbol.
// With the default MY_ID (the master) no control message is ever addressed
// to the card, so duty, led, io and ctl_upd stay constant; they are live
// only on the DIF01 slaves.
module frame_rx
  import remcs_pkg::*;
#(
  parameter logic [2:0] MY_ID = ID_MASTER
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // decoded ring input
  input  logic [7:0]             d,
  input  logic                   k,
  input  logic                   sym_err,
  // mailbox write port
  output logic                   mb_we,
  output mb_addr_t               mb_addr_o,
  output logic [15:0]            mb_wdata,
  // frame events
  output logic                   rx_end,
  output logic                   rx_ok,
  output hdr_t                   rx_hdr,
  output logic                   rx_err,
  // Table III fields for the hardware (DIF01 slave)
  output logic                   ctl_upd,
  output logic [N_PWM-1:0][15:0] duty,
  output logic [7:0]             led,
  output logic [31:0]            io
);

  localparam role_e ROLE = role_of(MY_ID);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_LEN, S_LO, S_HI, S_EOF} state_e;
  state_e     st;
  hdr_t       hdr_q;
  logic       keep, is_ctl;
  logic [5:0] len_q, idx;
  logic [7:0] lo_q;
  logic [N_PWM-1:0][15:0] duty_t;
  logic [7:0]             led_t;
  logic [31:0]            io_t;
  logic       bad_data;
  hdr_t       hdr_in;

  assign bad_data = sym_err || k;
  assign hdr_in   = hdr_t'(d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      hdr_q    <= '0;
      keep     <= 1'b0;
      is_ctl   <= 1'b0;
      len_q    <= '0;
      idx      <= '0;
      lo_q     <= '0;
      mb_we    <= 1'b0;
      mb_addr_o <= '0;
      mb_wdata <= '0;
      rx_end   <= 1'b0;
      rx_ok    <= 1'b0;
      rx_hdr   <= '0;
      rx_err   <= 1'b0;
      ctl_upd  <= 1'b0;
      duty     <= '0;
      led      <= '0;
      io       <= '0;
      duty_t   <= '0;
      led_t    <= '0;
      io_t     <= '0;
    end else begin
      mb_we   <= 1'b0;
      rx_end  <= 1'b0;
      rx_ok   <= 1'b0;
      rx_err  <= 1'b0;
      ctl_upd <= 1'b0;
      case (st)
        S_IDLE: if (k && !sym_err && d == K_SOF) st <= S_HDR;
        S_HDR: begin
          if (bad_data) begin
            st     <= S_IDLE;
            rx_err <= 1'b1;
          end else begin
            hdr_q  <= hdr_in;
            keep   <= (hdr_in.dst == MY_ID) ||
                      (ROLE == ROLE_MCU && hdr_in.dst == ID_MASTER && hdr_in.src != MY_ID);
            is_ctl <= (ROLE == ROLE_DIF) && hdr_in.dst == MY_ID &&
                      hdr_in.src == ID_MASTER && hdr_in.ph == PH_EXCH2;
            st     <= S_LEN;
          end
        end
        S_LEN: begin
          len_q <= d[5:0];
          idx   <= '0;
          if (bad_data || d[7:6] != 2'b00) st <= S_IDLE;
          else st <= (d[5:0] == 0) ? S_EOF : S_LO;
        end
        S_LO: begin
          lo_q <= d;
          st   <= bad_data ? S_IDLE : S_HI;
        end
        S_HI: begin
          if (bad_data) begin
            st <= S_IDLE;
          end else begin
            mb_we     <= keep;
            mb_addr_o <= mb_addr(1'b1, hdr_q.ph, hdr_q.src, idx);
            mb_wdata  <= {d, lo_q};
            if (is_ctl) begin
              if (idx == 6'(T3_IO))       io_t[15:0]  <= {d, lo_q};
              if (idx == 6'(T3_IO + 1))   io_t[31:16] <= {d, lo_q};
              if (idx == 6'(T3_LED))      led_t       <= lo_q;
              if (idx >= 6'(T3_DUTY) && idx < 6'(T3_DUTY + N_PWM))
                duty_t[3'(idx - 6'(T3_DUTY))] <= {d, lo_q};
            end
            idx <= idx + 6'd1;
            st  <= (idx + 6'd1 == len_q) ? S_EOF : S_LO;
          end
        end
        S_EOF: begin
          st <= S_IDLE;
          if (k && !sym_err && d == K_EOF) begin
            rx_end <= keep;
            rx_ok  <= keep;
            rx_hdr <= hdr_q;
            if (is_ctl && len_q == 6'(LEN_T3)) begin
              ctl_upd <= 1'b1;
              duty    <= duty_t;
              led     <= led_t;
              io      <= io_t;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
      // a broken frame after its header
      if (st inside {S_LEN, S_LO, S_HI} && bad_data ||
          st == S_LEN && d[7:6] != 2'b00 ||
          st == S_EOF && !(k && !sym_err && d == K_EOF)) begin
        rx_end <= keep;
        rx_ok  <= 1'b0;
        rx_hdr <= hdr_q;
        rx_err <= keep;
      end
    end
  end

endmodule
