// comm_ctrl - message sequencing of the exchange within a sampling period.
//
// Master (MY_ID = ID_MASTER). The CPU starts each part of the exchange:
//   start1 (step 3, "comm start"): user data (4 words) to DIF01 U, V and W,
//          each of which answers with its status message (Table I, 26
//          words), then user data to MCU01, which does not answer (step 9);
//   start2 (step 8): the control message with the PWM duty cycles (Table III,
//          13 words) to U, V and W, each answering with its user data
//          (step 10), then the packet of Table II (57 words) to MCU01, which
//          answers with its user data (step 11).
// Messages leave back to back, each followed by a gap as long as the answer
// it calls for plus GAP_MARGIN symbols, so an answer never meets the next
// message on the ring. After the last message the sequencer waits DRAIN
// symbols for the answers to come round, then drops 'busy'. rx_mask shows
// which cards' messages have arrived intact since the last 'mask_clr'.
// Slaves: a message from the master addressed to the card is answered at
// once (Table I or user data on a DIF01, user data on MCU01 after the
// Table II packet), also when its payload was broken, so the master still
// gets the measurements. The message order and contents follow the
// protocol's timing diagram and tables; the gap rule and the answer to a
// broken message are this design's.
module comm_ctrl
  import remcs_pkg::*;
#(
  parameter logic [2:0]  MY_ID      = ID_MASTER,
  parameter int unsigned GAP_MARGIN = 8,
  parameter int unsigned DRAIN      = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start1,
  input  logic                 start2,
  input  logic                 mask_clr,
  // receiver events
  input  logic                 rx_end,
  input  logic                 rx_ok,
  input  hdr_t                 rx_hdr,
  // transmitter
  output logic                 tx_start,
  output hdr_t                 tx_hdr,
  output logic [5:0]           tx_len,
  output mb_addr_t             tx_base,
  output txmode_e              tx_mode,
  input  logic                 tx_busy,
  input  logic                 tx_done,
  // status
  output logic                 busy,
  output logic                 seq_done,
  output logic [N_CARDS-1:0]   rx_mask
);

  localparam role_e ROLE = role_of(MY_ID);

  typedef enum logic [2:0] {M_IDLE, M_SEND, M_WAIT, M_GAP, M_DRAIN} mstate_e;
  mstate_e     st;
  logic        part2;
  logic [1:0]  n;         // message number within the part
  logic [15:0] cnt;

  // message n of the current part, and the gap it needs
  hdr_t        m_hdr;
  logic [5:0]  m_len;
  mb_addr_t    m_base;
  txmode_e     m_mode;
  logic [15:0] m_gap;
  logic [2:0]  m_dst;
  always_comb begin
    m_dst  = (n == 2'd3) ? ID_MCU : 3'(n + 2'd1);
    m_mode = TXM_PLAIN;
    if (!part2) begin
      m_hdr  = '{ph: PH_EXCH1, src: ID_MASTER, dst: m_dst};
      m_len  = 6'(LEN_USER);
      m_base = mb_addr(1'b0, PH_EXCH1, m_dst, 6'd0);
      m_gap  = 16'((n == 2'd3) ? 0 : frame_syms(LEN_T1)) + 16'(GAP_MARGIN);
    end else if (n != 2'd3) begin
      m_hdr  = '{ph: PH_EXCH2, src: ID_MASTER, dst: m_dst};
      m_len  = 6'(LEN_T3);
      m_base = mb_addr(1'b0, PH_EXCH2, m_dst, 6'd0);
      m_gap  = 16'(frame_syms(LEN_USER)) + 16'(GAP_MARGIN);
    end else begin
      m_hdr  = '{ph: PH_MCU, src: ID_MASTER, dst: ID_MCU};
      m_len  = 6'(LEN_T2);
      m_base = '0;
      m_mode = TXM_T2;
      m_gap  = 16'(frame_syms(LEN_USER)) + 16'(GAP_MARGIN);
    end
  end

  // answer of a slave to a message from the master
  logic        r_go;
  hdr_t        r_hdr;
  logic [5:0]  r_len;
  mb_addr_t    r_base;
  txmode_e     r_mode;
  always_comb begin
    r_go   = 1'b0;
    r_hdr  = '{ph: rx_hdr.ph, src: MY_ID, dst: ID_MASTER};
    r_len  = 6'(LEN_USER);
    r_base = mb_addr(1'b0, rx_hdr.ph, ID_MASTER, 6'd0);
    r_mode = TXM_PLAIN;
    if (rx_end && rx_hdr.dst == MY_ID && rx_hdr.src == ID_MASTER) begin
      if (ROLE == ROLE_DIF && rx_hdr.ph == PH_EXCH1) begin
        r_go   = 1'b1;
        r_len  = 6'(LEN_T1);
        r_mode = TXM_T1;
      end
      if (ROLE == ROLE_DIF && rx_hdr.ph == PH_EXCH2) r_go = 1'b1;
      if (ROLE == ROLE_MCU && rx_hdr.ph == PH_MCU)   r_go = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= M_IDLE;
      part2    <= 1'b0;
      n        <= '0;
      cnt      <= '0;
      seq_done <= 1'b0;
      rx_mask  <= '0;
    end else begin
      seq_done <= 1'b0;
      if (mask_clr) rx_mask <= '0;
      else if (rx_end && rx_ok) rx_mask[rx_hdr.src] <= 1'b1;
      if (ROLE == ROLE_MASTER) begin
        case (st)
          M_IDLE: if (start1 || start2) begin
            part2 <= start2 && !start1;
            n     <= '0;
            st    <= M_SEND;
          end
          M_SEND: if (!tx_busy) st <= M_WAIT;
          M_WAIT: if (tx_done) begin
            cnt <= m_gap;
            st  <= M_GAP;
          end
          M_GAP: begin
            if (cnt != 0) cnt <= cnt - 16'd1;
            else if (n == 2'd3) begin
              cnt <= 16'(DRAIN);
              st  <= M_DRAIN;
            end else begin
              n  <= n + 2'd1;
              st <= M_SEND;
            end
          end
          M_DRAIN: begin
            if (cnt != 0) cnt <= cnt - 16'd1;
            else begin
              st       <= M_IDLE;
              seq_done <= 1'b1;
            end
          end
          default: st <= M_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    tx_start = 1'b0;
    tx_hdr   = m_hdr;
    tx_len   = m_len;
    tx_base  = m_base;
    tx_mode  = m_mode;
    if (ROLE == ROLE_MASTER) begin
      tx_start = (st == M_SEND) && !tx_busy;
    end else begin
      tx_start = r_go && !tx_busy;
      tx_hdr   = r_hdr;
      tx_len   = r_len;
      tx_base  = r_base;
      tx_mode  = r_mode;
    end
    busy = (st != M_IDLE);
  end

endmodule
