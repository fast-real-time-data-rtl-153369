// ring_port - a card's attachment to the communication ring.
//
// Every card sits in one ring: what arrives on its receive line must leave on
// its transmit line unless the card takes it. The port decodes the incoming
// 8b/10b symbols, looks at the header of each frame and then
//   * forwards the frame, re-encoded with the port's own running disparity,
//     when it is addressed to another card (a broken symbol is sent on as
//     K30.7 so that the cards downstream also see the frame as broken);
//   * consumes the frame (sends idle in its place) when it is addressed to
//     this card, so that the card's reply takes the message's place, as the
//     protocol has a slave replace the master's message by its own;
//   * on the master, consumes everything: every message ends at the master.
// Frames the card sends itself (from frame_tx) go out whenever they are
// valid. A forwarded symbol that arrives while an own frame is being sent is
// lost and counted on 'collision'; the master spaces its messages so that
// this does not happen. Idle (K28.5) is sent when there is nothing else.
// The decoded input is also handed to frame_rx.
//
// Timing: three clocks from receive to transmit line for a forwarded
// symbol (decoder, header look-ahead, encoder); one clock from frame_tx.
module ring_port
  import remcs_pkg::*;
#(
  parameter logic [2:0] MY_ID = ID_MASTER
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] rx_code,
  output logic [9:0] tx_code,
  // decoded input for the receiver
  output logic [7:0] rx_d,
  output logic       rx_k,
  output logic       rx_err,
  // own frames
  input  sym_t       tx_sym,
  // events
  output logic       collision,
  output logic       forwarding
);

  localparam role_e ROLE = role_of(MY_ID);

  logic       cerr, derr;
  logic [7:0] b_d;
  logic       b_k, b_err;
  logic       in_cons, cons_b, b_sof, b_idle, a_take;
  hdr_t       a_hdr;
  sym_t       fwd, sel;
  logic [7:0] enc_d;
  logic       enc_k;
  logic       rd_unused;

  dec_8b10b u_dec (
    .clk, .rst_n, .code(rx_code),
    .dout(rx_d), .kout(rx_k), .code_err(cerr), .disp_err(derr)
  );
  assign rx_err = cerr || derr;

  // stage B: one symbol behind the decoder, so the header is known when the
  // SOF leaves this stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_d     <= K_IDLE;
      b_k     <= 1'b1;
      b_err   <= 1'b0;
      in_cons <= 1'b0;
    end else begin
      b_d     <= rx_d;
      b_k     <= rx_k;
      b_err   <= rx_err;
      in_cons <= cons_b && !(b_k && (b_d == K_EOF || b_d == K_IDLE));
    end
  end

  always_comb begin
    a_hdr  = hdr_t'(rx_d);
    a_take = (ROLE == ROLE_MASTER) ||
             (!rx_k && !rx_err && a_hdr.dst == MY_ID);
    b_sof  = b_k && !b_err && b_d == K_SOF;
    b_idle = b_k && !b_err && b_d == K_IDLE;
    cons_b = in_cons || (b_sof && a_take);

    fwd = '0;
    if (!cons_b && !b_idle && ROLE != ROLE_MASTER) begin
      fwd.valid = 1'b1;
      fwd.k     = b_err ? 1'b1 : b_k;
      fwd.d     = b_err ? K_ERR : b_d;
    end

    if (tx_sym.valid)   sel = tx_sym;
    else if (fwd.valid) sel = fwd;
    else                sel = '{valid: 1'b0, k: 1'b1, d: K_IDLE};
    enc_d = sel.d;
    enc_k = sel.k;
  end

  assign collision  = tx_sym.valid && fwd.valid;
  assign forwarding = fwd.valid;

  enc_8b10b u_enc (
    .clk, .rst_n, .din(enc_d), .kin(enc_k), .code(tx_code), .rd(rd_unused)
  );

endmodule
