// backplane_switch - one slot's switch of the ring on the backplane.
//
// The backplane closes the communication ring through all its slots. Each
// slot has a switch: with a card in the slot ('present') the ring goes
// through the card (ring_in to the card's receiver, the card's transmitter
// to ring_out); with the slot empty the ring bypasses it, so the ring stays
// closed with any set of cards. The register on ring_out stands for the
// delay of the serializer, the LVDS line and the deserializer of that hop,
// which pass the 10-bit symbols unchanged. The switch per slot is from the
// communication structure; its control by a presence signal and the one-clock
// hop delay are this design's choice.
module backplane_switch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       present,
  input  logic [9:0] ring_in,
  output logic [9:0] card_rx,
  input  logic [9:0] card_tx,
  output logic [9:0] ring_out
);

  assign card_rx = ring_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ring_out <= 10'b0011111010;   // K28.5
    else        ring_out <= present ? card_tx : ring_in;
  end

endmodule
