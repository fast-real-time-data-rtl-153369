// tb_backplane_switch - self-checking test of the slot switch.
//
// With a card present the card's transmit symbols must reach ring_out one
// clock later; with the slot empty the ring input must. The card always
// receives the ring input.
module tb_backplane_switch;
  logic clk = 1'b0, rst_n = 1'b0, present;
  logic [9:0] ring_in, card_rx, card_tx, ring_out;
  logic [9:0] exp_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  backplane_switch dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    present = 1; ring_in = 0; card_tx = 0;
    repeat (2) @(negedge clk);
    check(ring_out == 10'b0011111010, "idle after reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      present = (n / 50) % 2 == 0;
      ring_in = 10'($urandom); card_tx = 10'($urandom);
      exp_q = present ? card_tx : ring_in;
      #1 check(card_rx == ring_in, "card receives the ring");
      @(negedge clk);
      check(ring_out == exp_q, $sformatf("ring_out at %0d (present %0d)", n, present));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
