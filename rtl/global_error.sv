// global_error - the backplane's global error line and PWM blocking.
//
// Any serious error must block all PWM outputs of the whole converter at
// once. Each card drives the open-drain global error line of the backplane
// (modelled as 'glob_drive', OR-ed on the backplane) while it holds a latched
// local error, and senses the line on 'glob_in'. PWM is blocked
// combinationally, in the same clock, by a local fault input or the sensed
// line, and stays blocked while the latch holds. The cause of a local error
// is latched per fault input for the CPU (Table I "PWM errors"); an error
// seen only on the line sets the 'remote' flag. 'clear' (from the CPU)
// releases the latch when no local fault is active; if another card still
// holds the line, 'remote' is set again on the next clock. Line, immediate blocking and
// later reporting of the cause follow the protocol; the latch and its
// clearing are this design's choice.
module global_error
  import remcs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_FAULT-1:0] fault,       // local fault inputs, active high
  input  logic               glob_in,     // sensed global error line
  input  logic               clear,
  output logic               glob_drive,
  output logic               pwm_block,
  output logic [N_FAULT-1:0] cause,       // latched local causes
  output logic               remote       // line seen active, no local cause
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cause  <= '0;
      remote <= 1'b0;
    end else if (clear && fault == '0) begin
      cause  <= '0;
      remote <= 1'b0;
    end else begin
      cause <= cause | fault;
      if (glob_in && fault == '0 && cause == '0) remote <= 1'b1;
    end
  end

  assign glob_drive = (cause != '0) || (fault != '0);
  assign pwm_block  = glob_drive || glob_in || remote;

endmodule
