// pwm_gen - synchronized PWM of a DIF01 slave card.
//
// Six PWM channels (the six duty cycles of the master's control message)
// compare their duty cycle with a triangular carrier. The carrier rises for
// one sampling period and falls for the next, so the PWM frequency is half
// the sampling rate (9 kHz at 18 kHz), and it is restarted by every pulse of
// the backplane sync signal, which keeps the carriers of all cards in step.
// New duty cycles ('duty', taken with 'load') wait in a shadow register and
// become active at the next sync pulse, i.e. at the carrier's peak or valley.
// Output i is high while duty[i] > carrier; the carrier runs from 0 to
// HALF-1, so duty = 0 gives 0 % and duty >= HALF gives 100 %. 'block' (the
// global error) forces all outputs low in the same clock. The rates and the
// synchronization follow the protocol; the carrier shape, the duty unit
// (clock cycles) and the update instant are this design's choice.
module pwm_gen
  import remcs_pkg::*;
#(
  parameter int unsigned CLK_HZ    = CLK_HZ_DEF,
  parameter int unsigned SAMPLE_HZ = SAMPLE_HZ_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sync_in,
  input  logic                   load,
  input  logic [N_PWM-1:0][15:0] duty,
  input  logic                   block,
  output logic [N_PWM-1:0]       pwm,
  output logic [15:0]            carrier,
  output logic                   rising
);

  localparam int unsigned HALF = CLK_HZ / SAMPLE_HZ;

  logic [N_PWM-1:0][15:0] shadow, active;
  logic [N_PWM-1:0]       cmp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier <= '0;
      rising  <= 1'b0;
      shadow  <= '0;
      active  <= '0;
    end else begin
      if (load) shadow <= duty;
      if (sync_in) begin
        rising  <= !rising;
        carrier <= rising ? 16'(HALF - 1) : '0;
        active  <= load ? duty : shadow;
      end else if (rising) begin
        if (carrier != 16'(HALF - 1)) carrier <= carrier + 16'd1;
      end else begin
        if (carrier != 0) carrier <= carrier - 16'd1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_PWM; i++) cmp[i] = active[i] > carrier;
    pwm = block ? '0 : cmp;
  end

endmodule
