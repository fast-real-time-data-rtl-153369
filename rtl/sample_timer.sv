// sample_timer - sampling-period timing of a card (steps 1 and 2).
//
// The master's FPGA generates the synchronization signal, one clock wide,
// every CLK_HZ / SAMPLE_HZ clocks (55.6 us at 18 kHz). It is distributed on
// the backplane; on every card it starts the ADC conversion ('adc_start').
// The master counts the conversion time (3.4 us) from its own sync and then
// sends the global end-of-conversion signal EOC to all cards. On EOC each
// card captures the sample of its ADC channels ('adc_data', as delivered by
// the converters) into registers and raises 'sample_irq', which becomes
// the CPU interrupt. Period, conversion time and the master-only generation
// of both signals follow the protocol; counting the conversion time instead
// of waiting for a busy signal from the converters is this design's choice.
module sample_timer
  import remcs_pkg::*;
#(
  parameter bit          IS_MASTER = 1'b1,
  parameter int unsigned CLK_HZ    = CLK_HZ_DEF,
  parameter int unsigned SAMPLE_HZ = SAMPLE_HZ_DEF,
  parameter int unsigned CONV_NS   = ADC_CONV_NS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    sync_out,   // master: drives the sync line
  input  logic                    sync_in,    // the sync line
  output logic                    eoc_out,    // master: drives the EOC line
  input  logic                    eoc_in,     // the EOC line
  output logic                    adc_start,
  input  logic [N_ADC-1:0][15:0]  adc_data,
  output logic [N_ADC-1:0][15:0]  adc_q,
  output logic                    sample_irq
);

  localparam int unsigned PERIOD = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CONV   =
      int'((longint'(CLK_HZ) * longint'(CONV_NS)) / 64'd1_000_000_000);

  logic [31:0] pcnt, ccnt;
  logic        conv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt       <= '0;
      ccnt       <= '0;
      conv       <= 1'b0;
      sync_out   <= 1'b0;
      eoc_out    <= 1'b0;
      adc_q      <= '0;
      sample_irq <= 1'b0;
    end else begin
      // period counter (master only)
      sync_out <= 1'b0;
      if (IS_MASTER) begin
        if (pcnt == PERIOD - 1) begin
          pcnt     <= '0;
          sync_out <= 1'b1;
        end else begin
          pcnt <= pcnt + 32'd1;
        end
      end
      // conversion time (master only)
      eoc_out <= 1'b0;
      if (IS_MASTER) begin
        if (sync_in) begin
          conv <= 1'b1;
          ccnt <= '0;
        end else if (conv) begin
          if (ccnt == CONV - 1) begin
            conv    <= 1'b0;
            eoc_out <= 1'b1;
          end else begin
            ccnt <= ccnt + 32'd1;
          end
        end
      end
      // sample capture on EOC (all cards)
      sample_irq <= eoc_in;
      if (eoc_in) adc_q <= adc_data;
    end
  end

  assign adc_start = sync_in;

endmodule
