// remcs_top - the REMCS backplane of the STATCOM control system.
//
// Five control cards share a backplane: MCU01 (upper control loops, data
// for the supervisory PC), the DIF01 master (main control loops) and three
// DIF01 slaves, one per converter phase U, V, W. Their FPGAs are joined in
// one ring of point-to-point links through the backplane switches, in slot
// order MCU01, master, U, V, W and back to MCU01, so a message leaves the
// master, passes U, V, W and MCU01 and returns to the master. Three wired-OR
// backplane lines connect all cards: sync and EOC (driven by the master) and
// the global error line (driven by any card, blocks all PWM).
//
// All per-card ports are arrays indexed by card number (remcs_pkg: 0 master,
// 1-3 DIF01 U/V/W, 4 MCU01), not by slot. slot_present[i] = 0 empties card
// i's slot: its switch bypasses it. The CPU buses, the ADC data, the fault
// inputs and the PWM, LED and I/O outputs of each card are brought out, as
// the CPUs, converters and power stage are outside the FPGAs.
module remcs_top
  import remcs_pkg::*;
#(
  parameter int unsigned CLK_HZ    = CLK_HZ_DEF,
  parameter int unsigned SAMPLE_HZ = SAMPLE_HZ_DEF
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [N_CARDS-1:0]                   slot_present,
  // CPU buses
  input  logic [N_CARDS-1:0]                   cpu_cs_n,
  input  logic [N_CARDS-1:0]                   cpu_we_n,
  input  logic [N_CARDS-1:0]                   cpu_oe_n,
  input  logic [N_CARDS-1:0][CPU_AW-1:0]       cpu_addr,
  input  logic [N_CARDS-1:0][15:0]             cpu_din,
  output logic [N_CARDS-1:0][15:0]             cpu_dout,
  output logic [N_CARDS-1:0]                   cpu_dout_oe,
  output logic [N_CARDS-1:0]                   cpu_irq,
  // converters, faults, outputs
  input  logic [N_CARDS-1:0][N_ADC-1:0][15:0]  adc_data,
  output logic [N_CARDS-1:0]                   adc_start,
  input  logic [N_CARDS-1:0][N_FAULT-1:0]      fault,
  output logic [N_CARDS-1:0][N_PWM-1:0]        pwm,
  output logic [N_CARDS-1:0][7:0]              led,
  output logic [N_CARDS-1:0][31:0]             io_out,
  // backplane lines, for observation
  output logic                                 sync_line,
  output logic                                 eoc_line,
  output logic                                 err_line
);

  // slot s holds card SLOT_CARD[s]
  localparam logic [2:0] SLOT_CARD [N_CARDS] = '{ID_MCU, ID_MASTER, ID_U, ID_V, ID_W};

  logic [N_CARDS-1:0][9:0] card_rx, card_tx;    // by card
  logic [N_CARDS-1:0][9:0] ring;                // ring[s]: output of slot s
  logic [N_CARDS-1:0]      sync_o, eoc_o, err_o;

  assign sync_line = |sync_o;
  assign eoc_line  = |eoc_o;
  assign err_line  = |err_o;

  for (genvar s = 0; s < N_CARDS; s++) begin : g_slot
    localparam int C = int'(SLOT_CARD[s]);
    backplane_switch u_sw (
      .clk, .rst_n, .present(slot_present[C]),
      .ring_in(ring[(s + N_CARDS - 1) % N_CARDS]),
      .card_rx(card_rx[C]), .card_tx(card_tx[C]), .ring_out(ring[s])
    );
  end

  for (genvar c = 0; c < N_CARDS; c++) begin : g_card
    remcs_card #(.MY_ID(3'(c)), .CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_card (
      .clk, .rst_n,
      .ring_rx(card_rx[c]), .ring_tx(card_tx[c]),
      .sync_out(sync_o[c]), .sync_in(sync_line),
      .eoc_out(eoc_o[c]),   .eoc_in(eoc_line),
      .err_out(err_o[c]),   .err_in(err_line),
      .adc_start(adc_start[c]), .adc_data(adc_data[c]),
      .fault(fault[c]), .pwm(pwm[c]), .led(led[c]), .io_out(io_out[c]),
      .cpu_cs_n(cpu_cs_n[c]), .cpu_we_n(cpu_we_n[c]), .cpu_oe_n(cpu_oe_n[c]),
      .cpu_addr(cpu_addr[c]), .cpu_din(cpu_din[c]), .cpu_dout(cpu_dout[c]),
      .cpu_dout_oe(cpu_dout_oe[c]), .cpu_irq(cpu_irq[c])
    );
  end

endmodule
