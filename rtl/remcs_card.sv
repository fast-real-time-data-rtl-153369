// remcs_card - the FPGA of one REMCS control card.
//
// The same design serves the three kinds of card; MY_ID selects the role:
// ID_MASTER (DIF01 master), ID_U / ID_V / ID_W (DIF01 slaves, one per
// converter phase) or ID_MCU (MCU01). The card joins the ring through
// ring_port, sends with frame_tx and receives with frame_rx; comm_ctrl
// decides what is sent when. Messages pass through the mailbox, which the
// CPU reaches over the 16-bit parallel bus (cpu_bus_if), so that data moves
// between cards without the CPU. sample_timer makes the sync and EOC
// signals (driven on the master only, sensed on all cards), starts the ADCs
// and captures their samples; the EOC raises the CPU interrupt. On a DIF01
// slave the duty cycles received from the master drive pwm_gen, and
// global_error blocks PWM on any error on the backplane line.
//
// CPU word addresses: 0x000-0xFFF mailbox (see remcs_pkg::mb_addr),
// 0x1000 + REG_* registers (see remcs_pkg). Writing REG_CMD bit 0 / bit 1
// on the master starts the first / second part of the exchange.
//
// The sync, EOC and global error lines are outputs to be OR-ed on the
// backplane and inputs from it. All logic runs on one clock, the symbol
// clock of the ring (130 MHz: 1.04 Gbit/s of payload at 8 bits a symbol).
//
// Only the DIF01 slaves drive pwm, led and io_out; on the master and on
// MCU01 these outputs stay constant. The carrier and direction outputs of
// pwm_gen and the forwarding / sequence-done flags of ring_port and
// comm_ctrl are left unconnected here: they serve the block testbenches.
module remcs_card
  import remcs_pkg::*;
#(
  parameter logic [2:0]  MY_ID     = ID_MASTER,
  parameter int unsigned CLK_HZ    = CLK_HZ_DEF,
  parameter int unsigned SAMPLE_HZ = SAMPLE_HZ_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // ring
  input  logic [9:0]             ring_rx,
  output logic [9:0]             ring_tx,
  // backplane lines
  output logic                   sync_out,
  input  logic                   sync_in,
  output logic                   eoc_out,
  input  logic                   eoc_in,
  output logic                   err_out,
  input  logic                   err_in,
  // converters and I/O
  output logic                   adc_start,
  input  logic [N_ADC-1:0][15:0] adc_data,
  input  logic [N_FAULT-1:0]     fault,
  output logic [N_PWM-1:0]       pwm,
  output logic [7:0]             led,
  output logic [31:0]            io_out,
  // CPU bus
  input  logic                   cpu_cs_n,
  input  logic                   cpu_we_n,
  input  logic                   cpu_oe_n,
  input  logic [CPU_AW-1:0]      cpu_addr,
  input  logic [15:0]            cpu_din,
  output logic [15:0]            cpu_dout,
  output logic                   cpu_dout_oe,
  output logic                   cpu_irq
);

  localparam role_e ROLE = role_of(MY_ID);

  // ---------------------------------------------------------------- CPU bus
  logic              req, req_we;
  logic [CPU_AW-1:0] req_addr;
  logic [15:0]       req_wdata, rdata, mb_cpu_rdata;
  logic              sel_reg_q;
  logic [15:0]       reg_q;

  cpu_bus_if u_bus (
    .clk, .rst_n,
    .cs_n(cpu_cs_n), .we_n(cpu_we_n), .oe_n(cpu_oe_n), .addr(cpu_addr),
    .din(cpu_din), .dout(cpu_dout), .dout_oe(cpu_dout_oe),
    .req, .req_we, .req_addr, .req_wdata, .rdata
  );

  // ---------------------------------------------------------------- mailbox
  mb_addr_t    tx_mb_addr, rx_mb_addr;
  logic [15:0] tx_mb_rdata, rx_mb_wdata;
  logic        rx_mb_we;

  mailbox #(.AW(MB_AW), .DW(16)) u_mb (
    .clk, .rst_n,
    .cpu_we(req && req_we && !req_addr[12]), .cpu_addr(req_addr[MB_AW-1:0]),
    .cpu_wdata(req_wdata), .cpu_rdata(mb_cpu_rdata),
    .tx_addr(tx_mb_addr), .tx_rdata(tx_mb_rdata),
    .rx_we(rx_mb_we), .rx_addr(rx_mb_addr), .rx_wdata(rx_mb_wdata)
  );

  // ------------------------------------------------------------ sampling
  logic [N_ADC-1:0][15:0] adc_q;
  logic                   sample_irq;

  sample_timer #(
    .IS_MASTER(ROLE == ROLE_MASTER), .CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)
  ) u_timer (
    .clk, .rst_n, .sync_out, .sync_in, .eoc_out, .eoc_in,
    .adc_start, .adc_data, .adc_q, .sample_irq
  );

  // ---------------------------------------------------------- errors, PWM
  logic                   err_clear, pwm_block, remote;
  logic [N_FAULT-1:0]     cause;
  logic                   ctl_upd;
  logic [N_PWM-1:0][15:0] duty;
  logic [15:0]            carrier;
  logic                   rising;

  global_error u_err (
    .clk, .rst_n, .fault, .glob_in(err_in), .clear(err_clear),
    .glob_drive(err_out), .pwm_block, .cause, .remote
  );

  pwm_gen #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_pwm (
    .clk, .rst_n, .sync_in, .load(ctl_upd), .duty, .block(pwm_block),
    .pwm, .carrier, .rising
  );

  // ------------------------------------------------------------------ link
  sym_t        tx_sym;
  logic        tx_start, tx_busy, tx_done;
  hdr_t        tx_hdr;
  logic [5:0]  tx_len;
  mb_addr_t    tx_base;
  txmode_e     tx_mode;
  logic [7:0]  rx_d;
  logic        rx_k, rx_symerr;
  logic        rx_end, rx_ok, rx_err;
  hdr_t        rx_hdr;
  logic        collision, forwarding;
  logic        start1, start2, seq_busy, seq_done;
  logic [N_CARDS-1:0] rx_mask;
  logic [15:0] hw_block, hw_err, hw_stat;

  assign hw_block = {4'b0, {(2 * N_PWM){pwm_block}}};
  assign hw_err   = 16'(cause);
  assign hw_stat  = 16'(pwm);

  ring_port #(.MY_ID(MY_ID)) u_port (
    .clk, .rst_n, .rx_code(ring_rx), .tx_code(ring_tx),
    .rx_d, .rx_k, .rx_err(rx_symerr), .tx_sym, .collision, .forwarding
  );

  frame_tx u_tx (
    .clk, .rst_n, .start(tx_start), .hdr(tx_hdr), .len(tx_len),
    .base(tx_base), .mode(tx_mode), .adc(adc_q),
    .pwm_block(hw_block), .pwm_err(hw_err), .pwm_stat(hw_stat),
    .mb_addr_o(tx_mb_addr), .mb_rdata(tx_mb_rdata),
    .out(tx_sym), .busy(tx_busy), .done(tx_done)
  );

  frame_rx #(.MY_ID(MY_ID)) u_rx (
    .clk, .rst_n, .d(rx_d), .k(rx_k), .sym_err(rx_symerr),
    .mb_we(rx_mb_we), .mb_addr_o(rx_mb_addr), .mb_wdata(rx_mb_wdata),
    .rx_end, .rx_ok, .rx_hdr, .rx_err,
    .ctl_upd, .duty, .led, .io(io_out)
  );

  comm_ctrl #(.MY_ID(MY_ID)) u_ctrl (
    .clk, .rst_n, .start1, .start2,
    .mask_clr(ROLE == ROLE_MASTER ? (start1 || start2) : sync_in),
    .rx_end, .rx_ok, .rx_hdr,
    .tx_start, .tx_hdr, .tx_len, .tx_base, .tx_mode, .tx_busy, .tx_done,
    .busy(seq_busy), .seq_done, .rx_mask
  );

  // ------------------------------------------------------------ registers
  logic        irq_q;
  logic [15:0] rxerr_cnt, coll_cnt;
  logic        cmd_wr;

  assign cmd_wr    = req && req_we && req_addr[12] && req_addr[7:0] == REG_CMD;
  assign start1    = cmd_wr && req_wdata[0];
  assign start2    = cmd_wr && req_wdata[1];
  assign err_clear = cmd_wr && req_wdata[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q     <= 1'b0;
      rxerr_cnt <= '0;
      coll_cnt  <= '0;
      reg_q     <= '0;
      sel_reg_q <= 1'b0;
    end else begin
      if (sample_irq) irq_q <= 1'b1;
      else if (cmd_wr && req_wdata[3]) irq_q <= 1'b0;
      if (rx_err)    rxerr_cnt <= rxerr_cnt + 16'd1;
      if (collision) coll_cnt  <= coll_cnt + 16'd1;
      sel_reg_q <= req_addr[12];
      reg_q     <= '0;
      case (req_addr[7:0])
        REG_STATUS:  reg_q <= {3'b0, rx_mask, 4'b0, irq_q, (cause != '0), err_in, seq_busy};
        REG_RXERR:   reg_q <= rxerr_cnt;
        REG_COLL:    reg_q <= coll_cnt;
        REG_CAUSE:   reg_q <= {remote, 9'b0, cause};
        REG_PWMSTAT: reg_q <= hw_stat;
        REG_IO_LO:   reg_q <= io_out[15:0];
        REG_IO_HI:   reg_q <= io_out[31:16];
        REG_LED:     reg_q <= {8'b0, led};
        default: if (req_addr[7:4] == REG_ADC0[7:4]) reg_q <= adc_q[req_addr[3:0]];
      endcase
    end
  end

  assign rdata   = sel_reg_q ? reg_q : mb_cpu_rdata;
  assign cpu_irq = irq_q;

endmodule
