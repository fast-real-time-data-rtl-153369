// mailbox - message memory of a card's FPGA, shared by the CPU and the link.
//
// The CPU writes the messages the card sends and reads the messages it has
// received; the link reads outgoing messages while it transmits and writes
// incoming ones while it receives, without the CPU taking part. The memory
// has one write port and two synchronous read ports (CPU and link). The link
// receiver writes at most every other clock (two symbols per 16-bit word), so
// a CPU write that meets a link write is held in a one-entry buffer and done
// on the next free clock; the CPU must therefore not write on two clocks in
// a row (the bus interface issues at most one request per bus strobe), which
// an assertion checks. Ports of the CPU and the link may run at the same
// time; that the message areas are one memory with this port structure is
// this design's choice.
//
// Timing: read data appears one clock after the address.
module mailbox #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU port
  input  logic          cpu_we,
  input  logic [AW-1:0] cpu_addr,
  input  logic [DW-1:0] cpu_wdata,
  output logic [DW-1:0] cpu_rdata,
  // link transmit (read) port
  input  logic [AW-1:0] tx_addr,
  output logic [DW-1:0] tx_rdata,
  // link receive (write) port
  input  logic          rx_we,
  input  logic [AW-1:0] rx_addr,
  input  logic [DW-1:0] rx_wdata
);

  logic [DW-1:0] mem [2**AW];

  logic          pend;
  logic [AW-1:0] pend_addr;
  logic [DW-1:0] pend_data;

  logic          w_en;
  logic [AW-1:0] w_addr;
  logic [DW-1:0] w_data;

  // write port: link first, then a held CPU write, then a new CPU write
  always_comb begin
    w_en   = 1'b1;
    w_addr = rx_addr;
    w_data = rx_wdata;
    if (!rx_we) begin
      if (pend) begin
        w_addr = pend_addr;
        w_data = pend_data;
      end else if (cpu_we) begin
        w_addr = cpu_addr;
        w_data = cpu_wdata;
      end else begin
        w_en = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      pend_addr <= '0;
      pend_data <= '0;
    end else if (cpu_we && (rx_we || pend)) begin
      pend      <= 1'b1;
      pend_addr <= cpu_addr;
      pend_data <= cpu_wdata;
    end else if (!rx_we) begin
      pend      <= 1'b0;
    end
  end

  // a held CPU write must not be overtaken by the next one
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(cpu_we && pend && rx_we))
      else $error("mailbox: CPU write while an earlier one is still held");
  end

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
    cpu_rdata <= mem[cpu_addr];
    tx_rdata  <= mem[tx_addr];
  end

endmodule
