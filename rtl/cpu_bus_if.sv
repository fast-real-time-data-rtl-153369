// cpu_bus_if - the 16-bit parallel bus between the card's CPU and its FPGA.
//
// The CPU reaches the mailbox and the FPGA's registers over an asynchronous
// memory bus: chip select cs_n, write strobe we_n, read strobe oe_n, a word
// address and 16 data bits. The strobes are brought into the FPGA clock
// domain through two flip-flops. Two clocks after a write strobe falls, one
// write request is issued with the address and data then on the bus (the CPU
// must hold them for the whole strobe). Two clocks after a read strobe falls,
// one read request is issued; the data ('rdata', one clock later) is latched
// onto 'dout', driven while oe_n and cs_n are low ('dout_oe'). The CPU must
// therefore keep a read strobe at least five FPGA clocks long. The bus width
// is the protocol's; the strobe protocol and its timing are this design's
// reading of a memory-mapped parallel bus.
module cpu_bus_if
  import remcs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // CPU side
  input  logic              cs_n,
  input  logic              we_n,
  input  logic              oe_n,
  input  logic [CPU_AW-1:0] addr,
  input  logic [15:0]       din,
  output logic [15:0]       dout,
  output logic              dout_oe,
  // FPGA side
  output logic              req,
  output logic              req_we,
  output logic [CPU_AW-1:0] req_addr,
  output logic [15:0]       req_wdata,
  input  logic [15:0]       rdata
);

  logic [1:0] cs_s, we_s, oe_s;
  logic       wr_act, rd_act, wr_q, rd_q, rd_pend;

  assign wr_act = !cs_s[1] && !we_s[1];
  assign rd_act = !cs_s[1] && !oe_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_s      <= '1;
      we_s      <= '1;
      oe_s      <= '1;
      wr_q      <= 1'b0;
      rd_q      <= 1'b0;
      rd_pend   <= 1'b0;
      req       <= 1'b0;
      req_we    <= 1'b0;
      req_addr  <= '0;
      req_wdata <= '0;
      dout      <= '0;
    end else begin
      cs_s <= {cs_s[0], cs_n};
      we_s <= {we_s[0], we_n};
      oe_s <= {oe_s[0], oe_n};
      wr_q <= wr_act;
      rd_q <= rd_act;
      req  <= 1'b0;
      if (wr_act && !wr_q) begin
        req       <= 1'b1;
        req_we    <= 1'b1;
        req_addr  <= addr;
        req_wdata <= din;
      end else if (rd_act && !rd_q) begin
        req      <= 1'b1;
        req_we   <= 1'b0;
        req_addr <= addr;
      end
      rd_pend <= req && !req_we;
      if (rd_pend) dout <= rdata;
    end
  end

  assign dout_oe = !cs_n && !oe_n;

endmodule
