// tb_mailbox - self-checking test of the mailbox memory.
//
// Writes random words from the CPU port and the link receive port, at times
// also in the same clock (the CPU write is then held back one clock), and
// reads them back through both read ports, comparing with a model array.
module tb_mailbox;
  localparam int AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic          cpu_we, rx_we;
  logic [AW-1:0] cpu_addr, tx_addr, rx_addr;
  logic [15:0]   cpu_wdata, cpu_rdata, tx_rdata, rx_wdata;
  logic [15:0]   model [2**AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mailbox #(.AW(AW), .DW(16)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu_we = 0; rx_we = 0; cpu_addr = 0; tx_addr = 0; rx_addr = 0;
    cpu_wdata = 0; rx_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill everything through the link port, then overwrite half from the CPU
    for (int a = 0; a < 2**AW; a++) begin
      rx_we = 1; rx_addr = AW'(a); rx_wdata = 16'($urandom); model[a] = rx_wdata;
      @(negedge clk);
    end
    rx_we = 0;
    for (int n = 0; n < 400; n++) begin
      // link writes every other clock, CPU writes at random times
      rx_we = (n % 2 == 0);
      rx_addr = AW'($urandom); rx_wdata = 16'($urandom);
      cpu_we = ($urandom % 3 == 0) && !cpu_we;   // never two clocks in a row
      cpu_addr = AW'($urandom); cpu_wdata = 16'($urandom);
      if (cpu_addr == rx_addr) cpu_we = 0;
      if (rx_we) model[rx_addr] = rx_wdata;
      if (cpu_we) model[cpu_addr] = cpu_wdata;
      @(negedge clk);
    end
    cpu_we = 0; rx_we = 0;
    @(negedge clk);
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      cpu_addr = AW'(a); tx_addr = AW'(2**AW - 1 - a);
      @(negedge clk);
      check(cpu_rdata == model[a], $sformatf("cpu read %0d", a));
      check(tx_rdata == model[2**AW - 1 - a], $sformatf("link read %0d", 2**AW - 1 - a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
