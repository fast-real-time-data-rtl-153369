// tb_cpu_bus_if - self-checking test of the CPU bus interface.
//
// A CPU model makes write and read strobes of random length (at least five
// clocks) on the asynchronous bus. A small memory behind the interface
// answers reads one clock after the request. The test checks one request per
// strobe, its address and data, and that the data of a read reaches the bus
// before the strobe ends, and counts the clocks from strobe to request.
module tb_cpu_bus_if;
  import remcs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cs_n, we_n, oe_n, dout_oe, req, req_we;
  logic [CPU_AW-1:0] addr, req_addr;
  logic [15:0] din, dout, req_wdata, rdata;
  logic [15:0] mem [256];
  int checks = 0, failures = 0, nreq = 0;

  always #5 clk = ~clk;
  cpu_bus_if dut (.*);

  // memory behind the interface
  always_ff @(posedge clk) begin
    if (req && req_we) mem[req_addr[7:0]] <= req_wdata;
    rdata <= mem[req_addr[7:0]];
    if (req) nreq++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model [256];
  int n0, lat;
  initial begin
    cs_n = 1; we_n = 1; oe_n = 1; addr = 0; din = 0;
    for (int i = 0; i < 256; i++) begin mem[i] = 16'(i * 3); model[i] = 16'(i * 3); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int len = 5 + int'($urandom % 4);
      logic [7:0] a = 8'($urandom);
      n0 = nreq;
      addr = {5'b0, a};
      if ($urandom % 2) begin
        din = 16'($urandom);
        model[a] = din;
        @(negedge clk); cs_n = 0; we_n = 0;
        lat = 0;
        repeat (len) begin
          @(negedge clk);
          if (nreq == n0) lat++;
        end
        we_n = 1; cs_n = 1;
        check(lat == 3, $sformatf("write request %0d clocks after the strobe", lat));
      end else begin
        @(negedge clk); cs_n = 0; oe_n = 0;
        repeat (len) @(negedge clk);
        check(dout_oe && dout == model[a], $sformatf("read %0d = %04x", a, dout));
        oe_n = 1; cs_n = 1;
        #1 check(!dout_oe, "bus released");
      end
      repeat (3) @(negedge clk);
      check(nreq == n0 + 1, "one request per strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
