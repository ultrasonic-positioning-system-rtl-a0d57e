// tb_uart_lite: sends random bytes through the UART transmitter (10 clocks per bit)
// and decodes txd in the testbench by sampling each bit in its middle. It checks
// each byte, the stop bit, the frame length (STAT busy for 100 clocks), and that a
// write while busy is dropped.
module tb_uart_lite;
  import usps_pkg::*;
  localparam int CLKS = 10;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  logic cs = 1'b1;
  logic [31:0] rdata;
  logic txd;
  int checks = 0, failures = 0;
  logic [7:0] rx_q[$];
  int cyc = 0;

  uart_lite #(.CLK_HZ(1_000_000), .BAUD(100_000)) dut (.clk, .rst_n, .req, .cs, .rdata, .txd);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver model
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      repeat (CLKS / 2) @(posedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CLKS) @(posedge clk);
        b[i] = txd;
      end
      repeat (CLKS) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("bad stop bit"); end
      rx_q.push_back(b);
    end
  end

  task automatic bus_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b1, addr: {8'h04, a}, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic bus_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b0, addr: {8'h04, a}, wdata: '0};
    #1;
    d = rdata;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] sent[$];
    int busy_clks;
    req = '0;
    checks++;
    repeat (2) @(posedge clk);
    if (txd !== 1'b1) begin failures++; $display("line not idle high"); end
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      bus_wr(UART_TX, b);
      busy_clks = cyc;            // clock edge that started the frame
      sent.push_back(b);
      bus_wr(UART_TX, ~b);        // dropped: transmitter busy
      do bus_rd(UART_STAT, d); while (d[0]);
      busy_clks = cyc - busy_clks;  // edges until busy was seen low
      checks++;
      if (busy_clks < 10 * CLKS || busy_clks > 10 * CLKS + 3) begin
        failures++; $display("frame took %0d clocks", busy_clks);
      end
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    repeat (3 * CLKS) @(posedge clk);
    checks++;
    if (rx_q.size() != sent.size()) begin
      failures++; $display("received %0d of %0d", rx_q.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < rx_q.size(); i++) begin
      checks++;
      if (rx_q[i] !== sent[i]) begin failures++; $display("byte %0d %h exp %h", i, rx_q[i], sent[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
