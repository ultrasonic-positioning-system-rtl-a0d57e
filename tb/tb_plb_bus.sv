// tb_plb_bus: checks the address decoder and read multiplexer.
//  - each register slave's select goes high for its own addr[11:8] only, with sel or
//    without it, and its read data comes back with ack in the same cycle;
//  - the SPI slave's ack is passed through;
//  - unmapped register addresses are acknowledged and read 0;
//  - framebuffer accesses drive port B and are acknowledged one cycle later with
//    the BRAM's data.
module tb_plb_bus;
  import usps_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  logic [31:0] rdata;
  logic ack;
  logic cs_gpio1, cs_gpio2, cs_spi, cs_timer, cs_uart, cs_intc;
  logic [31:0] rd [6];
  logic ack_spi;
  logic fb_en, fb_we;
  logic [13:0] fb_addr;
  logic [7:0] fb_din, fb_dout;
  int checks = 0, failures = 0;

  plb_bus dut (.clk, .rst_n, .req, .rdata, .ack,
    .cs_gpio1, .cs_gpio2, .cs_spi, .cs_timer, .cs_uart, .cs_intc,
    .rd_gpio1(rd[0]), .rd_gpio2(rd[1]), .rd_spi(rd[2]), .ack_spi,
    .rd_timer(rd[3]), .rd_uart(rd[4]), .rd_intc(rd[5]),
    .fb_en, .fb_we, .fb_addr, .fb_din, .fb_dout);

  always #5 clk = ~clk;

  // a one-byte-wide stand-in for the BRAM: returns the low address byte, one clock late
  always_ff @(posedge clk) if (fb_en) fb_dout <= fb_addr[7:0] ^ 8'h5A;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [5:0] cs_vec;
    for (int i = 0; i < 6; i++) rd[i] = 32'h1000_0000 * (i + 1) + 32'($urandom_range(0, 4095));
    req = '0; ack_spi = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      for (int v = 0; v < 2; v++) begin
        @(negedge clk);
        ack_spi = 1'(v);
        req = '{sel: 1'b1, we: 1'b0, addr: {4'h0, 4'(s), 8'($urandom_range(0, 255))}, wdata: '0};
        #1;
        cs_vec = {cs_intc, cs_uart, cs_timer, cs_spi, cs_gpio2, cs_gpio1};
        expect_eq("select", 32'(cs_vec), (s < 6) ? 32'(1 << s) : 0);
        expect_eq("rdata", rdata, (s < 6) ? rd[s] : 0);
        expect_eq("ack", 32'(ack), (s == 2) ? 32'(v) : 1);
        expect_eq("no fb", 32'(fb_en), 0);
      end
    end
    // framebuffer reads and writes
    for (int i = 0; i < 50; i++) begin
      logic [13:0] a;
      logic w;
      a = 14'($urandom_range(0, 9599));
      w = 1'($urandom);
      @(negedge clk);
      req = '{sel: 1'b1, we: w, addr: {2'b10, a}, wdata: 32'($urandom)};
      #1;
      expect_eq("fb_en", 32'(fb_en), 1);
      expect_eq("fb_we", 32'(fb_we), 32'(w));
      expect_eq("fb_addr", 32'(fb_addr), 32'(a));
      expect_eq("fb_din", 32'(fb_din), 32'(req.wdata[7:0]));
      expect_eq("no ack yet", 32'(ack), 0);
      cs_vec = {cs_intc, cs_uart, cs_timer, cs_spi, cs_gpio2, cs_gpio1};
      expect_eq("no reg select", 32'(cs_vec), 0);
      @(negedge clk);
      req = '0;
      #1;
      expect_eq("fb ack", 32'(ack), 1);
      expect_eq("fb rdata", rdata, 32'(a[7:0] ^ 8'h5A));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
