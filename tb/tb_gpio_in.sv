// tb_gpio_in: checks the GPIO input port with interrupt.
//  - DATA shows the pin levels after the two-flop synchroniser (2-3 clocks late);
//  - a rising edge sets its EDGE bit; a falling edge does not;
//  - irq follows EDGE & IER; writing ones to EDGE clears those bits only;
//  - random pin activity against a model of the edge register.
module tb_gpio_in;
  import usps_pkg::*;
  localparam int W = 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] pins = '0;
  bus_req_t req;
  logic cs;
  logic [31:0] rdata;
  logic irq;
  int checks = 0, failures = 0;

  gpio_in #(.WIDTH(W)) dut (.clk, .rst_n, .pins, .req, .cs, .rdata, .irq);

  always #5 clk = ~clk;
  assign cs = 1'b1;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b1, addr: {8'h00, a}, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic bus_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b0, addr: {8'h00, a}, wdata: '0};
    #1;
    d = rdata;
    @(negedge clk);
    req = '0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d;
    logic [W-1:0] model_edge, prev_pins;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    bus_rd(GPIO_EDGE, d); expect_eq("edge after reset", d, 0);
    expect_eq("irq after reset", 32'(irq), 0);
    // synchroniser delay: level visible in DATA after 2 edges
    pins <= 3'b010;
    @(posedge clk);
    bus_rd(GPIO_DATA, d); expect_eq("data 1 edge after", d, 0);
    @(posedge clk);
    bus_rd(GPIO_DATA, d); expect_eq("data 3 edges after", d, 3'b010);
    bus_rd(GPIO_EDGE, d); expect_eq("edge set", d, 3'b010);
    expect_eq("irq masked", 32'(irq), 0);
    bus_wr(GPIO_IER, 3'b010);
    @(posedge clk);
    expect_eq("irq enabled", 32'(irq), 1);
    pins <= 3'b000;
    repeat (4) @(posedge clk);
    bus_rd(GPIO_EDGE, d); expect_eq("falling keeps edge", d, 3'b010);
    bus_wr(GPIO_EDGE, 3'b100);
    bus_rd(GPIO_EDGE, d); expect_eq("clear other bit", d, 3'b010);
    bus_wr(GPIO_EDGE, 3'b010);
    bus_rd(GPIO_EDGE, d); expect_eq("cleared", d, 0);
    expect_eq("irq off", 32'(irq), 0);
    // random activity, pins held >= 4 clocks
    bus_wr(GPIO_IER, 3'b111);
    model_edge = 0; prev_pins = 0;
    for (int i = 0; i < 300; i++) begin
      logic [W-1:0] np;
      np = W'($urandom);
      pins <= np;
      model_edge |= np & ~prev_pins;
      prev_pins = np;
      repeat (4) @(posedge clk);
      bus_rd(GPIO_EDGE, d); expect_eq("edge model", d, 32'(model_edge));
      bus_rd(GPIO_DATA, d); expect_eq("data model", d, 32'(np));
      expect_eq("irq model", 32'(irq), 32'(|model_edge));
      if ($urandom_range(0, 1)) begin
        logic [W-1:0] clr;
        clr = W'($urandom);
        bus_wr(GPIO_EDGE, 32'(clr));
        model_edge &= ~clr;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
