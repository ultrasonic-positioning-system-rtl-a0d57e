// tb_intc: checks the interrupt controller.
//  - a rising edge of a source sets its ISR bit, which stays set after the source
//    falls and until it is acknowledged through IAR;
//  - irq = MER & |(ISR & IER): each of the enables gates it;
//  - a held-high source does not set ISR again after acknowledge (edge, not level);
//  - random sequences against a model.
module tb_intc;
  import usps_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] irq_in = '0;
  bus_req_t req;
  logic cs = 1'b1;
  logic [31:0] rdata;
  logic irq;
  int checks = 0, failures = 0;

  intc #(.N_IRQ(N)) dut (.clk, .rst_n, .irq_in, .req, .cs, .rdata, .irq);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b1, addr: {8'h05, a}, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic bus_rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b0, addr: {8'h05, a}, wdata: '0};
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
    logic [N-1:0] m_isr, m_prev, m_ier;
    logic m_mer;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    irq_in <= 2'b01;
    @(posedge clk);
    irq_in <= 2'b00;
    repeat (2) @(posedge clk);
    bus_rd(INTC_ISR, d); expect_eq("isr latched", d, 2'b01);
    expect_eq("irq needs enables", 32'(irq), 0);
    bus_wr(INTC_IER, 2'b01);
    @(posedge clk); expect_eq("irq needs mer", 32'(irq), 0);
    bus_wr(INTC_MER, 1);
    @(posedge clk); expect_eq("irq on", 32'(irq), 1);
    bus_wr(INTC_IAR, 2'b01);
    @(posedge clk); expect_eq("irq off after ack", 32'(irq), 0);
    // held source: one edge only
    irq_in <= 2'b10;
    repeat (2) @(posedge clk);
    bus_rd(INTC_ISR, d); expect_eq("src1 latched", d, 2'b10);
    expect_eq("src1 masked", 32'(irq), 0);
    bus_wr(INTC_IAR, 2'b10);
    repeat (2) @(posedge clk);
    bus_rd(INTC_ISR, d); expect_eq("held level not relatched", d, 0);
    irq_in <= 2'b00;
    @(posedge clk);
    // random
    m_isr = 0; m_prev = 0; m_ier = 2'b01; m_mer = 1;
    for (int i = 0; i < 400; i++) begin
      logic [N-1:0] ns;
      ns = N'($urandom);
      irq_in <= ns;
      @(posedge clk);
      m_isr |= ns & ~m_prev;
      m_prev = ns;
      @(posedge clk);
      bus_rd(INTC_ISR, d); expect_eq("isr model", d, 32'(m_isr));
      expect_eq("irq model", 32'(irq), 32'(m_mer && |(m_isr & m_ier)));
      case ($urandom_range(0, 3))
        0: begin logic [N-1:0] a; a = N'($urandom); bus_wr(INTC_IAR, 32'(a)); m_isr &= ~a; end
        1: begin m_ier = N'($urandom); bus_wr(INTC_IER, 32'(m_ier)); end
        2: begin m_mer = 1'($urandom); bus_wr(INTC_MER, 32'(m_mer)); end
        default: ;
      endcase
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
