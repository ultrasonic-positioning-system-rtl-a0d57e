// tb_ranging_sweep: distance sweep through the whole design at default parameters.
//
// Both receivers sit at the origin and the transmitter is moved straight away from
// them. It goes from 0 to 800 mm in 50 mm steps, then to 1500 mm, the practical
// range of the ultrasonic parts. Sound travels at 343 m/s. A processor model runs the
// measurement software through the bus: the send interrupt clears and starts the
// timer, and each receiver interrupt reads it. The speed of sound is first calibrated
// from measurements at 500 mm and 200 mm, with BTN1 and BTN2. Every distance from
// each receiver must then come out within 1 mm of the true one.
// The sweep shows that the timing path is linear over the whole range, at one clock
// (20 ns, 7 um of sound) per count.
module tb_ranging_sweep;
  import usps_pkg::*;
  localparam real CLK_NS = 20.0;
  localparam real SOUND_MM_PER_NS = 343.0e-6;
  localparam int BURST_PERIOD = 1250;

  logic clk = 0, rst_n = 0;
  logic send_int = 0;
  logic [1:0] beacon_int = '0, btn = '0;
  bus_req_t cpu_req, spi_req;
  logic [31:0] cpu_rdata;
  logic cpu_ack, cpu_irq, spi_cs, uart_txd;
  logic [7:0] lcd_d;
  logic lcd_cp, lcd_load, lcd_frm;

  usps_top dut (.clk, .rst_n, .send_int, .beacon_int, .btn, .cpu_req, .cpu_rdata, .cpu_ack,
    .cpu_irq, .spi_req, .spi_cs, .spi_rdata(32'h0), .spi_ack(1'b1), .uart_txd,
    .lcd_d, .lcd_cp, .lcd_load, .lcd_frm);

  always #10 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  int n_meas = 0, n_btn = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    #200_000_000;   // 10 M clocks
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // world: a 5-period 40 kHz burst on one line
  task automatic burst_at(input longint start, input int line);
    while (cyc < start) @(posedge clk);
    for (int p = 0; p < 5; p++) begin
      if (line == 0) send_int <= 1; else beacon_int[line-1] <= 1;
      repeat (BURST_PERIOD / 2) @(posedge clk);
      if (line == 0) send_int <= 0; else beacon_int[line-1] <= 0;
      repeat (BURST_PERIOD / 2) @(posedge clk);
    end
  endtask

  // processor model
  task automatic bus_wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cpu_req = '{sel: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    cpu_req = '0;
  endtask

  task automatic bus_rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_req = '{sel: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1;
    d = cpu_rdata;
    @(negedge clk);
    cpu_req = '0;
  endtask

  function automatic logic [15:0] reg_addr(slave_e s, logic [7:0] off);
    return {4'h0, s, off};
  endfunction

  bit measuring = 0, got1 = 0, got2 = 0;
  logic [31:0] t1, t2;
  logic [1:0] buttons_seen = '0;

  task automatic service_irq();
    logic [31:0] isr, e;
    bus_rd(reg_addr(SLV_INTC, INTC_ISR), isr);
    if (isr[0]) begin
      bus_rd(reg_addr(SLV_GPIO1, GPIO_EDGE), e);
      bus_wr(reg_addr(SLV_GPIO1, GPIO_EDGE), e);
      if (e[0] && !measuring) begin
        bus_wr(reg_addr(SLV_TIMER, TMR_CTRL), 3);
        measuring = 1; got1 = 0; got2 = 0;
      end
      if (e[1] && measuring && !got1) begin bus_rd(reg_addr(SLV_TIMER, TMR_COUNT), t1); got1 = 1; end
      if (e[2] && measuring && !got2) begin bus_rd(reg_addr(SLV_TIMER, TMR_COUNT), t2); got2 = 1; end
    end
    if (isr[1]) begin
      bus_rd(reg_addr(SLV_GPIO2, GPIO_EDGE), e);
      bus_wr(reg_addr(SLV_GPIO2, GPIO_EDGE), e);
      buttons_seen |= e[1:0];
      n_btn++;
    end
    bus_wr(reg_addr(SLV_INTC, INTC_IAR), isr);
  endtask

  // transmitter at distance d from both receivers
  task automatic measure(input real d_mm);
    longint t0, t_end, tof;
    tof = longint'(d_mm / SOUND_MM_PER_NS / CLK_NS);
    measuring = 0;
    t0 = cyc + 10;
    fork
      burst_at(t0, 0);
      burst_at(t0 + tof, 1);
      burst_at(t0 + tof, 2);
    join_none
    t_end = t0 + tof + 6 * BURST_PERIOD + 100;
    while (cyc < t_end) begin
      if (cpu_irq) service_irq(); else @(negedge clk);
    end
    check(got1 && got2, $sformatf("both receivers answered at %f mm", d_mm));
    measuring = 0;
    n_meas++;
  endtask

  task automatic press(input int b);
    btn[b] <= 1;
    repeat (200) @(posedge clk);
    btn[b] <= 0;
    repeat (20) begin
      if (cpu_irq) service_irq(); else @(negedge clk);
    end
  endtask

  initial begin
    real k, t500, t200;
    cpu_req = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    bus_wr(reg_addr(SLV_GPIO1, GPIO_IER), 3'b111);
    bus_wr(reg_addr(SLV_GPIO2, GPIO_IER), 2'b11);
    bus_wr(reg_addr(SLV_INTC, INTC_IER), 2'b11);
    bus_wr(reg_addr(SLV_INTC, INTC_MER), 1);

    measure(500.0);
    t500 = (real'(t1) + real'(t2)) / 2.0;
    press(0);
    measure(200.0);
    t200 = (real'(t1) + real'(t2)) / 2.0;
    press(1);
    check(buttons_seen == 2'b11, "both calibration buttons seen");
    k = (t500 - t200) / 300.0;   // clocks per mm

    for (int i = 0; i <= 17; i++) begin
      real d, r1, r2;
      d = (i <= 16) ? 50.0 * i : 1500.0;
      measure(d);
      r1 = real'(t1) / k;
      r2 = real'(t2) / k;
      check(fabs(r1 - d) < 1.0 && fabs(r2 - d) < 1.0,
            $sformatf("distance %f: receiver 1 %f, receiver 2 %f", d, r1, r2));
      if (i % 4 == 0 || i == 17) $display("true %7.1f mm  rx1 %7.2f mm  rx2 %7.2f mm", d, r1, r2);
    end
    check(n_meas == 20, "all measurements ran");
    check(n_btn > 0, "button interrupts happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
