// usps_top: FPGA side of a two-receiver ultrasonic positioning system.
//
// A hand-held transmitter sends a 40 kHz ultrasonic burst. At the same moment it
// drives a wired "send" pulse into the FPGA. Two receivers a known distance apart
// turn the arriving sound into a digital pulse each. The processor (outside this
// module, reached through the cpu_* bus port) starts the timer on the send
// interrupt. It reads the timer on each receiver interrupt, which gives the time of
// flight to each receiver. From that it computes the position by trilateration.
//
// Inside:
//   plb_bus         address decode and read mux for the processor bus
//   gpio_in (GPIO1) send pulse (bit 0) and receiver pulses (bits 1, 2), interrupting
//   gpio_in (GPIO2) the two calibration buttons, interrupting
//   intc            ORs the GPIO1 and GPIO2 interrupts onto cpu_irq (sources 0, 1)
//   tof_timer       time-of-flight counter
//   uart_lite       terminal output (transmit)
//   frame_bram      9600-byte framebuffer, processor on port B
//   display_driver  refreshes a 320x240 LCD from the framebuffer through port A
// The processor, its program memory and the unused SPI radio interface are not part
// of this module. The SPI slave's bus signals are brought out as ports.
// All logic runs on one clock, assumed 50 MHz, with an active-low asynchronous reset.
module usps_top
  import usps_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned ENABLE_HZ = 3_000_000,
  parameter int unsigned BAUD      = 9600,
  parameter int unsigned H_PIXELS  = 320,
  parameter int unsigned V_LINES   = 240,
  localparam int unsigned FB_BYTES = H_PIXELS * V_LINES / 8,
  localparam int unsigned FB_AW    = $clog2(FB_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  // measurement inputs
  input  logic        send_int,     // transmitter's wired send pulse
  input  logic [1:0]  beacon_int,   // receiver 1 (bit 0) and receiver 2 (bit 1)
  input  logic [1:0]  btn,          // calibration buttons BTN1, BTN2
  // processor bus
  input  bus_req_t    cpu_req,
  output logic [31:0] cpu_rdata,
  output logic        cpu_ack,
  output logic        cpu_irq,
  // SPI slave (external)
  output bus_req_t    spi_req,
  output logic        spi_cs,
  input  logic [31:0] spi_rdata,
  input  logic        spi_ack,
  // terminal
  output logic        uart_txd,
  // LCD
  output logic [7:0]  lcd_d,
  output logic        lcd_cp,
  output logic        lcd_load,
  output logic        lcd_frm
);
  logic        cs_gpio1, cs_gpio2, cs_timer, cs_uart, cs_intc;
  logic [31:0] rd_gpio1, rd_gpio2, rd_timer, rd_uart, rd_intc;
  logic        irq_gpio1, irq_gpio2;
  logic             fb_en, fb_we;
  logic [FB_AW-1:0] fb_addr, disp_adr;
  logic [7:0]       fb_din, fb_dout, disp_data;

  plb_bus #(.FB_AW(FB_AW)) u_bus (
    .clk, .rst_n, .req(cpu_req), .rdata(cpu_rdata), .ack(cpu_ack),
    .cs_gpio1, .cs_gpio2, .cs_spi(spi_cs), .cs_timer, .cs_uart, .cs_intc,
    .rd_gpio1, .rd_gpio2, .rd_spi(spi_rdata), .ack_spi(spi_ack),
    .rd_timer, .rd_uart, .rd_intc,
    .fb_en, .fb_we, .fb_addr, .fb_din, .fb_dout
  );

  assign spi_req = cpu_req;

  gpio_in #(.WIDTH(3)) u_gpio1 (
    .clk, .rst_n, .pins({beacon_int, send_int}), .req(cpu_req), .cs(cs_gpio1),
    .rdata(rd_gpio1), .irq(irq_gpio1)
  );

  gpio_in #(.WIDTH(2)) u_gpio2 (
    .clk, .rst_n, .pins(btn), .req(cpu_req), .cs(cs_gpio2),
    .rdata(rd_gpio2), .irq(irq_gpio2)
  );

  intc #(.N_IRQ(2)) u_intc (
    .clk, .rst_n, .irq_in({irq_gpio2, irq_gpio1}), .req(cpu_req), .cs(cs_intc),
    .rdata(rd_intc), .irq(cpu_irq)
  );

  tof_timer #(.WIDTH(32)) u_timer (
    .clk, .rst_n, .req(cpu_req), .cs(cs_timer), .rdata(rd_timer)
  );

  uart_lite #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .req(cpu_req), .cs(cs_uart), .rdata(rd_uart), .txd(uart_txd)
  );

  frame_bram #(.DEPTH(FB_BYTES)) u_fb (
    .clk,
    .a_addr(disp_adr), .a_dout(disp_data),
    .b_en(fb_en), .b_we(fb_we), .b_addr(fb_addr), .b_din(fb_din), .b_dout(fb_dout)
  );

  display_driver #(.CLK_HZ(CLK_HZ), .ENABLE_HZ(ENABLE_HZ),
                   .H_PIXELS(H_PIXELS), .V_LINES(V_LINES)) u_disp (
    .clk, .rst_n, .fb_adr(disp_adr), .fb_data(disp_data),
    .lcd_d, .lcd_cp, .lcd_load, .lcd_frm
  );
endmodule
