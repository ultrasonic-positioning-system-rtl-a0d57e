// usps_pkg: types and constants shared by the ultrasonic positioning FPGA design.
//
// The peripherals hang off one simple processor bus. A request is a single-cycle
// strobe (sel) carrying a byte address, a write flag and write data; the addressed
// slave answers with read data and an acknowledge. Register slaves acknowledge in the
// same cycle, the framebuffer one cycle later. This bus stands in for the processor's
// peripheral bus; its exact protocol is this design's own choice.
//
// Address map (byte addresses, 16 bits):
//   0x8000-0xA57F  framebuffer, one byte per 8 pixels (bit 15 set)
//   0x0000         GPIO1  (send pulse and the two receiver pulses)
//   0x0100         GPIO2  (calibration buttons)
//   0x0200         SPI    (external slave, radio link, unused)
//   0x0300         timer/counter
//   0x0400         UART
//   0x0500         interrupt controller
package usps_pkg;

  localparam int unsigned BUS_AW = 16;
  localparam int unsigned BUS_DW = 32;

  typedef struct packed {
    logic              sel;    // request strobe, one cycle
    logic              we;     // 1 = write, 0 = read
    logic [BUS_AW-1:0] addr;   // byte address
    logic [BUS_DW-1:0] wdata;  // write data
  } bus_req_t;

  // Slave select field addr[11:8] for register slaves (addr[15] = 0).
  typedef enum logic [3:0] {
    SLV_GPIO1 = 4'h0,
    SLV_GPIO2 = 4'h1,
    SLV_SPI   = 4'h2,
    SLV_TIMER = 4'h3,
    SLV_UART  = 4'h4,
    SLV_INTC  = 4'h5
  } slave_e;

  // Register offsets inside a slave (addr[7:0]).
  localparam logic [7:0] GPIO_DATA = 8'h00;  // input levels (read only)
  localparam logic [7:0] GPIO_EDGE = 8'h04;  // captured rising edges, write 1 to clear
  localparam logic [7:0] GPIO_IER  = 8'h08;  // interrupt enable per pin

  localparam logic [7:0] TMR_CTRL  = 8'h00;  // bit0 run, bit1 clear (write, self-clearing)
  localparam logic [7:0] TMR_COUNT = 8'h04;  // counter value (read only)

  localparam logic [7:0] UART_TX   = 8'h00;  // write: byte to send
  localparam logic [7:0] UART_STAT = 8'h04;  // bit0 transmitter busy

  localparam logic [7:0] INTC_ISR  = 8'h00;  // pending interrupts (read only)
  localparam logic [7:0] INTC_IER  = 8'h04;  // enable per source
  localparam logic [7:0] INTC_IAR  = 8'h08;  // write 1 to acknowledge
  localparam logic [7:0] INTC_MER  = 8'h0C;  // bit0 master enable


endpackage
