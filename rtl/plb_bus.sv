// plb_bus: address decoder and read multiplexer of the processor's peripheral bus.
//
// One master (the processor) and the slaves of the address map in usps_pkg. For a
// register slave (addr[15] = 0), addr[11:8] picks the slave. Its chip select goes high
// for the request cycle, and its read data is returned with ack in that same cycle.
// An address with addr[15] set goes to port B of the framebuffer BRAM, byte address
// addr[AW-1:0]. The BRAM reads synchronously, so ack and rdata come one cycle after
// the request. An unmapped address is acknowledged at once and reads zero.
// The SPI slave is outside this design (its radio link was never used). Its select
// and the request go out, and its read data and ack come back in.
// The real system uses the processor vendor's PLB. This single-master, single-cycle
// protocol is this design's choice. So is the address map.
module plb_bus
  import usps_pkg::*;
#(
  parameter int unsigned FB_AW = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  // master
  input  bus_req_t         req,
  output logic [31:0]      rdata,
  output logic             ack,
  // register slaves
  output logic             cs_gpio1,
  output logic             cs_gpio2,
  output logic             cs_spi,
  output logic             cs_timer,
  output logic             cs_uart,
  output logic             cs_intc,
  input  logic [31:0]      rd_gpio1,
  input  logic [31:0]      rd_gpio2,
  input  logic [31:0]      rd_spi,
  input  logic             ack_spi,
  input  logic [31:0]      rd_timer,
  input  logic [31:0]      rd_uart,
  input  logic [31:0]      rd_intc,
  // framebuffer port B
  output logic             fb_en,
  output logic             fb_we,
  output logic [FB_AW-1:0] fb_addr,
  output logic [7:0]       fb_din,
  input  logic [7:0]       fb_dout
);
  logic   is_fb;
  logic   fb_rd_pending;
  slave_e slv;

  assign is_fb = req.addr[15];
  assign slv   = slave_e'(req.addr[11:8]);

  always_comb begin
    cs_gpio1 = 1'b0;
    cs_gpio2 = 1'b0;
    cs_spi   = 1'b0;
    cs_timer = 1'b0;
    cs_uart  = 1'b0;
    cs_intc  = 1'b0;
    if (!is_fb) begin
      unique case (slv)
        SLV_GPIO1: cs_gpio1 = 1'b1;
        SLV_GPIO2: cs_gpio2 = 1'b1;
        SLV_SPI:   cs_spi   = 1'b1;
        SLV_TIMER: cs_timer = 1'b1;
        SLV_UART:  cs_uart  = 1'b1;
        SLV_INTC:  cs_intc  = 1'b1;
        default: ;
      endcase
    end
  end

  assign fb_en   = req.sel && is_fb;
  assign fb_we   = req.we;
  assign fb_addr = req.addr[FB_AW-1:0];
  assign fb_din  = req.wdata[7:0];

  // framebuffer accesses are answered one cycle later
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb_rd_pending <= 1'b0;
    else        fb_rd_pending <= req.sel && is_fb;
  end

  always_comb begin
    rdata = '0;
    ack   = 1'b0;
    if (fb_rd_pending) begin
      rdata = {24'b0, fb_dout};
      ack   = 1'b1;
    end else if (req.sel && !is_fb) begin
      ack = 1'b1;
      unique case (slv)
        SLV_GPIO1: rdata = rd_gpio1;
        SLV_GPIO2: rdata = rd_gpio2;
        SLV_SPI:   begin rdata = rd_spi; ack = ack_spi; end
        SLV_TIMER: rdata = rd_timer;
        SLV_UART:  rdata = rd_uart;
        SLV_INTC:  rdata = rd_intc;
        default:   rdata = '0;
      endcase
    end
  end

  // The master issues one request at a time and waits for its ack.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    fb_rd_pending |-> !req.sel);
endmodule
