// uart_lite: serial transmitter for the terminal that shows the coordinates.
//
// Sends 8N1 frames (start bit, 8 data bits LSB first, stop bit) at BAUD bits per
// second. Each bit lasts CLK_HZ/BAUD clocks. Writing a byte to TX starts a frame if
// the transmitter is idle. STAT bit 0 reads 1 while a frame is being sent, and a
// write to TX then is dropped. The line idles high.
// The original system uses the UART only to print results to a terminal, so only the
// transmit half is built. Baud rate, framing and the register layout are this
// design's choice.
// Bus: combinational read in the request cycle. The write that starts a frame drives
// the start bit from the next clock edge.
module uart_lite
  import usps_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  input  logic        cs,
  output logic [31:0] rdata,
  output logic        txd
);
  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned BW = $clog2(BIT_CLKS);

  logic [9:0]    shreg;     // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [BW-1:0] bit_timer;
  logic          busy;

  assign busy = (bits_left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      bit_timer <= '0;
    end else if (!busy) begin
      if (req.sel && cs && req.we && req.addr[7:0] == UART_TX) begin
        shreg     <= {1'b1, req.wdata[7:0], 1'b0};
        bits_left <= 4'd10;
        bit_timer <= BW'(BIT_CLKS - 1);
      end
    end else if (bit_timer == '0) begin
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 1'b1;
      bit_timer <= BW'(BIT_CLKS - 1);
    end else begin
      bit_timer <= bit_timer - 1'b1;
    end
  end

  assign txd = busy ? shreg[0] : 1'b1;

  always_comb begin
    rdata = '0;
    if (req.addr[7:0] == UART_STAT) rdata[0] = busy;
  end

  initial assert (BIT_CLKS >= 2) else $error("uart_lite: CLK_HZ/BAUD too small");
endmodule
