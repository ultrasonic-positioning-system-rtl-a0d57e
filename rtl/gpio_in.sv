// gpio_in: general-purpose input port with an interrupt output.
//
// WIDTH external pins pass through a two-flop synchroniser. A rising edge on a pin sets
// that pin's bit in EDGE. The interrupt `irq` is high while any EDGE bit is set whose
// IER bit is set. Software reads DATA (synchronised pin levels) and EDGE to see which
// pin fired, and clears EDGE bits by writing ones.
// In this design GPIO1 takes the transmitter's send pulse and the two receiver
// pulses, and GPIO2 takes the calibration buttons. The per-pin edge register is this
// design's choice: the original design only says the inputs raise interrupts.
// Bus: cs qualifies req.sel for this slave. Reads are combinational, so rdata is valid
// in the request cycle. Writes take effect at the following clock edge.
// An edge that arrives in the same cycle as the write that clears its bit is kept.
module gpio_in
  import usps_pkg::*;
#(
  parameter int unsigned WIDTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] pins,
  input  bus_req_t         req,
  input  logic             cs,
  output logic [31:0]      rdata,
  output logic             irq
);
  logic [WIDTH-1:0] sync1, sync2, prev;
  logic [WIDTH-1:0] edge_q, ier_q;
  logic             wr;

  assign wr = req.sel && cs && req.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1  <= '0;
      sync2  <= '0;
      prev   <= '0;
      edge_q <= '0;
      ier_q  <= '0;
    end else begin
      sync1 <= pins;
      sync2 <= sync1;
      prev  <= sync2;
      if (wr && req.addr[7:0] == GPIO_IER) ier_q <= req.wdata[WIDTH-1:0];
      if (wr && req.addr[7:0] == GPIO_EDGE)
        edge_q <= (edge_q & ~req.wdata[WIDTH-1:0]) | (sync2 & ~prev);
      else
        edge_q <= edge_q | (sync2 & ~prev);
    end
  end

  always_comb begin
    rdata = '0;
    unique case (req.addr[7:0])
      GPIO_DATA: rdata[WIDTH-1:0] = sync2;
      GPIO_EDGE: rdata[WIDTH-1:0] = edge_q;
      GPIO_IER:  rdata[WIDTH-1:0] = ier_q;
      default:   rdata = '0;
    endcase
  end

  assign irq = |(edge_q & ier_q);
endmodule
