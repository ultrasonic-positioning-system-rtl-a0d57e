// intc: interrupt controller in front of the processor's single interrupt input.
//
// The processor has one interrupt pin, so the N_IRQ peripheral interrupts are ORed
// onto it. Software reads ISR to learn where an interrupt came from. A rising edge of
// source i sets ISR bit i. The bit stays set until software writes a one to that bit
// of IAR. `irq` is high while MER bit 0 is set and any ISR bit is set whose IER bit
// is set.
// Following the original design: the OR of the sources and the readable origin. This
// design's choice: the edge-latched ISR and the IER/IAR/MER registers. Sources here
// are GPIO1 (measurement pulses) and GPIO2 (buttons).
// Bus: combinational read in the request cycle. Writes act at the next clock edge.
// An edge that arrives while its bit is being acknowledged is kept.
module intc
  import usps_pkg::*;
#(
  parameter int unsigned N_IRQ = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IRQ-1:0] irq_in,
  input  bus_req_t         req,
  input  logic             cs,
  output logic [31:0]      rdata,
  output logic             irq
);
  logic [N_IRQ-1:0] prev, isr, ier;
  logic             mer;
  logic [N_IRQ-1:0] rise;
  logic             wr;

  assign wr   = req.sel && cs && req.we;
  assign rise = irq_in & ~prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0;
      isr  <= '0;
      ier  <= '0;
      mer  <= 1'b0;
    end else begin
      prev <= irq_in;
      if (wr && req.addr[7:0] == INTC_IAR) isr <= (isr & ~req.wdata[N_IRQ-1:0]) | rise;
      else                                 isr <= isr | rise;
      if (wr && req.addr[7:0] == INTC_IER) ier <= req.wdata[N_IRQ-1:0];
      if (wr && req.addr[7:0] == INTC_MER) mer <= req.wdata[0];
    end
  end

  always_comb begin
    rdata = '0;
    unique case (req.addr[7:0])
      INTC_ISR: rdata[N_IRQ-1:0] = isr;
      INTC_IER: rdata[N_IRQ-1:0] = ier;
      INTC_MER: rdata[0]         = mer;
      default:  rdata = '0;
    endcase
  end

  assign irq = mer && |(isr & ier);
endmodule
