// tof_timer: timer/counter that measures the ultrasound's time of flight.
//
// A WIDTH-bit counter that counts system clock cycles while CTRL.run is set. Writing
// CTRL with bit1 (clear) set zeroes the counter in the same step, so writing 3
// "resets and starts" it. The original system's software does this when the transmitter's
// send pulse interrupts. It reads COUNT when a receiver's pulse interrupts. The
// counter stops at all-ones rather than wrapping, so a missing echo reads as the
// maximum time, not as a short distance. The saturation is this design's choice.
// At 50 MHz a 32-bit counter spans 85 s; 1.5 m of sound takes about 4.4 ms.
// Bus: combinational read in the request cycle. A write acts at the next clock edge.
module tof_timer
  import usps_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  input  logic        cs,
  output logic [31:0] rdata
);
  logic [WIDTH-1:0] count;
  logic             run;
  logic             wr_ctrl;

  assign wr_ctrl = req.sel && cs && req.we && req.addr[7:0] == TMR_CTRL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      run   <= 1'b0;
    end else begin
      if (wr_ctrl) run <= req.wdata[0];
      if (wr_ctrl && req.wdata[1]) count <= '0;
      else if (run && count != '1) count <= count + 1'b1;
    end
  end

  always_comb begin
    rdata = '0;
    unique case (req.addr[7:0])
      TMR_CTRL:  rdata[0] = run;
      TMR_COUNT: rdata    = 32'(count);
      default:   rdata    = '0;
    endcase
  end
endmodule
