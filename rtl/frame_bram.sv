// frame_bram: dual-port block RAM holding the display image.
//
// DEPTH bytes (9600 = 320*240 pixels at one bit per pixel), one clock domain.
// Port A is read-only and belongs to the display driver. Port B reads and writes and
// belongs to the processor, which draws the picture. Both ports read synchronously:
// the data for an address presented in cycle t appears after the clock edge that
// ends cycle t. Port B is read-before-write: a write returns the old contents.
// The memory is not reset. Its power-up contents are whatever the processor writes.
module frame_bram #(
  parameter int unsigned DEPTH = 9600,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: display driver
  input  logic [AW-1:0] a_addr,
  output logic [7:0]    a_dout,
  // port B: processor
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [7:0]    b_din,
  output logic [7:0]    b_dout
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (32'(a_addr) < DEPTH) a_dout <= mem[a_addr];
    else                     a_dout <= '0;
  end

  always_ff @(posedge clk) begin
    if (b_en && 32'(b_addr) < DEPTH) begin
      b_dout <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_din;
    end
  end
endmodule
