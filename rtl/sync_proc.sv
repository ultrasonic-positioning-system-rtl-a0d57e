// sync_proc: one-enable pipeline stage between the scan counters and the outputs.
//
// On each `enable` it registers the framebuffer address, row, column and sub-byte
// index from adr_count. The registered address drives the framebuffer read port
// (port A). The BRAM answers one clock later, long before the next `enable`. So when
// sync_out samples at the next `enable`, the BRAM data and the registered row and
// column describe the same display byte.
// Reset puts these registers on the LOAD slot of the last row (RST_COL, RST_ROW),
// the position just before the counters' reset value of row 0, column 0. The first
// thing the display sees after reset is then a LOAD pulse followed by line 0 with
// FRM high, just as at every later frame start.
// Latency: counters at enable k -> these registers at enable k+1.
module sync_proc #(
  parameter int unsigned CW = 7,
  parameter int unsigned RW = 8,
  parameter int unsigned SW = 2,
  parameter int unsigned AW = 14,
  parameter int unsigned RST_COL = 120,
  parameter int unsigned RST_ROW = 239
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [CW-1:0] col_count,
  input  logic [RW-1:0] row_count,
  input  logic [SW-1:0] sub_count,
  input  logic [AW-1:0] adr_count,
  output logic [CW-1:0] col,
  output logic [RW-1:0] row,
  output logic [SW-1:0] sub,
  output logic [AW-1:0] adr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= CW'(RST_COL);
      row <= RW'(RST_ROW);
      sub <= '0;
      adr <= '0;
    end else if (enable) begin
      col <= col_count;
      row <= row_count;
      sub <= sub_count;
      adr <= adr_count;
    end
  end
endmodule
