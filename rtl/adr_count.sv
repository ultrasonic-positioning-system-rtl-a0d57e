// adr_count: scan position of the LCD driver.
//
// On every `enable` strobe it steps one display byte along the current line.
// A line of H_PIXELS pixels at BPP colour bits each is DISP_BYTES = H_PIXELS*BPP/8
// bytes (120 for 320 pixels of R,G,B). After the last byte comes one extra slot,
// col = DISP_BYTES, in which the LOAD pulse is sent. Then the row counter advances.
// After V_LINES rows the frame starts again at row 0.
// The framebuffer holds one bit per pixel, so one framebuffer byte covers 8 pixels.
// Those 8 pixels become BPP display bytes. `sub` counts 0..BPP-1 inside that group,
// and `adr` is the framebuffer byte address row*H_PIXELS/8 + col/BPP. Both are
// kept as counters, not computed by division. During the LOAD slot `adr` already
// points at the first byte of the next line (line 0 after the last line).
// Outputs are registers that change in the cycle after `enable`.
module adr_count #(
  parameter int unsigned H_PIXELS = 320,
  parameter int unsigned V_LINES  = 240,
  parameter int unsigned BPP      = 3,
  localparam int unsigned DISP_BYTES = H_PIXELS * BPP / 8,
  localparam int unsigned FB_BYTES   = H_PIXELS * V_LINES / 8,
  localparam int unsigned CW = $clog2(DISP_BYTES + 1),
  localparam int unsigned RW = $clog2(V_LINES),
  localparam int unsigned AW = $clog2(FB_BYTES),
  localparam int unsigned SW = (BPP > 1) ? $clog2(BPP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic [CW-1:0] col_count,
  output logic [RW-1:0] row_count,
  output logic [SW-1:0] sub_count,
  output logic [AW-1:0] adr
);
  localparam logic [CW-1:0] COL_LOAD = CW'(DISP_BYTES);
  localparam logic [RW-1:0] ROW_LAST = RW'(V_LINES - 1);
  localparam logic [SW-1:0] SUB_LAST = SW'(BPP - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_count <= '0;
      row_count <= '0;
      sub_count <= '0;
      adr <= '0;
    end else if (enable) begin
      if (col_count == COL_LOAD) begin
        // end of the LOAD slot: next line (or next frame)
        col_count <= '0;
        sub_count <= '0;
        if (row_count == ROW_LAST) begin
          row_count <= '0;
        end else begin
          row_count <= row_count + 1'b1;
        end
      end else begin
        col_count <= col_count + 1'b1;
        if (sub_count == SUB_LAST) begin
          sub_count <= '0;
          // last byte of the frame: the next line to be fetched is line 0
          if (col_count == COL_LOAD - 1'b1 && row_count == ROW_LAST) adr <= '0;
          else                                                     adr <= adr + 1'b1;
        end else begin
          sub_count <= sub_count + 1'b1;
        end
      end
    end
  end

  initial assert ((H_PIXELS * BPP) % 8 == 0 && H_PIXELS % 8 == 0)
    else $error("adr_count: H_PIXELS must be a multiple of 8");
endmodule
