// display_driver: refreshes a 320x240 colour LCD from a 1-bit-per-pixel framebuffer.
//
// The panel has an 8-bit data bus and a shift clock CP, a line latch LOAD and a
// first-line marker FRM. It has no memory of its own and must be redrawn all the time.
// Each line is 320 pixels * 3 colour bits = 120 data bytes, each clocked in with one
// CP pulse. A LOAD pulse then latches the line. FRM is high during the first line.
// The framebuffer stores 40 bytes per line (8 pixels per byte, 9600 bytes in all).
// Each framebuffer byte is widened to 3 display bytes on the way out.
//
// Four stages, as in the driver's block diagram:
//   comb_proc  ~3 MHz enable strobe (one display byte per enable)
//   adr_count  column/row/sub-byte counters and framebuffer address
//   sync_proc  registers the address for the BRAM and the position for the outputs
//   sync_out   builds D7..D0, CP, LOAD and FRM
// A line takes DISP_BYTES+1 enables (120 data bytes and the LOAD slot). A frame takes
// V_LINES*(DISP_BYTES+1) = 29040 enables: 107.6 frames/s at 3.125 MHz. The original design
// quotes about 70 Hz for a 3 MHz enable.
// fb_adr/fb_data connect to a synchronous-read BRAM port (one clock of latency).
module display_driver #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned ENABLE_HZ = 3_000_000,
  parameter int unsigned H_PIXELS  = 320,
  parameter int unsigned V_LINES   = 240,
  parameter int unsigned BPP       = 3,
  parameter logic [BPP-1:0] FG_RGB = '1,
  parameter logic [BPP-1:0] BG_RGB = '0,
  localparam int unsigned DISP_BYTES = H_PIXELS * BPP / 8,
  localparam int unsigned FB_BYTES   = H_PIXELS * V_LINES / 8,
  localparam int unsigned AW = $clog2(FB_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] fb_adr,
  input  logic [7:0]    fb_data,
  output logic [7:0]    lcd_d,
  output logic          lcd_cp,
  output logic          lcd_load,
  output logic          lcd_frm
);
  localparam int unsigned CW = $clog2(DISP_BYTES + 1);
  localparam int unsigned RW = $clog2(V_LINES);
  localparam int unsigned SW = (BPP > 1) ? $clog2(BPP) : 1;

  logic          enable, cp_win;
  logic [CW-1:0] col_count, col;
  logic [RW-1:0] row_count, row;
  logic [SW-1:0] sub_count, sub;
  logic [AW-1:0] adr_count;

  comb_proc #(.CLK_HZ(CLK_HZ), .ENABLE_HZ(ENABLE_HZ)) u_comb_proc (
    .clk, .rst_n, .enable, .cp_win
  );

  adr_count #(.H_PIXELS(H_PIXELS), .V_LINES(V_LINES), .BPP(BPP)) u_adr_count (
    .clk, .rst_n, .enable, .col_count, .row_count, .sub_count, .adr(adr_count)
  );

  sync_proc #(.CW(CW), .RW(RW), .SW(SW), .AW(AW),
              .RST_COL(DISP_BYTES), .RST_ROW(V_LINES - 1)) u_sync_proc (
    .clk, .rst_n, .enable, .col_count, .row_count, .sub_count, .adr_count,
    .col, .row, .sub, .adr(fb_adr)
  );

  sync_out #(.H_PIXELS(H_PIXELS), .BPP(BPP), .FG_RGB(FG_RGB), .BG_RGB(BG_RGB),
             .CW(CW), .RW(RW), .SW(SW)) u_sync_out (
    .clk, .rst_n, .enable, .cp_win, .col, .row, .sub, .fb_data,
    .lcd_d, .lcd_cp, .lcd_load, .lcd_frm
  );
endmodule
