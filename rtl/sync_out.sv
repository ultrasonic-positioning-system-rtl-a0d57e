// sync_out: drives the LCD pins D7..D0, CP, LOAD and FRM.
//
// On each `enable` it takes the position from sync_proc and the framebuffer byte
// read at that position. A normal column turns the framebuffer byte into display
// data. The framebuffer byte holds 8 pixels, leftmost pixel in bit 7, one bit each.
// A set bit gives colour FG_RGB and a clear bit BG_RGB. The 8 pixels form a stream of
// 8*BPP bits in the order R1 G1 B1 R2 G2 B2 ..., most significant first. Byte `sub`
// of that stream goes on D7..D0, so D7 carries R1 in the first byte and B3 in the
// second, as in the panel's timing chart.
// CP pulses once per data byte, inside the cp_win window, while D is stable.
// The column after the last data byte is the LOAD slot: D holds its value, CP stays
// low and LOAD pulses in the window. FRM is high for the whole of row 0, including
// its closing LOAD slot. So FRM rises after the LOAD that closes the previous frame
// and falls after the LOAD that ends line 0.
// All outputs are registers. D and FRM change one clock after `enable`; CP and LOAD
// follow cp_win with one clock of delay.
module sync_out #(
  parameter int unsigned H_PIXELS = 320,
  parameter int unsigned BPP      = 3,
  parameter logic [BPP-1:0] FG_RGB = '1,
  parameter logic [BPP-1:0] BG_RGB = '0,
  parameter int unsigned CW = 7,
  parameter int unsigned RW = 8,
  parameter int unsigned SW = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          cp_win,
  input  logic [CW-1:0] col,
  input  logic [RW-1:0] row,
  input  logic [SW-1:0] sub,
  input  logic [7:0]    fb_data,
  output logic [7:0]    lcd_d,
  output logic          lcd_cp,
  output logic          lcd_load,
  output logic          lcd_frm
);
  localparam int unsigned DISP_BYTES = H_PIXELS * BPP / 8;
  localparam int unsigned GW = 8 * BPP;

  logic [GW-1:0] group;     // colour stream of the 8 pixels of fb_data
  logic [7:0]    sel_byte;
  logic          active_q;  // current slot is a data byte
  logic          load_q;    // current slot is the LOAD slot

  always_comb begin
    for (int p = 0; p < 8; p++)
      group[GW-1-BPP*p -: BPP] = fb_data[7-p] ? FG_RGB : BG_RGB;
    sel_byte = '0;
    for (int s = 0; s < BPP; s++)
      if (sub == SW'(s)) sel_byte = group[GW-1-8*s -: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcd_d    <= '0;
      lcd_frm  <= 1'b0;
      active_q <= 1'b0;
      load_q   <= 1'b0;
      lcd_cp   <= 1'b0;
      lcd_load <= 1'b0;
    end else begin
      if (enable) begin
        active_q <= (col < CW'(DISP_BYTES));
        load_q   <= (col == CW'(DISP_BYTES));
        lcd_frm  <= (row == '0);
        if (col < CW'(DISP_BYTES)) lcd_d <= sel_byte;
      end
      lcd_cp   <= active_q && cp_win;
      lcd_load <= load_q && cp_win;
    end
  end

  // CP and LOAD are never high together.
  a_cp_load_excl: assert property (@(posedge clk) disable iff (!rst_n) !(lcd_cp && lcd_load));
endmodule
