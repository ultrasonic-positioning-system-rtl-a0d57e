// tb_sync_out: drives sync_out with random positions and framebuffer bytes. The
// colours are set to FG = 110 and BG = 001 so that each colour bit is told apart.
// For each slot it checks:
//  - D7..D0 against a bit-by-bit model of the R1 G1 B1 R2 ... stream;
//  - that D holds its value through the LOAD slot;
//  - FRM = (row == 0);
//  - that CP is high for exactly the cp_win length in a data slot and never in a
//    LOAD slot, and the reverse for LOAD.
module tb_sync_out;
  localparam int DIV = 8;
  localparam logic [2:0] FG = 3'b110, BG = 3'b001;
  logic clk = 0, rst_n = 0, enable, cp_win;
  logic [6:0] col; logic [7:0] row; logic [1:0] sub; logic [7:0] fb_data;
  logic [7:0] lcd_d; logic lcd_cp, lcd_load, lcd_frm;
  int checks = 0, failures = 0;
  int phase = 0;

  sync_out #(.FG_RGB(FG), .BG_RGB(BG)) dut (.clk, .rst_n, .enable, .cp_win, .col, .row, .sub,
    .fb_data, .lcd_d, .lcd_cp, .lcd_load, .lcd_frm);

  always #5 clk = ~clk;
  always_ff @(posedge clk) phase <= (phase + 1) % DIV;
  assign enable = (phase == DIV - 1);
  assign cp_win = (phase >= DIV / 4) && (phase < 3 * DIV / 4);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model(input logic [7:0] fb, input int s);
    logic [7:0] b;
    for (int j = 7; j >= 0; j--) begin
      int k, p, c;
      logic [2:0] rgb;
      k = 8 * s + (7 - j);     // position in the colour stream
      p = k / 3;               // pixel 0..7, leftmost first
      c = k % 3;               // 0 = R, 1 = G, 2 = B
      rgb = fb[7 - p] ? FG : BG;
      b[j] = rgb[2 - c];
    end
    return b;
  endfunction

  initial begin
    logic [7:0] exp_d;
    int cp_n, ld_n;
    bit is_load;
    col = 0; row = 0; sub = 0; fb_data = 0;
    exp_d = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      // present the inputs before the enable edge
      @(negedge clk);
      while (!enable) @(negedge clk);
      is_load = ($urandom_range(0, 9) == 0);
      col     = is_load ? 7'd120 : 7'($urandom_range(0, 119));
      sub     = 2'($urandom_range(0, 2));
      row     = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'($urandom_range(1, 239));
      fb_data = 8'($urandom);
      if (!is_load) exp_d = model(fb_data, sub);
      @(posedge clk);   // enable edge
      cp_n = 0; ld_n = 0;
      for (int t = 0; t < DIV; t++) begin
        @(posedge clk);
        #1;
        cp_n += lcd_cp;
        ld_n += lcd_load;
        checks++;
        if (lcd_d !== exp_d || lcd_frm !== (row == 0)) begin
          failures++;
          if (failures < 10) $display("i=%0d d=%h exp=%h frm=%b row=%0d", i, lcd_d, exp_d, lcd_frm, row);
        end
      end
      checks++;
      if (cp_n != (is_load ? 0 : DIV / 2) || ld_n != (is_load ? DIV / 2 : 0)) begin
        failures++;
        if (failures < 10) $display("i=%0d load=%b cp_n=%0d ld_n=%0d", i, is_load, cp_n, ld_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
