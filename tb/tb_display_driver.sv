// tb_display_driver: runs the display driver at its default size (320x240, 3 colour
// bits, 50 MHz clock, 3 MHz enable). A testbench framebuffer (synchronous read, like
// the BRAM) holds a random picture. The testbench acts as the panel: it collects the
// byte on D7..D0 at every CP rising edge, and at every LOAD rising edge it checks the
// collected line. Checks:
//  - every line has exactly 120 bytes, and its 320 pixels match the picture row
//    (each pixel's R, G and B all equal to its framebuffer bit);
//  - FRM is high at the LOAD of line 0 and low at every other line's LOAD;
//  - 240 lines per frame, and FRM rises once per frame, 240*121*16 = 464640 clocks
//    apart;
//  - LOAD and CP are never high together.
// The picture is changed between the two frames to check that the second frame
// shows the new one.
module tb_display_driver;
  localparam int H = 320, V = 240, FBL = H / 8, DISP = H * 3 / 8;
  localparam int FRAME_CLKS = V * (DISP + 1) * 16;
  logic clk = 0, rst_n = 0;
  logic [13:0] fb_adr;
  logic [7:0] fb_data;
  logic [7:0] lcd_d;
  logic lcd_cp, lcd_load, lcd_frm;
  logic [7:0] img [FBL * V];
  int checks = 0, failures = 0;
  longint cyc = 0;

  display_driver dut (.clk, .rst_n, .fb_adr, .fb_data, .lcd_d, .lcd_cp, .lcd_load, .lcd_frm);

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;
  always_ff @(posedge clk) fb_data <= (fb_adr < FBL * V) ? img[fb_adr] : 8'h00;

  initial begin
    #30_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // panel model
  logic [7:0] line_q[$];
  logic cp_d = 0, load_d = 0, frm_d = 0;
  int line_no = -1;       // row of the line being received; -1 before the first FRM
  int frames = 0;
  longint last_frm_rise = -1;

  function automatic void check_line(int row);
    logic bits [$];
    checks++;
    if (line_q.size() != DISP) begin
      failures++;
      $display("row %0d: %0d bytes", row, line_q.size());
      return;
    end
    foreach (line_q[i]) for (int j = 7; j >= 0; j--) bits.push_back(line_q[i][j]);
    for (int p = 0; p < H; p++) begin
      logic pix;
      pix = img[row * FBL + p / 8][7 - p % 8];
      if (bits[3 * p] !== pix || bits[3 * p + 1] !== pix || bits[3 * p + 2] !== pix) begin
        failures++;
        if (failures < 10) $display("row %0d pixel %0d wrong", row, p);
        return;
      end
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    cp_d <= lcd_cp; load_d <= lcd_load; frm_d <= lcd_frm;
    if (lcd_cp && lcd_load) begin
      checks++; failures++; $display("CP and LOAD together");
    end
    if (lcd_cp && !cp_d) line_q.push_back(lcd_d);
    if (lcd_frm && !frm_d) begin
      if (last_frm_rise >= 0) begin
        checks++;
        if (cyc - last_frm_rise != FRAME_CLKS) begin
          failures++; $display("frame period %0d", cyc - last_frm_rise);
        end
      end
      last_frm_rise = cyc;
    end
    if (lcd_load && !load_d) begin
      if (line_no >= 0) begin
        checks++;
        if (lcd_frm !== (line_no == 0)) begin failures++; $display("FRM wrong at row %0d", line_no); end
        check_line(line_no);
        if (line_no == V - 1) frames++;
        line_no = (line_no + 1) % V;
      end else begin
        checks++;
        if (line_q.size() != 0) begin failures++; $display("data before first line"); end
        line_no = 0;
      end
      line_q.delete();
    end
  end

  initial begin
    foreach (img[i]) img[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (frames == 1);
    foreach (img[i]) img[i] = 8'($urandom);   // changed during the LOAD slot of row 239
    wait (frames == 2);
    checks++;
    if (line_no != 0) begin failures++; $display("line counter %0d", line_no); end
    $display("frames=%0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
