// tb_usps_top: end-to-end run of the positioning FPGA at its default size (50 MHz,
// 320x240 display, 9600 baud).
//
// The testbench plays three roles:
//  * the world: a transmitter at a chosen (x, y) fires a 5-period 40 kHz burst on the
//    send wire. The two receivers, at (0, 0) and (A_MM, 0), see the same burst after
//    the sound's travel time (343 m/s here). Calibration buttons are pressed when
//    the calibration steps call for it;
//  * the processor: it runs the measurement software through the bus port. On the
//    send interrupt it clears and starts the timer. On each receiver interrupt it
//    reads the timer. Later edges of the same burst are ignored. Calibration: the
//    transmitter is measured at 500 mm and 200 mm, with BTN1 and BTN2 marking the
//    two steps, and the software derives the speed of sound from those two times.
//    It then computes x = A/2 + (r1^2 - r2^2)/(2A), y = sqrt(r1^2 - x^2) for three
//    positions, marks each position in the framebuffer, and prints the last one
//    over the UART;
//  * the display panel: it collects each line from CP/LOAD/FRM. Once all drawing is
//    done it compares one whole frame with the picture the processor drew.
// Checked: measured times against the true times of flight, positions within 2 mm,
// the UART bytes, the framebuffer read-back, the displayed frame, and an SPI access
// to the external slave. Each mechanism is counted and must happen at least once.
module tb_usps_top;
  import usps_pkg::*;
  localparam int H = 320, V = 240, FBL = H / 8, DISP = H * 3 / 8;
  localparam real CLK_NS = 20.0;
  localparam real SOUND_MM_PER_NS = 343.0e-6;   // 343 m/s
  localparam real A_MM = 600.0;
  localparam int BURST_PERIOD = 1250;            // 40 kHz at 50 MHz
  localparam int UART_BIT = 50_000_000 / 9600;

  logic clk = 0, rst_n = 0;
  logic send_int = 0;
  logic [1:0] beacon_int = '0, btn = '0;
  bus_req_t cpu_req, spi_req;
  logic [31:0] cpu_rdata, spi_rdata;
  logic cpu_ack, cpu_irq, spi_cs, spi_ack, uart_txd;
  logic [7:0] lcd_d;
  logic lcd_cp, lcd_load, lcd_frm;

  usps_top dut (.clk, .rst_n, .send_int, .beacon_int, .btn, .cpu_req, .cpu_rdata, .cpu_ack,
    .cpu_irq, .spi_req, .spi_cs, .spi_rdata, .spi_ack, .uart_txd,
    .lcd_d, .lcd_cp, .lcd_load, .lcd_frm);

  // external SPI slave stand-in: acknowledges at once with a fixed word
  assign spi_ack   = spi_cs;
  assign spi_rdata = 32'h5151_0000 | 32'(spi_req.addr[7:0]);

  always #10 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  int n_send_irq = 0, n_rx1_irq = 0, n_rx2_irq = 0, n_btn_irq = 0, n_ignored = 0;
  int n_uart = 0, n_fb_read = 0, n_spi = 0, n_frames_checked = 0, n_positions = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) fail(msg);
  endtask

  initial begin
    #100_000_000;   // 5 M clocks
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- world
  task automatic burst_at(input longint start, input int line);
    // line 0: send wire, 1/2: receivers
    while (cyc < start) @(posedge clk);
    for (int p = 0; p < 5; p++) begin
      if (line == 0) send_int <= 1; else beacon_int[line-1] <= 1;
      repeat (BURST_PERIOD / 2) @(posedge clk);
      if (line == 0) send_int <= 0; else beacon_int[line-1] <= 0;
      repeat (BURST_PERIOD / 2) @(posedge clk);
    end
  endtask

  real true_t1, true_t2;   // true times of flight in clocks
  task automatic fire(input real x, input real y, input real rx2_x);
    longint t0;
    real r1, r2;
    r1 = $sqrt(x * x + y * y);
    r2 = $sqrt((x - rx2_x) * (x - rx2_x) + y * y);
    true_t1 = r1 / SOUND_MM_PER_NS / CLK_NS;
    true_t2 = r2 / SOUND_MM_PER_NS / CLK_NS;
    t0 = cyc + 10;
    fork
      burst_at(t0, 0);
      burst_at(t0 + longint'(true_t1), 1);
      burst_at(t0 + longint'(true_t2), 2);
    join_none
  endtask

  // ---------------------------------------------------------------- processor bus
  task automatic bus_wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    cpu_req = '{sel: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    cpu_req = '0;
  endtask

  task automatic bus_rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_req = '{sel: 1'b1, we: 1'b0, addr: a, wdata: '0};
    #1;
    if (cpu_ack) begin
      d = cpu_rdata;
      @(negedge clk);
      cpu_req = '0;
    end else begin
      @(negedge clk);
      cpu_req = '0;
      #1;
      check(cpu_ack, "delayed ack");
      d = cpu_rdata;
    end
  endtask

  function automatic logic [15:0] reg_addr(slave_e s, logic [7:0] off);
    return {4'h0, s, off};
  endfunction

  // ---------------------------------------------------------------- measurement software
  bit   measuring = 0, got1 = 0, got2 = 0;
  logic [31:0] t1, t2;
  logic [1:0] buttons_seen = '0;

  task automatic service_irq();
    logic [31:0] isr, e;
    bus_rd(reg_addr(SLV_INTC, INTC_ISR), isr);
    if (isr[0]) begin
      bus_rd(reg_addr(SLV_GPIO1, GPIO_EDGE), e);
      bus_wr(reg_addr(SLV_GPIO1, GPIO_EDGE), e);
      if (e[0]) begin
        if (!measuring) begin
          bus_wr(reg_addr(SLV_TIMER, TMR_CTRL), 3);   // clear and start
          measuring = 1; got1 = 0; got2 = 0;
          n_send_irq++;
        end else n_ignored++;
      end
      if (e[1]) begin
        if (measuring && !got1) begin
          bus_rd(reg_addr(SLV_TIMER, TMR_COUNT), t1); got1 = 1; n_rx1_irq++;
        end else n_ignored++;
      end
      if (e[2]) begin
        if (measuring && !got2) begin
          bus_rd(reg_addr(SLV_TIMER, TMR_COUNT), t2); got2 = 1; n_rx2_irq++;
        end else n_ignored++;
      end
    end
    if (isr[1]) begin
      bus_rd(reg_addr(SLV_GPIO2, GPIO_EDGE), e);
      bus_wr(reg_addr(SLV_GPIO2, GPIO_EDGE), e);
      buttons_seen |= e[1:0];
      n_btn_irq++;
    end
    bus_wr(reg_addr(SLV_INTC, INTC_IAR), isr);
  endtask

  // run the interrupt loop until a measurement is complete and its burst is over
  task automatic measure(input real x, input real y, input real rx2_x);
    longint t_end;
    measuring = 0;
    fire(x, y, rx2_x);
    t_end = cyc + longint'(true_t1 > true_t2 ? true_t1 : true_t2) + 6 * BURST_PERIOD + 100;
    while (cyc < t_end) begin
      if (cpu_irq) service_irq(); else @(negedge clk);
    end
    check(got1 && got2, "both receivers answered");
    // software reacts a few clocks after each edge; the start and the stops see
    // the same delay, so the difference from the true time stays small
    check(fabs(real'(t1) - true_t1) < 20.0, $sformatf("t1 %0d vs %f", t1, true_t1));
    check(fabs(real'(t2) - true_t2) < 20.0, $sformatf("t2 %0d vs %f", t2, true_t2));
    measuring = 0;
  endtask

  task automatic press(input int b);
    btn[b] <= 1;
    repeat (200) @(posedge clk);
    btn[b] <= 0;
    repeat (20) begin
      if (cpu_irq) service_irq(); else @(negedge clk);
    end
  endtask

  // ---------------------------------------------------------------- display panel
  logic [7:0] shadow [FBL * V];
  logic [7:0] line_q[$];
  logic cp_d = 0, load_d = 0;
  int line_no = -1;
  bit arm = 0, checking = 0;

  always @(posedge clk) if (rst_n) begin
    cp_d <= lcd_cp; load_d <= lcd_load;
    if (lcd_cp && !cp_d) line_q.push_back(lcd_d);
    if (lcd_load && !load_d) begin
      if (line_no >= 0) begin
        if (checking) begin
          logic bits [$];
          bit ok;
          ok = (line_q.size() == DISP) && (lcd_frm == (line_no == 0));
          bits.delete();
          foreach (line_q[i]) for (int j = 7; j >= 0; j--) bits.push_back(line_q[i][j]);
          if (ok)
            for (int p = 0; p < H; p++) begin
              logic pix;
              pix = shadow[line_no * FBL + p / 8][7 - p % 8];
              if (bits[3*p] !== pix || bits[3*p+1] !== pix || bits[3*p+2] !== pix) ok = 0;
            end
          check(ok, $sformatf("display line %0d", line_no));
        end
        if (line_no == V - 1) begin
          if (checking) begin n_frames_checked++; checking = 0; end
          else if (arm) checking = 1;
        end
        line_no = (line_no + 1) % V;
      end else begin
        line_no = 0;
      end
      line_q.delete();
    end
  end

  // ---------------------------------------------------------------- UART receiver
  logic [7:0] uart_q[$];
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge uart_txd);
      repeat (UART_BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (UART_BIT) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (UART_BIT) @(posedge clk);
      if (uart_txd) uart_q.push_back(b);
      else fail("UART stop bit");
    end
  end

  task automatic uart_send(input logic [7:0] b);
    logic [31:0] s;
    do bus_rd(reg_addr(SLV_UART, UART_STAT), s); while (s[0]);
    bus_wr(reg_addr(SLV_UART, UART_TX), 32'(b));
    n_uart++;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    logic [31:0] d;
    real k_clk_per_mm, t500, t200;
    real pos[3][2];
    int mx, my;
    pos = '{'{250.0, 400.0}, '{100.0, 300.0}, '{450.0, 700.0}};
    cpu_req = '0;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);

    // set up interrupts
    bus_wr(reg_addr(SLV_GPIO1, GPIO_IER), 3'b111);
    bus_wr(reg_addr(SLV_GPIO2, GPIO_IER), 2'b11);
    bus_wr(reg_addr(SLV_INTC, INTC_IER), 2'b11);
    bus_wr(reg_addr(SLV_INTC, INTC_MER), 1);

    // SPI slave (outside the design) answers through the bus
    bus_rd(reg_addr(SLV_SPI, 8'h08), d);
    check(d == 32'h5151_0008, "SPI read");
    n_spi++;

    // draw a background: a frame border and a grid every 40 pixels
    for (int r = 0; r < V; r++)
      for (int c = 0; c < FBL; c++) begin
        logic [7:0] b;
        b = (r == 0 || r == V - 1 || r % 40 == 0) ? 8'hFF : 8'h00;
        if (c == 0) b[7] = 1;
        if (c == FBL - 1) b[0] = 1;
        if (c % 5 == 0) b[7] = 1;
        shadow[r * FBL + c] = b;
        bus_wr(FB_ADDR(r * FBL + c), 32'(b));
      end
    // read back a sample
    for (int i = 0; i < 50; i++) begin
      int a;
      a = $urandom_range(0, FBL * V - 1);
      bus_rd(FB_ADDR(a), d);
      check(d == 32'(shadow[a]), $sformatf("framebuffer read %0d", a));
      n_fb_read++;
    end

    // calibration: receivers together, transmitter 500 mm then 200 mm away
    measure(0.0, 500.0, 0.0);
    t500 = (real'(t1) + real'(t2)) / 2.0;
    press(0);
    check(buttons_seen[0], "BTN1 seen");
    measure(0.0, 200.0, 0.0);
    t200 = (real'(t1) + real'(t2)) / 2.0;
    press(1);
    check(buttons_seen[1], "BTN2 seen");
    k_clk_per_mm = (t500 - t200) / 300.0;
    check(fabs(k_clk_per_mm - 1.0 / SOUND_MM_PER_NS / CLK_NS) < 0.2, "calibrated speed of sound");

    // positioning
    for (int p = 0; p < 3; p++) begin
      real r1, r2, x, y;
      measure(pos[p][0], pos[p][1], A_MM);
      r1 = real'(t1) / k_clk_per_mm;
      r2 = real'(t2) / k_clk_per_mm;
      x = A_MM / 2.0 + (r1 * r1 - r2 * r2) / (2.0 * A_MM);
      y = $sqrt(r1 * r1 - x * x);
      check(fabs(x - pos[p][0]) < 2.0 && fabs(y - pos[p][1]) < 2.0,
            $sformatf("position %0d: (%f, %f) vs (%f, %f)", p, x, y, pos[p][0], pos[p][1]));
      n_positions++;
      // mark the position: 4 mm per pixel, origin at the bottom left
      mx = int'(x / 4.0);
      my = V - 1 - int'(y / 4.0);
      if (mx >= 0 && mx < H && my >= 0 && my < V) begin
        bus_rd(FB_ADDR(my * FBL + mx / 8), d);
        d[7 - mx % 8] = 1'b1;
        shadow[my * FBL + mx / 8] = d[7:0];
        bus_wr(FB_ADDR(my * FBL + mx / 8), d);
      end
    end

    // print the last position on the terminal: x then y, 16 bits each, low byte first
    uart_send(8'(mx)); uart_send(8'(mx >> 8)); uart_send(8'(my)); uart_send(8'(my >> 8));
    while (uart_q.size() < 4 && cyc < 4_500_000) @(posedge clk);
    check(uart_q.size() == 4, "UART bytes received");
    if (uart_q.size() == 4)
      check({uart_q[1], uart_q[0]} == 16'(mx) && {uart_q[3], uart_q[2]} == 16'(my), "UART data");

    // the display must now show the whole picture
    arm = 1;
    while (n_frames_checked == 0 && cyc < 4_900_000) @(posedge clk);

    $display("send=%0d rx1=%0d rx2=%0d ignored_edges=%0d buttons=%0d spi=%0d fb_reads=%0d uart=%0d positions=%0d frames=%0d",
             n_send_irq, n_rx1_irq, n_rx2_irq, n_ignored, n_btn_irq, n_spi, n_fb_read, n_uart,
             n_positions, n_frames_checked);
    check(n_send_irq > 0, "send interrupt happened");
    check(n_rx1_irq > 0, "receiver 1 interrupt happened");
    check(n_rx2_irq > 0, "receiver 2 interrupt happened");
    check(n_ignored > 0, "repeated burst edges happened");
    check(n_btn_irq > 0, "button interrupt happened");
    check(n_spi > 0, "SPI access happened");
    check(n_fb_read > 0, "framebuffer read happened");
    check(n_uart > 0, "UART transmission happened");
    check(n_positions > 0, "position computed");
    check(n_frames_checked > 0, "display frame checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic logic [15:0] FB_ADDR(int a);
    return 16'h8000 | 16'(a);
  endfunction
endmodule
