// tb_adr_count: steps adr_count (default 320x240, 3 colour bits) through one full
// frame and a bit more, with enable pulses at random gaps. After every enable it
// compares column, row, sub-byte and framebuffer address with a model. The model
// computes them from the step number by division (col = n mod 121, and so on). It
// also checks that the counters hold still between enables.
module tb_adr_count;
  localparam int H = 320, V = 240, BPP = 3;
  localparam int DISP = H * BPP / 8;   // 120
  localparam int FBL  = H / 8;         // 40 framebuffer bytes per line
  logic clk = 0, rst_n = 0, enable = 0;
  logic [6:0]  col_count;
  logic [7:0]  row_count;
  logic [1:0]  sub_count;
  logic [13:0] adr;
  int checks = 0, failures = 0;

  adr_count dut (.clk, .rst_n, .enable, .col_count, .row_count, .sub_count, .adr);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pos(input int n);
    int c, r, s, a;
    c = n % (DISP + 1);
    r = (n / (DISP + 1)) % V;
    if (c < DISP) begin
      s = c % BPP;
      a = r * FBL + c / BPP;
    end else begin
      s = 0;
      a = (r == V - 1) ? 0 : (r + 1) * FBL;
    end
    checks++;
    if (col_count != c || row_count != r || sub_count != s || adr != a) begin
      failures++;
      if (failures < 10)
        $display("n=%0d got c=%0d r=%0d s=%0d a=%0d exp c=%0d r=%0d s=%0d a=%0d",
                 n, col_count, row_count, sub_count, adr, c, r, s, a);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check_pos(0);
    for (int n = 1; n <= (DISP + 1) * V + 500; n++) begin
      enable <= 1;
      @(posedge clk);
      enable <= 0;
      #1 check_pos(n);
      if ($urandom_range(0, 7) == 0) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1 check_pos(n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
