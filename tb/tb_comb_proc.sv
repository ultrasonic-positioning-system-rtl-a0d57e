// tb_comb_proc: checks the enable strobe period and the CP window of comb_proc at
// its default 50 MHz / 3 MHz setting (divide by 16). Over 64 periods it checks that
// enable is a one-clock pulse exactly every 16 clocks and that cp_win is high for
// clocks 4..11 of each period (counted from the clock after enable).
module tb_comb_proc;
  logic clk = 0, rst_n = 0;
  logic enable, cp_win;
  int checks = 0, failures = 0;
  localparam int DIV = 16;

  comb_proc dut (.clk, .rst_n, .enable, .cp_win);

  always #10 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase, last_en, n_en, win_len;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    phase = 1; last_en = -1;  // first edge after reset release moves the phase to 1
    n_en = 0; win_len = 0;
    for (int t = 0; t < 64 * DIV; t++) begin
      @(posedge clk);
      #1;
      // reference: after reset the phase counter starts at 0 and counts up
      checks++;
      if (enable !== (phase == DIV - 1)) begin
        failures++;
        $display("t=%0d phase=%0d enable=%b", t, phase, enable);
      end
      checks++;
      if (cp_win !== (phase >= DIV / 4 && phase < 3 * DIV / 4)) begin
        failures++;
        $display("t=%0d phase=%0d cp_win=%b", t, phase, cp_win);
      end
      if (enable) begin
        if (last_en >= 0) begin
          checks++;
          if (t - last_en != DIV) begin failures++; $display("period %0d", t - last_en); end
        end
        last_en = t;
        n_en++;
      end
      phase = (phase + 1) % DIV;
    end
    checks++;
    if (n_en != 64) begin failures++; $display("enables %0d", n_en); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
