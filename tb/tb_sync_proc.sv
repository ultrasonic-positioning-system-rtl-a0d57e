// tb_sync_proc: checks that sync_proc comes out of reset on the LOAD slot of the
// last row, takes new values only on enable, and keeps them otherwise. Inputs are
// random; the expected register contents are tracked in the testbench.
module tb_sync_proc;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [6:0] col_count, col;
  logic [7:0] row_count, row;
  logic [1:0] sub_count, sub;
  logic [13:0] adr_count, adr;
  logic [6:0] e_col; logic [7:0] e_row; logic [1:0] e_sub; logic [13:0] e_adr;
  int checks = 0, failures = 0;

  sync_proc dut (.clk, .rst_n, .enable, .col_count, .row_count, .sub_count, .adr_count,
                 .col, .row, .sub, .adr);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_count = 0; row_count = 0; sub_count = 0; adr_count = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (col != 120 || row != 239 || sub != 0 || adr != 0) begin
      failures++; $display("reset values %0d %0d %0d %0d", col, row, sub, adr);
    end
    e_col = 120; e_row = 239; e_sub = 0; e_adr = 0;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      enable    = ($urandom_range(0, 2) == 0);
      col_count = 7'($urandom);
      row_count = 8'($urandom);
      sub_count = 2'($urandom);
      adr_count = 14'($urandom);
      if (enable) begin
        e_col = col_count; e_row = row_count; e_sub = sub_count; e_adr = adr_count;
      end
      @(posedge clk);
      #1;
      checks++;
      if (col != e_col || row != e_row || sub != e_sub || adr != e_adr) begin
        failures++;
        if (failures < 10) $display("i=%0d mismatch", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
