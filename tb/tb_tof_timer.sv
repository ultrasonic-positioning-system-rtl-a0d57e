// tb_tof_timer: checks the time-of-flight counter cycle by cycle.
//  - after a "clear and run" write (CTRL = 3) a read K clocks later returns exactly K;
//  - CTRL = 0 stops it, and it then holds its value;
//  - CTRL = 1 resumes without clearing;
//  - an 8-bit instance stops at 255 instead of wrapping.
module tb_tof_timer;
  import usps_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  logic cs = 1'b1;
  logic [31:0] rdata, rdata8;
  int checks = 0, failures = 0;

  tof_timer dut (.clk, .rst_n, .req, .cs, .rdata);
  tof_timer #(.WIDTH(8)) dut8 (.clk, .rst_n, .req, .cs, .rdata(rdata8));

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b1, addr: {8'h03, a}, wdata: d};
    @(negedge clk);
    req = '0;
  endtask

  task automatic bus_rd(input logic [7:0] a, output logic [31:0] d, output logic [31:0] d8);
    @(negedge clk);
    req = '{sel: 1'b1, we: 1'b0, addr: {8'h03, a}, wdata: '0};
    #1;
    d = rdata;
    d8 = rdata8;
    @(negedge clk);
    req = '0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] d, d8;
    int k;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    bus_rd(TMR_COUNT, d, d8); expect_eq("reset count", d, 0);
    repeat (10) begin
      k = $urandom_range(1, 2000);
      bus_wr(TMR_CTRL, 3);
      repeat (k) @(posedge clk);
      bus_rd(TMR_COUNT, d, d8); expect_eq("count after k", d, k);
      expect_eq("8-bit saturates", d8, (k > 255) ? 255 : k);
    end
    bus_rd(TMR_CTRL, d, d8); expect_eq("run bit", d, 1);
    // stop and hold
    bus_wr(TMR_CTRL, 3);
    repeat (99) @(posedge clk);
    bus_wr(TMR_CTRL, 0);           // the 100th clock edge after the clear stops it
    repeat (50) @(posedge clk);
    bus_rd(TMR_COUNT, d, d8); expect_eq("held", d, 100);
    bus_wr(TMR_CTRL, 1);           // resume
    repeat (9) @(posedge clk);
    bus_rd(TMR_COUNT, d, d8); expect_eq("resumed", d, 109);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
