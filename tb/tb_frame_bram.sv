// tb_frame_bram: writes random bytes through port B at random addresses, keeping a
// copy in the testbench. Then it reads them back through both ports and checks the
// one-clock read latency: the data for an address presented before an edge is valid
// after that edge. It also checks the read-before-write behaviour of port B.
module tb_frame_bram;
  localparam int DEPTH = 9600;
  logic clk = 0;
  logic [13:0] a_addr, b_addr;
  logic [7:0] a_dout, b_din, b_dout;
  logic b_en = 0, b_we = 0;
  logic [7:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  frame_bram dut (.clk, .a_addr, .a_dout, .b_en, .b_we, .b_addr, .b_din, .b_dout);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_addr = 0; b_addr = 0; b_din = 0;
    // fill the whole memory
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 14'(i); b_din = 8'($urandom);
      model[i] = b_din; written[i] = 1;
    end
    @(negedge clk);
    b_en = 0; b_we = 0;
    // random reads on both ports at once
    for (int i = 0; i < 4000; i++) begin
      int aa, ba;
      aa = $urandom_range(0, DEPTH - 1);
      ba = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      a_addr = 14'(aa); b_addr = 14'(ba); b_en = 1; b_we = 0;
      @(posedge clk);
      #1;
      checks += 2;
      if (a_dout !== model[aa]) begin failures++; $display("A[%0d]=%h exp %h", aa, a_dout, model[aa]); end
      if (b_dout !== model[ba]) begin failures++; $display("B[%0d]=%h exp %h", ba, b_dout, model[ba]); end
    end
    // read-before-write on port B, port A sees the new value one cycle later
    for (int i = 0; i < 200; i++) begin
      int wa;
      logic [7:0] nv;
      wa = $urandom_range(0, DEPTH - 1);
      nv = 8'($urandom);
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 14'(wa); b_din = nv; a_addr = 14'(wa);
      @(posedge clk);
      #1;
      checks++;
      if (b_dout !== model[wa]) begin failures++; $display("RBW[%0d]=%h exp %h", wa, b_dout, model[wa]); end
      model[wa] = nv;
      @(negedge clk);
      b_en = 0; b_we = 0;
      @(posedge clk);
      #1;
      checks++;
      if (a_dout !== nv) begin failures++; $display("A after write [%0d]=%h exp %h", wa, a_dout, nv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
