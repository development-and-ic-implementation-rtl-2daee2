// tb_tap_register: the register must load d on the falling edge of clk_n
// only, ignore rising edges and data changes in between, and clear
// asynchronously on clr.
`timescale 1ps/1ps
module tb_tap_register;
  logic        clk_n, clr;
  logic [15:0] d, q;
  logic [15:0] exp_q;
  int checks = 0, failures = 0;

  tap_register #(.W(16)) dut (.clk_n(clk_n), .clr(clr), .d(d), .q(q));

  task automatic chk(string what);
    checks++;
    if (q !== exp_q) begin
      failures++; $display("FAIL %s q=%h exp=%h", what, q, exp_q);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_n = 1'b0; clr = 1'b0; d = 16'h1234;
    #1 clr = 1'b1;
    #10 exp_q = '0; chk("clear");
    clr = 1'b0;
    for (int i = 0; i < 50; i++) begin
      d = 16'($urandom);
      #10 clk_n = 1'b1;                 // rising edge: no load
      #10 chk("rise");
      d = 16'($urandom);
      #10 clk_n = 1'b0; exp_q = d;      // falling edge: load
      #10 chk("fall");
      d = ~d;                           // data change without edge
      #10 chk("hold");
    end
    clr = 1'b1; exp_q = '0;
    #5 chk("async clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
