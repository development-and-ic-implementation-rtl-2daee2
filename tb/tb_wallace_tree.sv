// tb_wallace_tree: checks the full-adder ones counter against $countones.
// Two instances are tested: the 32-input tree of the Window ADC and the
// 1023-input tree of the basic delay-line ADC. Every thermometer code
// (and its complement) is applied, then random words with bubbles.
`timescale 1ps/1ps
module tb_wallace_tree;
  logic [31:0]   t32;
  logic [5:0]    c32;
  logic [1022:0] t1k;
  logic [9:0]    c1k;
  logic [126:0]  t127;
  logic [6:0]    c127;
  int checks = 0, failures = 0;

  wallace_tree #(.N(32))   dut32  (.thermo(t32),  .count(c32));
  wallace_tree #(.N(1023)) dut1k  (.thermo(t1k),  .count(c1k));
  wallace_tree #(.N(127))  dut127 (.thermo(t127), .count(c127));

  task automatic check_all();
    #10;
    checks++;
    if (c32 != 6'($countones(t32))) begin
      failures++; $display("FAIL N=32 %h -> %0d", t32, c32);
    end
    checks++;
    if (c1k != 10'($countones(t1k))) begin
      failures++; $display("FAIL N=1023 -> %0d exp %0d", c1k, $countones(t1k));
    end
    checks++;
    if (c127 != 7'($countones(t127))) begin
      failures++; $display("FAIL N=127 -> %0d exp %0d", c127, $countones(t127));
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 1023; k++) begin
      t1k  = (k == 1023) ? '1 : ((1023'(1) << k) - 1'b1);
      t32  = (k >= 32) ? '1 : ((32'(1) << k) - 1'b1);
      t127 = (k >= 127) ? '1 : ((127'(1) << k) - 1'b1);
      check_all();
      t1k = ~t1k; t32 = ~t32; t127 = ~t127;
      check_all();
    end
    for (int r = 0; r < 500; r++) begin
      t32 = $urandom;
      for (int w = 0; w < 32; w++) t1k[w*32 +: 31] = 31'($urandom);
      t1k[1022:992] = 31'($urandom);
      for (int w = 0; w < 4; w++) t127[w*32 +: 31] = 31'($urandom);
      t127[126:124] = 3'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
