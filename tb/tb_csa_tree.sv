// Testbench of csa_tree: trees of 1, 2, 3, 7 and 40 operands with random
// operands (and all-ones operands, which produce the most carries); checks
// that sum + carry equals the plain sum of the operands modulo 2^W.
module tb_csa_tree;

  localparam int W = 20;

  logic [0:0][W-1:0]  in1;  logic [W-1:0] s1, c1;
  logic [1:0][W-1:0]  in2;  logic [W-1:0] s2, c2;
  logic [2:0][W-1:0]  in3;  logic [W-1:0] s3, c3;
  logic [6:0][W-1:0]  in7;  logic [W-1:0] s7, c7;
  logic [39:0][W-1:0] in40; logic [W-1:0] s40, c40;

  csa_tree #(.N(1),  .W(W)) u1  (.in(in1),  .sum(s1),  .carry(c1));
  csa_tree #(.N(2),  .W(W)) u2  (.in(in2),  .sum(s2),  .carry(c2));
  csa_tree #(.N(3),  .W(W)) u3  (.in(in3),  .sum(s3),  .carry(c3));
  csa_tree #(.N(7),  .W(W)) u7  (.in(in7),  .sum(s7),  .carry(c7));
  csa_tree #(.N(40), .W(W)) u40 (.in(in40), .sum(s40), .carry(c40));

  int checks = 0, failures = 0;

  task automatic check(string name, logic [W-1:0] s, logic [W-1:0] c, logic [W-1:0] e);
    checks++;
    if (W'(s + c) !== e) begin
      failures++;
      $display("%s: sum+carry=%0h expected %0h", name, W'(s + c), e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [W-1:0] e1, e2, e3, e7, e40;
      bit ones;
      ones = (t < 5);
      e1 = '0; e2 = '0; e3 = '0; e7 = '0; e40 = '0;
      in1[0] = ones ? '1 : W'($urandom); e1 += in1[0];
      for (int i = 0; i < 2;  i++) begin in2[i]  = ones ? '1 : W'($urandom); e2  += in2[i];  end
      for (int i = 0; i < 3;  i++) begin in3[i]  = ones ? '1 : W'($urandom); e3  += in3[i];  end
      for (int i = 0; i < 7;  i++) begin in7[i]  = ones ? '1 : W'($urandom); e7  += in7[i];  end
      for (int i = 0; i < 40; i++) begin in40[i] = ones ? '1 : W'($urandom); e40 += in40[i]; end
      #1;
      check("N=1", s1, c1, e1);
      check("N=2", s2, c2, e2);
      check("N=3", s3, c3, e3);
      check("N=7", s7, c7, e7);
      check("N=40", s40, c40, e40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
