// tb_sr_ff: random set/reset inputs against a reset-dominant reference.
module tb_sr_ff;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic s, r, q, q_n, q_next;
  logic ref_q;
  int checks = 0, failures = 0;
  int both = 0;

  sr_ff dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 1'b0; r = 1'b0; ref_q = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks += 2;
      if (q !== ref_q) failures++;
      if (q_n !== ~ref_q) failures++;
      s = $urandom_range(0, 1) == 1;
      r = $urandom_range(0, 2) == 0;
      if (s && r) both++;
      #1;
      if (r) ref_q = 1'b0;
      else if (s) ref_q = 1'b1;
      checks++;
      if (q_next !== ref_q) failures++;
    end
    checks++;
    if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
