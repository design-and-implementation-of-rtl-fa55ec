// tb_prog_down_counter: random loads and enables against a reference model.
// Checks the count every clock and the terminal-count flag, which must be
// high exactly when the count after the coming edge is zero.
module tb_prog_down_counter;
  localparam int unsigned W = 5;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic load, en;
  logic [W-1:0] load_val, count;
  logic tcd;
  int unsigned ref_count;
  int checks = 0, failures = 0;
  int zero_holds = 0;

  prog_down_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; en = 1'b0; load_val = '0; ref_count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // compare what the last edge produced
      checks++;
      if (count !== W'(ref_count)) begin
        failures++;
        if (failures < 10) $display("count %0d expected %0d", count, ref_count);
      end
      load     = ($urandom_range(0, 15) == 0);
      load_val = W'($urandom);
      en       = ($urandom_range(0, 3) != 0);
      #1;
      // expected next count and flag
      if (load) ref_count = int'(load_val);
      else if (en && ref_count != 0) ref_count = ref_count - 1;
      if (!load && en && ref_count == 0) zero_holds++;
      checks++;
      if (tcd !== (ref_count == 0)) begin
        failures++;
        if (failures < 10) $display("tcd %0b for next count %0d", tcd, ref_count);
      end
    end
    checks++;
    if (zero_holds == 0) failures++;   // the counter must have sat at zero
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
