// tb_deadtime_regs: serial writes of td_on/td_off.
// Sends full frames with random values (sclk at an eighth of the clock),
// checks that both registers take them and that `updated` pulses once, and
// sends frames one bit short and one bit long, which must leave the
// registers unchanged. Also checks the reset values.
module tb_deadtime_regs;
  localparam int unsigned DT_W = 6;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
  logic sclk, sdi, cs_n;
  logic [DT_W-1:0] td_on, td_off;
  logic updated;
  logic [DT_W-1:0] ref_on, ref_off;
  int checks = 0, failures = 0;
  int n_updates;

  deadtime_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (updated) n_updates++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [2*DT_W:0] bits, input int unsigned n);
    // n bits, most significant of the n first
    @(negedge clk);
    cs_n = 1'b0;
    repeat (4) @(negedge clk);
    for (int i = n - 1; i >= 0; i--) begin
      sdi = bits[i];
      sclk = 1'b0;
      repeat (4) @(negedge clk);
      sclk = 1'b1;
      repeat (4) @(negedge clk);
    end
    sclk = 1'b0;
    repeat (4) @(negedge clk);
    cs_n = 1'b1;
    repeat (8) @(negedge clk);
  endtask

  task automatic check_regs(input int exp_updates);
    if (td_on !== ref_on || td_off !== ref_off || n_updates != exp_updates)
      $display("on=%0d/%0d off=%0d/%0d updates=%0d/%0d", td_on, ref_on,
               td_off, ref_off, n_updates, exp_updates);
    checks += 3;
    if (td_on !== ref_on) failures++;
    if (td_off !== ref_off) failures++;
    if (n_updates != exp_updates) failures++;
  endtask

  initial begin
    sclk = 1'b0; sdi = 1'b0; cs_n = 1'b1; n_updates = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    ref_on = 4; ref_off = 4;
    n_updates = 0;
    @(negedge clk);
    check_regs(0);
    for (int k = 0; k < 40; k++) begin
      logic [DT_W-1:0] a, b;
      a = DT_W'($urandom);
      b = DT_W'($urandom);
      n_updates = 0;
      case (k % 4)
        1: begin send({1'b0, a, b} >> 1, 2 * DT_W - 1); check_regs(0); end
        3: begin send({a, b, 1'b1}, 2 * DT_W + 1); check_regs(0); end
        default: begin
          send({1'b0, a, b}, 2 * DT_W);
          ref_on = a; ref_off = b;
          check_regs(1);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
