// tb_cr_latch - self-checking testbench of the conditional-reset memory cell.
// Drives random load/preset/reset_en/pdn patterns (plus directed cases) and
// compares q with a model of the cell: load has priority, then preset, then a
// reset when reset_en and pdn are both high; otherwise the bit holds.
module tb_cr_latch;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, d, preset, reset_en, pdn, q;
  logic expq;
  int checks = 0, failures = 0;

  cr_latch dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic l, input logic dd, input logic pr,
                      input logic re, input logic pd);
    load = l; d = dd; preset = pr; reset_en = re; pdn = pd;
    @(posedge clk);
    if (l)              expq = dd;
    else if (pr)        expq = 1'b1;
    else if (re && pd)  expq = 1'b0;
    #1;
    checks++;
    if (q !== expq) begin
      failures++;
      $display("ERROR: l=%b d=%b pr=%b re=%b pdn=%b q=%b exp=%b", l, dd, pr, re, pd, q, expq);
    end
  endtask

  initial begin
    {load, d, preset, reset_en, pdn} = '0;
    expq = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (q !== 1'b0) failures++;
    // directed: preset, hold, reset needs both enable and pdn
    step(0, 0, 1, 0, 0);
    step(0, 0, 0, 0, 1);
    step(0, 0, 0, 1, 0);
    step(0, 0, 0, 1, 1);
    step(0, 0, 0, 1, 1);
    step(1, 1, 0, 0, 0);
    step(1, 0, 1, 0, 0);
    step(0, 1, 1, 1, 1);
    for (int i = 0; i < 2000; i++)
      step(($urandom % 8) == 0, 1'($urandom), ($urandom % 4) == 0,
           1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
