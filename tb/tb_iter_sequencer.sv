// tb_iter_sequencer - self-checking testbench of the control sequencer.
// Starts runs of several lengths and checks, cycle by cycle, the control word
// against the expected chart: load_m only in the first unit of the run,
// preset_o in unit 0 of every sub-iteration, s1..s6 in units 1..6, end_sub1 /
// end_sub2 in unit 7 of the first / second sub-iteration; it also checks that
// busy lasts exactly 16 * n_iter cycles, that done pulses once after it and
// that start is ignored during a run.
module tb_iter_sequencer;
  import thin_pkg::*;
  localparam int ITER_W = 4;
  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [ITER_W-1:0] n_iter;
  ctl_t              ctl;
  logic              busy, done;
  int checks = 0, failures = 0;

  iter_sequencer #(.ITER_W(ITER_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s at %0t ctl=%p", what, $time, ctl);
    end
  endtask

  task automatic run(input int n);
    int iters, cyc;
    ctl_t e;
    iters = (n == 0) ? 1 : n;
    @(negedge clk);
    n_iter = ITER_W'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (cyc = 0; cyc < 16 * iters; cyc++) begin
      e = CTL_IDLE;
      e.load_m   = (cyc == 0);
      e.preset_o = (cyc % 8 == 0);
      if (cyc % 8 >= 1 && cyc % 8 <= 6) e.s[cyc % 8] = 1'b1;
      e.end_sub1 = (cyc % 16 == 7);
      e.end_sub2 = (cyc % 16 == 15);
      chk($sformatf("ctl n=%0d cyc=%0d", n, cyc), ctl == e);
      chk("busy", busy === 1'b1);
      chk("no done", done === 1'b0);
      if (cyc == 20) start = 1'b1;  // must be ignored
      @(negedge clk);
      start = 1'b0;
    end
    chk("done pulse", done === 1'b1 && busy === 1'b0);
    chk("idle ctl", ctl == CTL_IDLE);
    @(negedge clk);
    chk("done once", done === 1'b0 && busy === 1'b0 && ctl == CTL_IDLE);
  endtask

  initial begin
    n_iter = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk("idle after reset", ctl == CTL_IDLE && !busy && !done);
    run(1);
    run(3);
    run(0);
    run(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
