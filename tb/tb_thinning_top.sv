// tb_thinning_top - end-to-end testbench of the thinning circuit.
//
// A 24 x 24 instance is given, in turn:
//   1. an "H" shape with 4- and 5-pixel-wide legs and a 4-pixel-wide bar,
//      thinned for 4 iterations (the shape of the iteration-by-iteration
//      illustration of the procedure: each iteration removes about two
//      pixels of width, the last leaves a one-pixel skeleton);
//   2. a ridge-like pattern of slanted 3- and 4-pixel-wide stripes;
//   3. random blobs;
//   4. a run with n_iter = 0 (one iteration).
// For each run the final image is compared with the reference model, the
// image after every sub-iteration is compared while the run is in progress,
// and busy/done are checked to last exactly 16 * n_iter cycles. The
// testbench counts the mechanisms of the procedure as they happen: deletions
// in the first and in the second sub-iteration, edge pixels kept only by the
// Fc1/Fc2 side condition, skeleton pixels kept by consecutive discontinuities
// (Fa), interior pixels kept by Fb = 0; each must occur at least once.
module tb_thinning_top;
  import thin_pkg::*;
  import thin_ref_pkg::*;
  localparam int ROWS = 24;
  localparam int COLS = 24;
  localparam int ITER_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [ITER_W-1:0] n_iter;
  logic [ROWS-1:0][COLS-1:0] acq, pix;
  logic busy, done;
  int checks = 0, failures = 0;
  int del_sub1 = 0, del_sub2 = 0, kept_fc = 0, kept_fa = 0, kept_inner = 0;

  thinning_top #(.ROWS(ROWS), .COLS(COLS), .ITER_W(ITER_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int diff(const ref img_t im);
    int bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (pix[r][c] !== im[r][c]) bad++;
    return bad;
  endfunction

  task automatic show(const ref img_t im);
    for (int r = 0; r < ROWS; r++) begin
      string s = "";
      for (int c = 0; c < COLS; c++) s = {s, pix[r][c] ? "@" : "."};
      $display("  %s", s);
    end
  endtask

  task automatic run(input img_t im0, input int n, input string name, input bit print);
    img_t im;
    stats_t st;
    int iters, cyc, bad;
    iters = (n == 0) ? 1 : n;
    im = im0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) acq[r][c] = im[r][c];
    @(negedge clk);
    n_iter = ITER_W'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    // follow the run, checking the image after every sub-iteration
    for (int s = 0; s < 2 * iters; s++) begin
      repeat (8) begin
        checks++;
        if (busy !== 1'b1 || done !== 1'b0) begin
          failures++;
          $display("ERROR %s: busy/done wrong at cycle %0d", name, cyc);
        end
        @(negedge clk);
        cyc++;
      end
      st = '{default: 0};
      sub_iter(im, ROWS, COLS, s[0], st);
      if (s[0]) del_sub2 += st.deleted; else del_sub1 += st.deleted;
      kept_fc += st.kept_fc; kept_fa += st.kept_fa; kept_inner += st.kept_inner;
      bad = diff(im);
      checks++;
      if (bad != 0) begin
        failures++;
        $display("ERROR %s: %0d pixels differ after sub-iteration %0d", name, bad, s + 1);
      end
    end
    checks++;
    if (done !== 1'b1 || busy !== 1'b0 || cyc != 16 * iters) begin
      failures++;
      $display("ERROR %s: done=%b busy=%b after %0d cycles (expected %0d)",
               name, done, busy, cyc, 16 * iters);
    end
    if (print) begin
      $display("%s after %0d iterations (%0d cycles):", name, iters, cyc);
      show(im);
    end
    // the result must hold while idle
    repeat (5) @(negedge clk);
    checks++;
    if (diff(im) != 0) begin
      failures++;
      $display("ERROR %s: image changed while idle", name);
    end
  endtask

  initial begin
    img_t im;
    n_iter = '0; acq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. H shape
    foreach (im[i, j]) im[i][j] = 1'b0;
    for (int r = 2; r < 20; r++) begin
      for (int c = 2; c < 6; c++) im[r][c] = 1'b1;     // left leg, 4 wide
      for (int c = 16; c < 21; c++) im[r][c] = 1'b1;   // right leg, 5 wide
    end
    for (int r = 8; r < 12; r++)
      for (int c = 2; c < 21; c++) im[r][c] = 1'b1;    // bar, 4 wide
    run(im, 4, "H shape", 1'b1);

    // 2. slanted ridges of width 3 and 4
    foreach (im[i, j]) im[i][j] = 1'b0;
    for (int r = 1; r < ROWS - 1; r++)
      for (int c = 1; c < COLS - 1; c++)
        im[r][c] = ((r + 2 * c) % 9) < ((c < 12) ? 3 : 4);
    run(im, 6, "ridges", 1'b1);

    // 3. random blobs
    foreach (im[i, j]) im[i][j] = 1'b0;
    for (int b = 0; b < 10; b++) begin
      int r0 = $urandom % ROWS, c0 = $urandom % COLS, rad = 2 + $urandom % 4;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if ((r - r0) * (r - r0) + (c - c0) * (c - c0) <= rad * rad) im[r][c] = 1'b1;
    end
    run(im, 5, "blobs", 1'b0);

    // 4. n_iter = 0 runs one iteration
    foreach (im[i, j]) im[i][j] = ($urandom % 100) < 60;
    run(im, 0, "one iteration", 1'b0);

    $display("mechanisms: del_sub1=%0d del_sub2=%0d kept_by_fc=%0d kept_by_fa=%0d kept_inner=%0d",
             del_sub1, del_sub2, kept_fc, kept_fa, kept_inner);
    checks += 5;
    if (del_sub1 == 0) failures++;
    if (del_sub2 == 0) failures++;
    if (kept_fc == 0) failures++;
    if (kept_fa == 0) failures++;
    if (kept_inner == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
