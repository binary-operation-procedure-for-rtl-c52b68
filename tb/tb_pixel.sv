// tb_pixel - self-checking testbench of one pixel.
//
// The testbench plays the four neighbours. For every one of the 512 binary
// 3x3 windows and both sub-iterations it loads the centre value, runs the
// eight time units of a sub-iteration and, in each transfer unit, drives on
// the links what the neighbours would send (their pixel values, their XOR
// results, then their AND/NOR partial terms). It checks every value the
// pixel drives on its links and, at the end, the new centre value against
// the single-window rule of thin_ref_pkg (~Fa & Fb & Fc).
module tb_pixel;
  import thin_pkg::*;
  import thin_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  ctl_t       ctl;
  logic       acq, pix;
  logic [3:0] lnk_i, lnk_o, lnk_oe;
  int checks = 0, failures = 0;

  pixel dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR %s got %b exp %b (s=%b)", what, got, exp, ctl.s);
    end
  endtask

  // Drive one time unit: links in = li (N,E,S,W as bits 0..3).
  task automatic unit(input ctl_t c, input logic [3:0] li);
    ctl = c; lnk_i = li;
    #1;
  endtask

  initial begin
    img_t im;
    stats_t st;
    bit p, n1, n2, n3, n4, n5, n6, n7, n8;
    bit x1, x2, x3, x4, x5, x6, x7, x8, x9, x10, x11, x12;
    ctl_t c;
    int deleted_seen = 0;
    ctl = CTL_IDLE; acq = 1'b0; lnk_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int sub = 0; sub < 2; sub++) begin
      for (int w = 0; w < 512; w++) begin
        {n8, n7, n6, n5, n4, n3, n2, n1, p} = 9'(w);
        x1 = n1 ^ n2; x2 = n2 ^ n3; x3 = n3 ^ n4; x4 = n4 ^ n5;
        x5 = n5 ^ n6; x6 = n6 ^ n7; x7 = n7 ^ n8; x8 = n8 ^ n1;
        x9 = p ^ n1; x10 = p ^ n3; x11 = p ^ n5; x12 = p ^ n7;
        // expected result from the reference on a 3x3 image
        foreach (im[i, j]) im[i][j] = 1'b0;
        im[0][0] = n8; im[0][1] = n1; im[0][2] = n2;
        im[1][0] = n7; im[1][1] = p;  im[1][2] = n3;
        im[2][0] = n6; im[2][1] = n5; im[2][2] = n4;
        st = '{default: 0};
        sub_iter(im, 3, 3, sub[0], st);

        @(negedge clk);
        // unit 0: load and preset
        c = CTL_IDLE; c.load_m = 1'b1; c.preset_o = 1'b1; acq = p;
        unit(c, 4'b0000);
        @(negedge clk);
        // s1: neighbours E, S send their pixel values
        c = CTL_IDLE; c.s[1] = 1'b1;
        unit(c, {1'b0, n5, n3, 1'b0});
        chk("s1 N", lnk_o[DIR_N], p); chk("s1 W", lnk_o[DIR_W], p);
        chk("s1 oe", lnk_oe == 4'b1001, 1'b1);
        @(negedge clk);
        // s2: W sends X12 (its X10), N sends X9 (its X11)
        c = CTL_IDLE; c.s[2] = 1'b1;
        unit(c, {x12, 1'b0, 1'b0, x9});
        chk("s2 E", lnk_o[DIR_E], x10); chk("s2 S", lnk_o[DIR_S], x11);
        chk("s2 oe", lnk_oe == 4'b0110, 1'b1);
        @(negedge clk);
        // s3: E sends X2.X3, S sends ~(X4|X5)
        c = CTL_IDLE; c.s[3] = 1'b1;
        unit(c, {1'b0, ~(x4 | x5), x2 & x3, 1'b0});
        chk("s3 N", lnk_o[DIR_N], ~(x10 | x12)); chk("s3 W", lnk_o[DIR_W], x9 & x11);
        @(negedge clk);
        // s4: N sends X8.X1, W sends ~(X6|X7)
        c = CTL_IDLE; c.s[4] = 1'b1;
        unit(c, {~(x6 | x7), 1'b0, 1'b0, x8 & x1});
        chk("s4 S", lnk_o[DIR_S], x10 & x12); chk("s4 E", lnk_o[DIR_E], ~(x9 | x11));
        @(negedge clk);
        // s5: S sends X4.X5, E sends ~(X2|X3)
        c = CTL_IDLE; c.s[5] = 1'b1;
        unit(c, {1'b0, x4 & x5, ~(x2 | x3), 1'b0});
        chk("s5 N", lnk_o[DIR_N], x10 & x12); chk("s5 W", lnk_o[DIR_W], ~(x9 | x11));
        @(negedge clk);
        // s6: W sends X6.X7, N sends ~(X8|X1)
        c = CTL_IDLE; c.s[6] = 1'b1;
        unit(c, {x6 & x7, 1'b0, 1'b0, ~(x8 | x1)});
        chk("s6 S", lnk_o[DIR_S], ~(x10 | x12)); chk("s6 E", lnk_o[DIR_E], x9 & x11);
        @(negedge clk);
        // end of sub-iteration
        c = CTL_IDLE;
        if (sub == 0) c.end_sub1 = 1'b1; else c.end_sub2 = 1'b1;
        unit(c, 4'b0000);
        chk("pix before end", pix, p);
        @(negedge clk);
        ctl = CTL_IDLE;
        #1;
        chk($sformatf("pix after sub%0d window %03x", sub + 1, w), pix, im[1][1]);
        if (p && !im[1][1]) deleted_seen++;
      end
    end
    // both outcomes must have occurred
    checks++;
    if (deleted_seen == 0) failures++;
    $display("deletions seen: %0d", deleted_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
