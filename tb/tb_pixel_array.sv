// tb_pixel_array - self-checking testbench of the pixel array.
//
// A 10 x 12 array is driven directly with the control sequence (load and
// preset, s1..s6, end_sub1 or end_sub2). Random images of several densities
// and a few hand-made shapes are loaded and thinned for several iterations;
// after every sub-iteration the whole image is compared with the reference
// model of thin_ref_pkg, which pads the image with background. The link
// driver assertion of the array is active throughout.
module tb_pixel_array;
  import thin_pkg::*;
  import thin_ref_pkg::*;
  localparam int ROWS = 10;
  localparam int COLS = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  ctl_t ctl;
  logic [ROWS-1:0][COLS-1:0] acq, pix;
  int checks = 0, failures = 0;
  stats_t st;

  pixel_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sub(input bit first, input bit second);
    @(negedge clk);
    ctl = CTL_IDLE; ctl.load_m = first; ctl.preset_o = 1'b1;
    for (int k = 1; k <= 6; k++) begin
      @(negedge clk);
      ctl = CTL_IDLE; ctl.s[k] = 1'b1;
    end
    @(negedge clk);
    ctl = CTL_IDLE;
    if (second) ctl.end_sub2 = 1'b1; else ctl.end_sub1 = 1'b1;
    @(negedge clk);
    ctl = CTL_IDLE;
  endtask

  task automatic compare(const ref img_t im, input string tag);
    int bad = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (pix[r][c] !== im[r][c]) begin
          bad++;
          failures++;
        end
      end
    if (bad != 0) $display("ERROR %s: %0d pixels differ", tag, bad);
  endtask

  initial begin
    img_t im;
    ctl = CTL_IDLE; acq = '0;
    st = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 24; t++) begin
      foreach (im[i, j]) im[i][j] = 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          case (t % 4)
            0: im[r][c] = ($urandom % 100) < 50;
            1: im[r][c] = ($urandom % 100) < 80;
            2: im[r][c] = (r >= 1 && r <= 7 && c >= 2 && c <= 9);      // solid block
            default: im[r][c] = ((r + c) % 5 < 2) || (r >= 3 && r <= 5); // stripes + bar
          endcase
          acq[r][c] = im[r][c];
        end
      for (int it = 0; it < 4; it++) begin
        sub(it == 0, 1'b0);
        sub_iter(im, ROWS, COLS, 1'b0, st);
        compare(im, $sformatf("image %0d iter %0d sub1", t, it));
        sub(1'b0, 1'b1);
        sub_iter(im, ROWS, COLS, 1'b1, st);
        compare(im, $sformatf("image %0d iter %0d sub2", t, it));
      end
    end
    $display("deleted=%0d kept_fc=%0d kept_fa=%0d kept_inner=%0d",
             st.deleted, st.kept_fc, st.kept_fa, st.kept_inner);
    checks++;
    if (st.deleted == 0 || st.kept_fc == 0 || st.kept_fa == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
