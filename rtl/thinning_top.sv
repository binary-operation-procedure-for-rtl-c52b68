// thinning_top - pixel-array circuit for parallel binary thinning.
//
// A binary image (1 = ridge, 0 = background) is loaded into an array of
// pixels; every pixel then repeatedly decides in parallel whether it lies on
// the edge of a ridge without being part of its skeleton, and deletes itself
// if so. Each iteration has two sub-iterations that delete from the
// lower-right (Fc1) and the upper-left (Fc2) sides of a region in turn, so a
// ridge loses about two pixels of width per iteration until only its
// one-pixel-wide skeleton is left.
//
// The top joins the global control sequencer (iter_sequencer) to the pixel
// array (pixel_array). Pulse start with acq holding the image and n_iter the
// number of iterations; acq is sampled in the first cycle after start, done
// pulses 16 * n_iter cycles later, and pix then holds the thinned image.
// The acquisition units (photodiode and comparator) are analog and outside
// this RTL: acq carries their binary outputs. No read-out scheme is defined
// for the array, so all latch contents are brought out in parallel on pix.
// Defaults: a 96 x 96 array. The circuit is specified for 256 x 256; the
// default is smaller because elaborating the flattened array costs lint and
// synthesis tools about 0.5 MB per pixel each. ROWS/COLS may be set to 256.
// About ten iterations (twenty sub-iterations) are the typical need for a
// 500 dpi fingerprint image.
module thinning_top
  import thin_pkg::*;
#(
  parameter int unsigned ROWS   = 96,
  parameter int unsigned COLS   = 96,
  parameter int unsigned ITER_W = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [ITER_W-1:0]         n_iter,
  input  logic [ROWS-1:0][COLS-1:0] acq,
  output logic [ROWS-1:0][COLS-1:0] pix,
  output logic                      busy,
  output logic                      done
);

  ctl_t ctl;

  iter_sequencer #(.ITER_W(ITER_W)) u_seq (
    .clk, .rst_n, .start, .n_iter, .ctl, .busy, .done
  );

  pixel_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .ctl, .acq, .pix
  );

endmodule
