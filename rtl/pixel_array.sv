// pixel_array - orthogonal ROWS x COLS array of thinning pixels.
//
// Every pixel is joined to its north, east, south and west neighbour by one
// bidirectional link; there are no diagonal connections, the diagonal
// information reaches a pixel through the partial terms its neighbours
// forward. All pixels receive the same control word and work in lock-step,
// so one sub-iteration (8 clock cycles) thins the whole image in parallel.
//
// Border: the array is surrounded by a ring of extra pixels whose acquired
// signal is tied to 0. They never hold a 1, but they compute and forward
// their XOR results and partial terms like any pixel, so each real pixel
// sees its 3x3 window padded with background. The ring's own outer links
// read 0. This border treatment is this design's choice. The circuit is
// estimated for 256 x 256 pixels; the default here is 96 x 96 because
// elaborating the flattened array costs lint and synthesis tools about
// 0.5 MB per pixel each.
//
// Each link is modelled as two one-way wires with a drive enable per end;
// an assertion checks that the two ends never drive a link at once.
// Interface: acq[r][c] is the binary image (row 0 at the north, column 0 at
// the west), sampled when ctl.load_m; pix[r][c] is the content of latch m.
module pixel_array
  import thin_pkg::*;
#(
  parameter int unsigned ROWS = 96,
  parameter int unsigned COLS = 96
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  ctl_t                       ctl,
  input  logic [ROWS-1:0][COLS-1:0]  acq,
  output logic [ROWS-1:0][COLS-1:0]  pix
);

  localparam int unsigned R = ROWS + 2;  // with the background ring
  localparam int unsigned C = COLS + 2;

  // Per-row link vectors, indexed [row] of the ringed array, [column].
  logic [C-1:0] a    [R];  // acquired signal (0 in the ring)
  logic [C-1:0] p    [R];  // latch m
  logic [C-1:0] n_i  [R];
  logic [C-1:0] n_o  [R];
  logic [C-1:0] n_oe [R];
  logic [C-1:0] s_i  [R];
  logic [C-1:0] s_o  [R];
  logic [C-1:0] s_oe [R];
  logic [R-1:0] e_conflict;
  logic [R-1:0] v_conflict;

  for (genvar r = 0; r < R; r++) begin : g_row
    if (r == 0 || r == R - 1) begin : g_ring
      assign a[r] = '0;
    end else begin : g_core
      assign a[r]      = {1'b0, acq[r-1], 1'b0};
      assign pix[r-1]  = p[r][C-2:1];
    end

    // North/south links: each row reads what the adjacent row drives.
    if (r > 0) begin : g_n
      assign n_i[r] = s_o[r-1];
    end else begin : g_n0
      assign n_i[r] = '0;
    end
    if (r < R - 1) begin : g_s
      assign s_i[r]        = n_o[r+1];
      assign v_conflict[r] = |(s_oe[r] & n_oe[r+1]);
    end else begin : g_s0
      assign s_i[r]        = '0;
      assign v_conflict[r] = 1'b0;
    end

    pixel_row #(.N(C)) u_row (
      .clk        (clk),
      .rst_n      (rst_n),
      .ctl        (ctl),
      .acq        (a[r]),
      .pix        (p[r]),
      .n_i        (n_i[r]),
      .n_o        (n_o[r]),
      .n_oe       (n_oe[r]),
      .s_i        (s_i[r]),
      .s_o        (s_o[r]),
      .s_oe       (s_oe[r]),
      .e_conflict (e_conflict[r])
    );
  end

  // A link is bidirectional but has a single driver in every time unit.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(|e_conflict) && !(|v_conflict))
    else $error("pixel_array: a link is driven from both ends");

endmodule
