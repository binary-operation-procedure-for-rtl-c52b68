// pixel_row - one row of thinning pixels with their east/west links joined.
//
// The row holds N pixels side by side. Inside the row every pixel's east
// link is wired to its right neighbour's west link; the two ends of the row
// read 0 on their outer horizontal links. The north and south links of all
// pixels are brought out as vectors so that pixel_array can stack rows.
// Grouping pixels into rows is a structural choice of this design; it does
// not change the behaviour of any pixel.
//
// Interface: acq[c]/pix[c] are the acquired signal and latch m of column c
// (column 0 at the west); n_i/n_o/n_oe and s_i/s_o/s_oe are the values read,
// driven and drive enables on the north and south links of each column.
// e_conflict is 1 when both ends of some east/west link drive it.
module pixel_row
  import thin_pkg::*;
#(
  parameter int unsigned N = 98
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         ctl,
  input  logic [N-1:0] acq,
  output logic [N-1:0] pix,
  input  logic [N-1:0] n_i,
  output logic [N-1:0] n_o,
  output logic [N-1:0] n_oe,
  input  logic [N-1:0] s_i,
  output logic [N-1:0] s_o,
  output logic [N-1:0] s_oe,
  output logic         e_conflict
);

  logic [N-1:0] e_o, e_oe, w_o, w_oe, e_i, w_i;

  assign e_i = {1'b0, w_o[N-1:1]};
  assign w_i = {e_o[N-2:0], 1'b0};
  assign e_conflict = |(e_oe[N-2:0] & w_oe[N-1:1]);

  for (genvar c = 0; c < N; c++) begin : g_col
    logic [3:0] li, lo, loe;
    assign li[DIR_N] = n_i[c];
    assign li[DIR_E] = e_i[c];
    assign li[DIR_S] = s_i[c];
    assign li[DIR_W] = w_i[c];
    assign n_o[c]  = lo[DIR_N];
    assign e_o[c]  = lo[DIR_E];
    assign s_o[c]  = lo[DIR_S];
    assign w_o[c]  = lo[DIR_W];
    assign n_oe[c] = loe[DIR_N];
    assign e_oe[c] = loe[DIR_E];
    assign s_oe[c] = loe[DIR_S];
    assign w_oe[c] = loe[DIR_W];

    pixel u_pix (
      .clk    (clk),
      .rst_n  (rst_n),
      .ctl    (ctl),
      .acq    (acq[c]),
      .lnk_i  (li),
      .lnk_o  (lo),
      .lnk_oe (loe),
      .pix    (pix[c])
    );
  end

endmodule
