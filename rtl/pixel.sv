// pixel - logic processing unit of one pixel of the thinning array.
//
// The pixel holds its binary value in latch m and decides, once per
// sub-iteration, whether to delete it (reset m to 0). The decision needs the
// twelve neighbour differences X1..X12 of its 3x3 window, but the pixel only
// computes two of them itself and only has four links, so the work is spread
// over the neighbourhood in six transfer time units s1..s6 (see switch_unit):
//
//   s1  m is sent N and W; the values of the E and S neighbours arrive and
//       the two local XORs give X10 = P^P3 (latch m1) and X11 = P^P5 (m2).
//   s2  X10 is sent E and X11 S; X12 arrives from W (m3) and X9 from N (m4).
//       Now Fb = (X9^X11)|(X10^X12), Fc1 = X10|X11|X9.X12 and
//       Fc2 = X9|X12|X10.X11 are known locally, and so are the partial terms
//       X10.X12, ~(X10|X12), X9.X11, ~(X9|X11).
//   s3..s6  the partial terms are exchanged. In the frame of a neighbour these
//       terms are exactly the pairs X2.X3, X4.X5, X6.X7, X8.X1 (into m5) and
//       the complements of X2+X3, ... (into m6). m5 and m6 are preset to 1 and
//       pulled down by any 1 received, so m5 = ~Fd and m6 = Fe.
//   end unit  latch m is pulled down if m5 & ~m6 & Fb & Fc, with Fc = Fc1
//       when end_sub1 and Fc2 when end_sub2.
//
// ~Fd.~Fe.Fb is equivalent to the single-window condition ~Fa.Fb with
// Fa = OR of the eight consecutive pairs Xi.X(i+1). Gates, latches and switch
// timing follow the pixel circuit diagram; the exact series/parallel form of
// m's pull-down network is not given and is written here directly from the
// deletion condition. Every latch stores through its pull-down network
// (preset to 1, cleared when the value to store is 0), as in the circuit.
//
// Interface: ctl is the broadcast control word, acq the binary signal of the
// acquisition unit (sampled when ctl.load_m), lnk_i/lnk_o/lnk_oe the four
// links indexed by thin_pkg::dir_e, pix the content of latch m.
module pixel
  import thin_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ctl_t       ctl,
  input  logic       acq,
  input  logic [3:0] lnk_i,
  output logic [3:0] lnk_o,
  output logic [3:0] lnk_oe,
  output logic       pix
);

  logic m, m1, m2, m3, m4, m5, m6;
  logic xor_e_in, xor_s_in, x_w_in, x_n_in, m5_in, m6_in;
  logic x10, x11, x12, x9;
  logic xor_ew, and_ew, nor_ew, xor_ns, and_ns, nor_ns;
  logic fb, fc1, fc2, del;

  // Latches m1..m4 hold X10, X11, X12, X9.
  assign x10 = m1;
  assign x11 = m2;
  assign x12 = m3;
  assign x9  = m4;

  // Two-input gates of the pixel (east/west pair and north/south pair).
  assign xor_ew = x10 ^ x12;
  assign and_ew = x10 & x12;
  assign nor_ew = ~(x10 | x12);
  assign xor_ns = x9 ^ x11;
  assign and_ns = x9 & x11;
  assign nor_ns = ~(x9 | x11);

  assign fb  = xor_ew | xor_ns;
  assign fc1 = x10 | x11 | (x9 & x12);
  assign fc2 = x9 | x12 | (x10 & x11);
  assign del = m5 & ~m6 & fb & ((ctl.end_sub1 & fc1) | (ctl.end_sub2 & fc2));

  switch_unit u_sw (
    .ctl      (ctl),
    .m        (m),
    .x_e      (x10),
    .x_s      (x11),
    .and_ew   (and_ew),
    .nor_ew   (nor_ew),
    .and_ns   (and_ns),
    .nor_ns   (nor_ns),
    .lnk_i    (lnk_i),
    .lnk_o    (lnk_o),
    .lnk_oe   (lnk_oe),
    .xor_e_in (xor_e_in),
    .xor_s_in (xor_s_in),
    .x_w_in   (x_w_in),
    .x_n_in   (x_n_in),
    .m5_in    (m5_in),
    .m6_in    (m6_in)
  );

  // Main memory m: loaded with the acquired bit, reset on deletion.
  cr_latch u_m (
    .clk, .rst_n,
    .load     (ctl.load_m),
    .d        (acq),
    .preset   (1'b0),
    .reset_en (ctl.end_sub1 | ctl.end_sub2),
    .pdn      (del),
    .q        (m)
  );

  // m1 = X10 and m2 = X11, produced by the two local XOR gates during s1.
  cr_latch u_m1 (
    .clk, .rst_n, .load(1'b0), .d(1'b0), .preset(ctl.preset_o),
    .reset_en (ctl.s[1]), .pdn(~(m ^ xor_e_in)), .q(m1)
  );
  cr_latch u_m2 (
    .clk, .rst_n, .load(1'b0), .d(1'b0), .preset(ctl.preset_o),
    .reset_en (ctl.s[1]), .pdn(~(m ^ xor_s_in)), .q(m2)
  );

  // m3 = X12 from the west neighbour, m4 = X9 from the north neighbour (s2).
  cr_latch u_m3 (
    .clk, .rst_n, .load(1'b0), .d(1'b0), .preset(ctl.preset_o),
    .reset_en (ctl.s[2]), .pdn(~x_w_in), .q(m3)
  );
  cr_latch u_m4 (
    .clk, .rst_n, .load(1'b0), .d(1'b0), .preset(ctl.preset_o),
    .reset_en (ctl.s[2]), .pdn(~x_n_in), .q(m4)
  );

  // m5 collects the AND terms (-> ~Fd), m6 the NOR terms (-> Fe), s3..s6.
  cr_latch u_m5 (
    .clk, .rst_n, .load(1'b0), .d(1'b0), .preset(ctl.preset_o),
    .reset_en (|ctl.s[6:3]), .pdn(m5_in), .q(m5)
  );
  cr_latch u_m6 (
    .clk, .rst_n, .load(1'b0), .d(1'b0), .preset(ctl.preset_o),
    .reset_en (|ctl.s[6:3]), .pdn(m6_in), .q(m6)
  );

  assign pix = m;

endmodule
