// switch_unit - the per-pixel crossbar of pass switches that time-shares the
// four bidirectional neighbour links N, E, S, W.
//
// In every transfer time unit exactly one select s[k] is high. It lets the
// pixel drive two of its links and read the other two, in a pattern chosen
// so that each link is driven by exactly one of its two ends:
//
//   unit | drives                      | reads
//   s1   | N <- m,       W <- m        | E -> X10 XOR,  S -> X11 XOR
//   s2   | E <- X10 (m1), S <- X11 (m2)| W -> m3 (X12), N -> m4 (X9)
//   s3   | N <- nor_ew,  W <- and_ns   | E -> m5,       S -> m6
//   s4   | S <- and_ew,  E <- nor_ns   | N -> m5,       W -> m6
//   s5   | N <- and_ew,  W <- nor_ns   | S -> m5,       E -> m6
//   s6   | S <- nor_ew,  E <- and_ns   | W -> m5,       N -> m6
//
// and_ew/nor_ew are the AND and NOR of the east/west XOR pair (X10, X12),
// and_ns/nor_ns those of the north/south pair (X9, X11). After s3..s6 the
// neighbours have delivered the four AND terms (X2.X3, X8.X1, X4.X5, X6.X7)
// to m5 and the four NOR terms of the F_e factors to m6. The switch positions
// are those of the pixel circuit diagram; modelling each link as two one-way
// wires with a drive enable (no tri-state) is this design's choice. An
// undriven link output is 0. The unit is purely combinational.
module switch_unit
  import thin_pkg::*;
(
  input  ctl_t       ctl,
  input  logic       m,
  input  logic       x_e,
  input  logic       x_s,
  input  logic       and_ew,
  input  logic       nor_ew,
  input  logic       and_ns,
  input  logic       nor_ns,
  input  logic [3:0] lnk_i,
  output logic [3:0] lnk_o,
  output logic [3:0] lnk_oe,
  output logic       xor_e_in,
  output logic       xor_s_in,
  output logic       x_w_in,
  output logic       x_n_in,
  output logic       m5_in,
  output logic       m6_in
);

  always_comb begin
    lnk_o    = '0;
    lnk_oe   = '0;
    xor_e_in = 1'b0;
    xor_s_in = 1'b0;
    x_w_in   = 1'b0;
    x_n_in   = 1'b0;
    m5_in    = 1'b0;
    m6_in    = 1'b0;
    unique case (1'b1)
      ctl.s[1]: begin
        lnk_o[DIR_N] = m;      lnk_oe[DIR_N] = 1'b1;
        lnk_o[DIR_W] = m;      lnk_oe[DIR_W] = 1'b1;
        xor_e_in     = lnk_i[DIR_E];
        xor_s_in     = lnk_i[DIR_S];
      end
      ctl.s[2]: begin
        lnk_o[DIR_E] = x_e;    lnk_oe[DIR_E] = 1'b1;
        lnk_o[DIR_S] = x_s;    lnk_oe[DIR_S] = 1'b1;
        x_w_in       = lnk_i[DIR_W];
        x_n_in       = lnk_i[DIR_N];
      end
      ctl.s[3]: begin
        lnk_o[DIR_N] = nor_ew; lnk_oe[DIR_N] = 1'b1;
        lnk_o[DIR_W] = and_ns; lnk_oe[DIR_W] = 1'b1;
        m5_in        = lnk_i[DIR_E];
        m6_in        = lnk_i[DIR_S];
      end
      ctl.s[4]: begin
        lnk_o[DIR_S] = and_ew; lnk_oe[DIR_S] = 1'b1;
        lnk_o[DIR_E] = nor_ns; lnk_oe[DIR_E] = 1'b1;
        m5_in        = lnk_i[DIR_N];
        m6_in        = lnk_i[DIR_W];
      end
      ctl.s[5]: begin
        lnk_o[DIR_N] = and_ew; lnk_oe[DIR_N] = 1'b1;
        lnk_o[DIR_W] = nor_ns; lnk_oe[DIR_W] = 1'b1;
        m5_in        = lnk_i[DIR_S];
        m6_in        = lnk_i[DIR_E];
      end
      ctl.s[6]: begin
        lnk_o[DIR_S] = nor_ew; lnk_oe[DIR_S] = 1'b1;
        lnk_o[DIR_E] = and_ns; lnk_oe[DIR_E] = 1'b1;
        m5_in        = lnk_i[DIR_W];
        m6_in        = lnk_i[DIR_N];
      end
      default: ;
    endcase
  end

endmodule
