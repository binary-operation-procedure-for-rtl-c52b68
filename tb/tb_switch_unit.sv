// tb_switch_unit - self-checking testbench of the per-pixel switch unit.
// For each of the six transfer time units (and for no select) it applies
// random local values and link inputs and checks which links are driven,
// with which value, and which link reaches each latch input, against the
// routing table of the pixel circuit written out independently below.
module tb_switch_unit;
  import thin_pkg::*;
  ctl_t       ctl;
  logic       m, x_e, x_s, and_ew, nor_ew, and_ns, nor_ns;
  logic [3:0] lnk_i, lnk_o, lnk_oe;
  logic       xor_e_in, xor_s_in, x_w_in, x_n_in, m5_in, m6_in;
  int checks = 0, failures = 0;

  switch_unit dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("ERROR s=%b %s got %b exp %b", ctl.s, what, got, exp);
    end
  endtask

  initial begin
    logic [3:0] eo, ev;  // expected enables / values, [N,E,S,W]
    logic e_xe, e_xs, e_xw, e_xn, e_m5, e_m6;
    for (int it = 0; it < 400; it++) begin
      for (int k = 0; k <= 6; k++) begin
        ctl = CTL_IDLE;
        if (k > 0) ctl.s[k] = 1'b1;
        {m, x_e, x_s, and_ew, nor_ew, and_ns, nor_ns} = 7'($urandom);
        lnk_i = 4'($urandom);
        eo = '0; ev = '0;
        {e_xe, e_xs, e_xw, e_xn, e_m5, e_m6} = '0;
        // bit order of eo/ev: [0]=N [1]=E [2]=S [3]=W
        case (k)
          1: begin eo = 4'b1001; ev = {m, 1'b0, 1'b0, m};
                   e_xe = lnk_i[1]; e_xs = lnk_i[2]; end
          2: begin eo = 4'b0110; ev = {1'b0, x_s, x_e, 1'b0};
                   e_xw = lnk_i[3]; e_xn = lnk_i[0]; end
          3: begin eo = 4'b1001; ev = {and_ns, 1'b0, 1'b0, nor_ew};
                   e_m5 = lnk_i[1]; e_m6 = lnk_i[2]; end
          4: begin eo = 4'b0110; ev = {1'b0, and_ew, nor_ns, 1'b0};
                   e_m5 = lnk_i[0]; e_m6 = lnk_i[3]; end
          5: begin eo = 4'b1001; ev = {nor_ns, 1'b0, 1'b0, and_ew};
                   e_m5 = lnk_i[2]; e_m6 = lnk_i[1]; end
          6: begin eo = 4'b0110; ev = {1'b0, nor_ew, and_ns, 1'b0};
                   e_m5 = lnk_i[3]; e_m6 = lnk_i[0]; end
          default: ;
        endcase
        #1;
        chk("lnk_oe", lnk_oe == eo, 1'b1);
        chk("lnk_o", lnk_o == ev, 1'b1);
        chk("xor_e_in", xor_e_in, e_xe);
        chk("xor_s_in", xor_s_in, e_xs);
        chk("x_w_in", x_w_in, e_xw);
        chk("x_n_in", x_n_in, e_xn);
        chk("m5_in", m5_in, e_m5);
        chk("m6_in", m6_in, e_m6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
