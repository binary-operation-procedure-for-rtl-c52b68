// iter_sequencer - global control sequence of the thinning array.
//
// A run performs n_iter iterations; each iteration is two sub-iterations of
// eight time units (one clock cycle each):
//
//   unit 0      preset_o (and load_m in the first unit of the run only)
//   units 1..6  s[1] .. s[6], one per unit
//   unit 7      end_sub1 in the first sub-iteration, end_sub2 in the second
//
// so a run lasts 16 * n_iter cycles from the first control cycle to the last
// end_sub2; done pulses in the cycle after it. The order and number of the
// pulses are those of the circuit's timing chart; the start/busy/done
// handshake and the iteration counter are this design's own (n_iter = 0 is
// run as one iteration). start is ignored while busy. Outside a run the
// control word is idle (all 0), so the pixels hold their values.
module iter_sequencer
  import thin_pkg::*;
#(
  parameter int unsigned ITER_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ITER_W-1:0] n_iter,
  output ctl_t              ctl,
  output logic              busy,
  output logic              done
);

  logic [2:0]        tu;       // time unit within the sub-iteration
  logic              sub2;     // second sub-iteration
  logic              first;    // first time unit of the run
  logic [ITER_W-1:0] it_left;  // iterations left after the current one

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      tu      <= '0;
      sub2    <= 1'b0;
      first   <= 1'b0;
      it_left <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          first   <= 1'b1;
          tu      <= '0;
          sub2    <= 1'b0;
          it_left <= (n_iter == '0) ? '0 : n_iter - 1'b1;
        end
      end else begin
        first <= 1'b0;
        tu    <= tu + 1'b1;
        if (tu == 3'(TU_PER_SUB - 1)) begin
          sub2 <= ~sub2;
          if (sub2) begin
            if (it_left == '0) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              it_left <= it_left - 1'b1;
            end
          end
        end
      end
    end
  end

  always_comb begin
    ctl = CTL_IDLE;
    if (busy) begin
      ctl.load_m   = first;
      ctl.preset_o = (tu == 3'd0);
      for (int k = 1; k <= 6; k++) ctl.s[k] = (tu == 3'(k));
      ctl.end_sub1 = (tu == 3'd7) && !sub2;
      ctl.end_sub2 = (tu == 3'd7) && sub2;
    end
  end

endmodule
