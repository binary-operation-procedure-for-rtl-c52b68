// cr_latch - one-bit memory cell with a conditional reset.
//
// The cell is a storage bit that can only be forced to 1 (preset, or load
// of an acquired 1) and otherwise only be pulled down: when reset_en is high
// and the pull-down network input pdn conducts, the bit is cleared. Every
// latch of a pixel (m and m1..m6) is one of these; latch m additionally uses
// load/d to take the binary pixel signal at the start of a run.
//
// The circuit is a cross-coupled inverter pair with an NMOS pull-down
// network; here it is modelled as a flip-flop whose new value is taken at the
// rising clock edge that ends a time unit. Priority is load, then preset,
// then conditional reset (the control sequence never asserts two at once).
// rst_n is an asynchronous clear added for simulation start-up.
//
// Interface: q is the stored bit, valid from the clock edge that ends the
// time unit which wrote it. (The circuit also offers the complement; users
// here invert q where they need it.)
module cr_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic d,
  input  logic preset,
  input  logic reset_en,
  input  logic pdn,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q <= 1'b0;
    else if (load)           q <= d;
    else if (preset)         q <= 1'b1;
    else if (reset_en && pdn) q <= 1'b0;
  end

endmodule
