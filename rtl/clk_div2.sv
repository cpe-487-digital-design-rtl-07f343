// clk_div2: divide-by-two clock generator.
//
// Makes the 25 MHz VGA pixel clock from the 50 MHz board clock with a single
// toggle flip-flop, so clk_out has a 50% duty cycle and a rising edge on every
// second rising edge of clk_in. This is how the board design derives its pixel
// clock. The flip-flop has no reset on purpose: it keeps toggling while the
// rest of the design is held in reset, so the logic clocked by clk_out sees
// clock edges, and therefore its synchronous reset, during reset. Its phase
// relative to clk_in after power-up does not matter.
//
// Interface: clk_in (50 MHz), clk_out (25 MHz), which changes on every rising
// edge of clk_in.
module clk_div2 (
  input  logic clk_in,
  output logic clk_out
);

  always_ff @(posedge clk_in) begin
    clk_out <= ~clk_out;
  end

endmodule
