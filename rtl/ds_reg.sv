// ds_reg: double-sampling, error-detecting pipeline register.
//
// A main flip-flop captures the stage output at the clock edge; a shadow
// element samples the same signal a fixed time later (on a delayed clock),
// when even a slow path has settled. If the two samples differ the main
// flip-flop caught a value that had not yet arrived: 'error' is raised for one
// cycle, during which 'q' holds the wrong value, and at the next edge the
// main flip-flop is reloaded from the shadow sample through the selector in
// front of it. This is the detection and one-cycle recovery scheme of the
// design; the surrounding lane stalls for exactly that cycle.
//
// Synchronous RTL cannot miss a setup time, so the two samples are separate
// inputs: 'd_shadow' is the settled value and 'd_main' what the main
// flip-flop saw. They are equal in normal operation; driving them apart
// represents a timing violation. The shadow element is modelled as a register
// on the same clock edge (the delayed clock itself is not modelled); this is
// this design's own simplification.
//
// Timing: samples taken at edge k with en=1 appear on q after edge k; if they
// differed, error=1 after edge k, and after edge k+1 q = shadow sample and
// error=0. While error=1 the register ignores en and new data.
module ds_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // capture new data (stage not stalled)
  input  logic [WIDTH-1:0] d_main,    // value seen at the main clock edge
  input  logic [WIDTH-1:0] d_shadow,  // value seen at the delayed clock
  output logic [WIDTH-1:0] q,
  output logic             error
);

  logic [WIDTH-1:0] shadow_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      shadow_q <= '0;
      error    <= 1'b0;
    end else if (error) begin
      // recovery: restart from the correct shadow sample
      q     <= shadow_q;
      error <= 1'b0;
    end else if (en) begin
      q        <= d_main;
      shadow_q <= d_shadow;
      error    <= (d_main != d_shadow);
    end
  end

endmodule
