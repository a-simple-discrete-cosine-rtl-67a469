// zout_stage: latch and multiplexer with storage element of one PE.
//
// The finished results of the PEs leave the array through a chain of these
// stages, toward the multiplier at the left end. When 'pump' (the RPX
// signal) is high the stage loads its own PE's result, held in Latch#3;
// otherwise it takes the value of the stage to its right, so after a pump
// the N results shift out one per clock, Z(0) first. The rightmost stage
// is fed zero.
//
// Interface: own_in (this PE's result), adj_in (from the adjacent cell to
// the right), pump, z_out (to the cell on the left / the multiplier).
// Timing: one register; z_out changes on the clock edge after pump/adj_in.
// The stage itself (a multiplexer with storage fed by the PE's result latch
// and by the adjacent cell) follows the original design; the meaning of
// pump = 1 (load own result) and the zero fill are this design's choices.
module zout_stage #(
  parameter int W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pump,
  input  logic signed [W-1:0] own_in,
  input  logic signed [W-1:0] adj_in,
  output logic signed [W-1:0] z_out
);

  always_ff @(posedge clk) begin
    if (!rst_n)    z_out <= '0;
    else if (pump) z_out <= own_in;
    else           z_out <= adj_in;
  end

endmodule
