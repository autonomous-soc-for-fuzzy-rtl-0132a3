// pipe_delay: DEPTH register stages on a WIDTH-bit bus.
//
// Used for the component pipeline registers (CPR) behind each DFLP component
// and for the path synchronisation registers (PSR) that realign side paths.
// DEPTH = 0 gives a plain connection, so a pipeline depth can be set to zero
// from a parameter. The registers have no reset and no enable: the DFLP
// pipeline never stalls, and every path carries its own valid bit, which is
// itself delayed by a resettable instance (RESET = 1).
module pipe_delay #(
  parameter int WIDTH = 1,
  parameter int DEPTH = 1,
  parameter bit RESET = 1'b0   // clear the stages on rst
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (RESET && rst) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
