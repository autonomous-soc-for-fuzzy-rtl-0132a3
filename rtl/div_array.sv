// div_array: restoring array divider, the weighted-average defuzzifier.
//
// Computes y = (num * 2^FRAC) / den, where num is the signed sum of
// alpha*singleton terms and den the unsigned sum of firing strengths. FRAC =
// OP_SZ - CS_SZ scales the 8-bit singleton range to the 12-bit output range.
// The magnitude of the dividend goes through a combinational array of
// NUM_W+FRAC restoring stages (shift in one bit, subtract den if it fits, set
// the quotient bit); the sign is put back afterwards, so the quotient is
// truncated toward zero, and it saturates to the signed OP_SZ-bit range.
// A zero denominator (no rule fired) gives 0 (our choice).
// The restoring array type and its two pipeline stages (cpr9_no = 2) follow
// the processor's divider configuration; in_valid travels with the data.
module div_array
  import dflp_pkg::*;
#(
  parameter int CPR = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [NUM_W-1:0]  num,
  input  logic        [DEN_W-1:0]  den,
  output logic                     out_valid,
  output logic signed [OP_SZ-1:0]  q
);
  localparam int QW = NUM_W + FRAC;

  logic signed [OP_SZ-1:0] q_c;

  always_comb begin
    logic [QW-1:0]    dividend;
    logic [QW-1:0]    quo;
    logic [DEN_W:0]   rem;
    logic [DEN_W+1:0] trial;
    logic             neg;
    logic [NUM_W-1:0] mag;
    logic signed [OP_SZ-1:0] sq;
    neg      = num[NUM_W-1];
    mag      = neg ? NUM_W'(-num) : NUM_W'(num);
    dividend = QW'(mag) << FRAC;
    rem      = '0;
    quo      = '0;
    for (int i = QW - 1; i >= 0; i--) begin
      trial = {rem, dividend[i]} - {2'b00, den};
      if (!trial[DEN_W+1]) begin
        rem    = trial[DEN_W:0];
        quo[i] = 1'b1;
      end else begin
        rem    = {rem[DEN_W-1:0], dividend[i]};
      end
    end
    sq = neg ? -OP_SZ'(quo) : OP_SZ'(quo);
    if (den == '0)
      q_c = '0;
    else if (!neg && quo > QW'(2 ** (OP_SZ - 1) - 1))
      q_c = {1'b0, {(OP_SZ-1){1'b1}}};
    else if (neg && quo > QW'(2 ** (OP_SZ - 1)))
      q_c = {1'b1, {(OP_SZ-1){1'b0}}};
    else
      q_c = sq;
  end

  pipe_delay #(.WIDTH(OP_SZ), .DEPTH(CPR)) u_cpr_d (.clk, .rst, .d(q_c), .q(q));
  pipe_delay #(.WIDTH(1), .DEPTH(CPR), .RESET(1'b1)) u_cpr_v (.clk, .rst, .d(in_valid), .q(out_valid));
endmodule
