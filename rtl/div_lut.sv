// div_lut: reciprocal look-up divider, the processor's second divider type.
//
// Approximates y = (num * 2^FRAC) / den without a divider array: a table
// holds R(den) = round(2^RS / den) for every possible denominator
// (2^DEN_W entries, computed at elaboration), and the quotient is
// (|num| * 2^FRAC * R(den)) >> RS with the sign put back, so it is rounded
// toward zero from a slightly rounded reciprocal. The result can differ
// from the exact truncated quotient by one output LSB. It saturates to the
// signed OP_SZ-bit range, and den = 0 gives 0, as in div_array.
// The divider type (0 restoring array, 1 reciprocal LUT) is a generic of the
// processor; the table size, RS and rounding are this design's. Timing:
// combinational (table read and one multiply), then CPR register stages.
module div_lut
  import dflp_pkg::*;
#(
  parameter int CPR = 2,
  parameter int RS  = 20   // reciprocal scale: R(den) = round(2^RS / den)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [NUM_W-1:0]  num,
  input  logic        [DEN_W-1:0]  den,
  output logic                     out_valid,
  output logic signed [OP_SZ-1:0]  q
);
  localparam int RW = RS + 1;                  // R(1) = 2^RS needs RS+1 bits
  localparam int PW = NUM_W + FRAC + RW;       // product width

  typedef logic [RW-1:0] recip_t;

  function automatic recip_t recip(input int d);
    longint one = longint'(1) << RS;
    if (d == 0) return '0;
    return recip_t'((one + longint'(d) / 2) / longint'(d));
  endfunction

  typedef recip_t [2**DEN_W-1:0] rtab_t;

  function automatic rtab_t make_rtab();
    rtab_t t;
    for (int d = 0; d < 2**DEN_W; d++) t[d] = recip(d);
    return t;
  endfunction

  localparam rtab_t RTAB = make_rtab();

  logic signed [OP_SZ-1:0] q_c;

  always_comb begin
    logic             neg;
    logic [NUM_W-1:0] mag;
    logic [PW-1:0]    prod;
    logic [PW-1:0]    quo;
    neg  = num[NUM_W-1];
    mag  = neg ? NUM_W'(-num) : NUM_W'(num);
    prod = (PW'(mag) << FRAC) * PW'(RTAB[den]);
    quo  = prod >> RS;
    if (den == '0)
      q_c = '0;
    else if (!neg && quo > PW'(2 ** (OP_SZ - 1) - 1))
      q_c = {1'b0, {(OP_SZ-1){1'b1}}};
    else if (neg && quo > PW'(2 ** (OP_SZ - 1)))
      q_c = {1'b1, {(OP_SZ-1){1'b0}}};
    else
      q_c = neg ? -OP_SZ'(quo) : OP_SZ'(quo);
  end

  pipe_delay #(.WIDTH(OP_SZ), .DEPTH(CPR)) u_cpr_d (.clk, .rst, .d(q_c), .q(q));
  pipe_delay #(.WIDTH(1), .DEPTH(CPR), .RESET(1'b1)) u_cpr_v (.clk, .rst, .d(in_valid), .q(out_valid));
endmodule
