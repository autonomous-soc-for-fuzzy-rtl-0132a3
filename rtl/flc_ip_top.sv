// flc_ip_top: Fast Simplex Link (FSL) wrapper of the fuzzy logic processor.
//
// This is the co-processor the soft processor drives: it pops one 32-bit
// word from its FSL slave channel per computation, hands the two 12-bit
// controller inputs to dflp_core, and pushes every crisp output back on its
// FSL master channel, sign-extended to 32 bits.
//
//   fsl_s_data[11:0]  = input 1 (phi_1 code)   fsl_m_data = {{20{y[11]}}, y}
//   fsl_s_data[27:16] = input 2 (phi_2 code)   fsl_m_control = 0
//
// The FSL signals follow the usual FIFO link convention: the slave side
// offers a word with fsl_s_exists and this block takes it by raising
// fsl_s_read in the same cycle; the master side writes with fsl_m_write
// whenever fsl_m_full is low.
//
// The core pipeline cannot stall, so results go into an OUT_FIFO_DEPTH-entry
// result FIFO and a word is only taken when a FIFO entry is reserved for its
// result (credit count = samples in flight + results waiting). With a
// non-full master link the wrapper keeps the core at its full rate of one
// sample every 2^IP_NO clocks; a full link throttles the input side.
// The word packing, the FIFO and the credit scheme are this design's; the
// role of the wrapper (FSL-compliant peripheral logic around the core)
// follows the processor description.
module flc_ip_top
  import dflp_pkg::*;
#(
  parameter int OUT_FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst,
  // FSL slave (processor -> DFLP)
  input  logic [31:0] fsl_s_data,
  input  logic        fsl_s_control,
  input  logic        fsl_s_exists,
  output logic        fsl_s_read,
  // FSL master (DFLP -> processor)
  output logic [31:0] fsl_m_data,
  output logic        fsl_m_control,
  output logic        fsl_m_write,
  input  logic        fsl_m_full
);
  localparam int PW = $clog2(OUT_FIFO_DEPTH);
  localparam int CW = $clog2(OUT_FIFO_DEPTH + 1);

  logic                    core_ready, core_valid, accept;
  logic                    y_valid;
  logic signed [OP_SZ-1:0] y;
  x_t [IP_NO-1:0]          x_in;

  logic [CW-1:0]           credits_used;   // in flight + waiting in FIFO
  logic [CW-1:0]           fifo_cnt;
  logic [PW-1:0]           wr_ptr, rd_ptr;
  logic [OP_SZ-1:0]        fifo [OUT_FIFO_DEPTH];
  logic                    pop;

  assign x_in[0]    = fsl_s_data[IP_SZ-1:0];
  assign x_in[1]    = fsl_s_data[16 +: IP_SZ];
  assign core_valid = fsl_s_exists && (credits_used < CW'(OUT_FIFO_DEPTH));
  assign accept     = core_valid && core_ready;
  assign fsl_s_read = accept;

  dflp_core u_fpga_fc (
    .clk, .rst, .in_valid(core_valid), .in_ready(core_ready), .x(x_in),
    .out_valid(y_valid), .y(y));

  assign pop           = (fifo_cnt != '0) && !fsl_m_full;
  assign fsl_m_write   = pop;
  assign fsl_m_data    = {{(32-OP_SZ){fifo[rd_ptr][OP_SZ-1]}}, fifo[rd_ptr]};
  assign fsl_m_control = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      credits_used <= '0;
      fifo_cnt     <= '0;
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      for (int i = 0; i < OUT_FIFO_DEPTH; i++) fifo[i] <= '0;
    end else begin
      credits_used <= credits_used + CW'(accept) - CW'(pop);
      fifo_cnt     <= fifo_cnt + CW'(y_valid) - CW'(pop);
      if (y_valid) begin
        fifo[wr_ptr] <= y;
        wr_ptr       <= (int'(wr_ptr) == OUT_FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      end
      if (pop)
        rd_ptr <= (int'(rd_ptr) == OUT_FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
    end
  end

`ifndef SYNTHESIS
  // The credit scheme guarantees the result FIFO never overflows.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    y_valid |-> (fifo_cnt < CW'(OUT_FIFO_DEPTH) || pop));
`endif
endmodule
