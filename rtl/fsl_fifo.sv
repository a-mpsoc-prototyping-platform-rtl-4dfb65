// fsl_fifo: one Fast Simplex Link FIFO between the MAC and PLCP processors.
// The writing processor uses the master side (m_data, m_control, m_write,
// m_full); the reading processor uses the slave side (s_data, s_control,
// s_exists, s_read). Words are W bits plus the FSL control bit; a write
// while full is ignored. Both processors share one clock here.
module fsl_fifo #(
  parameter int W = 32,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] m_data,
  input  logic         m_control,
  input  logic         m_write,
  output logic         m_full,
  output logic [W-1:0] s_data,
  output logic         s_control,
  output logic         s_exists,
  input  logic         s_read,
  output logic [$clog2(DEPTH):0] level
);
  logic in_ready;
  sync_fifo #(.W(W+1), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clr(1'b0),
    .in_valid(m_write), .in_ready, .in_data({m_control, m_data}),
    .out_valid(s_exists), .out_ready(s_read), .out_data({s_control, s_data}), .count(level));
  assign m_full = !in_ready;
endmodule
