// fsl_tx_if: PLCP interface at the head of the transmit chain. The PLCP
// processor writes 32-bit FSL words (bits 7:0 byte, bits 11:8 ID) with the
// master-side FSL handshake (m_write while m_full is low); each word becomes
// one byte with its ID on the stream output after a DEPTH-entry FIFO.
// A write while full is ignored. init empties the FIFO.
module fsl_tx_if
  import radio_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [31:0] m_data,
  input  logic        m_control,
  input  logic        m_write,
  output logic        m_full,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output id_t         out_id
);
  logic in_ready;
  logic [$clog2(DEPTH):0] cnt;
  sync_fifo #(.W(ID_W+8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clr(init),
    .in_valid(m_write), .in_ready, .in_data(m_data[ID_W+7:0]),
    .out_valid, .out_ready, .out_data({out_id, out_data}), .count(cnt));
  assign m_full = !in_ready;
  // m_control has no meaning on this link; it is accepted and ignored.
  logic unused;
  assign unused = m_control ^ (^m_data[31:ID_W+8]) ^ (^cnt);
endmodule
