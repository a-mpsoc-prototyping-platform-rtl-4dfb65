// fsl_rx_if: FSL interface FIFO at the end of the receive chain. Bytes and
// their IDs enter a DEPTH-entry FIFO; the PLCP processor reads them as
// 32-bit FSL words (bits 7:0 byte, bits 11:8 ID, the rest zero) with the
// slave-side FSL handshake: s_exists says a word waits, s_read pops it.
// The FIFO exerts back-pressure on the chain when full. init empties it.
module fsl_rx_if
  import radio_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  id_t         in_id,
  output logic [31:0] s_data,
  output logic        s_control,
  output logic        s_exists,
  input  logic        s_read
);
  logic [ID_W+7:0] head;
  logic [$clog2(DEPTH):0] cnt;
  sync_fifo #(.W(ID_W+8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clr(init),
    .in_valid, .in_ready, .in_data({in_id, in_data}),
    .out_valid(s_exists), .out_ready(s_read), .out_data(head), .count(cnt));
  assign s_data    = 32'(head);
  assign s_control = 1'b0;
endmodule
