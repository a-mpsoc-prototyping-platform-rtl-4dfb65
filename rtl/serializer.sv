// serializer: sends each byte as 8 bits, bit 0 first (802.11 order), each
// with the byte's ID. A new byte is taken when the last bit of the previous
// one leaves (or when idle).
module serializer
  import radio_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  id_t        in_id,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_data,
  output id_t        out_id
);
  logic [7:0] sh;
  logic [2:0] n;        // bits of the current byte already sent
  assign out_data = sh[0];
  assign in_ready = !out_valid || (out_ready && n == 3'd7);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sh <= '0; n <= '0; out_valid <= 1'b0; out_id <= '0;
    end else if (init) begin
      n <= '0; out_valid <= 1'b0;
    end else if (in_valid && in_ready) begin
      sh <= in_data; n <= '0; out_valid <= 1'b1; out_id <= in_id;
    end else if (out_valid && out_ready) begin
      sh <= sh >> 1;
      n  <= n + 1'b1;
      if (n == 3'd7) out_valid <= 1'b0;
    end
endmodule
