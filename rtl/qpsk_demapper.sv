// qpsk_demapper: DQPSK demapper (2 Mb/s). The phase difference is rounded to
// the nearest quarter turn q and mapped to the dibit (d0,d1) of 802.11
// DQPSK: 0 -> 00, pi/2 -> 01, pi -> 11, 3pi/2 -> 10. The two bits leave
// one after the other, d0 first, both with the input's ID. A new phase is
// taken only when both bits of the previous one have been accepted.
module qpsk_demapper
  import radio_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  logic   in_valid,
  output logic   in_ready,
  input  phase_t in_data,
  input  id_t    in_id,
  output logic   out_valid,
  input  logic   out_ready,
  output logic   out_data,
  output id_t    out_id
);
  phase_t r;
  logic [1:0] q;
  logic d1, second;
  assign r = in_data + phase_t'(1 << (PHASE_W-3));
  assign q = r[PHASE_W-1 -: 2];
  // can take a phase when nothing is held, or when the last bit leaves now
  assign in_ready = !out_valid || (second && out_ready);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= 1'b0; out_id <= '0; d1 <= 1'b0; second <= 1'b0;
    end else if (init) begin
      out_valid <= 1'b0; second <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_data  <= q[1];
        d1        <= q[1] ^ q[0];
        out_id    <= in_id;
        second    <= 1'b0;
      end else if (out_valid && out_ready) begin
        if (!second) begin
          out_data <= d1; second <= 1'b1;
        end else begin
          out_valid <= 1'b0; second <= 1'b0;
        end
      end
    end
endmodule
