// bus_decoder: splits one processor bus port into N slave ports by address.
// Slave k owns the 64 KB window whose address bits 19:16 equal k; the
// request is passed on with its address unchanged and cs set only for that
// slave. Read data come back one cycle after the request from the slave
// selected then. Requests outside the N windows are ignored and read 0.
module bus_decoder
  import radio_pkg::*;
#(
  parameter int N = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    m_req,
  output logic [31:0] m_rdata,
  output bus_req_t    s_req   [N],
  input  logic [31:0] s_rdata [N]
);
  logic [3:0] slot, slot_q;
  logic hit_q;
  assign slot = m_req.addr[19:16];
  always_comb
    for (int k = 0; k < N; k++) begin
      s_req[k]    = m_req;
      s_req[k].cs = m_req.cs && (slot == 4'(k));
    end
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      slot_q <= '0; hit_q <= 1'b0;
    end else begin
      slot_q <= slot; hit_q <= m_req.cs && !m_req.we && (int'(slot) < N);
    end
  always_comb begin
    m_rdata = '0;
    for (int k = 0; k < N; k++)
      if (hit_q && slot_q == 4'(k)) m_rdata = s_rdata[k];
  end
endmodule
