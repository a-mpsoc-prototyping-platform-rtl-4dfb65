// dp_ram: true dual-port block RAM of WORDS 32-bit words with byte enables,
// one bus port per side. Each port writes the bytes selected by be on a
// write request and returns the addressed word one cycle after a read
// request (synchronous read). The word index is addr[.. :2]; addresses wrap
// inside the memory. Used for the OS/MAC shared memory, where packet
// descriptors and data live, and for the processors' local memories.
// Simultaneous writes of one word from both ports leave either value.
module dp_ram
  import radio_pkg::*;
#(
  parameter int WORDS = 4096
) (
  input  logic        clk,
  input  bus_req_t    a_req,
  output logic [31:0] a_rdata,
  input  bus_req_t    b_req,
  output logic [31:0] b_rdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] aa, ba;
  assign aa = a_req.addr[AW+1:2];
  assign ba = b_req.addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (a_req.cs && a_req.we)
      for (int b = 0; b < 4; b++) if (a_req.be[b]) mem[aa][8*b +: 8] <= a_req.wdata[8*b +: 8];
    if (a_req.cs && !a_req.we) a_rdata <= mem[aa];
  end
  always_ff @(posedge clk) begin
    if (b_req.cs && b_req.we)
      for (int b = 0; b < 4; b++) if (b_req.be[b]) mem[ba][8*b +: 8] <= b_req.wdata[8*b +: 8];
    if (b_req.cs && !b_req.we) b_rdata <= mem[ba];
  end
endmodule
