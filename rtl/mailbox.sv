// mailbox: message passing between the OS processor (port A) and the MAC
// processor (port B). Each direction is a DEPTH-entry FIFO of 32-bit words.
// Per port, byte offsets: 0x0 write = send a word to the other side (lost if
// that FIFO is full); 0x4 read = take the oldest received word (0 if none);
// 0x8 read = status {16'(receive count), 14'b0, send FIFO full, receive
// FIFO empty}. irq_a / irq_b are high while a word waits for that side and
// feed the interrupt controllers. Reads return one cycle after the request.
module mailbox
  import radio_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    a_req,
  output logic [31:0] a_rdata,
  output logic        irq_a,
  input  bus_req_t    b_req,
  output logic [31:0] b_rdata,
  output logic        irq_b
);
  localparam int CW = $clog2(DEPTH) + 1;
  logic ab_ready, ab_valid, ba_ready, ba_valid;
  logic [31:0] ab_head, ba_head;
  logic [CW-1:0] ab_cnt, ba_cnt;
  logic a_push, a_pop, b_push, b_pop;

  assign a_push = a_req.cs &&  a_req.we && a_req.addr[3:2] == 2'd0;
  assign a_pop  = a_req.cs && !a_req.we && a_req.addr[3:2] == 2'd1;
  assign b_push = b_req.cs &&  b_req.we && b_req.addr[3:2] == 2'd0;
  assign b_pop  = b_req.cs && !b_req.we && b_req.addr[3:2] == 2'd1;

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_ab (.clk, .rst_n, .clr(1'b0),
    .in_valid(a_push), .in_ready(ab_ready), .in_data(a_req.wdata),
    .out_valid(ab_valid), .out_ready(b_pop), .out_data(ab_head), .count(ab_cnt));
  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_ba (.clk, .rst_n, .clr(1'b0),
    .in_valid(b_push), .in_ready(ba_ready), .in_data(b_req.wdata),
    .out_valid(ba_valid), .out_ready(a_pop), .out_data(ba_head), .count(ba_cnt));

  assign irq_a = ba_valid;
  assign irq_b = ab_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_rdata <= '0; b_rdata <= '0;
    end else begin
      if (a_req.cs && !a_req.we)
        case (a_req.addr[3:2])
          2'd1: a_rdata <= ba_valid ? ba_head : '0;
          2'd2: a_rdata <= {16'(ba_cnt), 14'b0, !ab_ready, !ba_valid};
          default: a_rdata <= '0;
        endcase
      if (b_req.cs && !b_req.we)
        case (b_req.addr[3:2])
          2'd1: b_rdata <= ab_valid ? ab_head : '0;
          2'd2: b_rdata <= {16'(ab_cnt), 14'b0, !ba_ready, !ab_valid};
          default: b_rdata <= '0;
        endcase
    end
endmodule
