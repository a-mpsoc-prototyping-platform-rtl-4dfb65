// Bus access tasks shared by the peripheral testbenches. The including
// module declares clk, a bus_req_t variable named req and a 32-bit rdata
// input. Requests are set up on the falling edge, so the slave sees them on
// the next rising edge; read data are taken on the falling edge after it.
task automatic bus_wr(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
  @(negedge clk);
  req = '{cs: 1'b1, we: 1'b1, be: be, addr: a, wdata: d};
  @(negedge clk);
  req = '0;
endtask
task automatic bus_rd(input logic [31:0] a, output logic [31:0] d);
  @(negedge clk);
  req = '{cs: 1'b1, we: 1'b0, be: 4'hF, addr: a, wdata: '0};
  @(negedge clk);
  req = '0;
  d = rdata;
endtask
