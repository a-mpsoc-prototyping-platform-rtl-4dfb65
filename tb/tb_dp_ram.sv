// tb_dp_ram: writes random words through both ports of the shared memory
// (with random byte enables) and reads them back through the other port,
// comparing with a model array; checks the one-cycle read latency.
module tb_dp_ram;
  import radio_pkg::*;
  localparam int WORDS = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bus_req_t a_req = '0, b_req = '0; logic [31:0] a_rdata, b_rdata;
  logic [31:0] model [WORDS];
  dp_ram #(.WORDS(WORDS)) dut (.clk, .a_req, .a_rdata, .b_req, .b_rdata);
  initial begin
    for (int w = 0; w < WORDS; w++) begin
      model[w] = 32'($urandom);
      @(negedge clk);
      if (w % 2) a_req = '{cs: 1, we: 1, be: 4'hF, addr: 32'(w*4), wdata: model[w]};
      else       b_req = '{cs: 1, we: 1, be: 4'hF, addr: 32'(w*4), wdata: model[w]};
    end
    @(negedge clk); a_req = '0; b_req = '0;
    for (int n = 0; n < 2000; n++) begin
      automatic int w = $urandom_range(0, WORDS-1);
      automatic int r = $urandom_range(0, WORDS-1);
      automatic logic [3:0] be = 4'($urandom);
      automatic logic [31:0] d = 32'($urandom);
      @(negedge clk);
      // port A writes w, port B reads r (r != w)
      if (r == w) r = (w + 1) % WORDS;
      a_req = '{cs: 1, we: 1, be: be, addr: 32'(w*4), wdata: d};
      b_req = '{cs: 1, we: 0, be: 4'hF, addr: 32'(r*4), wdata: '0};
      @(negedge clk);
      checks++;
      if (b_rdata != model[r]) begin failures++; $display("FAIL read %0d", r); end
      for (int b = 0; b < 4; b++) if (be[b]) model[w][8*b +: 8] = d[8*b +: 8];
      a_req = '{cs: 1, we: 0, be: 4'hF, addr: 32'(w*4), wdata: '0};
      b_req = '0;
      @(negedge clk);
      checks++;
      if (a_rdata != model[w]) begin failures++; $display("FAIL byte write %0d", w); end
      a_req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
